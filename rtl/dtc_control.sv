// dtc_control: the control part of the DTC drive. From the estimated flux
// magnitude and angle, the estimated torque and the two references it
// chooses the next inverter switching state.
//
//   phi_ang ----------------> sector_select -----+
//   phi_ref, phi_mag -------> flux_hysteresis ---+--> switching_table --> reg --> sw
//   te_ref,  te_est --------> torque_hysteresis -+
//
// The three front blocks work in parallel, one register stage each; the
// switching table is combinational and its result is registered, so sw and
// out_valid follow in_valid by 2 clocks. sector, cflx and ccpl expose the
// intermediate decisions of the same sample, registered with sw. The inputs are used on the in_valid clock only.
module dtc_control
  import dtc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  flux_t   phi_mag,
  input  ang_t    phi_ang,
  input  te_t     te_est,
  input  flux_t   phi_ref,
  input  te_t     te_ref,
  output logic    out_valid,
  output sw_vec_t sw,
  output sector_t sector,
  output logic    cflx,
  output te_cmp_t ccpl
);
  logic    sec_v, flx_v, te_v;
  sector_t sec1;
  logic    cflx1;
  te_cmp_t ccpl1;

  sector_select u_sector (
    .clk, .rst_n, .in_valid, .angle(phi_ang),
    .out_valid(sec_v), .sector(sec1)
  );

  flux_hysteresis u_flux_cmp (
    .clk, .rst_n, .in_valid, .phi_ref, .phi_est(phi_mag),
    .out_valid(flx_v), .cflx(cflx1)
  );

  torque_hysteresis u_te_cmp (
    .clk, .rst_n, .in_valid, .te_ref, .te_est,
    .out_valid(te_v), .ccpl(ccpl1)
  );

  sw_vec_t sw_next;
  switching_table u_table (
    .sector(sec1), .cflx(cflx1), .ccpl(ccpl1), .sw(sw_next)
  );

  // The decisions are registered with the vector so that all outputs of a
  // sample stay together even when samples arrive on consecutive clocks.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sw        <= '0;
      sector    <= 3'd1;
      cflx      <= 1'b0;
      ccpl      <= TE_HOLD;
    end else begin
      out_valid <= sec_v;
      if (sec_v) begin
        sw     <= sw_next;
        sector <= sec1;
        cflx   <= cflx1;
        ccpl   <= ccpl1;
      end
    end
  end

  a_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                              sec_v == flx_v && sec_v == te_v);
endmodule
