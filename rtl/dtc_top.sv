// dtc_top: direct torque control of an induction motor, estimation part and
// control part closed into one loop.
//
// Every sample period (Ts, 100 us by default) the surrounding system pulses
// sample_valid with the two measured phase currents and the flux and torque
// references. The estimator integrates the stator flux over the period that
// just ended, using the switching state that the inverter applied during it
// (sw, held in this block), and computes flux magnitude, flux angle and
// torque. The control part turns these into the next switching state, which
// is registered into sw and applied for the next period.
//
//   isa,isb -----> flux_torque_estimator --(phi_mag, phi_ang, te)--> dtc_control --> sw
//                        ^                                                            |
//                        +------------------ applied switching state ------------------+
//
// Timing: sw changes N_ITER + 7 clocks (17 at the defaults)
// after sample_valid, with a one-clock sw_valid pulse. busy is high in
// between; a new sample must not arrive while busy is high, since it would
// use the old switching state (an assertion checks this). At any clock rate
// above about 0.2 MHz the loop finishes well inside a 100 us period.
// rst_n (synchronous, active low) zeroes the flux and selects the zero
// vector; clear zeroes only the flux integrators.
// The speed controller that produces te_ref, the inverter and the motor are
// outside this block.
module dtc_top
  import dtc_pkg::*;
#(
  parameter real RS     = 10.0,
  parameter real TS     = 100.0e-6,
  parameter int  P      = 2,
  parameter int  N_ITER = 10,
  parameter real ZN     = 0.6073
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    sample_valid,
  input  cur_t    isa,
  input  cur_t    isb,
  input  flux_t   phi_ref,
  input  te_t     te_ref,
  output sw_vec_t sw,
  output logic    sw_valid,
  output logic    busy,
  // estimator results of the last sample
  output logic    est_valid,
  output flux_t   phi_alpha,
  output flux_t   phi_beta,
  output flux_t   phi_mag,
  output ang_t    phi_ang,
  output te_t     te,
  // control decisions of the last sample
  output sector_t sector,
  output logic    cflx,
  output te_cmp_t ccpl
);
  // References are captured with the sample so they stay steady until the
  // control part uses them.
  flux_t phi_ref_q;
  te_t   te_ref_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phi_ref_q <= '0;
      te_ref_q  <= '0;
    end else if (sample_valid) begin
      phi_ref_q <= phi_ref;
      te_ref_q  <= te_ref;
    end
  end

  flux_torque_estimator #(
    .RS(RS), .TS(TS), .P(P), .N_ITER(N_ITER), .ZN(ZN)
  ) u_est (
    .clk, .rst_n, .clear,
    .in_valid(sample_valid), .isa, .isb, .sw,
    .out_valid(est_valid),
    .phi_alpha, .phi_beta, .phi_mag, .phi_ang, .te
  );

  // The control part's output register holds the applied switching state:
  // it changes only when a new decision is made and resets to 000.
  dtc_control u_ctl (
    .clk, .rst_n, .in_valid(est_valid),
    .phi_mag, .phi_ang, .te_est(te),
    .phi_ref(phi_ref_q), .te_ref(te_ref_q),
    .out_valid(sw_valid), .sw,
    .sector, .cflx, .ccpl
  );

  // busy: from the clock after sample_valid up to, not including, the clock
  // in which sw_valid is high.
  logic in_flight;
  always_ff @(posedge clk) begin
    if (!rst_n)            in_flight <= 1'b0;
    else if (sample_valid) in_flight <= 1'b1;
    else if (sw_valid)     in_flight <= 1'b0;
  end
  assign busy = in_flight & ~sw_valid;

  a_one_sample_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
                                           sample_valid |-> !busy);
endmodule
