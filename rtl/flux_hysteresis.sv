// flux_hysteresis: two-level stator flux comparator. The flux error
// phi_ref - phi_est is compared with the band threshold (zero, as published):
// cflx = 1 (raise the flux, delta phi = +1) when the error is above it,
// cflx = 0 (lower the flux, delta phi = -1) otherwise.
// Timing: one register stage; cflx and out_valid follow in_valid by one
// clock.
module flux_hysteresis
  import dtc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flux_t phi_ref,
  input  flux_t phi_est,
  output logic  out_valid,
  output logic  cflx
);
  logic signed [FLUX_W:0] err;
  assign err = (FLUX_W+1)'(phi_ref) - (FLUX_W+1)'(phi_est);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      cflx      <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) cflx <= (err > 0);
    end
  end
endmodule
