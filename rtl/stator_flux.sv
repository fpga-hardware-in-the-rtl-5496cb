// stator_flux: Euler integration of the stator flux in the alpha-beta frame,
//   phi <= phi + Ts * (vs - Rs * is)       (one update per sample)
// done for both axes in parallel. Each axis is the structure of a discrete
// integrator: a constant Rs multiply, a subtractor, a constant Ts multiply,
// an adder and a one-sample register closing the loop.
//
// The running sums are kept in ACC_W-bit accumulators with ACC_F fractional
// bits, far finer than the 16-bit flux output, so that the small increments
// of one sample (tens of mWb at most) are not lost to rounding; the outputs
// are the accumulators rounded and saturated to Q4.12. Rs is a Q8.8
// constant, Ts a constant with TS_F fractional bits.
//
// Timing: on a clock with in_valid high the accumulators take the new sum and
// out_valid rises one clock later with the new flux. The inputs sampled with
// in_valid are the voltage applied over the sample period that just ended and
// the current measured at its end. clear (synchronous) zeroes the flux.
// Rs = 10 ohm comes from the motor data; the sample time Ts is a parameter
// whose 100 us default is this design's choice.
module stator_flux
  import dtc_pkg::*;
#(
  parameter real RS    = 10.0,     // stator resistance, ohm
  parameter real TS    = 100.0e-6, // sample time, s
  parameter int  ACC_W = 32,
  parameter int  ACC_F = 24
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  volt_t vs_alpha,
  input  volt_t vs_beta,
  input  cur_t  is_alpha,
  input  cur_t  is_beta,
  output logic  out_valid,
  output flux_t phi_alpha,
  output flux_t phi_beta
);
  localparam int     RS_F = 8;
  localparam int     TS_F = 40;
  localparam longint RS_C = to_fix(RS, RS_F);
  localparam longint TS_C = to_fix(TS, TS_F);

  logic signed [ACC_W-1:0] acc_a, acc_b;

  // Back-EMF term (vs - Rs*is) in volts with CUR_F fractional bits, then the
  // flux increment Ts*(...) with ACC_F fractional bits.
  function automatic longint increment(volt_t v, cur_t i);
    longint emf;
    emf = (longint'(v) <<< (CUR_F - VOLT_F)) - rshift_round(RS_C * longint'(i), RS_F);
    return rshift_round(emf * TS_C, CUR_F + TS_F - ACC_F);
  endfunction

  longint next_a, next_b;
  always_comb begin
    next_a = sat(longint'(acc_a) + increment(vs_alpha, is_alpha), ACC_W);
    next_b = sat(longint'(acc_b) + increment(vs_beta,  is_beta),  ACC_W);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      acc_a     <= '0;
      acc_b     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        acc_a <= ACC_W'(next_a);
        acc_b <= ACC_W'(next_b);
      end
    end
  end

  assign phi_alpha = flux_t'(sat(rshift_round(longint'(acc_a), ACC_F - FLUX_F), FLUX_W));
  assign phi_beta  = flux_t'(sat(rshift_round(longint'(acc_b), ACC_F - FLUX_F), FLUX_W));
endmodule
