// ab_current: stator current transform from two measured phase currents
// (a, b) to the stationary alpha-beta frame, in the power-invariant form
//   is_alpha = sqrt(3/2) * isa                    (gain 1.225)
//   is_beta  = (isa + 2*isb) / sqrt(2)            (gains 0.7071 and 1.414)
// The three gains are parameters with the published values; they are turned
// into Q2.14 constants at elaboration, so the block is three constant
// multiplies and one adder. One register stage: results and out_valid appear
// one clock after in_valid. The Q2.14 coefficient format, the rounding
// (round half up) and the saturation to the current format are this design's
// choices.
module ab_current
  import dtc_pkg::*;
#(
  parameter real K_ALPHA  = 1.225,   // sqrt(3/2)
  parameter real K_BETA_A = 0.7071,  // 1/sqrt(2)
  parameter real K_BETA_B = 1.414    // 2/sqrt(2)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  cur_t isa,
  input  cur_t isb,
  output logic out_valid,
  output cur_t is_alpha,
  output cur_t is_beta
);
  localparam int     COEF_F = 14;
  localparam longint KA  = to_fix(K_ALPHA, COEF_F);
  localparam longint KBA = to_fix(K_BETA_A, COEF_F);
  localparam longint KBB = to_fix(K_BETA_B, COEF_F);

  longint pa, pb;
  always_comb begin
    pa = sat(rshift_round(KA * longint'(isa), COEF_F), CUR_W);
    pb = sat(rshift_round(KBA * longint'(isa) + KBB * longint'(isb), COEF_F), CUR_W);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      is_alpha  <= '0;
      is_beta   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        is_alpha <= cur_t'(pa);
        is_beta  <= cur_t'(pb);
      end
    end
  end
endmodule
