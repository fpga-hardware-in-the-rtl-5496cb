// torque_est: electromagnetic torque from stator flux and current,
//   Te = (3/2) P (phi_alpha * is_beta - phi_beta * is_alpha)
// Two multipliers run in parallel, each a MULT_LAT-stage pipeline (3 stages
// as published, matching a pipelined DSP multiplier); their difference is
// scaled by 3P/2 (computed exactly as 3*P times the difference, halved) and
// registered. The Q4.12 x Q6.10 products are Q10.22 and are rounded to the
// Q6.10 torque format and saturated.
// Timing: fully pipelined, one sample per clock; te and out_valid appear
// MULT_LAT + 1 clocks after in_valid. P = 2 pole pairs as in the motor data.
module torque_est
  import dtc_pkg::*;
#(
  parameter int P        = 2,
  parameter int MULT_LAT = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flux_t phi_alpha,
  input  flux_t phi_beta,
  input  cur_t  is_alpha,
  input  cur_t  is_beta,
  output logic  out_valid,
  output te_t   te
);
  localparam int PW = FLUX_W + CUR_W;
  typedef logic signed [PW-1:0] prod_t;

  // Multiplier pipelines: the product is formed in the first stage and moved
  // through the remaining MULT_LAT-1 registers.
  prod_t m1_q [MULT_LAT];
  prod_t m2_q [MULT_LAT];
  logic [MULT_LAT-1:0] v_q;

  always_ff @(posedge clk) begin
    m1_q[0] <= prod_t'(phi_alpha) * prod_t'(is_beta);
    m2_q[0] <= prod_t'(phi_beta) * prod_t'(is_alpha);
    for (int i = 1; i < MULT_LAT; i++) begin
      m1_q[i] <= m1_q[i-1];
      m2_q[i] <= m2_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= '0;
    else begin
      v_q[0] <= in_valid;
      for (int i = 1; i < MULT_LAT; i++) v_q[i] <= v_q[i-1];
    end
  end

  longint diff, scaled;
  always_comb begin
    diff   = longint'(m1_q[MULT_LAT-1]) - longint'(m2_q[MULT_LAT-1]);
    scaled = sat(rshift_round(3 * P * diff, FLUX_F + CUR_F - TE_F + 1), TE_W);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      te        <= '0;
    end else begin
      out_valid <= v_q[MULT_LAT-1];
      if (v_q[MULT_LAT-1]) te <= te_t'(scaled);
    end
  end
endmodule
