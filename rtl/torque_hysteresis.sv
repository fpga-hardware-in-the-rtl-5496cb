// torque_hysteresis: three-level torque comparator. The torque error
// te_ref - te_est is compared with zero twice, "greater than" and "equal",
// and the two results select the output code:
//   error > 0 -> TE_INC (2, delta Te = +1)
//   error = 0 -> TE_HOLD (1, delta Te = 0)
//   error < 0 -> TE_DEC (0, delta Te = -1)
// as in the published comparator, which has a zero-width band.
// Timing: one register stage; ccpl and out_valid follow in_valid by one clock.
module torque_hysteresis
  import dtc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  te_t     te_ref,
  input  te_t     te_est,
  output logic    out_valid,
  output te_cmp_t ccpl
);
  logic signed [TE_W:0] err;
  assign err = (TE_W+1)'(te_ref) - (TE_W+1)'(te_est);

  te_cmp_t code;
  always_comb begin
    unique case ({err > 0, err == 0})
      2'b10:   code = TE_INC;
      2'b01:   code = TE_HOLD;
      default: code = TE_DEC;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ccpl      <= TE_HOLD;
    end else begin
      out_valid <= in_valid;
      if (in_valid) ccpl <= code;
    end
  end
endmodule
