// ab_voltage: stator voltage in the alpha-beta frame, computed from the
// inverter switching state rather than measured:
//   vs_alpha = sqrt(2/3) E (Sa - (Sb + Sc)/2) = K1*Sa - K2*Sb - K3*Sc
//   vs_beta  = E/sqrt(2) (Sb - Sc)            = K4*Sb - K5*Sc
// K1..K5 are parameters holding the published gains (420.2, 210.1, 210.1,
// 363.9, 363.9 V, which correspond to a DC link of about 514.6 V). Since each
// switch state is one bit, the gains reduce to selecting constants and
// subtracting them. One register stage: outputs follow in_valid by one clock.
module ab_voltage
  import dtc_pkg::*;
#(
  parameter real K1 = 420.2,
  parameter real K2 = 210.1,
  parameter real K3 = 210.1,
  parameter real K4 = 363.9,
  parameter real K5 = 363.9
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sw_vec_t sw,
  output logic    out_valid,
  output volt_t   vs_alpha,
  output volt_t   vs_beta
);
  localparam longint C1 = to_fix(K1, VOLT_F);
  localparam longint C2 = to_fix(K2, VOLT_F);
  localparam longint C3 = to_fix(K3, VOLT_F);
  localparam longint C4 = to_fix(K4, VOLT_F);
  localparam longint C5 = to_fix(K5, VOLT_F);

  longint va, vb;
  always_comb begin
    va = (sw.sa ? C1 : 0) - (sw.sb ? C2 : 0) - (sw.sc ? C3 : 0);
    vb = (sw.sb ? C4 : 0) - (sw.sc ? C5 : 0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      vs_alpha  <= '0;
      vs_beta   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        vs_alpha <= volt_t'(sat(va, VOLT_W));
        vs_beta  <= volt_t'(sat(vb, VOLT_W));
      end
    end
  end
endmodule
