// cordic_c2p: cartesian-to-polar conversion of the stator flux vector by a
// pipelined CORDIC in vectoring mode. Inputs are the alpha (qsd) and beta
// (qsq) flux components, outputs the vector length and its angle.
//
// Stage 0 folds the vector into the right half plane: a vector with x < 0 is
// turned by -90 deg (y >= 0) or +90 deg (y < 0) and the angle accumulator
// starts at +pi/2 or -pi/2. Stages 1..N_ITER are the micro-rotations
//   x' = x + d y 2^-i,  y' = y - d x 2^-i,  z' = z + d atan(2^-i),
// d = +1 when y >= 0, else -1, which drive y to zero; the atan(2^-i) constants
// are computed at elaboration. A last stage rounds and saturates. The
// magnitude is NOT corrected for the CORDIC gain (1/Zn, 1.6468 for ten
// iterations): as in the published estimator, the caller multiplies by
// Zn = 0.6073 outside this block.
//
// Formats: qsd, qsq and magnitude are Q4.12 (so the uncorrected magnitude
// saturates for flux vectors longer than about 4.8 Wb); angle_q is Q3.13
// radians in -pi..pi. Internally x and y carry 2 extra integer bits and
// GUARD extra fractional bits, z carries GUARD extra fractional bits.
// Timing: fully pipelined, one vector per clock, latency N_ITER + 2 clocks.
// Ten iterations follow the published design; the quadrant folding, word
// widths and guard bits are this design's choices.
module cordic_c2p
  import dtc_pkg::*;
#(
  parameter int N_ITER = 10,
  parameter int GUARD  = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flux_t qsd,
  input  flux_t qsq,
  output logic  out_valid,
  output flux_t magnitude,
  output ang_t  angle_q
);
  localparam int XW = FLUX_W + 2 + GUARD;
  localparam int ZW = ANG_W + GUARD;
  localparam int ZF = ANG_F + GUARD;
  typedef logic signed [XW-1:0] xw_t;
  typedef logic signed [ZW-1:0] zw_t;

  localparam longint HALF_PI = to_fix(PI / 2.0, ZF);

  function automatic zw_t atan_const(int i);
    return zw_t'(to_fix($atan(2.0 ** (-i)), ZF));
  endfunction

  xw_t x_q [N_ITER+1];
  xw_t y_q [N_ITER+1];
  zw_t z_q [N_ITER+1];
  logic [N_ITER+1:0] v_q;

  // Stage 0: widen and fold into the right half plane.
  xw_t x_in, y_in;
  assign x_in = xw_t'(qsd) <<< GUARD;
  assign y_in = xw_t'(qsq) <<< GUARD;

  always_ff @(posedge clk) begin
    if (x_in < 0) begin
      if (y_in >= 0) begin
        x_q[0] <= y_in;
        y_q[0] <= -x_in;
        z_q[0] <= zw_t'(HALF_PI);
      end else begin
        x_q[0] <= -y_in;
        y_q[0] <= x_in;
        z_q[0] <= zw_t'(-HALF_PI);
      end
    end else begin
      x_q[0] <= x_in;
      y_q[0] <= y_in;
      z_q[0] <= '0;
    end
  end

  // Micro-rotation stages.
  for (genvar i = 0; i < N_ITER; i++) begin : g_iter
    localparam zw_t ATAN_I = atan_const(i);
    always_ff @(posedge clk) begin
      if (y_q[i] >= 0) begin
        x_q[i+1] <= x_q[i] + (y_q[i] >>> i);
        y_q[i+1] <= y_q[i] - (x_q[i] >>> i);
        z_q[i+1] <= z_q[i] + ATAN_I;
      end else begin
        x_q[i+1] <= x_q[i] - (y_q[i] >>> i);
        y_q[i+1] <= y_q[i] + (x_q[i] >>> i);
        z_q[i+1] <= z_q[i] - ATAN_I;
      end
    end
  end

  // Output stage: drop the guard bits with rounding, saturate the magnitude.
  always_ff @(posedge clk) begin
    magnitude <= flux_t'(sat(rshift_round(longint'(x_q[N_ITER]), GUARD), FLUX_W));
    angle_q   <= ang_t'(sat(rshift_round(longint'(z_q[N_ITER]), GUARD), ANG_W));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= '0;
    else begin
      v_q[0] <= in_valid;
      for (int i = 1; i <= N_ITER + 1; i++) v_q[i] <= v_q[i-1];
    end
  end
  assign out_valid = v_q[N_ITER+1];
endmodule
