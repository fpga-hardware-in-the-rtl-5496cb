// sector_select: sector number (1..6) of the stator flux vector from its
// angle. The angle, in -pi..pi, is first moved into 0..2pi (a comparator
// against zero selects whether 2pi is added), then multiplied by 3/pi, the
// number of 60-degree sectors per radian, truncated to an integer and
// incremented. Sector 1 therefore spans 0..60 degrees, sector 2 60..120
// degrees, and so on counter-clockwise. The published block shows the
// constants 6 and 0.954 for 2pi and 3/pi; this design uses the exact values
// (WRAP, GAIN parameters) so that the sector boundaries fall on multiples
// of 60 degrees. A result above 6 from rounding is clamped to 6.
// Timing: one register stage; sector and out_valid follow in_valid by one
// clock.
module sector_select
  import dtc_pkg::*;
#(
  parameter real WRAP = 2.0 * PI,
  parameter real GAIN = 3.0 / PI
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  ang_t    angle,
  output logic    out_valid,
  output sector_t sector
);
  localparam int     GAIN_F = 16;
  localparam longint WRAP_C = to_fix(WRAP, ANG_F);
  localparam longint GAIN_C = to_fix(GAIN, GAIN_F);

  longint wrapped, idx;
  always_comb begin
    wrapped = (angle >= 0) ? longint'(angle) : longint'(angle) + WRAP_C;
    idx     = (wrapped * GAIN_C) >>> (ANG_F + GAIN_F);
    if (idx > 5) idx = 5;
    if (idx < 0) idx = 0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sector    <= 3'd1;
    end else begin
      out_valid <= in_valid;
      if (in_valid) sector <= sector_t'(idx + 1);
    end
  end
endmodule
