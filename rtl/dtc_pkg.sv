// dtc_pkg: number formats, types and fixed-point helpers shared by the DTC
// flux/torque estimator and the DTC control logic.
//
// All physical quantities are two's-complement fixed-point words. The widths
// of the CORDIC ports (16 bits) follow the estimator's published interface;
// every other format below is this design's own choice, picked for the motor
// it was tuned for (stator flux ~1.2 Wb, torque within +-32 Nm, DC link ~515 V):
//   current  Q6.10  (A)    +-32 A,     LSB ~0.98 mA
//   voltage  Q11.5  (V)    +-1024 V,   LSB 31 mV
//   flux     Q4.12  (Wb)   +-8 Wb,     LSB 0.24 mWb
//   angle    Q3.13  (rad)  +-4 rad,    LSB 0.12 mrad  (result range -pi..pi)
//   torque   Q6.10  (Nm)   +-32 Nm,    LSB ~0.98 mNm
// Switching vectors are packed {sa, sb, sc}, sa in the MSB, in the order the
// switching table writes them. The torque comparator result uses the 2-bit
// code of the comparator's output multiplexer: 0 = decrease, 1 = hold,
// 2 = increase.
package dtc_pkg;

  localparam int CUR_W  = 16, CUR_F  = 10;
  localparam int VOLT_W = 16, VOLT_F = 5;
  localparam int FLUX_W = 16, FLUX_F = 12;
  localparam int ANG_W  = 16, ANG_F  = 13;
  localparam int TE_W   = 16, TE_F   = 10;

  typedef logic signed [CUR_W-1:0]  cur_t;
  typedef logic signed [VOLT_W-1:0] volt_t;
  typedef logic signed [FLUX_W-1:0] flux_t;
  typedef logic signed [ANG_W-1:0]  ang_t;
  typedef logic signed [TE_W-1:0]   te_t;

  // Inverter switching state, one bit per leg (1 = upper switch on).
  typedef struct packed {
    logic sa;
    logic sb;
    logic sc;
  } sw_vec_t;

  // Three-level torque comparator output (delta Te = -1, 0, +1).
  typedef enum logic [1:0] {
    TE_DEC  = 2'd0,
    TE_HOLD = 2'd1,
    TE_INC  = 2'd2
  } te_cmp_t;

  // Sector number of the stator flux vector, 1..6 (0 and 7 unused).
  typedef logic [2:0] sector_t;

  localparam real PI = 3.14159265358979323846;

  // Nearest integer to v * 2**f; used to turn real parameters into constants.
  function automatic longint to_fix(real v, int f);
    real s;
    s = v * (2.0 ** f);
    return (s >= 0.0) ? longint'($rtoi(s + 0.5)) : -longint'($rtoi(-s + 0.5));
  endfunction

  // Clamp x to the range of a w-bit signed word (result still 64 bits wide).
  function automatic longint sat(longint x, int w);
    longint hi, lo;
    hi = (longint'(1) <<< (w - 1)) - 1;
    lo = -(longint'(1) <<< (w - 1));
    if (x > hi) return hi;
    if (x < lo) return lo;
    return x;
  endfunction

  // Arithmetic right shift with round-half-up.
  function automatic longint rshift_round(longint x, int s);
    if (s <= 0) return x <<< (-s);
    return (x + (longint'(1) <<< (s - 1))) >>> s;
  endfunction

endpackage
