// flux_torque_estimator: the estimation part of the DTC drive. From the two
// measured phase currents and the inverter switching state it produces the
// stator flux components, the flux magnitude and angle, and the torque.
//
//   isa,isb --> ab_current --+--> stator_flux --+--> torque_est ----> te
//   sw -------> ab_voltage --+                  +--> cordic_c2p -> x Zn -> phi_mag
//                                               |               -------> phi_ang
//                                               +-------------------> phi_alpha/beta
//
// The CORDIC magnitude is multiplied by the CORDIC scale factor ZN (0.6073,
// a Q1.15 constant) in a register stage outside the CORDIC, as published.
// The torque and flux-component branches are delayed so that every output of
// one sample is valid in the same clock.
//
// Sample protocol: pulse in_valid for one clock with isa/isb (the currents
// measured at the end of a sample period) and sw (the switching state applied
// during that period). The flux integrator advances one step per pulse.
// All outputs and out_valid appear LATENCY = N_ITER + 5 clocks later (15 at
// the defaults); a new sample may be given every clock. clear zeroes the flux
// integrators. The block needs nothing from the control part, so it can serve
// other controllers that need these quantities.
module flux_torque_estimator
  import dtc_pkg::*;
#(
  parameter real RS       = 10.0,
  parameter real TS       = 100.0e-6,
  parameter int  P        = 2,
  parameter int  N_ITER   = 10,
  parameter real ZN       = 0.6073,
  parameter int  MULT_LAT = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    in_valid,
  input  cur_t    isa,
  input  cur_t    isb,
  input  sw_vec_t sw,
  output logic    out_valid,
  output flux_t   phi_alpha,
  output flux_t   phi_beta,
  output flux_t   phi_mag,
  output ang_t    phi_ang,
  output te_t     te
);
  localparam int     ZN_F    = 15;
  localparam longint ZN_C    = to_fix(ZN, ZN_F);

  // Stage 1: alpha-beta transforms.
  logic  cur_v, volt_v;
  cur_t  is_a, is_b;
  volt_t vs_a, vs_b;

  ab_current u_cur (
    .clk, .rst_n, .in_valid,
    .isa, .isb,
    .out_valid(cur_v), .is_alpha(is_a), .is_beta(is_b)
  );

  ab_voltage u_volt (
    .clk, .rst_n, .in_valid, .sw,
    .out_valid(volt_v), .vs_alpha(vs_a), .vs_beta(vs_b)
  );

  // Stage 2: flux integration; currents delayed to meet the new flux.
  logic  flux_v, cur2_v;
  flux_t phi_a, phi_b;
  cur_t  is_a2, is_b2;

  stator_flux #(.RS(RS), .TS(TS)) u_flux (
    .clk, .rst_n, .clear,
    .in_valid(cur_v & volt_v),
    .vs_alpha(vs_a), .vs_beta(vs_b), .is_alpha(is_a), .is_beta(is_b),
    .out_valid(flux_v), .phi_alpha(phi_a), .phi_beta(phi_b)
  );

  pipe_delay #(.W(2*CUR_W), .DEPTH(1)) u_cur_dly (
    .clk, .rst_n, .in_valid(cur_v), .in_data({is_a, is_b}),
    .out_valid(cur2_v), .out_data({is_a2, is_b2})
  );

  // Torque branch.
  logic te_v;
  te_t  te_raw;
  torque_est #(.P(P), .MULT_LAT(MULT_LAT)) u_torque (
    .clk, .rst_n, .in_valid(flux_v & cur2_v),
    .phi_alpha(phi_a), .phi_beta(phi_b), .is_alpha(is_a2), .is_beta(is_b2),
    .out_valid(te_v), .te(te_raw)
  );

  // Polar branch.
  logic  pol_v;
  flux_t mag_raw;
  ang_t  ang_raw;
  cordic_c2p #(.N_ITER(N_ITER)) u_cordic (
    .clk, .rst_n, .in_valid(flux_v),
    .qsd(phi_a), .qsq(phi_b),
    .out_valid(pol_v), .magnitude(mag_raw), .angle_q(ang_raw)
  );

  // CORDIC scale factor.
  logic  mag_v;
  flux_t mag_s;
  ang_t  ang_s;
  always_ff @(posedge clk) begin
    if (!rst_n) mag_v <= 1'b0;
    else        mag_v <= pol_v;
    mag_s <= flux_t'(sat(rshift_round(ZN_C * longint'(mag_raw), ZN_F), FLUX_W));
    ang_s <= ang_raw;
  end

  // Line the other branches up with the polar branch.
  logic te_al_v, phi_al_v;
  pipe_delay #(.W(TE_W), .DEPTH(N_ITER + 2 + 1 - (MULT_LAT + 1))) u_te_dly (
    .clk, .rst_n, .in_valid(te_v), .in_data(te_raw),
    .out_valid(te_al_v), .out_data(te)
  );
  pipe_delay #(.W(2*FLUX_W), .DEPTH(N_ITER + 3)) u_phi_dly (
    .clk, .rst_n, .in_valid(flux_v), .in_data({phi_a, phi_b}),
    .out_valid(phi_al_v), .out_data({phi_alpha, phi_beta})
  );

  assign out_valid = mag_v;
  assign phi_mag   = mag_s;
  assign phi_ang   = ang_s;

  // The three branches must agree on which clock a sample is complete.
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                              mag_v == te_al_v && mag_v == phi_al_v);

  initial assert (MULT_LAT + 1 <= N_ITER + 3)
    else $error("torque branch longer than the polar branch");
endmodule
