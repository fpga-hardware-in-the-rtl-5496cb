// tb_dtc_top: closed-loop test of the complete DTC design at its default
// parameters. A real-valued induction motor and inverter model (stator-frame
// flux equations, rs = 10, rr = 6.3 ohm, Ls = 0.4642, Lr = 0.4612,
// Lm = 0.4212 H, J = 0.02 kg m2, P = 2, DC link 514.6 V, integrated with 20
// Euler sub-steps per 100 us sample) supplies the phase currents; the design
// returns the next switching state, which drives the model for the next
// period. The model uses the same alpha-beta convention and torque formula as
// the estimator. The run starts with a zero torque reference (the torque
// comparator holds), then accelerates with +8 Nm and brakes with -4 Nm.
//
// Checked every sample:
//  - sw_valid arrives exactly 17 clocks after sample_valid, busy in between;
//  - the estimates match a real-valued replica of the estimator equations
//    fed with the same currents and switching states (flux 10 mWb, angle
//    10 mrad, torque 50 mNm) and the model's own flux (60 mWb);
//  - the chosen vector matches the classic DTC rule applied to the reported
//    estimates (sector from the angle, both comparators, switching table).
// At the end: every sector, both flux comparator outputs, all three torque
// comparator outputs and all eight inverter states must have occurred, the
// mean flux magnitude must be within 10 % of its reference, the mean torque
// within 1.5 Nm of its reference in each phase, and clear must zero the flux.
// The RMS and largest estimation errors (angle, magnitude, torque) are
// printed; the largest must stay below 0.03 rad, 0.02 Wb and 0.04 Nm, the
// maximum errors reported for the original hardware.
module tb_dtc_top;
  import dtc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction

  localparam real M_PI = 3.14159265358979;
  localparam real TS = 100.0e-6, RS = 10.0, RR = 6.3, LS = 0.4642, LR = 0.4612, LM = 0.4212;
  localparam real JM = 0.02, E = 514.6, PHI_REF = 1.0;
  localparam int  NP = 2, LAT = 17, N_SAMPLES = 3000, SUB = 20;

  logic sample_valid = 1'b0, sw_valid, busy, est_valid, cflx;
  cur_t isa = '0, isb = '0;
  flux_t phi_ref = '0, pa, pb, pm;
  te_t te_ref = '0, te;
  ang_t pang;
  sw_vec_t sw;
  sector_t sector;
  te_cmp_t ccpl;

  dtc_top dut (.clk, .rst_n, .clear, .sample_valid, .isa, .isb, .phi_ref, .te_ref,
               .sw, .sw_valid, .busy, .est_valid, .phi_alpha(pa), .phi_beta(pb),
               .phi_mag(pm), .phi_ang(pang), .te, .sector, .cflx, .ccpl);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---- motor model state ----
  real fsa = 0.0, fsb = 0.0, fra = 0.0, frb = 0.0, wm = 0.0;
  real sig;

  function automatic void currents(output real ia, output real ib);
    ia = (fsa - LM / LR * fra) / (sig * LS);
    ib = (fsb - LM / LR * frb) / (sig * LS);
  endfunction

  task automatic motor_run(sw_vec_t s, real tl);
    real va, vb, ia, ib, ra, rb, tem, h, we;
    va = $sqrt(2.0 / 3.0) * E * (real'(s.sa) - 0.5 * (real'(s.sb) + real'(s.sc)));
    vb = E / $sqrt(2.0) * (real'(s.sb) - real'(s.sc));
    h = TS / SUB;
    for (int k = 0; k < SUB; k++) begin
      currents(ia, ib);
      ra = (fra - LM * ia) / LR;
      rb = (frb - LM * ib) / LR;
      we = NP * wm;
      tem = 1.5 * NP * (fsa * ib - fsb * ia);
      fsa += h * (va - RS * ia);
      fsb += h * (vb - RS * ib);
      fra += h * (-RR * ra - we * frb);
      frb += h * (-RR * rb + we * fra);
      wm  += h * (tem - tl) / JM;
    end
  endtask

  // ---- replica of the estimator ----
  real ea = 0.0, eb = 0.0;

  function automatic logic [2:0] active(int j);
    logic [2:0] v [6];
    v = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};
    return v[((j - 1) % 6 + 6) % 6];
  endfunction

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int seen_sector [1:6];
  int seen_cflx [2];
  int seen_ccpl [3];
  int seen_vec [8];

  sw_vec_t applied;

  // estimation error against the real-valued replica, closed-loop samples only
  real se_ang, se_mag, se_te, mx_ang, mx_mag, mx_te;
  int  n_err;

  task automatic one_sample(int n, real tref_r, real phiref_r, bit open_loop);
    real ia, ib, ial, ibe, va, vb, tl, d, x, ang_r;
    int  t0, lat, want_k, want_t;
    bit  want_f, near;
    logic [2:0] want_v;
      tl = 0.5;
      // currents at the end of the last period
      currents(ial, ibe);
      if (open_loop) begin ial = 0.0; ibe = 0.0; end
      ia = ial / $sqrt(1.5);
      ib = (ibe * $sqrt(2.0) - ia) / 2.0;
      @(negedge clk);
      isa = cur_t'($rtoi(ia * 1024.0));
      isb = cur_t'($rtoi(ib * 1024.0));
      phi_ref = flux_t'($rtoi(phiref_r * 4096.0));
      te_ref = te_t'($rtoi(tref_r * 1024.0));
      check(!busy, "not busy at the start of a sample");
      sample_valid = 1'b1;
      t0 = cycle;
      // replica with the quantised currents
      ial = $sqrt(1.5) * real'(isa) / 1024.0;
      ibe = (real'(isa) + 2.0 * real'(isb)) / 1024.0 / $sqrt(2.0);
      va = $sqrt(2.0 / 3.0) * E * (real'(applied.sa) - 0.5 * (real'(applied.sb) + real'(applied.sc)));
      vb = E / $sqrt(2.0) * (real'(applied.sb) - real'(applied.sc));
      ea += TS * (va - RS * ial);
      eb += TS * (vb - RS * ibe);
      @(negedge clk);
      sample_valid = 1'b0;
      check(busy, "busy after sample_valid");
      while (!est_valid) @(negedge clk);
      // estimates
      check(fabs(real'(pa) / 4096.0 - ea) < 0.01, $sformatf("n=%0d phi_alpha %f want %f", n, real'(pa) / 4096.0, ea));
      check(fabs(real'(pb) / 4096.0 - eb) < 0.01, $sformatf("n=%0d phi_beta %f want %f", n, real'(pb) / 4096.0, eb));
      check(fabs(real'(pm) / 4096.0 - $sqrt(ea * ea + eb * eb)) < 0.01, $sformatf("n=%0d phi_mag", n));
      d = real'(pang) / 8192.0 - $atan2(eb, ea);
      if (d > M_PI) d -= 2.0 * M_PI;
      if (d < -M_PI) d += 2.0 * M_PI;
      check($sqrt(ea * ea + eb * eb) < 0.01 || fabs(d) < 0.01, $sformatf("n=%0d phi_ang %f want %f", n, real'(pang) / 8192.0, $atan2(eb, ea)));
      check(fabs(real'(te) / 1024.0 - 1.5 * NP * (ea * ibe - eb * ial)) < 0.05,
            $sformatf("n=%0d te %f want %f", n, real'(te) / 1024.0, 1.5 * NP * (ea * ibe - eb * ial)));
      if (!open_loop && $sqrt(ea * ea + eb * eb) >= 0.01) begin
        n_err++;
        se_ang += d * d;
        x = real'(pm) / 4096.0 - $sqrt(ea * ea + eb * eb);
        se_mag += x * x;
        if (fabs(d) > mx_ang) mx_ang = fabs(d);
        if (fabs(x) > mx_mag) mx_mag = fabs(x);
        x = real'(te) / 1024.0 - 1.5 * NP * (ea * ibe - eb * ial);
        se_te += x * x;
        if (fabs(x) > mx_te) mx_te = fabs(x);
      end
      check(open_loop || (fabs(ea - fsa) < 0.06 && fabs(eb - fsb) < 0.06),
            $sformatf("n=%0d estimate %f,%f motor %f,%f", n, ea, eb, fsa, fsb));
      // decision expected from the reported estimates
      ang_r = real'(pang) / 8192.0;
      if (ang_r < 0.0) ang_r += 2.0 * M_PI;
      x = ang_r / (M_PI / 3.0);
      want_k = $rtoi(x) + 1;
      near = fabs(x - $rtoi(x + 0.5)) * (M_PI / 3.0) < 2.0 / 8192.0;
      want_f = phi_ref > pm;
      want_t = (te_ref > te) ? 2 : (te_ref == te) ? 1 : 0;
      if (want_t == 1) want_v = ((want_k % 2 == 1) == want_f) ? 3'b111 : 3'b000;
      else if (want_f) want_v = (want_t == 2) ? active(want_k + 1) : active(want_k - 1);
      else             want_v = (want_t == 2) ? active(want_k + 2) : active(want_k - 2);
      while (!sw_valid) @(negedge clk);
      lat = cycle - t0;
      check(lat == LAT, $sformatf("sample-to-vector latency %0d", lat));
      check(!busy, "busy cleared with sw_valid");
      check(cflx == want_f, $sformatf("n=%0d flux comparator", n));
      check(int'(ccpl) == want_t, $sformatf("n=%0d torque comparator %0d want %0d", n, ccpl, want_t));
      if (!near) begin
        check(int'(sector) == want_k, $sformatf("n=%0d sector %0d want %0d", n, sector, want_k));
        check(sw == want_v, $sformatf("n=%0d vector %b want %b", n, sw, want_v));
      end
      if (sector >= 1 && sector <= 6) seen_sector[sector]++;
      seen_cflx[cflx]++;
      if (ccpl <= TE_INC) seen_ccpl[ccpl]++;
      seen_vec[sw]++;
      applied = sw;
      // the motor runs with the new state until the next sample
      if (!open_loop) motor_run(sw, tl);
      repeat (2) @(negedge clk);
  endtask

  initial begin
    real tref_r, sum_m, sum_t;
    int  n_m;

    sig = 1.0 - LM * LM / (LS * LR);
    sum_m = 0.0; sum_t = 0.0; n_m = 0;
    se_ang = 0.0; se_mag = 0.0; se_te = 0.0; mx_ang = 0.0; mx_mag = 0.0; mx_te = 0.0; n_err = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    applied = '0;

    for (int n = 0; n < N_SAMPLES; n++) begin
      tref_r = (n < 10) ? 0.0 : (n < 2000) ? 8.0 : -4.0;
      one_sample(n, tref_r, PHI_REF, 1'b0);
      // statistics after the flux has built up
      if (n >= 300 && n < 2000) begin
        sum_m += real'(pm) / 4096.0; sum_t += real'(te) / 1024.0; n_m++;
      end
      if (n == 1999) begin
        check(fabs(sum_m / n_m - PHI_REF) < 0.1 * PHI_REF, $sformatf("mean flux %f", sum_m / n_m));
        check(fabs(sum_t / n_m - 8.0) < 1.5, $sformatf("mean torque %f", sum_t / n_m));
        $display("acceleration: mean flux %f Wb, mean torque %f Nm, speed %f rad/s", sum_m / n_m, sum_t / n_m, wm);
        sum_m = 0.0; sum_t = 0.0; n_m = 0;
      end
      if (n >= 2300) begin
        sum_m += real'(pm) / 4096.0; sum_t += real'(te) / 1024.0; n_m++;
      end
    end
    check(fabs(sum_m / n_m - PHI_REF) < 0.1 * PHI_REF, $sformatf("mean flux %f", sum_m / n_m));
    check(fabs(sum_t / n_m + 4.0) < 1.5, $sformatf("mean torque %f", sum_t / n_m));
    $display("braking: mean flux %f Wb, mean torque %f Nm, speed %f rad/s", sum_m / n_m, sum_t / n_m, wm);

    // Estimation error over the closed-loop run. The bounds are the largest
    // errors reported for the original hardware against a floating-point
    // estimator: 0.03 rad, 0.02 Wb and 0.04 Nm.
    $display("estimation error rms/max: angle %f/%f rad, magnitude %f/%f Wb, torque %f/%f Nm",
             $sqrt(se_ang / n_err), mx_ang, $sqrt(se_mag / n_err), mx_mag, $sqrt(se_te / n_err), mx_te);
    check(mx_ang < 0.03, "largest angle error below 0.03 rad");
    check(mx_mag < 0.02, "largest magnitude error below 0.02 Wb");
    check(mx_te < 0.04, "largest torque error below 0.04 Nm");

    // Open-loop samples with zero current: the torque estimate is exactly
    // zero, so a zero torque reference makes the comparator hold, and the
    // flux reference alternately above and below the flux selects both zero
    // vectors.
    for (int n = 0; n < 6; n++) one_sample(N_SAMPLES + n, 0.0, (n % 2 == 0) ? 2.0 : 0.0, 1'b1);

    // mechanisms
    for (int s = 1; s <= 6; s++) begin
      check(seen_sector[s] > 0, $sformatf("sector %0d used", s));
      $display("sector %0d: %0d samples", s, seen_sector[s]);
    end
    for (int k = 0; k < 2; k++) check(seen_cflx[k] > 0, $sformatf("flux comparator output %0d", k));
    for (int k = 0; k < 3; k++) check(seen_ccpl[k] > 0, $sformatf("torque comparator output %0d", k));
    for (int k = 0; k < 8; k++) check(seen_vec[k] > 0, $sformatf("inverter state %03b", k[2:0]));
    $display("flux comparator 0/1: %0d/%0d; torque comparator dec/hold/inc: %0d/%0d/%0d",
             seen_cflx[0], seen_cflx[1], seen_ccpl[0], seen_ccpl[1], seen_ccpl[2]);
    $display("inverter states 000..111: %0d %0d %0d %0d %0d %0d %0d %0d", seen_vec[0], seen_vec[1],
             seen_vec[2], seen_vec[3], seen_vec[4], seen_vec[5], seen_vec[6], seen_vec[7]);

    // clear
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    @(negedge clk); sample_valid = 1'b1; isa = '0; isb = '0;
    @(negedge clk); sample_valid = 1'b0;
    while (!est_valid) @(negedge clk);
    check(fabs(real'(pa) / 4096.0 - TS * $sqrt(2.0 / 3.0) * E * (real'(applied.sa) - 0.5 * (real'(applied.sb) + real'(applied.sc)))) < 0.001,
          "clear restarts the flux integration from zero");
    while (!sw_valid) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_SAMPLES * 30 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
