// tb_dtc_speed_profile: runs the complete DTC design through the drive
// scenario used to evaluate it: 2 s of operation with a speed reference of
// 130 rad/s, stepped to 100 rad/s at 1.1 s and to 70 rad/s at 1.6 s, and a
// load torque stepped from 0 to 5 Nm at 0.6 s, with a 1.2 Wb flux reference.
// The induction motor and inverter are the same real-valued model as in
// tb_dtc_top (motor data rs = 10, rr = 6.3 ohm, Ls = 0.4642, Lr = 0.4612,
// Lm = 0.4212 H, J = 0.02 kg m2, P = 2, DC link 514.6 V). The speed loop that
// produces the torque reference is a PI controller in the testbench
// (Kp = 0.5 Nm s/rad, Ki = 5 Nm/rad, output limited to +-15 Nm); its gains
// are a choice of this testbench.
//
// Checked: every sample's estimates against a real-valued replica of the
// estimator (flux 10 mWb, angle 10 mrad, torque 50 mNm) and against the
// model's flux (60 mWb); every decision against the classic DTC rule; the
// 17-clock sample-to-vector latency; the speed within 3 rad/s of its
// reference before each reference step and at the end; the mean flux
// magnitude within 5 % of 1.2 Wb; phase currents inside the +-32 A input
// range. Every sector and all three torque comparator outputs must occur.
module tb_dtc_speed_profile;
  import dtc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction

  localparam real M_PI = 3.14159265358979;
  localparam real TS = 100.0e-6, RS = 10.0, RR = 6.3, LS = 0.4642, LR = 0.4612, LM = 0.4212;
  localparam real JM = 0.02, E = 514.6, PHI_REF = 1.2;
  localparam int  NP = 2, LAT = 17, N_SAMPLES = 20000, SUB = 20;
  localparam real KP = 0.5, KI = 5.0, TMAX = 15.0;

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
  real tload = 0.0, integ = 0.0, ipk = 0.0;

  task automatic one_sample(int n, real tref_r, real phiref_r, bit open_loop);
    real ia, ib, ial, ibe, va, vb, tl, d, x, ang_r;
    int  t0, lat, want_k, want_t;
    bit  want_f, near;
    logic [2:0] want_v;
      tl = tload;
      // currents at the end of the last period
      currents(ial, ibe);
      if (open_loop) begin ial = 0.0; ibe = 0.0; end
      ia = ial / $sqrt(1.5);
      ib = (ibe * $sqrt(2.0) - ia) / 2.0;
      if (fabs(ia) > ipk) ipk = fabs(ia);
      if (fabs(ib) > ipk) ipk = fabs(ib);
      check(fabs(ia) < 31.0 && fabs(ib) < 31.0, $sformatf("n=%0d phase current in range", n));
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
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    applied = '0;

    integ = 0.0;
    for (int n = 0; n < N_SAMPLES; n++) begin
      real wref, err, u;
      wref = (n < 11000) ? 130.0 : (n < 16000) ? 100.0 : 70.0;
      tload = (n < 6000) ? 0.0 : 5.0;
      // PI speed controller with clamping anti-windup
      err = wref - wm;
      u = KP * err + integ;
      if (u > TMAX) u = TMAX;
      else if (u < -TMAX) u = -TMAX;
      else integ += KI * err * TS;
      tref_r = u;
      one_sample(n, tref_r, PHI_REF, 1'b0);
      if (n >= 1000) begin sum_m += real'(pm) / 4096.0; n_m++; end
      if (n == 5999 || n == 10999 || n == 15999 || n == N_SAMPLES - 1) begin
        check(fabs(wm - wref) < 3.0, $sformatf("t=%f s speed %f want %f", (n + 1) * TS, wm, wref));
        $display("t = %4.2f s: speed %7.2f rad/s (reference %6.1f), torque estimate %6.2f Nm, flux %5.3f Wb",
                 (n + 1) * TS, wm, wref, real'(te) / 1024.0, real'(pm) / 4096.0);
      end
    end
    check(fabs(sum_m / n_m - PHI_REF) < 0.05 * PHI_REF, $sformatf("mean flux %f", sum_m / n_m));
    $display("mean flux magnitude %f Wb, peak phase current %f A", sum_m / n_m, ipk);


    // mechanisms
    for (int s = 1; s <= 6; s++) begin
      check(seen_sector[s] > 0, $sformatf("sector %0d used", s));
      $display("sector %0d: %0d samples", s, seen_sector[s]);
    end
    for (int k = 0; k < 2; k++) check(seen_cflx[k] > 0, $sformatf("flux comparator output %0d", k));
    for (int k = 0; k < 3; k++) check(seen_ccpl[k] > 0, $sformatf("torque comparator output %0d", k));
    $display("flux comparator 0/1: %0d/%0d; torque comparator dec/hold/inc: %0d/%0d/%0d",
             seen_cflx[0], seen_cflx[1], seen_ccpl[0], seen_ccpl[1], seen_ccpl[2]);
    $display("inverter states 000..111: %0d %0d %0d %0d %0d %0d %0d %0d", seen_vec[0], seen_vec[1],
             seen_vec[2], seen_vec[3], seen_vec[4], seen_vec[5], seen_vec[6], seen_vec[7]);

    while (busy) @(negedge clk);
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
