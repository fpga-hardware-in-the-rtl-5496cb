// tb_flux_torque_estimator: feeds the estimation part a stream of samples
// (rotating phase currents and switching states that turn the flux vector)
// and rebuilds every output with a real-valued model written from the
// machine equations: power-invariant a-b/alpha-beta transforms, Euler flux
// integration with Rs = 10 ohm, Ts = 100 us, torque 3/2 P (phi_a i_b -
// phi_b i_a) with P = 2, and the polar form of the flux. Tolerances: flux
// components 4 mWb, magnitude 5 mWb, angle 4 mrad, torque 20 mNm. Every
// result must appear exactly 15 clocks after its sample. A second pass sends
// samples on consecutive clocks.
module tb_flux_torque_estimator;
  import dtc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction

  localparam int  LAT = 15;
  localparam real TS = 100.0e-6, RS = 10.0, E = 514.6;
  localparam real M_PI = 3.14159265358979;

  logic in_valid = 1'b0, out_valid;
  cur_t isa = '0, isb = '0;
  sw_vec_t sw = '0;
  flux_t pa, pb, pm;
  ang_t  pang;
  te_t   te;
  flux_torque_estimator dut (.clk, .rst_n, .clear, .in_valid, .isa, .isb, .sw,
                             .out_valid, .phi_alpha(pa), .phi_beta(pb), .phi_mag(pm),
                             .phi_ang(pang), .te);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { real fa, fb, m, a, t; int c; } exp_t;
  exp_t q[$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  real fa = 0.0, fb = 0.0;

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t w;
    real d;
    if (q.size() == 0) check(1'b0, "unexpected out_valid");
    else begin
      w = q.pop_front();
      d = real'(pang) / 8192.0 - w.a;
      if (d > M_PI) d -= 2.0 * M_PI;
      if (d < -M_PI) d += 2.0 * M_PI;
      check(cycle - w.c == LAT, $sformatf("latency %0d", cycle - w.c));
      check(fabs(real'(pa) / 4096.0 - w.fa) <= 0.004, $sformatf("phi_alpha %f want %f", real'(pa) / 4096.0, w.fa));
      check(fabs(real'(pb) / 4096.0 - w.fb) <= 0.004, $sformatf("phi_beta %f want %f", real'(pb) / 4096.0, w.fb));
      check(fabs(real'(pm) / 4096.0 - w.m) <= 0.005, $sformatf("phi_mag %f want %f", real'(pm) / 4096.0, w.m));
      check(w.m < 0.05 || fabs(d) <= 0.004, $sformatf("phi_ang %f want %f", real'(pang) / 8192.0, w.a));
      check(fabs(real'(te) / 1024.0 - w.t) <= 0.02, $sformatf("te %f want %f", real'(te) / 1024.0, w.t));
    end
  end

  task automatic send(real a_amp, real theta, sw_vec_t s);
    exp_t w;
    real ia_r, ib_r, ial, ibe, va, vb;
    @(negedge clk);
    isa = cur_t'($rtoi(a_amp * $cos(theta) * 1024.0));
    isb = cur_t'($rtoi(a_amp * $cos(theta - 2.0 * M_PI / 3.0) * 1024.0));
    sw = s;
    in_valid = 1'b1;
    ia_r = real'(isa) / 1024.0; ib_r = real'(isb) / 1024.0;
    ial = $sqrt(1.5) * ia_r;
    ibe = (ia_r + 2.0 * ib_r) / $sqrt(2.0);
    va = $sqrt(2.0 / 3.0) * E * (real'(s.sa) - 0.5 * (real'(s.sb) + real'(s.sc)));
    vb = E / $sqrt(2.0) * (real'(s.sb) - real'(s.sc));
    fa += TS * (va - RS * ial);
    fb += TS * (vb - RS * ibe);
    w.fa = fa; w.fb = fb;
    w.m = $sqrt(fa * fa + fb * fb);
    w.a = $atan2(fb, fa);
    w.t = 1.5 * 2.0 * (fa * ibe - fb * ial);
    w.c = cycle;
    q.push_back(w);
  endtask

  // Active vector that leads the flux by about 90 degrees, so the flux turns.
  function automatic sw_vec_t lead_vec(real ang, bit grow);
    int k;
    sw_vec_t v [6];
    v = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};
    if (ang < 0.0) ang += 2.0 * M_PI;
    k = $rtoi(ang / (M_PI / 3.0));
    return v[(k + (grow ? 1 : 2)) % 6];
  endfunction

  initial begin
    real th;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    th = 0.0;
    // Build the flux up with V1, then let it rotate.
    for (int n = 0; n < 25; n++) send(2.0, th, 3'b100);
    for (int n = 0; n < 300; n++) begin
      th += 0.05;
      send(3.0, th, (n % 9 == 0) ? 3'b000 : lead_vec($atan2(fb, fa), $sqrt(fa * fa + fb * fb) < 1.0));
      @(negedge clk);
      in_valid = 1'b0;
      repeat (2) @(negedge clk);
    end
    // Back-to-back samples.
    for (int n = 0; n < 200; n++) begin
      th += 0.05;
      send(3.0, th, lead_vec($atan2(fb, fa), $sqrt(fa * fa + fb * fb) < 1.0));
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    check(q.size() == 0, "all results delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
