// tb_cordic_c2p: streams flux vectors (axes, all quadrants, random) through
// the CORDIC one per clock and checks, against $atan2 and $sqrt in reals:
// angle within 3 mrad (the residual rotation of ten iterations is
// atan(2^-9) = 2 mrad), magnitude equal to the vector length times the
// CORDIC gain 1/Zn (product of sqrt(1 + 2^-2i), i = 0..9) within 2 mWb,
// and a latency of exactly N_ITER + 2 = 12 clocks.
module tb_cordic_c2p;
  import dtc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction

  localparam int LAT = 12;
  logic in_valid = 1'b0, out_valid;
  flux_t qd = '0, qq = '0, mag;
  ang_t ang;
  cordic_c2p dut (.clk, .rst_n, .in_valid, .qsd(qd), .qsq(qq), .out_valid,
                  .magnitude(mag), .angle_q(ang));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real gain = 1.0;
  real want_m[$], want_a[$];
  int  sent_cycle[$];
  int  cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    real wm, wa, ga, d;
    int  c0;
    if (want_m.size() == 0) check(1'b0, "unexpected out_valid");
    else begin
      wm = want_m.pop_front(); wa = want_a.pop_front(); c0 = sent_cycle.pop_front();
      ga = real'(ang) / 8192.0;
      d = ga - wa;
      // pi and -pi are the same direction
      if (d > 3.14159) d -= 2.0 * 3.14159265358979;
      if (d < -3.14159) d += 2.0 * 3.14159265358979;
      check(cycle - c0 == LAT, $sformatf("latency %0d", cycle - c0));
      check(fabs(d) <= 0.003, $sformatf("angle got %f want %f", ga, wa));
      check(fabs(real'(mag) / 4096.0 - wm) <= 0.002, $sformatf("magnitude got %f want %f", real'(mag) / 4096.0, wm));
    end
  end

  task automatic send(real x, real y);
    real fx, fy;
    @(negedge clk);
    qd = flux_t'($rtoi(x * 4096.0)); qq = flux_t'($rtoi(y * 4096.0));
    in_valid = 1'b1;
    fx = real'(qd) / 4096.0; fy = real'(qq) / 4096.0;
    want_m.push_back($sqrt(fx * fx + fy * fy) * gain);
    want_a.push_back($atan2(fy, fx));
    sent_cycle.push_back(cycle);
  endtask

  initial begin
    for (int i = 0; i < 10; i++) gain = gain * $sqrt(1.0 + 2.0 ** (-2 * i));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send(1.2, 0.0); send(0.0, 1.2); send(-1.2, 0.0); send(0.0, -1.2);
    send(1.0, 1.0); send(-1.0, 1.0); send(-1.0, -1.0); send(1.0, -1.0);
    send(-1.2, 0.001); send(-1.2, -0.001); send(0.3, 0.0);
    for (int n = 0; n < 400; n++) begin
      real r, t;
      r = 0.1 + 2.3 * real'($urandom_range(10000)) / 10000.0;
      t = 2.0 * 3.14159265358979 * real'($urandom_range(100000)) / 100000.0;
      send(r * $cos(t), r * $sin(t));
      if (n % 11 == 0) begin @(negedge clk); in_valid = 1'b0; end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (20) @(negedge clk);
    check(want_m.size() == 0, "all results delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
