// tb_sector_select: sweeps the flux angle over -pi..pi in small steps plus
// random angles and checks the sector against floor((angle mod 2pi) /
// (pi/3)) + 1, skipping angles within 2 LSB of a 60-degree boundary. Also
// checks the one-clock latency and that every sector 1..6 appears.
module tb_sector_select;
  import dtc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction
  localparam real M_PI = 3.14159265358979;

  logic in_valid = 1'b0, out_valid;
  ang_t ang = '0;
  sector_t sec;
  sector_select dut (.clk, .rst_n, .in_valid, .angle(ang), .out_valid, .sector(sec));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int seen [1:6];

  task automatic one(int a);
    real r, w;
    int want;
    @(negedge clk);
    ang = ang_t'(a); in_valid = 1'b1;
    r = real'(ang) / 8192.0;
    w = (r < 0.0) ? r + 2.0 * M_PI : r;
    want = $rtoi(w / (M_PI / 3.0)) + 1;
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid, "out_valid one clock after in_valid");
    if (fabs(w / (M_PI / 3.0) - $rtoi(w / (M_PI / 3.0) + 0.5)) * (M_PI / 3.0) > 2.0 / 8192.0) begin
      check(int'(sec) == want, $sformatf("angle %f sector %0d want %0d", r, sec, want));
      if (sec >= 1 && sec <= 6) seen[sec]++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = -25736; a <= 25736; a += 97) one(a);
    one(0); one(-1); one(1); one(25735); one(-25735);
    for (int n = 0; n < 300; n++) one(int'($urandom_range(51472)) - 25736);
    for (int s = 1; s <= 6; s++) check(seen[s] > 0, $sformatf("sector %0d seen", s));
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
