// tb_ab_current: checks the a-b to alpha-beta current transform against a
// real-valued reference built from the published gains (1.225, 0.7071,
// 1.414) within 2 LSB, and against the exact sqrt(3/2) isa and
// (isa + 2 isb)/sqrt(2) within 0.03 %, for random and corner currents; also
// checks the one-clock latency.
module tb_ab_current;
  import dtc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction

  logic in_valid = 1'b0, out_valid;
  cur_t isa = '0, isb = '0, ia, ib;
  ab_current dut (.clk, .rst_n, .in_valid, .isa, .isb, .out_valid, .is_alpha(ia), .is_beta(ib));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(real a, real b);
    real ra, rb, ea, eb;
    @(negedge clk);
    isa = cur_t'($rtoi(a * 1024.0)); isb = cur_t'($rtoi(b * 1024.0)); in_valid = 1'b1;
    // published gains, and the exact transform they approximate
    ra = 1.225 * real'(isa);
    rb = 0.7071 * real'(isa) + 1.414 * real'(isb);
    ea = $sqrt(1.5) * real'(isa);
    eb = (real'(isa) + 2.0 * real'(isb)) / $sqrt(2.0);
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid, "out_valid one clock after in_valid");
    check(fabs(real'(ia) - ra) <= 2.0, $sformatf("alpha isa=%0d got %0d want %f", isa, ia, ra));
    check(fabs(real'(ib) - rb) <= 2.0, $sformatf("beta isa=%0d isb=%0d got %0d want %f", isa, isb, ib, rb));
    check(fabs(real'(ia) - ea) <= 2.0 + 3.0e-4 * fabs(ea), "alpha close to sqrt(3/2) isa");
    check(fabs(real'(ib) - eb) <= 2.0 + 3.0e-4 * fabs(eb), "beta close to (isa + 2 isb)/sqrt(2)");
    @(negedge clk);
    check(!out_valid, "out_valid is a single pulse");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    one(0.0, 0.0);
    one(10.0, -5.0);
    one(-20.0, 5.5);
    one(1.0, 1.0);
    for (int n = 0; n < 300; n++)
      one((real'($urandom_range(40000)) - 20000.0) / 1000.0,
          (real'($urandom_range(20000)) - 10000.0) / 1000.0);
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
