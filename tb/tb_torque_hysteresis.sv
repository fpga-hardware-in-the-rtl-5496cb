// tb_torque_hysteresis: checks the three-level torque comparator (increase
// when reference > estimate, hold when equal, decrease when below) on edge
// and random pairs, including the extremes of the 16-bit range, and its
// one-clock latency; all three outputs must occur.
module tb_torque_hysteresis;
  import dtc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 1'b0, out_valid;
  te_t r = '0, e = '0;
  te_cmp_t ccpl;
  torque_hysteresis dut (.clk, .rst_n, .in_valid, .te_ref(r), .te_est(e), .out_valid, .ccpl);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int seen [3];

  task automatic one(int ri, int ei);
    logic [1:0] want;
    @(negedge clk);
    r = te_t'(ri); e = te_t'(ei); in_valid = 1'b1;
    want = (ri > ei) ? 2'd2 : (ri == ei) ? 2'd1 : 2'd0;
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid, "out_valid one clock after in_valid");
    check(ccpl == want, $sformatf("ref %0d est %0d ccpl %0d want %0d", ri, ei, ccpl, want));
    seen[want]++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    one(5120, 5120); one(5120, 5119); one(5120, 5121);
    one(32767, -32768); one(-32768, 32767); one(0, 0); one(-1, -1);
    for (int n = 0; n < 300; n++) begin
      int a;
      a = int'($urandom_range(65535)) - 32768;
      one(a, (n % 5 == 0) ? a : int'($urandom_range(65535)) - 32768);
    end
    for (int k = 0; k < 3; k++) check(seen[k] > 0, $sformatf("code %0d seen", k));
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
