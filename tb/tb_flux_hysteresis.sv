// tb_flux_hysteresis: checks the two-level flux comparator on equal, just
// above, just below and random reference/estimate pairs (output 1 only when
// the reference exceeds the estimate), its one-clock latency, and that the
// output holds while in_valid is low.
module tb_flux_hysteresis;
  import dtc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 1'b0, out_valid, cflx;
  flux_t r = '0, e = '0;
  flux_hysteresis dut (.clk, .rst_n, .in_valid, .phi_ref(r), .phi_est(e), .out_valid, .cflx);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(int ri, int ei);
    @(negedge clk);
    r = flux_t'(ri); e = flux_t'(ei); in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid, "out_valid one clock after in_valid");
    check(cflx == (ri > ei), $sformatf("ref %0d est %0d cflx %b", ri, ei, cflx));
  endtask

  initial begin
    logic held;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    one(4915, 4915); one(4915, 4914); one(4915, 4916);
    one(32767, -32768); one(-32768, 32767); one(0, 0);
    for (int n = 0; n < 300; n++) one(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768);
    one(100, 0);
    held = cflx;
    @(negedge clk); r = 0; e = 100;
    repeat (3) @(negedge clk);
    check(cflx == held, "output holds without in_valid");
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
