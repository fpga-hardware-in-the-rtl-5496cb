// tb_ab_voltage: applies all eight switching states and compares the
// alpha-beta voltages with sqrt(2/3) E (Sa - (Sb+Sc)/2) and E/sqrt(2) (Sb - Sc)
// for E = 514.6 V (to 1 V, the rounding of the published gains), then checks
// them exactly against the gain sums and checks the one-clock latency.
module tb_ab_voltage;
  import dtc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction

  logic in_valid = 1'b0, out_valid;
  sw_vec_t sw = '0;
  volt_t va, vb;
  ab_voltage dut (.clk, .rst_n, .in_valid, .sw, .out_valid, .vs_alpha(va), .vs_beta(vb));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real e, ra, rb, ga, gb;
    e = 514.6;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++)
      for (int s = 0; s < 8; s++) begin
        @(negedge clk);
        sw = sw_vec_t'(s); in_valid = 1'b1;
        ra = $sqrt(2.0 / 3.0) * e * (real'(sw.sa) - 0.5 * (real'(sw.sb) + real'(sw.sc)));
        rb = e / $sqrt(2.0) * (real'(sw.sb) - real'(sw.sc));
        ga = 420.2 * real'(sw.sa) - 210.1 * real'(sw.sb) - 210.1 * real'(sw.sc);
        gb = 363.9 * real'(sw.sb) - 363.9 * real'(sw.sc);
        @(negedge clk);
        in_valid = 1'b0;
        check(out_valid, "out_valid one clock after in_valid");
        check(fabs(real'(va) / 32.0 - ra) < 1.0, $sformatf("alpha sw=%b got %f want %f", sw, real'(va) / 32.0, ra));
        check(fabs(real'(vb) / 32.0 - rb) < 1.0, $sformatf("beta sw=%b got %f want %f", sw, real'(vb) / 32.0, rb));
        check(fabs(real'(va) / 32.0 - ga) <= 1.5 / 32.0, $sformatf("alpha sw=%b vs gains", sw));
        check(fabs(real'(vb) / 32.0 - gb) <= 1.5 / 32.0, $sformatf("beta sw=%b vs gains", sw));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
