// tb_stator_flux: drives random voltage/current samples into the flux
// integrator and follows them with a real-valued Euler integrator,
// phi += Ts (v - Rs i); the outputs must stay within 3 LSB (0.73 mWb) over
// 400 steps. Also checks the one-clock latency, that the flux holds between
// samples and that clear zeroes it.
module tb_stator_flux;
  import dtc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction

  localparam real RS = 10.0, TS = 100.0e-6;
  logic in_valid = 1'b0, out_valid;
  volt_t va = '0, vb = '0;
  cur_t ia = '0, ib = '0;
  flux_t pa, pb;
  stator_flux dut (.clk, .rst_n, .clear, .in_valid, .vs_alpha(va), .vs_beta(vb),
                   .is_alpha(ia), .is_beta(ib), .out_valid, .phi_alpha(pa), .phi_beta(pb));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real ra = 0.0, rb = 0.0;

  task automatic step(int vai, int vbi, int iai, int ibi);
    @(negedge clk);
    va = volt_t'(vai); vb = volt_t'(vbi); ia = cur_t'(iai); ib = cur_t'(ibi);
    in_valid = 1'b1;
    ra += TS * (real'(va) / 32.0 - RS * real'(ia) / 1024.0);
    rb += TS * (real'(vb) / 32.0 - RS * real'(ib) / 1024.0);
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid, "out_valid one clock after in_valid");
    check(fabs(real'(pa) / 4096.0 - ra) <= 3.0 / 4096.0, $sformatf("alpha got %f want %f", real'(pa) / 4096.0, ra));
    check(fabs(real'(pb) / 4096.0 - rb) <= 3.0 / 4096.0, $sformatf("beta got %f want %f", real'(pb) / 4096.0, rb));
  endtask

  initial begin
    flux_t hold_a;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(pa == 0 && pb == 0, "flux zero after reset");
    // A steady 420 V on alpha alone ramps the flux linearly.
    for (int n = 0; n < 20; n++) step(420 * 32, 0, 0, 0);
    // Random voltages; the sign is forced back when the flux leaves +-0.5 Wb.
    for (int n = 0; n < 400; n++) begin
      int v1, v2;
      v1 = (ra > 0.5) ? -420 * 32 : (ra < -0.5) ? 420 * 32 : ($urandom_range(1) ? 420 : -420) * 32;
      v2 = (rb > 0.5) ? -363 * 32 : (rb < -0.5) ? 363 * 32 : (int'($urandom_range(2)) - 1) * 363 * 32;
      step(v1, v2, int'($urandom_range(20000)) - 10000, int'($urandom_range(20000)) - 10000);
    end
    // Holds while in_valid is low.
    hold_a = pa;
    repeat (5) @(negedge clk);
    check(pa == hold_a, "flux holds without a sample");
    // clear
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(pa == 0 && pb == 0, "clear zeroes the flux");
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
