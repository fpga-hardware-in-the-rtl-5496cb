// tb_torque_est: streams random flux/current samples into the torque
// estimator, one per clock, and compares each result with
// 3/2 P (phi_a i_b - phi_b i_a) computed in reals (within 2 LSB). The result
// must appear exactly MULT_LAT + 1 = 4 clocks after its sample.
module tb_torque_est;
  import dtc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction

  localparam int LAT = 4;
  logic in_valid = 1'b0, out_valid;
  flux_t pa = '0, pb = '0;
  cur_t ia = '0, ib = '0;
  te_t te;
  torque_est dut (.clk, .rst_n, .in_valid, .phi_alpha(pa), .phi_beta(pb),
                  .is_alpha(ia), .is_beta(ib), .out_valid, .te);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real expq[$];
  int  sent_cycle[$];
  int  cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Output monitor.
  always @(negedge clk) if (rst_n && out_valid) begin
    real want;
    int  c0;
    if (expq.size() == 0) check(1'b0, "unexpected out_valid");
    else begin
      want = expq.pop_front();
      c0 = sent_cycle.pop_front();
      check(cycle - c0 == LAT, $sformatf("latency %0d", cycle - c0));
      check(fabs(real'(te) / 1024.0 - want) <= 2.0 / 1024.0,
            $sformatf("te got %f want %f", real'(te) / 1024.0, want));
    end
  end

  task automatic send(real fa, real fb, real ca, real cb);
    @(negedge clk);
    pa = flux_t'($rtoi(fa * 4096.0)); pb = flux_t'($rtoi(fb * 4096.0));
    ia = cur_t'($rtoi(ca * 1024.0)); ib = cur_t'($rtoi(cb * 1024.0));
    in_valid = 1'b1;
    expq.push_back(1.5 * 2.0 * (real'(pa) / 4096.0 * real'(ib) / 1024.0 - real'(pb) / 4096.0 * real'(ia) / 1024.0));
    sent_cycle.push_back(cycle);
  endtask

  function automatic real rnd(real lim);
    return (real'($urandom_range(20000)) / 10000.0 - 1.0) * lim;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send(1.0, 0.0, 0.0, 2.0);       // +6 Nm
    send(0.0, 1.0, 2.0, 0.0);       // -6 Nm
    for (int n = 0; n < 300; n++) begin
      send(rnd(1.5), rnd(1.5), rnd(3.0), rnd(3.0));
      if (n % 7 == 0) begin @(negedge clk); in_valid = 1'b0; end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (10) @(negedge clk);
    check(expq.size() == 0, "all results delivered");
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
