// tb_switching_table: exhaustive check of the switching table over all
// sector codes (0..7), both flux comparator values and all four torque codes.
// The expected vector is derived from the geometry of the six active
// vectors V1..V6 = 100, 110, 010, 011, 001, 101 rather than copied from the
// table: in sector k, raise flux and torque -> V(k+1), raise flux and lower
// torque -> V(k-1), lower flux and raise torque -> V(k+2), lower both ->
// V(k-2); hold torque -> a zero vector (111 or 000 alternating with the
// sector, starting with 111 in sector 1 when the flux is raised). Invalid
// sectors and the unused torque code give 000.
module tb_switching_table;
  import dtc_pkg::*;
  int checks = 0, failures = 0;

  sector_t sector;
  logic cflx;
  te_cmp_t ccpl;
  sw_vec_t sw;
  switching_table dut (.sector, .cflx, .ccpl, .sw);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [2:0] active(int j);
    logic [2:0] v [6];
    v = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};
    return v[((j - 1) % 6 + 6) % 6];
  endfunction

  function automatic logic [2:0] expect_vec(int k, bit f, int t);
    if (k < 1 || k > 6 || t == 3) return 3'b000;
    if (t == 1) return ((k % 2 == 1) == f) ? 3'b111 : 3'b000;
    if (f)  return (t == 2) ? active(k + 1) : active(k - 1);
    return (t == 2) ? active(k + 2) : active(k - 2);
  endfunction

  int zero_cnt = 0, active_cnt = 0;

  initial begin
    for (int k = 0; k < 8; k++)
      for (int f = 0; f < 2; f++)
        for (int t = 0; t < 4; t++) begin
          sector = sector_t'(k); cflx = f[0]; ccpl = te_cmp_t'(t);
          #1;
          check(sw == expect_vec(k, f[0], t),
                $sformatf("sector %0d cflx %0d ccpl %0d -> %b want %b", k, f, t, sw, expect_vec(k, f[0], t)));
          if (sw == 3'b000 || sw == 3'b111) zero_cnt++; else active_cnt++;
        end
    check(active_cnt == 24, "24 active selections");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
