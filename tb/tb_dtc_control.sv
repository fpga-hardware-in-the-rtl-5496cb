// tb_dtc_control: drives the control part with random flux magnitude,
// flux angle, torque and references, and checks the sector, the two
// comparator outputs and the chosen switching vector against an
// independent reference (sector = floor((angle mod 2pi)/(pi/3)) + 1, the
// vector from the V(k+-1), V(k+-2) rule of classic DTC). Also checks the
// two-clock latency and that samples may arrive on consecutive clocks.
module tb_dtc_control;
  import dtc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction
  localparam real M_PI = 3.14159265358979;
  localparam int LAT = 2;

  logic in_valid = 1'b0, out_valid, cflx;
  flux_t mag = '0, pref = '0;
  ang_t ang = '0;
  te_t te = '0, tref = '0;
  sw_vec_t sw;
  sector_t sector;
  te_cmp_t ccpl;
  dtc_control dut (.clk, .rst_n, .in_valid, .phi_mag(mag), .phi_ang(ang), .te_est(te),
                   .phi_ref(pref), .te_ref(tref), .out_valid, .sw, .sector, .cflx, .ccpl);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [2:0] active(int j);
    logic [2:0] v [6];
    v = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};
    return v[((j - 1) % 6 + 6) % 6];
  endfunction

  typedef struct { int k; bit f; int t; logic [2:0] v; int c; bit near; } exp_t;
  exp_t q[$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t w;
    if (q.size() == 0) check(1'b0, "unexpected out_valid");
    else begin
      w = q.pop_front();
      check(cycle - w.c == LAT, $sformatf("latency %0d", cycle - w.c));
      check(cflx == w.f, "flux comparator");
      check(int'(ccpl) == w.t, "torque comparator");
      if (!w.near) begin
        check(int'(sector) == w.k, $sformatf("sector %0d want %0d", sector, w.k));
        check(sw == w.v, $sformatf("vector %b want %b", sw, w.v));
      end
    end
  end

  task automatic send();
    exp_t w;
    real r, x;
    @(negedge clk);
    mag  = flux_t'($urandom_range(8000));
    pref = (cycle % 4 == 0) ? mag : flux_t'($urandom_range(8000));
    te   = te_t'(int'($urandom_range(20000)) - 10000);
    tref = (cycle % 3 == 0) ? te : te_t'(int'($urandom_range(20000)) - 10000);
    ang  = ang_t'(int'($urandom_range(51472)) - 25736);
    in_valid = 1'b1;
    r = real'(ang) / 8192.0;
    if (r < 0.0) r += 2.0 * M_PI;
    x = r / (M_PI / 3.0);
    w.k = $rtoi(x) + 1;
    w.near = fabs(x - $rtoi(x + 0.5)) * (M_PI / 3.0) < 2.0 / 8192.0;
    w.f = pref > mag;
    w.t = (tref > te) ? 2 : (tref == te) ? 1 : 0;
    if (w.t == 1) w.v = ((w.k % 2 == 1) == w.f) ? 3'b111 : 3'b000;
    else if (w.f) w.v = (w.t == 2) ? active(w.k + 1) : active(w.k - 1);
    else          w.v = (w.t == 2) ? active(w.k + 2) : active(w.k - 2);
    w.c = cycle;
    q.push_back(w);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      send();
      if (n % 3 == 0) begin @(negedge clk); in_valid = 1'b0; end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (5) @(negedge clk);
    check(q.size() == 0, "all results delivered");
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
