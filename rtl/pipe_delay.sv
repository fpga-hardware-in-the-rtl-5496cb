// pipe_delay: fixed-latency delay line for a data word and its valid flag.
//
// Used to line up results of pipeline branches of different depth. Data and
// valid move one register per clock; DEPTH = 0 makes it a plain wire. Only the
// valid flags are reset (synchronous, active-low rst_n); data registers are
// don't-care until their valid flag is set.
module pipe_delay #(
  parameter int W     = 16,
  parameter int DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  if (DEPTH == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_regs
    logic [W-1:0] d_q [DEPTH];
    logic [DEPTH-1:0] v_q;
    always_ff @(posedge clk) begin
      d_q[0] <= in_data;
      for (int i = 1; i < DEPTH; i++) d_q[i] <= d_q[i-1];
    end
    always_ff @(posedge clk) begin
      if (!rst_n) v_q <= '0;
      else begin
        v_q[0] <= in_valid;
        for (int i = 1; i < DEPTH; i++) v_q[i] <= v_q[i-1];
      end
    end
    assign out_valid = v_q[DEPTH-1];
    assign out_data  = d_q[DEPTH-1];
  end
endmodule
