// switching_table: the Takahashi look-up table of classic DTC. It picks the
// inverter voltage vector (Sa Sb Sc) from the flux comparator output, the
// torque comparator output and the flux sector:
//
//                       N1    N2    N3    N4    N5    N6
//   dphi=+1  dTe=+1    110   010   011   001   101   100
//            dTe= 0    111   000   111   000   111   000
//            dTe=-1    101   100   110   010   011   001
//   dphi=-1  dTe=+1    010   011   001   101   100   110
//            dTe= 0    000   111   000   111   000   111
//            dTe=-1    001   101   100   110   010   011
//
// cflx = 1 means dphi = +1, 0 means dphi = -1; ccpl uses the TE_INC / TE_HOLD
// / TE_DEC codes of the torque comparator. A sector outside 1..6 or an unused
// torque code selects the zero vector 000. Purely combinational.
module switching_table
  import dtc_pkg::*;
(
  input  sector_t sector,
  input  logic    cflx,
  input  te_cmp_t ccpl,
  output sw_vec_t sw
);
  typedef logic [2:0] row_t [6];

  localparam row_t UP_INC  = '{3'b110, 3'b010, 3'b011, 3'b001, 3'b101, 3'b100};
  localparam row_t UP_HOLD = '{3'b111, 3'b000, 3'b111, 3'b000, 3'b111, 3'b000};
  localparam row_t UP_DEC  = '{3'b101, 3'b100, 3'b110, 3'b010, 3'b011, 3'b001};
  localparam row_t DN_INC  = '{3'b010, 3'b011, 3'b001, 3'b101, 3'b100, 3'b110};
  localparam row_t DN_HOLD = '{3'b000, 3'b111, 3'b000, 3'b111, 3'b000, 3'b111};
  localparam row_t DN_DEC  = '{3'b001, 3'b101, 3'b100, 3'b110, 3'b010, 3'b011};

  always_comb begin
    sw = '0;
    if (sector >= 3'd1 && sector <= 3'd6) begin
      unique case ({cflx, ccpl})
        {1'b1, TE_INC}:  sw = UP_INC[sector - 3'd1];
        {1'b1, TE_HOLD}: sw = UP_HOLD[sector - 3'd1];
        {1'b1, TE_DEC}:  sw = UP_DEC[sector - 3'd1];
        {1'b0, TE_INC}:  sw = DN_INC[sector - 3'd1];
        {1'b0, TE_HOLD}: sw = DN_HOLD[sector - 3'd1];
        {1'b0, TE_DEC}:  sw = DN_DEC[sector - 3'd1];
        default:         sw = '0;
      endcase
    end
  end
endmodule
