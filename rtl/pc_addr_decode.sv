// Router address decoder of one pixel converter board.
//
// Splits the 19-bit converter address (bits 18..0) into the target and the
// offset. Bits 18..16 select the target as in the interface's address table:
// 000 event memory, 001 control word 0, 010 control word 1, 011 flush event
// register, 100 test/run register. Bits 15..0 are the event memory address;
// for the control words bits 2..0 are the event index, event 0 being the
// oldest stored event. The three codes with bit 18 set and bits 17..16 not 00
// are not defined by the interface; this design decodes them as REG_NONE.
// Purely combinational.
module pc_addr_decode
  import pc_pkg::*;
(
  input  logic [CONV_AW-1:0]  addr,
  output region_e             region,
  output logic [MEM_AW_D-1:0] mem_addr,
  output logic [2:0]          ev_idx
);

  always_comb begin
    unique case (addr[18:16])
      3'b000:  region = REG_MEM;
      3'b001:  region = REG_CTRL0;
      3'b010:  region = REG_CTRL1;
      3'b011:  region = REG_FLUSH;
      3'b100:  region = REG_TESTRUN;
      default: region = REG_NONE;
    endcase
  end

  assign mem_addr = addr[15:0];
  assign ev_idx   = addr[2:0];

endmodule
