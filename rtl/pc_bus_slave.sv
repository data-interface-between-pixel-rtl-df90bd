// Router bus port of one pixel converter board.
//
// The router drives strobe, wr (1 = write, 0 = read), a 19-bit address and
// write data; a high strobe validates the bus at a rising clock edge. The
// address is decoded by pc_addr_decode.
//
// Reads: the cycle after a read strobe, rvalid is high for one cycle and
// rdata holds the event memory word (read through the memory's bottom port),
// control word 0 or 1 of the addressed event, or the test/run register in
// bit 0. Unmapped addresses and the flush register read as 0. A new read may
// be strobed every cycle.
// Writes: to the flush event register, a one-cycle flush pulse; to the
// test/run register, bit 0 of wdata (1 = test, reset value 0 = run); to the
// event memory, only in test mode, a write through the memory's top port at
// the same address the router reads from. Other writes are ignored.
//
// The address map, the write-only flush register, the test/run register
// gating router writes to the memory, and reading and writing the memory at
// one address through two ports follow the interface definition. The one-
// cycle read latency, the rvalid signal, separate read and write data buses
// and the register encodings are this design's choices.
module pc_bus_slave
  import pc_pkg::*;
#(
  parameter int unsigned AW = MEM_AW_D
) (
  input  logic               clk,
  input  logic               rst_n,
  // router bus
  input  logic               strobe,
  input  logic               wr,
  input  logic [CONV_AW-1:0] addr,
  input  logic [DATA_W-1:0]  wdata,
  output logic [DATA_W-1:0]  rdata,
  output logic               rvalid,
  // event memory bottom port
  output logic               mem_re,
  output logic [AW-1:0]      mem_raddr,
  input  logic [DATA_W-1:0]  mem_rdata,
  // router test write to the top port
  output logic               tw_we,
  output logic [AW-1:0]      tw_addr,
  output logic [DATA_W-1:0]  tw_data,
  // control word registers
  output logic [2:0]         ev_idx,
  input  logic [DATA_W-1:0]  ctrl0,
  input  logic [DATA_W-1:0]  ctrl1,
  output logic               flush,
  output logic               test_mode
);

  region_e             region;
  logic [MEM_AW_D-1:0] mem_addr;
  logic                rd, wt;

  pc_addr_decode u_dec (
    .addr     (addr),
    .region   (region),
    .mem_addr (mem_addr),
    .ev_idx   (ev_idx)
  );

  assign rd = strobe && !wr;
  assign wt = strobe &&  wr;

  assign mem_re    = rd && (region == REG_MEM);
  assign mem_raddr = AW'(mem_addr);
  assign tw_we     = wt && (region == REG_MEM) && test_mode;
  assign tw_addr   = AW'(mem_addr);
  assign tw_data   = wdata;
  assign flush     = wt && (region == REG_FLUSH);

  logic              sel_mem_q;
  logic [DATA_W-1:0] reg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      test_mode <= 1'b0;
      rvalid    <= 1'b0;
      sel_mem_q <= 1'b0;
      reg_q     <= '0;
    end else begin
      if (wt && region == REG_TESTRUN) test_mode <= wdata[0];
      rvalid    <= rd;
      sel_mem_q <= rd && (region == REG_MEM);
      if (rd) begin
        unique case (region)
          REG_CTRL0:   reg_q <= ctrl0;
          REG_CTRL1:   reg_q <= ctrl1;
          REG_TESTRUN: reg_q <= DATA_W'(test_mode);
          default:     reg_q <= '0;
        endcase
      end
    end
  end

  assign rdata = sel_mem_q ? mem_rdata : reg_q;

endmodule
