// Dual-port event memory of one pixel converter board.
//
// 2^AW words of DW bits. The top port is the only write port: both the
// board's own link writer and router test writes go through it. The bottom
// port is the router's read port. Reads are synchronous: rdata holds the word
// at raddr one clock after re is high, and keeps it until the next read.
// A write and a read of the same address in one cycle return the old word.
// The dual-port organisation, the port names and the 16-bit / 32-bit sizes
// follow the interface definition; the synchronous read, the single clock
// and the read-during-write behaviour are this design's choices. The array
// is not reset.
module pc_event_memory #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  // top port (write)
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  // bottom port (read)
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
