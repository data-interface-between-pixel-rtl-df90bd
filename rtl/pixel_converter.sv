// One pixel converter daughter board as seen by the pixel router.
//
// The board stores up to EVENTS events of one half stave in a dual-port
// event memory of 2^MEM_AW 32-bit words and lets the router read them in a
// memory-mapped way, as often as it likes, until the router writes the flush
// event register. Blocks:
//   pc_event_writer  stores link receiver words into the memory (top port)
//                    and collects each event's start/end address and errors;
//   pc_event_queue   control words 0 and 1 of up to eight events, flush,
//                    event-ready interrupt;
//   pc_event_memory  dual-port memory, top port writes, bottom port reads;
//   pc_bus_slave     router bus, address decode, test/run register.
// The top port is shared by the link writer and router test writes; test
// mode holds the link writer off, so the two never collide.
//
// Router bus timing: the bus is sampled when strobe is high at a rising
// edge; read data comes with rvalid one cycle later. irq (event ready) is
// high while at least one complete event is stored.
//
// The partition into these blocks and the shared top port are this design's
// reading of the interface definition.
module pixel_converter
  import pc_pkg::*;
#(
  parameter int unsigned MEM_AW = MEM_AW_D,
  parameter int unsigned EVENTS = EVENTS_D
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
  output logic               irq,
  // link receiver
  input  logic               lk_valid,
  output logic               lk_ready,
  input  logic [DATA_W-1:0]  lk_data,
  input  logic               lk_last,
  input  logic               lk_parity_err,
  input  logic               lk_format_err,
  // board status
  input  logic               link_ready,
  input  logic               seu_err,
  input  logic               pixel_ctrl_err,
  input  logic               temp_high
);

  logic                    test_mode, flush;
  logic                    mem_re;
  logic [MEM_AW-1:0]       mem_raddr;
  logic [DATA_W-1:0]       mem_rdata;
  logic                    tw_we, lw_we, top_we;
  logic [MEM_AW-1:0]       tw_addr, lw_addr, top_addr;
  logic [DATA_W-1:0]       tw_data, lw_data, top_data;
  logic [2:0]              ev_idx;
  logic [DATA_W-1:0]       ctrl0, ctrl1;
  logic                    push;
  event_desc_t             push_desc;
  logic [$clog2(EVENTS):0] ev_count;
  logic [MEM_AW:0]         flush_len;
  board_status_t           status;

  assign status = '{link_ready: link_ready, temp_high: temp_high,
                    pixel_ctrl_err: pixel_ctrl_err, seu_err: seu_err};

  pc_bus_slave #(.AW(MEM_AW)) u_bus (
    .clk, .rst_n,
    .strobe, .wr, .addr, .wdata, .rdata, .rvalid,
    .mem_re, .mem_raddr, .mem_rdata,
    .tw_we, .tw_addr, .tw_data,
    .ev_idx, .ctrl0, .ctrl1,
    .flush, .test_mode
  );

  pc_event_writer #(.AW(MEM_AW), .EVENTS(EVENTS)) u_writer (
    .clk, .rst_n, .test_mode,
    .lk_valid, .lk_ready, .lk_data, .lk_last, .lk_parity_err, .lk_format_err,
    .link_ready,
    .we (lw_we), .waddr (lw_addr), .wdata (lw_data),
    .push, .push_desc, .ev_count, .flush_len
  );

  pc_event_queue #(.EVENTS(EVENTS), .AW(MEM_AW)) u_queue (
    .clk, .rst_n,
    .push, .push_desc, .flush, .status,
    .rd_idx (ev_idx), .ctrl0, .ctrl1,
    .count (ev_count), .event_ready (irq), .flush_len
  );

  // Top port: router test writes in test mode, otherwise the link writer.
  always_comb begin
    if (test_mode) begin
      top_we   = tw_we;
      top_addr = tw_addr;
      top_data = tw_data;
    end else begin
      top_we   = lw_we;
      top_addr = lw_addr;
      top_data = lw_data;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(lw_we && tw_we));

  pc_event_memory #(.AW(MEM_AW), .DW(DATA_W)) u_mem (
    .clk,
    .we (top_we), .waddr (top_addr), .wdata (top_data),
    .re (mem_re), .raddr (mem_raddr), .rdata (mem_rdata)
  );

endmodule
