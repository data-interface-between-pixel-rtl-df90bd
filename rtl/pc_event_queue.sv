// Control word registers of one pixel converter board.
//
// Holds the descriptors (start address, end address, error flags, event
// number) of up to EVENTS complete events in a circular buffer, oldest first.
// Control word 0 and control word 1 of event rd_idx (0 = oldest) are formed
// combinationally from the descriptor at (head + rd_idx):
//   control word 0: bit 0 event ready, bits 9..1 event number, bit 10 parity
//     error, 11 link down, 12 format error, 13 single event upset, 14 pixel
//     control error, 15 temperature high, 16 link ready; 31..17 zero.
//   control word 1: bits 31..16 start address, bits 15..0 end address.
// The board status bits 13..16 belong to no event and appear in all eight
// control words. A one-cycle flush pulse frees the oldest event: the head
// advances, so every stored event moves one index down, and flush_len gives
// the number of memory words released (end - start + 1, modulo 2^AW, with an
// end equal to start - 1 meaning the whole memory). event_ready is high while
// at least one event is stored; it is the board's interrupt line and does not
// depend on the address bus. A push and a flush may coincide.
//
// Field positions, the eight-event depth, the oldest-first indexing, the
// flush behaviour and the interrupt follow the interface definition. The
// event number being a 9-bit count of completed events since reset, the
// ready bit of event i meaning "event i is stored", the zero value of
// unused fields, and ignoring a flush when nothing is stored are this
// design's choices.
module pc_event_queue
  import pc_pkg::*;
#(
  parameter int unsigned EVENTS = EVENTS_D,
  parameter int unsigned AW     = MEM_AW_D
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    push,
  input  event_desc_t             push_desc,
  input  logic                    flush,
  input  board_status_t           status,
  input  logic [2:0]              rd_idx,
  output logic [DATA_W-1:0]       ctrl0,
  output logic [DATA_W-1:0]       ctrl1,
  output logic [$clog2(EVENTS):0] count,
  output logic                    event_ready,
  output logic [AW:0]             flush_len
);

  localparam int unsigned PW = $clog2(EVENTS);

  // Descriptors carry 16-bit addresses, the width of the control word fields.
  // The descriptor ring wraps its pointers at 2^PW entries.
  if (EVENTS != 2**PW || EVENTS > 8) begin : g_events_check
    $error("EVENTS must be a power of two, at most 8");
  end
  if (AW > MEM_AW_D) begin : g_aw_check
    $error("AW may not exceed %0d", MEM_AW_D);
  end

  event_desc_t        desc  [EVENTS];
  logic [EVNUM_W-1:0] evnum [EVENTS];
  logic [PW-1:0]      head, tail;
  logic [EVNUM_W-1:0] evnum_next;
  logic               do_flush;

  assign do_flush = flush && (count != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head       <= '0;
      tail       <= '0;
      count      <= '0;
      evnum_next <= '0;
      for (int i = 0; i < EVENTS; i++) begin
        desc[i]  <= '0;
        evnum[i] <= '0;
      end
    end else begin
      if (push) begin
        desc[tail]  <= push_desc;
        evnum[tail] <= evnum_next;
        tail        <= tail + 1'b1;
        evnum_next  <= evnum_next + 1'b1;
      end
      if (do_flush) head <= head + 1'b1;
      count <= count + $bits(count)'(push) - $bits(count)'(do_flush);
    end
  end

  // The writer never pushes into a full queue.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> (int'(count) < EVENTS || flush));

  // Released words of the oldest event.
  logic [AW-1:0] span;
  always_comb begin
    span      = desc[head].end_addr - desc[head].start_addr;
    flush_len = do_flush ? ({1'b0, span} + 1'b1) : '0;
  end

  // Control words of the selected event.
  logic [PW-1:0] sel;
  logic          sel_valid;
  event_desc_t   d;
  always_comb begin
    sel       = head + rd_idx[PW-1:0];
    sel_valid = (int'(rd_idx) < int'(count)) && (int'(rd_idx) < EVENTS);
    d         = desc[sel];
    ctrl0     = '0;
    ctrl1     = '0;
    if (sel_valid) begin
      ctrl0[C0_READY]                           = 1'b1;
      ctrl0[C0_EVNUM_LSB +: EVNUM_W]            = evnum[sel];
      ctrl0[C0_PARITY]                          = d.err.parity_err;
      ctrl0[C0_LINKDOWN]                        = d.err.link_down_err;
      ctrl0[C0_FORMAT]                          = d.err.format_err;
      ctrl1[31:16]                              = 16'(d.start_addr);
      ctrl1[15:0]                               = 16'(d.end_addr);
    end
    ctrl0[C0_SEU]       = status.seu_err;
    ctrl0[C0_PIXCTRL]   = status.pixel_ctrl_err;
    ctrl0[C0_TEMPHIGH]  = status.temp_high;
    ctrl0[C0_LINKREADY] = status.link_ready;
  end

  assign event_ready = (count != 0);

endmodule
