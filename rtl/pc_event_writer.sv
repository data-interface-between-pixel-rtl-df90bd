// Link-side event writer of one pixel converter board.
//
// Accepts the words of each event from the link receiver on a valid/ready
// handshake (a word moves when lk_valid and lk_ready are both high; lk_last
// marks the last word of an event) and writes them through the top port of
// the event memory, which it uses as a circular buffer of 2^AW words. The
// address of an event's first word is its start address and that of its
// last word its end address; an event may wrap, so end can be below start.
// While an event is received, the per-word parity and format error flags and
// any cycle with link_ready low are accumulated into the event's error flags.
// In the cycle after the last word is written, push delivers the completed
// descriptor to the control word registers.
//
// Back-pressure: lk_ready is low in test mode, when the memory holds 2^AW
// words, or, at the first word of an event, when EVENTS events are stored or
// one is waiting to be pushed. Flushed events return flush_len words.
//
// That events are stored in the event memory with start and end addresses
// and per-event parity, link-down and format errors follows the interface
// definition. The circular buffer, the handshake with back-pressure and
// holding the link off in test mode are this design's choices.
module pc_event_writer
  import pc_pkg::*;
#(
  parameter int unsigned AW     = MEM_AW_D,
  parameter int unsigned EVENTS = EVENTS_D
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    test_mode,
  // link receiver
  input  logic                    lk_valid,
  output logic                    lk_ready,
  input  logic [DATA_W-1:0]       lk_data,
  input  logic                    lk_last,
  input  logic                    lk_parity_err,
  input  logic                    lk_format_err,
  input  logic                    link_ready,
  // top port of the event memory
  output logic                    we,
  output logic [AW-1:0]           waddr,
  output logic [DATA_W-1:0]       wdata,
  // control word registers
  output logic                    push,
  output event_desc_t             push_desc,
  input  logic [$clog2(EVENTS):0] ev_count,
  input  logic [AW:0]             flush_len
);

  localparam int unsigned MEM_WORDS = 2**AW;

  // Descriptors carry 16-bit addresses, the width of the control word fields.
  if (AW > MEM_AW_D) begin : g_aw_check
    $error("AW may not exceed %0d", MEM_AW_D);
  end

  logic [AW-1:0] wptr;       // next free word
  logic [AW:0]   used;       // words held by stored and in-progress events
  logic          in_event;   // first word accepted, last not yet
  logic [AW-1:0] start_q;
  event_err_t    err_q;
  logic          space_ok, slot_ok, accept;
  event_err_t    err_now;

  assign space_ok = (int'(used) < MEM_WORDS);
  // A new event needs a free slot; the slot count includes a pending push.
  assign slot_ok  = in_event || ((int'(ev_count) + (push ? 1 : 0)) < EVENTS);
  assign lk_ready = !test_mode && space_ok && slot_ok;
  assign accept   = lk_valid && lk_ready;

  // Error flags including the current word.
  always_comb begin
    err_now = in_event ? err_q : '0;
    if (accept) begin
      err_now.parity_err    |= lk_parity_err;
      err_now.format_err    |= lk_format_err;
    end
    err_now.link_down_err |= (in_event || accept) && !link_ready;
  end

  assign we    = accept;
  assign waddr = wptr;
  assign wdata = lk_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      used      <= '0;
      in_event  <= 1'b0;
      start_q   <= '0;
      err_q     <= '0;
      push      <= 1'b0;
      push_desc <= '0;
    end else begin
      push <= 1'b0;
      used <= used + (AW+1)'(accept) - flush_len;
      if (in_event) err_q <= err_now;
      if (accept) begin
        wptr <= wptr + 1'b1;
        if (!in_event) start_q <= wptr;
        if (lk_last) begin
          in_event             <= 1'b0;
          push                 <= 1'b1;
          push_desc.start_addr <= MEM_AW_D'(in_event ? start_q : wptr);
          push_desc.end_addr   <= MEM_AW_D'(wptr);
          push_desc.err        <= err_now;
          err_q                <= '0;
        end else begin
          in_event <= 1'b1;
          err_q    <= err_now;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) int'(used) <= MEM_WORDS);

endmodule
