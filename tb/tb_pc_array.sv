// End-to-end testbench of pc_array, the six-board design, at its default
// sizes (six boards, 2^16-word event memories, eight events per board).
//
// One link receiver process per board sends events whose words are a known
// function of (board, event number, word index), with random gaps, per-word
// parity and format errors and link-down cycles, and records in a per-board
// scoreboard what each event must look like. Board 0 starts with eight long
// events (9000 to 10000 words) so that its memory fills, stalls the link, and
// later events wrap around the end of the memory. One router process serves
// the boards in turn through the shared 22-bit address (bits 21..19 select
// the half stave): it waits for event ready (by reading control word 0 or by
// watching the board's interrupt line), reads control words 0 and 1 of event
// 0, reads the event data one word per clock, checks everything against the
// scoreboard and writes the board's flush register. Now and then it also
// reads an absent half stave (6 or 7, expecting 0), and puts one board in
// test mode, writes and reads back its memory, and returns it to run mode.
// Each mechanism (eight-event stall, memory-full stall, test-mode stall,
// wrap-around, each error flag, test writes, absent half stave, interrupt
// polling, flushes on every board) is counted and must occur at least once.
module tb_pc_array;
  import pc_pkg::*;
  localparam int BOARDS = 6, MEM_AW = 16, EVENTS = 8, WORDS = 2**MEM_AW;
  localparam int N_EVENTS = 40;   // per board

  logic                          clk = 0, rst_n = 0;
  logic                          strobe, wr;
  logic [21:0]                   addr;
  logic [DATA_W-1:0]             wdata, rdata;
  logic                          rvalid;
  logic [BOARDS-1:0]             irq;
  logic [BOARDS-1:0]             lk_valid, lk_ready, lk_last, lk_parity_err, lk_format_err;
  logic [BOARDS-1:0][DATA_W-1:0] lk_data;
  logic [BOARDS-1:0]             link_ready, seu_err, pixel_ctrl_err, temp_high;
  int checks = 0, failures = 0;

  pc_array dut (.*);

  always #5 clk = ~clk;

  typedef struct { int len; event_err_t err; } ev_ref_t;
  ev_ref_t sb [BOARDS][$];
  int n_slot_stall = 0, n_mem_stall = 0, n_test_stall = 0, n_wrap = 0;
  int n_par = 0, n_fmt = 0, n_ldown = 0, n_tw = 0, n_irq_polls = 0, n_absent = 0;
  int n_flush [BOARDS];
  int links_done = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired: links done %0d", links_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %08h expected %08h (t=%0t)", what, got, exp, $time);
    end
  endtask

  function automatic logic [31:0] word_of(int b, int ev, int i);
    return (32'(ev) * 32'h9E3779B1) ^ (32'(i) * 32'h85EBCA77) ^ (32'(b) << 28) ^ 32'h0123_4567;
  endfunction

  // ---------------- link receivers ----------------
  for (genvar gb = 0; gb < BOARDS; gb++) begin : g_link
    initial begin
      bit in_ev, acc;
      event_err_t e;
      int len, i;
      lk_valid[gb] = 0; lk_last[gb] = 0; lk_data[gb] = 0;
      lk_parity_err[gb] = 0; lk_format_err[gb] = 0; link_ready[gb] = 1;
      wait (rst_n);
      for (int ev = 0; ev < N_EVENTS; ev++) begin
        if (gb == 0 && ev < 8)        len = $urandom_range(9000, 10000);
        else if (gb == 0 && ev < 16)  len = $urandom_range(2000, 4000);
        else                          len = $urandom_range(1, 60);
        i = 0; e = '0; in_ev = 0;
        while (i < len) begin
          @(negedge clk);
          lk_valid[gb]      = ($urandom_range(0, 9) < 9);
          lk_last[gb]       = (i == len - 1);
          lk_data[gb]       = word_of(gb, ev, i);
          lk_parity_err[gb] = ($urandom_range(0, 2999) == 0);
          lk_format_err[gb] = ($urandom_range(0, 2999) == 0);
          link_ready[gb]    = ($urandom_range(0, 1999) != 0);
          #1;
          acc = lk_valid[gb] && lk_ready[gb];
          if (lk_valid[gb] && !lk_ready[gb]) begin
            if (dut.g_board[gb].u_pc.test_mode) n_test_stall++;
            else if (int'(dut.g_board[gb].u_pc.ev_count) == EVENTS) n_slot_stall++;
            else n_mem_stall++;
          end
          if ((in_ev || acc) && !link_ready[gb]) e.link_down_err = 1;
          if (acc) begin
            e.parity_err |= lk_parity_err[gb];
            e.format_err |= lk_format_err[gb];
            in_ev = 1;
            i++;
          end
        end
        sb[gb].push_back('{len: len, err: e});
      end
      @(negedge clk);
      lk_valid[gb] = 0; link_ready[gb] = 1;
      links_done++;
    end
  end

  // ---------------- router ----------------
  logic lr_at_read;

  task automatic bus_read(int b, logic [18:0] a, output logic [31:0] d);
    @(negedge clk);
    strobe = 1; wr = 0; addr = {3'(b), a};
    @(posedge clk);
    lr_at_read = (b < BOARDS) ? link_ready[b] : 1'b0;
    @(negedge clk);
    strobe = 0;
    expect_eq(32'(rvalid), 1, "rvalid");
    d = rdata;
  endtask

  task automatic bus_write(int b, logic [18:0] a, logic [31:0] d);
    @(negedge clk);
    strobe = 1; wr = 1; addr = {3'(b), a}; wdata = d;
    @(negedge clk);
    strobe = 0; wr = 0;
    expect_eq(32'(rvalid), 0, "rvalid after write");
  endtask

  task automatic read_block(int b, int ev, int start, int len);
    for (int i = 0; i <= len; i++) begin
      @(negedge clk);
      if (i > 0) begin
        expect_eq(32'(rvalid), 1, "burst rvalid");
        expect_eq(rdata, word_of(b, ev, i - 1), "event word");
      end
      if (i < len) begin
        strobe = 1; wr = 0; addr = {3'(b), 3'b000, 16'((start + i) % WORDS)};
      end else begin
        strobe = 0;
      end
    end
  endtask

  initial begin
    logic [31:0] c0, c1, d;
    logic        lr_c0;
    int          next_ev [BOARDS];
    int          start, stop, len, ta, served;
    strobe = 0; wr = 0; addr = 0; wdata = 0;
    seu_err = 0; pixel_ctrl_err = 0; temp_high = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // let board 0 fill its memory before the router starts
    repeat (80000) @(posedge clk);
    served = 0;
    while (served < BOARDS * N_EVENTS) begin
      for (int b = 0; b < BOARDS; b++) begin
        int ev;
        ev = next_ev[b];
        if (ev == N_EVENTS) continue;
        seu_err = BOARDS'($urandom); pixel_ctrl_err = BOARDS'($urandom); temp_high = BOARDS'($urandom);
        if (ev % 2 == 0) begin
          bus_read(b, {3'b001, 16'h0}, c0);
          if (!c0[0]) continue;
        end else begin
          @(negedge clk);
          if (!irq[b]) continue;
          n_irq_polls++;
          bus_read(b, {3'b001, 16'h0}, c0);
        end
        lr_c0 = lr_at_read;
        bus_read(b, {3'b010, 16'h0}, c1);
        wait (sb[b].size() > ev);
        start = int'(c1[31:16]);
        stop  = int'(c1[15:0]);
        len   = ((stop - start + WORDS) % WORDS) + 1;
        expect_eq(32'(c0[0]), 1, "event ready");
        expect_eq(32'(c0[9:1]), 32'(ev % 512), "event number");
        expect_eq(32'(c0[12:10]), 32'({sb[b][ev].err.format_err, sb[b][ev].err.link_down_err, sb[b][ev].err.parity_err}), "error bits");
        expect_eq(32'(c0[16:13]), 32'({lr_c0, temp_high[b], pixel_ctrl_err[b], seu_err[b]}), "status bits");
        expect_eq(32'(len), 32'(sb[b][ev].len), "event length");
        if (stop < start) n_wrap++;
        if (sb[b][ev].err.parity_err) n_par++;
        if (sb[b][ev].err.format_err) n_fmt++;
        if (sb[b][ev].err.link_down_err) n_ldown++;
        read_block(b, ev, start, len);
        // absent half stave
        if (ev % 10 == 4) begin
          bus_read(6 + (ev / 10) % 2, {3'b001, 16'h0}, d);
          expect_eq(d, 0, "absent half stave");
          n_absent++;
        end
        // test mode on this board
        if (ev == 12 + b) begin
          ta = (stop + WORDS / 2) % WORDS;
          bus_write(b, {3'b100, 16'h0}, 32'h1);
          bus_read(b, {3'b100, 16'h0}, d);
          expect_eq(d, 32'h1, "test/run read-back");
          repeat (30) @(negedge clk);
          for (int k = 0; k < 4; k++) begin
            bus_write(b, {3'b000, 16'((ta + k) % WORDS)}, 32'hBEEF_0000 + 32'(k));
            n_tw++;
          end
          for (int k = 0; k < 4; k++) begin
            bus_read(b, {3'b000, 16'((ta + k) % WORDS)}, d);
            expect_eq(d, 32'hBEEF_0000 + 32'(k), "test write read-back");
          end
          bus_write(b, {3'b100, 16'h0}, 32'h0);
          read_block(b, ev, start, len);
        end
        bus_write(b, {3'b011, 16'h0}, 32'h0);
        n_flush[b]++;
        next_ev[b] = ev + 1;
        served++;
      end
    end
    wait (links_done == BOARDS);
    repeat (5) @(negedge clk);
    expect_eq(32'(irq), 0, "no interrupt after all flushed");
    $display("flushes per board %0d %0d %0d %0d %0d %0d", n_flush[0], n_flush[1], n_flush[2], n_flush[3], n_flush[4], n_flush[5]);
    $display("stalls: slots %0d memory %0d test %0d; wraps %0d; parity %0d format %0d link-down %0d; test writes %0d; absent %0d; irq polls %0d",
             n_slot_stall, n_mem_stall, n_test_stall, n_wrap, n_par, n_fmt, n_ldown, n_tw, n_absent, n_irq_polls);
    if (n_slot_stall == 0 || n_mem_stall == 0 || n_test_stall == 0 || n_wrap == 0 ||
        n_par == 0 || n_fmt == 0 || n_ldown == 0 || n_tw == 0 || n_absent == 0 || n_irq_polls == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    for (int b = 0; b < BOARDS; b++)
      if (n_flush[b] != N_EVENTS) begin
        failures++;
        $display("FAIL board %0d flushed %0d events", b, n_flush[b]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
