// End-to-end testbench of one pixel converter board (pixel_converter), with
// a 1024-word event memory (MEM_AW=10) so that the memory fills up quickly.
//
// A link receiver process sends events of random length whose words are a
// known function of (event number, word index), with random gaps, random
// per-word parity and format errors and occasional link-down cycles; it
// records in a scoreboard what each event must look like. A router process
// follows the access sequence of the interface: poll event ready (through
// control word 0 or the interrupt line), read control word 0 and control
// word 1 of event 0, read the event's words from start to end address (one
// read per clock, data one clock after each strobe), then write the flush
// register. Everything read is compared with the scoreboard. Part of the
// time the router also checks events 1..7, switches to test mode, writes
// the memory and reads it back, then returns to run mode.
// Counted mechanisms (each must occur): link back-pressure with eight
// events stored, with the memory full, and in test mode; address wrap of an
// event; each per-event error flag; router test writes; the interrupt.
module tb_pixel_converter;
  import pc_pkg::*;
  localparam int MEM_AW = 10, EVENTS = 8, WORDS = 2**MEM_AW, N_EVENTS = 300;

  logic               clk = 0, rst_n = 0;
  logic               strobe, wr;
  logic [CONV_AW-1:0] addr;
  logic [DATA_W-1:0]  wdata, rdata;
  logic               rvalid, irq;
  logic               lk_valid, lk_ready, lk_last, lk_parity_err, lk_format_err;
  logic [DATA_W-1:0]  lk_data;
  logic               link_ready, seu_err, pixel_ctrl_err, temp_high;
  int checks = 0, failures = 0;

  pixel_converter #(.MEM_AW(MEM_AW), .EVENTS(EVENTS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired: router at %0d, link sent %0d, count %0d, irq %0d", n_done, sb.size(), dut.u_queue.count, irq);
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

  function automatic logic [31:0] word_of(int ev, int i);
    return (32'(ev) * 32'h9E3779B1) ^ (32'(i) * 32'h85EBCA77) ^ 32'h1234_5678;
  endfunction

  typedef struct { int len; event_err_t err; } ev_ref_t;
  ev_ref_t sb[$];
  int n_slot_stall = 0, n_mem_stall = 0, n_test_stall = 0, n_wrap = 0;
  int n_par = 0, n_fmt = 0, n_ldown = 0, n_tw = 0, n_irq_polls = 0, n_done = 0;
  bit link_done = 0;
  logic lr_at_read;   // link_ready when the last single read was strobed

  // ---------------- link receiver ----------------
  initial begin
    bit in_ev, acc;
    event_err_t e;
    lk_valid = 0; lk_last = 0; lk_data = 0; lk_parity_err = 0; lk_format_err = 0;
    link_ready = 1;
    wait (rst_n);
    for (int ev = 0; ev < N_EVENTS; ev++) begin
      int len, i;
      len = ((ev % 10) == 5) ? $urandom_range(300, 700) : $urandom_range(1, 40);
      i   = 0;
      e = '0; in_ev = 0;
      while (i < len) begin
        @(negedge clk);
        lk_valid      = ($urandom_range(0, 9) < 9);
        lk_last       = (i == len - 1);
        lk_data       = word_of(ev, i);
        lk_parity_err = ($urandom_range(0, 999) == 0);
        lk_format_err = ($urandom_range(0, 999) == 0);
        link_ready    = ($urandom_range(0, 499) != 0);
        #1;
        acc = lk_valid && lk_ready;
        if (lk_valid && !lk_ready) begin
          if (dut.test_mode) n_test_stall++;
          else if (int'(dut.u_queue.count) == EVENTS) n_slot_stall++;
          else n_mem_stall++;
        end
        if ((in_ev || acc) && !link_ready) e.link_down_err = 1;
        if (acc) begin
          e.parity_err |= lk_parity_err;
          e.format_err |= lk_format_err;
          in_ev = 1;
          i++;
        end
      end
      sb.push_back('{len: len, err: e});
    end
    @(negedge clk);
    lk_valid = 0; link_ready = 1;
    link_done = 1;
  end

  // ---------------- router ----------------
  task automatic bus_read(logic [18:0] a, output logic [31:0] d);
    @(negedge clk);
    strobe = 1; wr = 0; addr = a;
    @(posedge clk);
    lr_at_read = link_ready;
    @(negedge clk);
    strobe = 0;
    expect_eq(32'(rvalid), 1, "rvalid");
    d = rdata;
  endtask

  task automatic bus_write(logic [18:0] a, logic [31:0] d);
    @(negedge clk);
    strobe = 1; wr = 1; addr = a; wdata = d;
    @(negedge clk);
    strobe = 0; wr = 0;
    expect_eq(32'(rvalid), 0, "rvalid after write");
  endtask

  // reads words start..end (wrapping), one strobe per clock
  task automatic read_block(int ev, int start, int len);
    for (int i = 0; i <= len; i++) begin
      @(negedge clk);
      if (i > 0) begin
        expect_eq(32'(rvalid), 1, "burst rvalid");
        expect_eq(rdata, word_of(ev, i - 1), "event word");
      end
      if (i < len) begin
        strobe = 1; wr = 0; addr = {3'b000, 16'((start + i) % WORDS)};
      end else begin
        strobe = 0;
      end
    end
  endtask

  initial begin
    logic [31:0] c0, c1, d;
    logic        lr_c0;
    strobe = 0; wr = 0; addr = 0; wdata = 0;
    seu_err = 0; pixel_ctrl_err = 0; temp_high = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // let the link fill the board first, so that it stalls
    repeat (3000) @(posedge clk);
    for (int ev = 0; ev < N_EVENTS; ev++) begin
      int start, stop, len;
      seu_err = 1'($urandom); pixel_ctrl_err = 1'($urandom); temp_high = 1'($urandom);
      // poll: event ready bit of control word 0 or the interrupt line
      if (ev % 2 == 0) begin
        do bus_read({3'b001, 16'h0}, c0); while (!c0[0]);
      end else begin
        do @(negedge clk); while (!irq);
        n_irq_polls++;
        bus_read({3'b001, 16'h0}, c0);
      end
      lr_c0 = lr_at_read;
      bus_read({3'b010, 16'h0}, c1);
      wait (sb.size() > ev);
      start = int'(c1[31:16]);
      stop  = int'(c1[15:0]);
      len   = ((stop - start + WORDS) % WORDS) + 1;
      expect_eq(32'(c0[0]), 1, "event ready");
      expect_eq(32'(c0[9:1]), 32'(ev % 512), "event number");
      expect_eq(32'(c0[12:10]), 32'({sb[ev].err.format_err, sb[ev].err.link_down_err, sb[ev].err.parity_err}), "error bits");
      expect_eq(32'(c0[16:13]), 32'({lr_c0, temp_high, pixel_ctrl_err, seu_err}), "status bits");
      expect_eq(32'(len), 32'(sb[ev].len), "event length");
      if (stop < start) n_wrap++;
      if (sb[ev].err.parity_err) n_par++;
      if (sb[ev].err.format_err) n_fmt++;
      if (sb[ev].err.link_down_err) n_ldown++;
      // read the event twice sometimes: memory-mapped access allows it
      read_block(ev, start, len);
      if (ev % 25 == 3) read_block(ev, start, len);
      // look at the younger events' control words
      if (ev % 7 == 0) begin
        for (int k = 1; k < EVENTS; k++) begin
          bus_read({3'b001, 13'h0, 3'(k)}, c0);
          if (c0[0]) expect_eq(32'(c0[9:1]), 32'((ev + k) % 512), "younger event number");
        end
      end
      // test mode: write a few words outside the events and read them back
      if (ev % 40 == 20) begin
        int ta;
        ta = (stop + WORDS / 2) % WORDS;
        bus_write({3'b100, 16'h0}, 32'h1);
        bus_read({3'b100, 16'h0}, d);
        expect_eq(d, 32'h1, "test/run read-back");
        repeat (20) @(negedge clk);
        for (int k = 0; k < 4; k++) begin
          bus_write({3'b000, 16'((ta + k) % WORDS)}, 32'hDEAD_0000 + 32'(k));
          n_tw++;
        end
        for (int k = 0; k < 4; k++) begin
          bus_read({3'b000, 16'((ta + k) % WORDS)}, d);
          expect_eq(d, 32'hDEAD_0000 + 32'(k), "test write read-back");
        end
        bus_write({3'b100, 16'h0}, 32'h0);
        // the test words must not have touched the stored event
        read_block(ev, start, len);
      end
      bus_write({3'b011, 16'h0}, 32'h0);
      n_done++;
    end
    wait (link_done);
    repeat (5) @(negedge clk);
    expect_eq(32'(irq), 0, "irq after all flushed");
    bus_read({3'b001, 16'h0}, c0);
    expect_eq(32'(c0[0]), 0, "no event left");
    $display("events %0d, stalls: slots %0d memory %0d test %0d, wraps %0d, parity %0d format %0d link-down %0d, test writes %0d, irq polls %0d",
             n_done, n_slot_stall, n_mem_stall, n_test_stall, n_wrap, n_par, n_fmt, n_ldown, n_tw, n_irq_polls);
    if (n_slot_stall == 0 || n_mem_stall == 0 || n_test_stall == 0 || n_wrap == 0 ||
        n_par == 0 || n_fmt == 0 || n_ldown == 0 || n_tw == 0 || n_irq_polls == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
