// Self-checking testbench of pc_event_writer with a 256-word memory (AW=8)
// so that wrap-around and a full memory happen often.
// The testbench plays the link receiver (random events, gaps, error flags,
// link-down cycles) and the control word registers (it keeps the pushed
// descriptors, reports the count and flushes the oldest at random, returning
// the freed word count). A reference model here predicts lk_ready, every
// memory write (address and data), and each pushed descriptor, which must
// arrive exactly one clock after the last word of its event. Counts how
// often the memory-full and eight-events stalls, test-mode hold-off, wrap
// and each error flag occur; a mechanism never seen is a failure.
module tb_pc_event_writer;
  import pc_pkg::*;
  localparam int AW = 8, EVENTS = 8, WORDS = 2**AW;

  logic                    clk = 0, rst_n = 0;
  logic                    test_mode;
  logic                    lk_valid, lk_ready, lk_last, lk_parity_err, lk_format_err, link_ready;
  logic [DATA_W-1:0]       lk_data;
  logic                    we;
  logic [AW-1:0]           waddr;
  logic [DATA_W-1:0]       wdata;
  logic                    push;
  event_desc_t             push_desc;
  logic [$clog2(EVENTS):0] ev_count;
  logic [AW:0]             flush_len;
  int checks = 0, failures = 0;

  pc_event_writer #(.AW(AW), .EVENTS(EVENTS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // reference state
  event_desc_t stored[$];     // descriptors held by the "control registers"
  int          m_wptr = 0, m_used = 0;
  bit          m_in_event = 0;
  int          m_start = 0;
  event_err_t  m_err = '0;
  bit          exp_push = 0;
  event_desc_t exp_desc;
  int n_mem_full = 0, n_slots_full = 0, n_test_hold = 0, n_wrap = 0;
  int n_par = 0, n_fmt = 0, n_ldown = 0, n_events = 0;

  // link stimulus state
  int words_left = 0;

  initial begin
    bit exp_ready, acc, do_flush;
    logic [AW-1:0] ea;
    int len;
    test_mode = 0; lk_valid = 0; lk_last = 0; lk_data = 0; lk_parity_err = 0;
    lk_format_err = 0; link_ready = 1; ev_count = 0; flush_len = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40000; n++) begin
      @(negedge clk);
      // phases: slow draining (memory and slots fill up) and fast draining
      test_mode  = ((n % 5000) >= 4900);
      link_ready = ($urandom_range(0, 199) != 0);
      if (words_left == 0) words_left = ($urandom_range(0, 3) == 0) ? $urandom_range(60, 200) : $urandom_range(1, 12);
      lk_valid      = ($urandom_range(0, 9) < 8);
      lk_last       = (words_left == 1);
      lk_data       = $urandom;
      lk_parity_err = ($urandom_range(0, 299) == 0);
      lk_format_err = ($urandom_range(0, 299) == 0);
      do_flush      = (stored.size() != 0) &&
                      ($urandom_range(0, 99) < (((n / 2500) % 2) == 0 ? 3 : 40));
      ev_count      = ($clog2(EVENTS)+1)'(stored.size());
      flush_len     = do_flush ? (AW+1)'(int'(AW'(stored[0].end_addr - stored[0].start_addr)) + 1) : '0;
      // expected handshake
      exp_ready = !test_mode && (m_used < WORDS) &&
                  (m_in_event || (stored.size() + (exp_push ? 1 : 0) < EVENTS));
      if (!exp_ready && !test_mode) begin
        if (m_used >= WORDS) n_mem_full++;
        else n_slots_full++;
      end
      if (test_mode && lk_valid) n_test_hold++;
      #1;
      expect_eq(lk_ready, exp_ready, "lk_ready");
      acc = lk_valid && exp_ready;
      expect_eq(we, acc, "we");
      if (acc) begin
        ea = AW'(m_wptr);
        expect_eq(waddr, ea, "waddr");
        expect_eq(wdata, lk_data, "wdata");
      end
      @(posedge clk);
      // check the push produced by the previous cycle's last word
      expect_eq(push, exp_push, "push");
      if (exp_push && push) begin
        expect_eq(push_desc, exp_desc, "push_desc");
        stored.push_back(push_desc);
      end
      exp_push = 0;
      if (do_flush) begin
        m_used -= int'(flush_len);
        void'(stored.pop_front());
      end
      // advance the reference
      if (m_in_event || acc) m_err.link_down_err |= !link_ready;
      if (acc) begin
        if (!m_in_event) m_start = m_wptr;
        m_err.parity_err |= lk_parity_err;
        m_err.format_err |= lk_format_err;
        m_used++;
        if (lk_last) begin
          exp_push = 1;
          exp_desc.start_addr = 16'(m_start);
          exp_desc.end_addr   = 16'(m_wptr);
          exp_desc.err        = m_err;
          if (m_wptr < m_start) n_wrap++;
          if (m_err.parity_err) n_par++;
          if (m_err.format_err) n_fmt++;
          if (m_err.link_down_err) n_ldown++;
          n_events++;
          m_err = '0;
          m_in_event = 0;
        end else begin
          m_in_event = 1;
        end
        m_wptr = (m_wptr + 1) % WORDS;
        words_left--;
      end
    end
    $display("events %0d, memory-full stalls %0d, slot stalls %0d, test hold %0d, wraps %0d, parity %0d, format %0d, link down %0d",
             n_events, n_mem_full, n_slots_full, n_test_hold, n_wrap, n_par, n_fmt, n_ldown);
    if (n_mem_full == 0 || n_slots_full == 0 || n_test_hold == 0 || n_wrap == 0 ||
        n_par == 0 || n_fmt == 0 || n_ldown == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
