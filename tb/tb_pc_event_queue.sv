// Self-checking testbench of pc_event_queue.
// Random pushes of descriptors and flushes (including flushes of an empty
// queue and pushes coinciding with flushes) are mirrored in a reference queue
// kept here. After every clock, control words 0 and 1 of all eight indices,
// the event count, the event-ready line and, for flushes, the freed word
// count are compared with the reference. The board status bits are changed
// at random and must appear in every control word 0.
module tb_pc_event_queue;
  import pc_pkg::*;
  localparam int EVENTS = 8, AW = 16;

  logic                    clk = 0, rst_n = 0;
  logic                    push, flush;
  event_desc_t             push_desc;
  board_status_t           status;
  logic [2:0]              rd_idx;
  logic [DATA_W-1:0]       ctrl0, ctrl1;
  logic [$clog2(EVENTS):0] count;
  logic                    event_ready;
  logic [AW:0]             flush_len;
  int checks = 0, failures = 0;

  typedef struct { event_desc_t d; int num; } ref_t;
  ref_t q[$];
  int   next_num = 0;
  int   n_full = 0, n_empty_flush = 0, n_both = 0, n_wrapped = 0;

  pc_event_queue #(.EVENTS(EVENTS), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
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

  function automatic logic [31:0] ref_ctrl0(int i);
    logic [31:0] w = '0;
    if (i < q.size()) begin
      w[0]    = 1'b1;
      w[9:1]  = 9'(q[i].num);
      w[10]   = q[i].d.err.parity_err;
      w[11]   = q[i].d.err.link_down_err;
      w[12]   = q[i].d.err.format_err;
    end
    w[13] = status.seu_err;
    w[14] = status.pixel_ctrl_err;
    w[15] = status.temp_high;
    w[16] = status.link_ready;
    return w;
  endfunction

  function automatic logic [31:0] ref_ctrl1(int i);
    if (i < q.size()) return {q[i].d.start_addr, q[i].d.end_addr};
    return '0;
  endfunction

  task automatic check_all();
    for (int i = 0; i < 8; i++) begin
      rd_idx = 3'(i);
      #1;
      expect_eq(ctrl0, ref_ctrl0(i), $sformatf("ctrl0[%0d]", i));
      expect_eq(ctrl1, ref_ctrl1(i), $sformatf("ctrl1[%0d]", i));
    end
    expect_eq(32'(count), 32'(q.size()), "count");
    expect_eq(32'(event_ready), 32'(q.size() != 0), "event_ready");
  endtask

  initial begin
    logic [16:0] exp_len;
    push = 0; flush = 0; push_desc = '0; status = '0; rd_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // bias towards filling in the first half of each 200-cycle window
      push  = (q.size() < EVENTS) && ($urandom_range(0, 99) < ((n % 200) < 100 ? 70 : 30));
      flush = ($urandom_range(0, 99) < ((n % 200) < 100 ? 25 : 65));
      push_desc.start_addr = 16'($urandom);
      push_desc.end_addr   = ($urandom_range(0, 3) == 0) ? 16'(push_desc.start_addr - 1)
                                                         : 16'(push_desc.start_addr + $urandom_range(0, 3000));
      push_desc.err        = 3'($urandom);
      status               = 4'($urandom);
      #1;
      // freed words of the oldest event, checked before the clock
      if (flush && q.size() != 0) begin
        exp_len = 17'(16'(q[0].d.end_addr - q[0].d.start_addr)) + 17'd1;
        if (q[0].d.end_addr == 16'(q[0].d.start_addr - 1)) n_wrapped++;
      end else begin
        exp_len = '0;
      end
      if (flush && q.size() == 0) n_empty_flush++;
      if (flush && push && q.size() != 0) n_both++;
      expect_eq(32'(flush_len), 32'(exp_len), "flush_len");
      @(posedge clk);
      if (flush && q.size() != 0) void'(q.pop_front());
      if (push) begin
        q.push_back('{d: push_desc, num: next_num});
        next_num = (next_num + 1) % 512;
      end
      if (q.size() == EVENTS) n_full++;
      @(negedge clk);
      push = 0; flush = 0;
      check_all();
    end
    if (n_full == 0 || n_empty_flush == 0 || n_both == 0 || n_wrapped == 0) begin
      failures++;
      $display("FAIL coverage full=%0d empty_flush=%0d both=%0d wrapped=%0d", n_full, n_empty_flush, n_both, n_wrapped);
    end
    $display("queue full %0d times, empty flushes %0d, push+flush %0d", n_full, n_empty_flush, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
