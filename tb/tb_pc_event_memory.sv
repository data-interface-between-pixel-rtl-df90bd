// Self-checking testbench of pc_event_memory at its full 2^16 x 32 size.
// Writes random words to random addresses through the top port while reading
// random addresses through the bottom port, and compares every read, one
// clock after it was issued, with a reference array kept here. Also checks
// that rdata holds its value when no read is issued and that a read of an
// address written in the same cycle returns the old word.
module tb_pc_event_memory;
  localparam int AW = 16, DW = 32;

  logic          clk = 0;
  logic          we, re;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] model [2**AW];
  bit            known [2**AW];
  int checks = 0, failures = 0;

  pc_event_memory #(.AW(AW), .DW(DW)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [DW-1:0] exp, string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %08h expected %08h", what, rdata, exp);
    end
  endtask

  initial begin
    logic [DW-1:0] exp;
    logic          exp_ok;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill a block of addresses, including both ends of the address space
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a < 128 ? a : 2**AW - 256 + a); wdata = $urandom;
      model[waddr] = wdata; known[waddr] = 1;
    end
    @(negedge clk); we = 0;
    // random traffic
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1);
      waddr = AW'($urandom_range(0, 255) < 128 ? $urandom_range(0, 127) : $urandom);
      wdata = $urandom;
      re    = 1;
      raddr = (n % 3 == 0) ? waddr : AW'($urandom_range(0, 255) < 128 ? $urandom_range(0, 127) : 2**AW - 128 + $urandom_range(0, 127));
      exp    = model[raddr];
      exp_ok = known[raddr];
      @(posedge clk);
      #1;
      if (we) begin model[waddr] = wdata; known[waddr] = 1; end
      if (exp_ok) check(exp, "read");
    end
    // hold: no read issued, rdata keeps the last value
    @(negedge clk);
    we = 0; re = 0;
    exp = rdata;
    repeat (3) @(posedge clk);
    #1 check(exp, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
