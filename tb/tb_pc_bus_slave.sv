// Self-checking testbench of pc_bus_slave.
// The testbench stands in for the event memory (a synchronous read port
// returning a hash of the address one clock after mem_re) and for the
// control word registers (words computed from the event index). It issues
// random back-to-back router reads and writes to every target and checks:
// rdata and rvalid exactly one clock after each read strobe, the flush pulse
// on flush-register writes only, the test/run register and its read-back,
// router memory writes forwarded to the top port only in test mode, and no
// side effects of reads.
module tb_pc_bus_slave;
  import pc_pkg::*;
  localparam int AW = 16;

  logic               clk = 0, rst_n = 0;
  logic               strobe, wr;
  logic [CONV_AW-1:0] addr;
  logic [DATA_W-1:0]  wdata, rdata;
  logic               rvalid;
  logic               mem_re;
  logic [AW-1:0]      mem_raddr;
  logic [DATA_W-1:0]  mem_rdata;
  logic               tw_we;
  logic [AW-1:0]      tw_addr;
  logic [DATA_W-1:0]  tw_data;
  logic [2:0]         ev_idx;
  logic [DATA_W-1:0]  ctrl0, ctrl1;
  logic               flush, test_mode;
  int checks = 0, failures = 0;

  pc_bus_slave #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] hash(logic [31:0] a);
    return (a * 32'h9E3779B1) ^ 32'h5A5A_0000;
  endfunction

  // stand-ins for the memory bottom port and the control registers
  always_ff @(posedge clk) if (mem_re) mem_rdata <= hash(32'(mem_raddr));
  assign ctrl0 = 32'hC000_0000 | 32'(ev_idx);
  assign ctrl1 = 32'hC100_0000 | (32'(ev_idx) << 4);

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    bit          m_test = 0;
    bit          pend = 0;
    logic [31:0] pend_data = 0;
    int          n_rd [8], n_wr [8], n_tw = 0, n_tw_blocked = 0;
    strobe = 0; wr = 0; addr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      logic [2:0]  code;
      logic [31:0] exp_rd;
      @(negedge clk);
      strobe = ($urandom_range(0, 9) < 8);
      wr     = ($urandom_range(0, 2) == 0);
      code   = ($urandom_range(0, 9) == 0) ? 3'($urandom_range(5, 7)) : 3'($urandom_range(0, 4));
      addr   = {code, 16'($urandom)};
      wdata  = $urandom;
      #1;
      // combinational outputs in the strobe cycle
      expect_eq(32'(ev_idx), 32'(addr[2:0]), "ev_idx");
      expect_eq(32'(flush), 32'(strobe && wr && code == 3'd3), "flush");
      expect_eq(32'(mem_re), 32'(strobe && !wr && code == 3'd0), "mem_re");
      expect_eq(32'(tw_we), 32'(strobe && wr && code == 3'd0 && m_test), "tw_we");
      if (strobe && !wr && code == 3'd0) expect_eq(32'(mem_raddr), 32'(addr[15:0]), "mem_raddr");
      if (tw_we) begin
        expect_eq(32'(tw_addr), 32'(addr[15:0]), "tw_addr");
        expect_eq(tw_data, wdata, "tw_data");
        n_tw++;
      end
      if (strobe && wr && code == 3'd0 && !m_test) n_tw_blocked++;
      case (code)
        3'd0: exp_rd = hash(32'(addr[15:0]));
        3'd1: exp_rd = 32'hC000_0000 | 32'(addr[2:0]);
        3'd2: exp_rd = 32'hC100_0000 | (32'(addr[2:0]) << 4);
        3'd4: exp_rd = 32'(m_test);
        default: exp_rd = 0;
      endcase
      if (strobe) begin
        if (wr) n_wr[code]++;
        else    n_rd[code]++;
      end
      @(posedge clk);
      #1;
      // read data of this strobe, one clock later
      expect_eq(32'(rvalid), 32'(strobe && !wr), "rvalid");
      if (strobe && !wr) expect_eq(rdata, exp_rd, $sformatf("rdata code %0d", code));
      if (strobe && wr && code == 3'd4) m_test = wdata[0];
      expect_eq(32'(test_mode), 32'(m_test), "test_mode");
    end
    for (int c = 0; c < 8; c++)
      if (n_rd[c] == 0 || n_wr[c] == 0) begin
        failures++;
        $display("FAIL target code %0d not exercised", c);
      end
    if (n_tw == 0 || n_tw_blocked == 0) begin
      failures++;
      $display("FAIL test writes %0d, blocked writes %0d", n_tw, n_tw_blocked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
