// Self-checking testbench of pc_addr_decode.
// Applies every code of address bits 18..16 and random low bits and compares
// the target, memory address and event index with a reference worked out
// here from the address map.
module tb_pc_addr_decode;
  import pc_pkg::*;

  logic [CONV_AW-1:0]  addr;
  region_e             region;
  logic [MEM_AW_D-1:0] mem_addr;
  logic [2:0]          ev_idx;
  int checks = 0, failures = 0;

  pc_addr_decode dut (.addr, .region, .mem_addr, .ev_idx);

  function automatic region_e ref_region(logic [2:0] code);
    case (code)
      3'd0: return REG_MEM;
      3'd1: return REG_CTRL0;
      3'd2: return REG_CTRL1;
      3'd3: return REG_FLUSH;
      3'd4: return REG_TESTRUN;
      default: return REG_NONE;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      addr = CONV_AW'($urandom);
      if (n < 8) addr[18:16] = 3'(n);
      #1;
      checks++;
      if (region !== ref_region(addr[18:16]) || mem_addr !== addr[15:0] || ev_idx !== addr[2:0]) begin
        failures++;
        if (failures < 10)
          $display("FAIL addr=%05h region=%0d mem_addr=%04h ev_idx=%0d", addr, region, mem_addr, ev_idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
