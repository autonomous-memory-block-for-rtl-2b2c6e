// tb_amb_bypass_mux: self-checking testbench of the random-access bypass.
// Applies random AGU and external address/enable sets with the bypass
// select in both positions and checks that the memory side follows the
// selected source exactly.
`timescale 1ns/1ps
module tb_amb_bypass_mux;
  localparam int unsigned AW = 8;
  logic bypass, agu_we, agu_re, ext_we, ext_re, mem_we, mem_re;
  logic [AW-1:0] agu_waddr, agu_raddr, ext_waddr, ext_raddr, mem_waddr, mem_raddr;
  amb_bypass_mux #(.ADDR_W(AW)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 2000; t++) begin
      bypass = $urandom % 2;
      agu_we = $urandom % 2; agu_re = $urandom % 2; ext_we = $urandom % 2; ext_re = $urandom % 2;
      agu_waddr = AW'($urandom); agu_raddr = AW'($urandom);
      ext_waddr = AW'($urandom); ext_raddr = AW'($urandom);
      #1;
      checks++;
      if (bypass ? (mem_we != ext_we || mem_re != ext_re || mem_waddr != ext_waddr || mem_raddr != ext_raddr)
                 : (mem_we != agu_we || mem_re != agu_re || mem_waddr != agu_waddr || mem_raddr != agu_raddr)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d bypass=%0b", t, bypass);
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
