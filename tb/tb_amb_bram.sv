// tb_amb_bram: self-checking testbench of the dual-port block RAM.
// Fills every word, then runs random simultaneous writes and reads
// (including same-address collisions) and checks each read, one cycle
// later, against a model memory; also checks that rdata holds while re is
// low and that a colliding read returns the old word.
`timescale 1ns/1ps
module tb_amb_bram;
  localparam int unsigned AW = 8, DW = 9;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  amb_bram #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  int checks = 0, failures = 0, n_coll = 0;
  logic [DW-1:0] model [1 << AW];
  logic [DW-1:0] exp_q;
  bit pend;
  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0; pend = 0;
    @(negedge clk);
    for (int a = 0; a < (1 << AW); a++) begin
      we = 1; waddr = AW'(a); wdata = DW'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int t = 0; t < 3000; t++) begin
      we = $urandom % 2; re = $urandom % 2; wdata = DW'($urandom);
      waddr = AW'($urandom); raddr = (($urandom % 4) == 0) ? waddr : AW'($urandom);
      #1;
      if (pend) begin
        checks++;
        if (rdata != exp_q) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d rdata=%0h exp=%0h", t, rdata, exp_q);
        end
      end
      if (re) begin exp_q = model[raddr]; if (we && waddr == raddr) n_coll++; end
      pend = 1;   // rdata must hold its last value when re is low
      if (we) model[waddr] = wdata;
      @(negedge clk);
    end
    checks++;
    if (n_coll == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
