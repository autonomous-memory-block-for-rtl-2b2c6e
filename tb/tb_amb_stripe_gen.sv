// tb_amb_stripe_gen: self-checking testbench of the stripe address
// sequencer. For a 1-D pattern (Fig. 3 a style: n items, fixed stripe
// offset) and 2-D patterns (windows in a raster image) it steps the
// sequencer with random gaps and compares every address and the
// row/stripe/pattern end flags with the closed-form
// start + s*offset + r*pitch + i, over more than one full pattern.
`timescale 1ns/1ps
module tb_amb_stripe_gen;
  import amb_pkg::*;
  localparam int unsigned AW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stripe_cfg_t cfg;
  logic clear, step, row_end, stripe_end, pattern_end;
  logic [AW-1:0] addr;
  amb_stripe_gen #(.ADDR_W(AW)) dut (.*);

  int checks = 0, failures = 0;

  task automatic run(input int start, n, rows, pitch, offset, stripes);
    int total, i, r, s, expa;
    cfg.start = CFG_W'(start); cfg.n = CFG_W'(n); cfg.rows = CFG_W'(rows);
    cfg.pitch = CFG_W'(pitch); cfg.offset = CFG_W'(offset); cfg.stripes = CFG_W'(stripes);
    clear = 1; step = 0;
    @(negedge clk);
    clear = 0;
    total = n * rows * stripes;
    for (int k = 0; k < 2 * total + 3; k++) begin
      i = k % n; r = (k / n) % rows; s = (k / (n * rows)) % stripes;
      expa = (start + s * offset + r * pitch + i) % 256;
      while (($urandom % 4) == 0) @(negedge clk);   // idle cycles
      step = 1;
      #1;
      checks++;
      if (addr != AW'(expa) || row_end != (i == n - 1) ||
          stripe_end != (i == n - 1 && r == rows - 1) ||
          pattern_end != (i == n - 1 && r == rows - 1 && s == stripes - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d addr=%0d exp=%0d", k, addr, expa);
      end
      @(negedge clk);
      step = 0;
    end
  endtask

  initial begin
    cfg = '0; clear = 0; step = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5, 4, 1, 0, 3, 6);      // 1-D overlapping stripes
    run(0, 3, 3, 16, 1, 14);    // 3x3 windows sliding along a 16-wide image
    run(200, 8, 4, 32, 8, 3);   // 8x4 blocks, wraps past the top of memory
    run(7, 1, 1, 0, 0, 1);      // degenerate: a single address
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
