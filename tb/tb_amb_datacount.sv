// tb_amb_datacount: self-checking testbench of the datacount counter.
// Random inc/dec/clear with several capacities; checks count, full and
// empty every cycle against a saturating model, and that full and empty
// were both reached.
`timescale 1ns/1ps
module tb_amb_datacount;
  localparam int unsigned W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, inc, dec, full, empty;
  logic [W:0] capacity, count;
  amb_datacount #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  int model, n_full, n_empty;
  initial begin
    clear = 0; inc = 0; dec = 0; capacity = 16;
    repeat (2) @(negedge clk);
    rst_n = 1; model = 0;
    for (int t = 0; t < 4000; t++) begin
      if (t % 800 == 0) begin
        capacity = (W+1)'(t == 0 ? 16 : t == 800 ? 1 : 1 + $urandom % 16);
        clear = 1;
      end else clear = ($urandom % 200) == 0;
      inc = ($urandom % 100) < ((t / 200) % 2 ? 70 : 30);
      dec = ($urandom % 100) < ((t / 200) % 2 ? 30 : 70);
      #1;
      checks++;
      if (count != (W+1)'(model) || full != (model >= int'(capacity)) || empty != (model == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d count=%0d exp=%0d", t, count, model);
      end
      if (model >= int'(capacity)) n_full++;
      if (model == 0) n_empty++;
      if (clear) model = 0;
      else if (inc && !dec && model < int'(capacity)) model++;
      else if (dec && !inc && model > 0) model--;
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) failures++;
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
