// tb_amb_wrap_counter: self-checking testbench of the wrap-around offset
// counter. Drives random inc/dec/load/clear with several lengths (including
// 1 and the full 2**W) and compares value and wrap_up every cycle with a
// modular-arithmetic model.
`timescale 1ns/1ps
module tb_amb_wrap_counter;
  localparam int unsigned W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, inc, dec, load, wrap_up;
  logic [W:0] length;
  logic [W-1:0] load_val, value;
  amb_wrap_counter #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  int model, n_wrap, n_under;
  initial begin
    clear = 0; inc = 0; dec = 0; load = 0; load_val = 0; length = 5;
    repeat (2) @(negedge clk);
    rst_n = 1; model = 0;
    for (int t = 0; t < 4000; t++) begin
      if (t % 500 == 0) begin
        length = (W+1)'(t == 0 ? 5 : t == 500 ? 1 : t == 1000 ? 16 : 1 + $urandom % 16);
        clear = 1;
      end else begin
        clear = ($urandom % 50) == 0;
      end
      inc = $urandom % 2; dec = ($urandom % 3) == 0;
      load = ($urandom % 40) == 0; load_val = W'($urandom % length);
      #1;
      checks++;
      if (value != W'(model) ||
          wrap_up != (inc && !dec && model == int'(length) - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d value=%0d exp=%0d wrap=%0b", t, value, model, wrap_up);
      end
      if (clear) model = 0;
      else if (load) model = load_val;
      else if (inc && !dec) begin
        if (model == int'(length) - 1) n_wrap++;
        model = (model + 1) % int'(length);
      end else if (dec && !inc) begin
        if (model == 0) n_under++;
        model = (model + int'(length) - 1) % int'(length);
      end
      @(negedge clk);
    end
    checks++;
    if (n_wrap == 0 || n_under == 0) failures++;
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
