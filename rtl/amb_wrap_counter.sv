// amb_wrap_counter: buffer offset counter with wrap-around.
//
// Holds an offset 0..length-1 into a circular buffer. The AGU uses one as its
// write counter, one as its read counter and one as the FIMO output-count
// counter. inc steps up and dec steps down, both wrapping at the configured
// length (0 -> length-1 going down); inc and dec together hold the value.
// load sets the value directly; clear returns it to zero. Priority:
// clear, load, then inc/dec. wrap_up is a combinational flag, high when an
// inc in this cycle wraps from length-1 to 0. All updates take effect at the
// next rising clock edge; rst_n is asynchronous and active low.
// The counters and their wrap-around come from the document's FIFO address
// generator; the load input and the down direction serve the FIMO and LIFO
// modes. Zero-based offsets (the buffer base is added elsewhere) are this
// design's choice.
module amb_wrap_counter #(
  parameter int unsigned W = 8   // offset width; length may be up to 2**W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [W:0]   length,
  input  logic         inc,
  input  logic         dec,
  input  logic         load,
  input  logic [W-1:0] load_val,
  output logic [W-1:0] value,
  output logic         wrap_up
);
  logic [W:0] last;
  assign last    = length - 1'b1;
  assign wrap_up = inc && !dec && ({1'b0, value} == last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           value <= '0;
    else if (clear)                       value <= '0;
    else if (load)                        value <= load_val;
    else if (inc && !dec) begin
      if ({1'b0, value} >= last)          value <= '0;
      else                                value <= value + 1'b1;
    end else if (dec && !inc) begin
      if (value == '0)                    value <= last[W-1:0];
      else                                value <= value - 1'b1;
    end
  end
endmodule
