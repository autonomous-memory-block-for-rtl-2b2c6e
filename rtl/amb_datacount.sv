// amb_datacount: the AGU's datacount counter.
//
// Counts the items currently held in a buffer of `capacity` entries. inc adds
// one stored item and dec removes one; both together leave the count
// unchanged. inc at full and dec at empty are ignored, so the count never
// leaves 0..capacity (the FIMO mode relies on this to saturate at the buffer
// length). full and empty are combinational from the registered count.
// clear (synchronous) and rst_n (asynchronous, active low) empty the counter.
// The counter itself is the document's; saturation and flag decoding are
// this design's choices.
module amb_datacount #(
  parameter int unsigned W = 8   // buffer holds up to 2**W items
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [W:0] capacity,
  input  logic       inc,
  input  logic       dec,
  output logic [W:0] count,
  output logic       full,
  output logic       empty
);
  assign full  = (count >= capacity);
  assign empty = (count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      count <= '0;
    else if (clear)                  count <= '0;
    else if (inc && !dec && !full)   count <= count + 1'b1;
    else if (dec && !inc && !empty)  count <= count - 1'b1;
  end
endmodule
