// amb_bram: dual-port embedded block RAM of the Autonomous Memory Block.
//
// 2**ADDR_W words of DATA_W bits with one write port and one read port on a
// common clock. A write with `we` stores wdata at waddr at the rising edge. A
// read with `re` captures mem[raddr] into rdata at the rising edge (one cycle
// latency); rdata holds its value while re is low. When both ports use the
// same address in one cycle the read returns the old word (read-before-write),
// which the AGU's LIFO mode relies on when a push and a pop coincide.
// The document only names a dual-port block RAM; the fixed word width, the
// synchronous read and the read-before-write rule are this design's choices.
// The array is not initialised: contents are undefined until written.
module amb_bram #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 9
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
