// amb: Autonomous Memory Block - an FPGA block RAM with its own address
// generation unit.
//
// A conventional FPGA block RAM needs address counters and control built in
// the surrounding logic cells, and every address bit routed to the memory.
// The AMB moves that address generation into the memory block: once
// configured (cfg, normally static configuration memory) the surrounding
// logic only says "write this word" and "give me the next word", and the AGU
// (amb_agu) works out the addresses for the selected mode: FIFO, FIMO, LIFO,
// swinging buffer or striped access. In random access mode amb_bypass_mux
// hands the RAM (amb_bram) the external addresses instead, as in a
// conventional block RAM.
// Interface: wr_req/wr_data with wr_ready, rd_req with rd_avail; a read
// accepted in cycle t (rd_req && rd_avail) returns rd_data with rd_valid one
// clock later; rd_last comes with that data and marks the end of a FIMO
// window, a swinging read half or a read stripe. ext_waddr/ext_raddr are used
// only in random mode, with wr_req/rd_req as enables. clear restarts the AGU
// (pulse it after changing cfg) and clears the sticky overflow/underflow
// flags. full, empty, count and swap report buffer state.
// The structure (AGU + bypass + dual-port RAM) follows the document; the
// handshakes, the one-cycle read latency and the 256 x 9-bit default size
// are this design's choices (8 address bits is the size the document
// evaluates).
module amb
  import amb_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  amb_cfg_t          cfg,
  input  logic              clear,
  // write side
  input  logic              wr_req,
  input  logic [DATA_W-1:0] wr_data,
  output logic              wr_ready,
  // read side
  input  logic              rd_req,
  output logic              rd_avail,
  output logic [DATA_W-1:0] rd_data,
  output logic              rd_valid,
  output logic              rd_last,
  // random access mode addresses
  input  logic [ADDR_W-1:0] ext_waddr,
  input  logic [ADDR_W-1:0] ext_raddr,
  // status
  output logic              full,
  output logic              empty,
  output logic [ADDR_W:0]   count,
  output logic              overflow,
  output logic              underflow,
  output logic              swap
);
  logic              agu_we, agu_re, agu_last;
  logic [ADDR_W-1:0] agu_waddr, agu_raddr;
  logic              mem_we, mem_re;
  logic [ADDR_W-1:0] mem_waddr, mem_raddr;
  logic              bypass;

  assign bypass = (cfg.mode == MODE_RANDOM);

  amb_agu #(.ADDR_W(ADDR_W)) u_agu (
    .clk, .rst_n, .clear, .cfg,
    .wr_req, .wr_ready, .rd_req, .rd_avail, .rd_last(agu_last),
    .mem_we(agu_we), .mem_waddr(agu_waddr), .mem_re(agu_re), .mem_raddr(agu_raddr),
    .full, .empty, .count, .overflow, .underflow, .swap);

  amb_bypass_mux #(.ADDR_W(ADDR_W)) u_bypass (
    .bypass,
    .agu_we, .agu_waddr, .agu_re, .agu_raddr,
    .ext_we(wr_req), .ext_waddr, .ext_re(rd_req), .ext_raddr,
    .mem_we, .mem_waddr, .mem_re, .mem_raddr);

  amb_bram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ram (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(wr_data),
    .re(mem_re), .raddr(mem_raddr), .rdata(rd_data));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_last  <= 1'b0;
    end else begin
      rd_valid <= mem_re;
      rd_last  <= agu_last && !bypass;
    end
  end
endmodule
