// amb_bypass_mux: random-access bypass of the AGU.
//
// In random access mode (bypass = 1) the block RAM's write and read
// addresses and enables come straight from the surrounding logic, exactly as
// in a conventional block RAM; otherwise they come from the AGU. A second
// function is gating: in bypass mode the AGU's enables are ignored, and in
// AGU mode the external enables are ignored. Purely combinational; it adds
// one multiplexer level to the address path, the small extra delay of the
// bypass path that the document mentions. Port names and the single select
// bit are this design's choices.
module amb_bypass_mux #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              bypass,
  // from the AGU
  input  logic              agu_we,
  input  logic [ADDR_W-1:0] agu_waddr,
  input  logic              agu_re,
  input  logic [ADDR_W-1:0] agu_raddr,
  // from the surrounding logic
  input  logic              ext_we,
  input  logic [ADDR_W-1:0] ext_waddr,
  input  logic              ext_re,
  input  logic [ADDR_W-1:0] ext_raddr,
  // to the block RAM
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_waddr,
  output logic              mem_re,
  output logic [ADDR_W-1:0] mem_raddr
);
  always_comb begin
    if (bypass) begin
      mem_we = ext_we;  mem_waddr = ext_waddr;
      mem_re = ext_re;  mem_raddr = ext_raddr;
    end else begin
      mem_we = agu_we;  mem_waddr = agu_waddr;
      mem_re = agu_re;  mem_raddr = agu_raddr;
    end
  end
endmodule
