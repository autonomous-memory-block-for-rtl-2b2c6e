// amb_stripe_gen: address sequencer for the striped access mode.
//
// Produces the address sequence of Fig. 3: n consecutive items starting at
// A1 form a stripe; the next stripe starts at A1 plus a fixed offset. In the
// 2-D form each stripe is `rows` rows of n items in an image stored in raster
// order, rows `pitch` addresses apart. Address, for stripe s, row r, item i:
//   addr = start + s*offset + r*pitch + i      (modulo 2**ADDR_W)
// Three nested counters (item, row, stripe) hold i, r and s; two running
// sums hold s*offset and s*offset + r*pitch, so no multiplier is needed.
// After the last item of the last stripe the pattern starts again at A1.
// Interface: `addr` is the current address (combinational from the state and
// cfg.start); `step` consumes it and moves to the next one at the clock edge.
// row_end, stripe_end and pattern_end flag the current address as the last
// of its row, its stripe and the whole pattern. clear and rst_n restart the
// pattern. The access pattern is the document's; the parameterisation into
// n, rows, pitch, offset and stripes and the repeat are this design's.
module amb_stripe_gen
  import amb_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  stripe_cfg_t       cfg,
  input  logic              step,
  output logic [ADDR_W-1:0] addr,
  output logic              row_end,
  output logic              stripe_end,
  output logic              pattern_end
);
  logic [ADDR_W:0]   item_q, row_q, stripe_q;   // i, r, s
  logic [ADDR_W-1:0] stripe_base_q;             // s*offset
  logic [ADDR_W-1:0] row_base_q;                // s*offset + r*pitch

  logic [ADDR_W:0] n_last, rows_last, stripes_last;
  assign n_last       = cfg.n[ADDR_W:0]       - 1'b1;
  assign rows_last    = cfg.rows[ADDR_W:0]    - 1'b1;
  assign stripes_last = cfg.stripes[ADDR_W:0] - 1'b1;

  assign addr        = cfg.start[ADDR_W-1:0] + row_base_q + item_q[ADDR_W-1:0];
  assign row_end     = (item_q >= n_last);
  assign stripe_end  = row_end && (row_q >= rows_last);
  assign pattern_end = stripe_end && (stripe_q >= stripes_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      item_q <= '0; row_q <= '0; stripe_q <= '0;
      stripe_base_q <= '0; row_base_q <= '0;
    end else if (clear) begin
      item_q <= '0; row_q <= '0; stripe_q <= '0;
      stripe_base_q <= '0; row_base_q <= '0;
    end else if (step) begin
      if (!row_end) begin
        item_q <= item_q + 1'b1;
      end else begin
        item_q <= '0;
        if (!stripe_end) begin
          row_q      <= row_q + 1'b1;
          row_base_q <= row_base_q + cfg.pitch[ADDR_W-1:0];
        end else begin
          row_q <= '0;
          if (!pattern_end) begin
            stripe_q      <= stripe_q + 1'b1;
            stripe_base_q <= stripe_base_q + cfg.offset[ADDR_W-1:0];
            row_base_q    <= stripe_base_q + cfg.offset[ADDR_W-1:0];
          end else begin
            stripe_q      <= '0;
            stripe_base_q <= '0;
            row_base_q    <= '0;
          end
        end
      end
    end
  end
endmodule
