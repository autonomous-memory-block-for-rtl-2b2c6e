// amb_agu: configurable address generation unit of the Autonomous Memory Block.
//
// Once configured, the AGU turns plain write and read requests from the
// surrounding logic into block-RAM addresses, so no address wires or address
// counters are needed outside the memory block. It is built, as in the
// document's FIFO diagram, from a write counter, a read counter, a datacount
// counter and a small FSM, plus an output-count counter for FIMO and two
// stripe sequencers for striped access. cfg.mode selects:
//   FIFO   circular buffer of L = cfg.length entries at cfg.base; write and
//          read counters wrap at L; datacount gives full and empty.
//   FIMO   each accepted write stores one item over the oldest one, then the
//          FSM enters a burst and supplies the K = cfg.taps most recent items,
//          oldest first (newest last), one per accepted read; writes wait
//          during the burst. No burst is started until K items are held.
//   LIFO   stack of L entries; the counters move up on push and down on pop.
//          A push and a pop in the same cycle return the old top and
//          overwrite it with the new item (the RAM reads before it writes).
//   SWING  two halves of L entries at base and base+L. One fills while the
//          other is read in order; when the write half is full and the read
//          half exhausted the FSM swaps them (one idle cycle, `swap` pulse).
//   STRIPE write and read addresses come from two independent stripe
//          sequencers (cfg.wr_stripe, cfg.rd_stripe); no flow control.
//   RANDOM AGU bypassed; requests are always accepted and the caller's
//          addresses are used (see amb_bypass_mux).
// Flow control: wr_ready / rd_avail say whether a request this cycle is
// accepted. A write request without wr_ready is dropped and sets the sticky
// `overflow` flag; a read request without rd_avail sets `underflow`. Both
// clear with `clear`, which also restarts every counter (pulse it after
// changing cfg). Memory-side outputs (mem_*) are combinational from the
// requests and the state; the RAM reads synchronously, so data for a read
// accepted in cycle t appears after edge t+1. rd_last marks the accepted read
// that ends a FIMO burst, a swinging read half, or a read stripe.
// The five modes and their counters are the document's; request/ready
// handshakes, sticky flags, the FIMO output order, the burst condition and
// the configuration layout are this design's choices.
module amb_agu
  import amb_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  amb_cfg_t          cfg,
  // fabric side
  input  logic              wr_req,
  output logic              wr_ready,
  input  logic              rd_req,
  output logic              rd_avail,
  output logic              rd_last,
  // memory side
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_waddr,
  output logic              mem_re,
  output logic [ADDR_W-1:0] mem_raddr,
  // status
  output logic              full,
  output logic              empty,
  output logic [ADDR_W:0]   count,
  output logic              overflow,
  output logic              underflow,
  output logic              swap
);
  typedef enum logic {FIMO_ACCEPT, FIMO_BURST} fimo_state_e;

  logic [ADDR_W:0]   len, taps;
  logic [ADDR_W-1:0] base;
  assign len  = cfg.length[ADDR_W:0];
  assign taps = cfg.taps[ADDR_W:0];
  assign base = cfg.base[ADDR_W-1:0];

  // counters
  logic              w_inc, w_dec, w_wrap;
  logic              r_inc, r_load, r_wrap;
  logic [ADDR_W-1:0] r_load_val;
  logic              o_inc, o_wrap;
  logic              d_inc, d_dec, d_full, d_empty, d_clear;
  logic [ADDR_W-1:0] wcnt, rcnt;
  logic [ADDR_W:0]   dcnt;

  amb_wrap_counter #(.W(ADDR_W)) u_wr_cnt (
    .clk, .rst_n, .clear, .length(len), .inc(w_inc), .dec(w_dec),
    .load(1'b0), .load_val('0), .value(wcnt), .wrap_up(w_wrap));
  amb_wrap_counter #(.W(ADDR_W)) u_rd_cnt (
    .clk, .rst_n, .clear, .length(len), .inc(r_inc), .dec(1'b0),
    .load(r_load), .load_val(r_load_val), .value(rcnt), .wrap_up(r_wrap));
  amb_wrap_counter #(.W(ADDR_W)) u_out_cnt (
    .clk, .rst_n, .clear, .length(taps), .inc(o_inc), .dec(1'b0),
    .load(1'b0), .load_val('0), .value(), .wrap_up(o_wrap));
  amb_datacount #(.W(ADDR_W)) u_data_cnt (
    .clk, .rst_n, .clear(d_clear), .capacity(len), .inc(d_inc), .dec(d_dec),
    .count(dcnt), .full(d_full), .empty(d_empty));

  // stripe sequencers
  logic              ws_step, rs_step;
  logic [ADDR_W-1:0] ws_addr, rs_addr;
  logic              rs_stripe_end;

  amb_stripe_gen #(.ADDR_W(ADDR_W)) u_wr_stripe (
    .clk, .rst_n, .clear, .cfg(cfg.wr_stripe), .step(ws_step), .addr(ws_addr),
    .row_end(), .stripe_end(), .pattern_end());
  amb_stripe_gen #(.ADDR_W(ADDR_W)) u_rd_stripe (
    .clk, .rst_n, .clear, .cfg(cfg.rd_stripe), .step(rs_step), .addr(rs_addr),
    .row_end(), .stripe_end(rs_stripe_end), .pattern_end());

  // FSM state
  fimo_state_e fimo_q;
  logic        wsel_q, wfull_q, rhas_q;   // swinging buffer
  logic        burst_start;

  // LIFO top of stack, FIMO burst start offset, swinging half offsets
  logic [ADDR_W-1:0] top_off, fimo_start, w_half, r_half;
  logic [ADDR_W+1:0] fimo_sum;
  assign top_off    = (wcnt == '0) ? ADDR_W'(len - 1'b1) : wcnt - 1'b1;
  assign fimo_sum   = {1'b0, wcnt} + {1'b0, len} - {1'b0, taps} + 1'b1;
  assign fimo_start = (fimo_sum >= {1'b0, len}) ? ADDR_W'(fimo_sum - {1'b0, len})
                                                : fimo_sum[ADDR_W-1:0];
  assign w_half     = wsel_q ? len[ADDR_W-1:0] : '0;
  assign r_half     = wsel_q ? '0 : len[ADDR_W-1:0];

  logic do_wr, do_rd;

  always_comb begin
    wr_ready = 1'b0;  rd_avail = 1'b0;
    w_inc = 1'b0;  w_dec = 1'b0;
    r_inc = 1'b0;  r_load = 1'b0;  r_load_val = fimo_start;
    o_inc = 1'b0;  d_inc = 1'b0;  d_dec = 1'b0;
    ws_step = 1'b0;  rs_step = 1'b0;
    burst_start = 1'b0;  rd_last = 1'b0;  swap = 1'b0;
    mem_waddr = base + wcnt;
    mem_raddr = base + rcnt;
    full  = d_full;
    empty = d_empty;
    do_wr = 1'b0;  do_rd = 1'b0;
    unique case (cfg.mode)
      MODE_FIFO: begin
        wr_ready = !d_full;
        rd_avail = !d_empty;
        do_wr = wr_req && wr_ready;
        do_rd = rd_req && rd_avail;
        w_inc = do_wr;  r_inc = do_rd;
        d_inc = do_wr;  d_dec = do_rd;
      end
      MODE_LIFO: begin
        wr_ready = !d_full;
        rd_avail = !d_empty;
        do_wr = wr_req && wr_ready;
        do_rd = rd_req && rd_avail;
        mem_raddr = base + top_off;
        if (do_rd) mem_waddr = base + top_off;   // replace top on push+pop
        w_inc = do_wr && !do_rd;
        w_dec = do_rd && !do_wr;
        d_inc = do_wr;  d_dec = do_rd;
      end
      MODE_FIMO: begin
        wr_ready = (fimo_q == FIMO_ACCEPT);
        rd_avail = (fimo_q == FIMO_BURST);
        do_wr = wr_req && wr_ready;
        do_rd = rd_req && rd_avail;
        w_inc = do_wr;
        d_inc = do_wr;   // saturates at L: the oldest item is overwritten
        burst_start = do_wr && ({1'b0, dcnt} + 1'b1 >= {1'b0, taps});
        r_load = burst_start;
        r_inc  = do_rd;
        o_inc  = do_rd;
        rd_last = do_rd && o_wrap;
      end
      MODE_SWING: begin
        wr_ready = !wfull_q;
        rd_avail = rhas_q;
        do_wr = wr_req && wr_ready;
        do_rd = rd_req && rd_avail;
        mem_waddr = base + w_half + wcnt;
        mem_raddr = base + r_half + rcnt;
        w_inc = do_wr;  r_inc = do_rd;
        d_inc = do_wr;
        rd_last = do_rd && r_wrap;
        swap  = wfull_q && !rhas_q;
        full  = wfull_q;
        empty = !rhas_q;
      end
      MODE_STRIPE: begin
        wr_ready = 1'b1;  rd_avail = 1'b1;
        do_wr = wr_req;   do_rd = rd_req;
        ws_step = do_wr;  rs_step = do_rd;
        mem_waddr = ws_addr;
        mem_raddr = rs_addr;
        rd_last = do_rd && rs_stripe_end;
        full = 1'b0;  empty = 1'b0;
      end
      default: begin   // MODE_RANDOM: addresses come from outside
        wr_ready = 1'b1;  rd_avail = 1'b1;
        do_wr = wr_req;   do_rd = rd_req;
        full = 1'b0;  empty = 1'b0;
      end
    endcase
  end

  assign mem_we  = do_wr;
  assign mem_re  = do_rd;
  assign count   = dcnt;
  assign d_clear = clear || swap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fimo_q <= FIMO_ACCEPT;
      wsel_q <= 1'b0;  wfull_q <= 1'b0;  rhas_q <= 1'b0;
      overflow <= 1'b0;  underflow <= 1'b0;
    end else if (clear) begin
      fimo_q <= FIMO_ACCEPT;
      wsel_q <= 1'b0;  wfull_q <= 1'b0;  rhas_q <= 1'b0;
      overflow <= 1'b0;  underflow <= 1'b0;
    end else begin
      if (wr_req && !wr_ready) overflow  <= 1'b1;
      if (rd_req && !rd_avail) underflow <= 1'b1;
      // FIMO FSM
      if (burst_start)  fimo_q <= FIMO_BURST;
      else if (rd_last && cfg.mode == MODE_FIMO) fimo_q <= FIMO_ACCEPT;
      // swinging buffer FSM
      if (cfg.mode == MODE_SWING) begin
        if (swap) begin
          wsel_q  <= !wsel_q;
          wfull_q <= 1'b0;
          rhas_q  <= 1'b1;
        end else begin
          if (do_wr && w_wrap) wfull_q <= 1'b1;
          if (do_rd && r_wrap) rhas_q  <= 1'b0;
        end
      end
    end
  end

  // rules of the handshake
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    (cfg.mode inside {MODE_FIFO, MODE_LIFO}) |-> !(mem_we && d_full))
    else $error("AGU wrote into a full buffer");
  a_no_read_when_empty: assert property (@(posedge clk) disable iff (!rst_n)
    (cfg.mode inside {MODE_FIFO, MODE_LIFO}) |-> !(mem_re && d_empty))
    else $error("AGU read from an empty buffer");
endmodule
