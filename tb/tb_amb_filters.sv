// tb_amb_filters: the Autonomous Memory Block used the way DSP code uses it,
// at its default size, with the arithmetic done in this testbench.
//   1. 1-D FIR filter (FIMO mode): 8 taps over 64 samples; each sample
//      written yields the 8-sample window, which is multiplied by the
//      coefficients; every output is compared with a direct convolution.
//   2. 2-D 3x3 convolution (striped mode): a 16 x 12 image is written in
//      raster order by a striped write pattern, then each output row is read
//      as 14 overlapping 3x3 windows (rows = 3, pitch = 16, offset = 1);
//      outputs are compared with a direct 2-D convolution.
//   3. Block processing (swinging buffer): 6 blocks of 32 samples stream in
//      while the previous block is read out; the sum of every block read is
//      compared with the sum of the block written.
// Reads are issued whenever rd_avail is high and checked via rd_valid.
`timescale 1ns/1ps
module tb_amb_filters;
  import amb_pkg::*;
  localparam int unsigned AW = 8;
  localparam int unsigned DW = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  amb_cfg_t cfg;
  logic clear, wr_req, wr_ready, rd_req, rd_avail, rd_valid, rd_last;
  logic [DW-1:0] wr_data, rd_data;
  logic [AW-1:0] ext_waddr, ext_raddr;
  logic full, empty, overflow, underflow, swap;
  logic [AW:0] count;

  amb dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic amb_cfg_t mk(input amb_mode_e m, input int len, taps = 1);
    amb_cfg_t c = '0;
    c.mode = m; c.length = CFG_W'(len); c.taps = CFG_W'(taps);
    c.wr_stripe.n = 1; c.wr_stripe.rows = 1; c.wr_stripe.stripes = 1;
    c.rd_stripe.n = 1; c.rd_stripe.rows = 1; c.rd_stripe.stripes = 1;
    return c;
  endfunction

  task automatic configure(input amb_cfg_t c);
    @(negedge clk);
    cfg = c; clear = 1; wr_req = 0; rd_req = 0;
    @(negedge clk);
    clear = 0;
  endtask

  // ---- 1-D FIR through FIMO ----
  localparam int TAPS = 8, NS = 64;
  int h [TAPS] = '{3, -1, 4, 1, -5, 9, 2, -6};
  int x [NS];
  task automatic fir_test();
    int k, acc, expy, outs, last_seen;
    configure(mk(MODE_FIMO, TAPS, TAPS));
    foreach (x[i]) x[i] = $urandom % 200;
    outs = 0;
    for (int n = 0; n < NS; n++) begin
      // write sample n
      wait (wr_ready); wr_req = 1; wr_data = DW'(x[n]);
      @(negedge clk); wr_req = 0;
      if (n < TAPS - 1) continue;
      // read the window x[n-7] .. x[n]; coefficient h[TAPS-1-k] for the k-th item
      acc = 0; k = 0; last_seen = 0;
      rd_req = 1;
      while (k < TAPS) begin
        @(negedge clk);
        if (rd_valid) begin
          acc += h[TAPS - 1 - k] * int'(rd_data);
          if (rd_last) last_seen++;
          k++;
        end
        if (!rd_avail) rd_req = 0;
      end
      rd_req = 0;
      expy = 0;
      for (int j = 0; j < TAPS; j++) expy += h[j] * x[n - j];
      check(acc == expy, $sformatf("FIR y[%0d] = %0d, expected %0d", n, acc, expy));
      check(last_seen == 1, "FIR window end marker");
      outs++;
    end
    check(outs == NS - TAPS + 1, "FIR output count");
    check(!overflow && !underflow, "FIR flow control flags");
  endtask

  // ---- 2-D 3x3 convolution through striped access ----
  localparam int IW = 16, IH = 12;
  int img [IH][IW];
  int kern [3][3] = '{'{1, 2, 1}, '{0, 1, 0}, '{-1, 3, -2}};
  task automatic conv_test();
    amb_cfg_t c;
    int acc, expy, k, nwin;
    c = mk(MODE_STRIPE, 1);
    c.wr_stripe.start = 0; c.wr_stripe.n = IW; c.wr_stripe.rows = IH;
    c.wr_stripe.pitch = IW; c.wr_stripe.stripes = 1;
    configure(c);
    for (int yy = 0; yy < IH; yy++)
      for (int xx = 0; xx < IW; xx++) begin
        img[yy][xx] = $urandom % 256;
        wr_req = 1; wr_data = DW'(img[yy][xx]);
        @(negedge clk);
      end
    wr_req = 0;
    nwin = 0;
    for (int oy = 0; oy < IH - 2; oy++) begin
      c.rd_stripe.start = CFG_W'(oy * IW); c.rd_stripe.n = 3; c.rd_stripe.rows = 3;
      c.rd_stripe.pitch = IW; c.rd_stripe.offset = 1; c.rd_stripe.stripes = IW - 2;
      configure(c);
      for (int ox = 0; ox < IW - 2; ox++) begin
        acc = 0; k = 0;
        rd_req = 1;
        while (k < 9) begin
          @(negedge clk);
          if (k == 8) rd_req = 0;
          if (rd_valid) begin
            acc += kern[k / 3][k % 3] * int'(rd_data);
            if (k == 8) check(rd_last, "stripe end marker");
            k++;
          end
        end
        rd_req = 0;
        expy = 0;
        for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
          expy += kern[i][j] * img[oy + i][ox + j];
        check(acc == expy, $sformatf("conv out[%0d][%0d] = %0d, expected %0d", oy, ox, acc, expy));
        nwin++;
      end
    end
    check(nwin == (IH - 2) * (IW - 2), "conv output count");
  endtask

  // ---- block processing through the swinging buffer ----
  localparam int BL = 32, NB = 6;
  int blk_sum [NB];
  task automatic swing_test();
    int wn, rn, rb, rsum, nswap;
    configure(mk(MODE_SWING, BL));
    foreach (blk_sum[b]) blk_sum[b] = 0;
    wn = 0; rn = 0; rb = 0; rsum = 0; nswap = 0;
    fork
      begin : producer
        while (wn < NB * BL) begin
          wr_req = 1; wr_data = DW'($urandom % 512);
          #1;
          if (wr_ready) begin blk_sum[wn / BL] += int'(wr_data); wn++; end
          @(negedge clk);
        end
        wr_req = 0;
      end
      begin : consumer
        while (rb < NB) begin
          rd_req = ($urandom % 4) != 0;
          @(negedge clk);
          if (swap) nswap++;
          if (rd_valid) begin
            rsum += int'(rd_data); rn++;
            if (rd_last) begin
              check(rn == BL, "block length at end marker");
              check(rsum == blk_sum[rb], $sformatf("block %0d sum %0d, expected %0d", rb, rsum, blk_sum[rb]));
              rb++; rn = 0; rsum = 0;
            end
          end
        end
        rd_req = 0;
      end
    join
    check(nswap >= NB, $sformatf("swaps %0d, expected at least %0d", nswap, NB));
    check(rb == NB, "all blocks read");
  endtask

  initial begin
    cfg = mk(MODE_RANDOM, 1); clear = 0; wr_req = 0; rd_req = 0; wr_data = '0;
    ext_waddr = '0; ext_raddr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fir_test();
    conv_test();
    swing_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
