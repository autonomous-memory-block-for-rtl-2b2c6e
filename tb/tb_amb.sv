// tb_amb: end-to-end self-checking testbench of the Autonomous Memory Block
// at its default size (256 x 9 bits).
//
// It runs the block through every mode in turn, switching mode with `clear`:
// random access (bypass), FIFO, FIMO, LIFO, swinging buffer, striped 1-D and
// 2-D reads and a striped write. Requests are random, with phases biased
// towards writing or reading so the buffers fill up and run dry. Reference
// models written here (a queue, a stack, a sample history, two buffer
// halves, a nested-loop stripe formula and an address-indexed memory image)
// predict wr_ready, rd_avail, full/empty/count, the sticky flags, swap, and
// the data and rd_last returned one cycle after each accepted read. It also
// counts how often each mechanism happened (overflow, underflow, counter
// wrap-around, FIMO burst, LIFO replace, swap, 2-D row jump, pattern repeat,
// bypass access, mode switch) and fails any that never did.
`timescale 1ns/1ps
module tb_amb;
  import amb_pkg::*;
  localparam int unsigned AW = 8;
  localparam int unsigned DW = 9;
  localparam int unsigned DEPTH = 1 << AW;

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
      if (failures < 20) $display("FAIL @%0t mode=%s: %s", $time, cfg.mode.name(), what);
    end
  endtask

  // mechanism counters
  int n_overflow, n_underflow, n_wrap, n_burst, n_replace, n_swap, n_rowjump,
      n_repeat, n_bypass, n_switch, n_full, n_empty;

  // ---------------- reference state ----------------
  logic [DW-1:0] img [DEPTH];      // memory image where addresses are known
  bit            known [DEPTH];
  logic [DW-1:0] q[$];             // FIFO queue / LIFO stack / FIMO history
  logic [DW-1:0] win[$];           // FIMO window being read
  logic [DW-1:0] wbuf[$], rbuf[$]; // swinging halves
  int  held, widx, ridx, wcount;
  bit  burst, wfull, rhas, m_ovf, m_udf;
  int  L, K;
  // stripe counters
  int ws_i, ws_r, ws_s, rs_i, rs_r, rs_s;
  // pending read result
  bit pend_v, pend_last, pend_chk;
  logic [DW-1:0] pend_d;

  function automatic int saddr(input stripe_cfg_t c, input int i, r, s);
    return (int'(c.start) + s*int'(c.offset) + r*int'(c.pitch) + i) % DEPTH;
  endfunction

  task automatic set_mode(input amb_cfg_t c);
    @(negedge clk);
    cfg = c; clear = 1'b1; wr_req = 0; rd_req = 0;
    @(negedge clk);
    clear = 1'b0;
    q.delete(); win.delete(); wbuf.delete(); rbuf.delete();
    held = 0; widx = 0; ridx = 0; wcount = 0;
    burst = 0; wfull = 0; rhas = 0; m_ovf = 0; m_udf = 0; pend_v = 0;
    ws_i = 0; ws_r = 0; ws_s = 0; rs_i = 0; rs_r = 0; rs_s = 0;
    L = int'(c.length); K = int'(c.taps);
    if (c.mode != MODE_RANDOM && c.mode != MODE_STRIPE)
      foreach (known[a]) known[a] = 0;
    n_switch++;
  endtask

  // one clock cycle: drive at the falling edge, check just after it
  task automatic step(input bit w, input bit r, input logic [DW-1:0] d,
                      input logic [AW-1:0] wa = '0, input logic [AW-1:0] ra = '0);
    bit exp_wr, exp_rd, wacc, racc, exp_last, exp_swap, chk;
    logic [DW-1:0] exp_d;
    int a;
    wr_req = w; rd_req = r; wr_data = d; ext_waddr = wa; ext_raddr = ra;
    #1;
    // result of the read accepted one cycle ago
    check(rd_valid == pend_v, "rd_valid");
    if (pend_v && pend_chk) begin
      check(rd_data == pend_d, $sformatf("rd_data %0h exp %0h", rd_data, pend_d));
      check(rd_last == pend_last, "rd_last");
    end
    exp_last = 0; exp_swap = 0; chk = 1; exp_d = '0;
    unique case (cfg.mode)
      MODE_FIFO, MODE_LIFO: begin exp_wr = q.size() < L; exp_rd = q.size() > 0; end
      MODE_FIMO:  begin exp_wr = !burst; exp_rd = burst; end
      MODE_SWING: begin exp_wr = !wfull; exp_rd = rhas; exp_swap = wfull && !rhas; end
      default:    begin exp_wr = 1; exp_rd = 1; end
    endcase
    check(wr_ready == exp_wr, "wr_ready");
    check(rd_avail == exp_rd, "rd_avail");
    check(swap == exp_swap, "swap");
    check(overflow == m_ovf && underflow == m_udf, "sticky flags");
    if (cfg.mode inside {MODE_FIFO, MODE_LIFO}) begin
      check(count == (AW+1)'(q.size()), "count");
      check(full == (q.size() == L) && empty == (q.size() == 0), "full/empty");
      if (q.size() == L) n_full++;
    end
    wacc = w && exp_wr; racc = r && exp_rd;
    if (w && !exp_wr) begin m_ovf = 1; n_overflow++; end
    if (r && !exp_rd) begin m_udf = 1; n_underflow++; end
    unique case (cfg.mode)
      MODE_FIFO: begin
        if (racc) exp_d = q.pop_front();
        if (wacc) begin q.push_back(d); wcount++; if (wcount % L == 0) n_wrap++; end
      end
      MODE_LIFO: begin
        if (racc && wacc) begin exp_d = q[$]; q[$] = d; n_replace++; end
        else if (racc) exp_d = q.pop_back();
        else if (wacc) q.push_back(d);
      end
      MODE_FIMO: begin
        if (racc) begin
          exp_d = win.pop_front();
          exp_last = (win.size() == 0);
          if (exp_last) burst = 0;
        end
        if (wacc) begin
          q.push_back(d);
          if (q.size() > L) begin void'(q.pop_front()); n_wrap++; end
          if (q.size() >= K) begin
            burst = 1; n_burst++;
            for (int k = q.size() - K; k < q.size(); k++) win.push_back(q[k]);
          end
        end
      end
      MODE_SWING: begin
        if (racc) begin
          exp_d = rbuf[ridx]; ridx++;
          exp_last = (ridx == L);
          if (exp_last) rhas = 0;
        end
        if (wacc) begin wbuf.push_back(d); if (wbuf.size() == L) wfull = 1; end
        if (exp_swap) begin
          rbuf = wbuf; wbuf.delete(); ridx = 0; rhas = 1; wfull = 0; n_swap++;
        end
      end
      MODE_STRIPE: begin
        if (racc) begin
          a = saddr(cfg.rd_stripe, rs_i, rs_r, rs_s);
          chk = known[a]; exp_d = img[a];
          exp_last = (rs_i == int'(cfg.rd_stripe.n) - 1) && (rs_r == int'(cfg.rd_stripe.rows) - 1);
          rs_i++;
          if (rs_i == int'(cfg.rd_stripe.n)) begin
            rs_i = 0; rs_r++;
            if (rs_r < int'(cfg.rd_stripe.rows)) n_rowjump++;
            if (rs_r == int'(cfg.rd_stripe.rows)) begin
              rs_r = 0; rs_s++;
              if (rs_s == int'(cfg.rd_stripe.stripes)) begin rs_s = 0; n_repeat++; end
            end
          end
        end
        if (wacc) begin
          a = saddr(cfg.wr_stripe, ws_i, ws_r, ws_s);
          img[a] = d; known[a] = 1;
          ws_i++;
          if (ws_i == int'(cfg.wr_stripe.n)) begin
            ws_i = 0; ws_r++;
            if (ws_r == int'(cfg.wr_stripe.rows)) begin
              ws_r = 0; ws_s++;
              if (ws_s == int'(cfg.wr_stripe.stripes)) ws_s = 0;
            end
          end
        end
      end
      default: begin  // random access, read-before-write
        if (racc) begin chk = known[ra]; exp_d = img[ra]; end
        if (wacc) begin img[wa] = d; known[wa] = 1; end
        if (wacc || racc) n_bypass++;
      end
    endcase
    pend_v = racc; pend_d = exp_d; pend_last = exp_last; pend_chk = chk;
    @(negedge clk);
  endtask

  function automatic amb_cfg_t mk(input amb_mode_e m, input int base, len, taps = 1);
    amb_cfg_t c = '0;
    c.mode = m; c.base = CFG_W'(base); c.length = CFG_W'(len); c.taps = CFG_W'(taps);
    c.wr_stripe.n = 1; c.wr_stripe.rows = 1; c.wr_stripe.stripes = 1;
    c.rd_stripe.n = 1; c.rd_stripe.rows = 1; c.rd_stripe.stripes = 1;
    return c;
  endfunction

  // random traffic: write with probability pw %, read with pr %
  task automatic traffic(input int cycles, input int pw, input int pr);
    repeat (cycles)
      step(($urandom % 100) < pw, ($urandom % 100) < pr, DW'($urandom));
  endtask

  amb_cfg_t c;
  initial begin
    cfg = mk(MODE_RANDOM, 0, 1); clear = 0; wr_req = 0; rd_req = 0; wr_data = '0;
    ext_waddr = '0; ext_raddr = '0;
    foreach (known[a]) known[a] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // random access: fill the whole memory, then random reads and writes
    set_mode(mk(MODE_RANDOM, 0, 1));
    for (int a = 0; a < DEPTH; a++) step(1, 0, DW'($urandom), AW'(a));
    repeat (400) step($urandom % 2, $urandom % 2, DW'($urandom), AW'($urandom), AW'($urandom));

    // striped 1-D read: 4 items per stripe, stripes 3 apart (overlapping)
    c = mk(MODE_STRIPE, 0, 1);
    c.rd_stripe.start = 10; c.rd_stripe.n = 4; c.rd_stripe.rows = 1;
    c.rd_stripe.offset = 3; c.rd_stripe.stripes = 5;
    set_mode(c);
    traffic(120, 0, 70);
    // striped 2-D read: 3x3 windows in a 16-wide raster image, windows 1 apart
    c.rd_stripe.start = 0; c.rd_stripe.n = 3; c.rd_stripe.rows = 3; c.rd_stripe.pitch = 16;
    c.rd_stripe.offset = 1; c.rd_stripe.stripes = 14;
    set_mode(c);
    traffic(300, 0, 80);
    // striped write (4x4 blocks of a 16-wide image) with raster reads
    c.wr_stripe.start = 32; c.wr_stripe.n = 4; c.wr_stripe.rows = 4; c.wr_stripe.pitch = 16;
    c.wr_stripe.offset = 4; c.wr_stripe.stripes = 4;
    c.rd_stripe.start = 32; c.rd_stripe.n = 16; c.rd_stripe.rows = 4; c.rd_stripe.pitch = 16;
    c.rd_stripe.offset = 0; c.rd_stripe.stripes = 1;
    set_mode(c);
    traffic(64, 100, 0);
    traffic(200, 30, 60);

    // FIFO over the whole memory, and a small one that wraps past the top
    set_mode(mk(MODE_FIFO, 0, DEPTH));
    traffic(700, 80, 20); traffic(700, 20, 80); traffic(1500, 50, 50);
    set_mode(mk(MODE_FIFO, 250, 13));
    traffic(200, 70, 30); traffic(200, 30, 70); traffic(400, 50, 50);

    // FIMO: 8-tap window in a 16-entry buffer, and a full-length window
    set_mode(mk(MODE_FIMO, 100, 16, 8));
    traffic(600, 40, 90);
    set_mode(mk(MODE_FIMO, 0, 5, 5));
    traffic(300, 60, 70);

    // LIFO
    set_mode(mk(MODE_LIFO, 0, DEPTH));
    traffic(700, 80, 30); traffic(700, 30, 80); traffic(1000, 50, 50);
    set_mode(mk(MODE_LIFO, 200, 7));
    traffic(300, 50, 50);

    // swinging buffer: two halves of 128, then two halves of 10
    set_mode(mk(MODE_SWING, 0, DEPTH/2));
    traffic(1500, 60, 60);
    set_mode(mk(MODE_SWING, 240, 10));
    traffic(400, 70, 40); traffic(400, 40, 70);

    $display("mechanisms: overflow=%0d underflow=%0d wrap=%0d full=%0d burst=%0d replace=%0d swap=%0d rowjump=%0d repeat=%0d bypass=%0d switch=%0d",
             n_overflow, n_underflow, n_wrap, n_full, n_burst, n_replace, n_swap, n_rowjump, n_repeat, n_bypass, n_switch);
    check(n_overflow > 0, "overflow never happened");
    check(n_underflow > 0, "underflow never happened");
    check(n_wrap > 0, "wrap-around never happened");
    check(n_full > 0, "buffer never full");
    check(n_burst > 0, "FIMO burst never happened");
    check(n_replace > 0, "LIFO replace never happened");
    check(n_swap > 1, "swinging swap never happened");
    check(n_rowjump > 0, "2-D row jump never happened");
    check(n_repeat > 0, "stripe pattern repeat never happened");
    check(n_bypass > 0, "bypass access never happened");
    check(n_switch > 5, "mode switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
