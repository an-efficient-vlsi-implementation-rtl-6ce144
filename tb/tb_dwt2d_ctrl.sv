// Self-checking testbench for the 2-D control on its own.  The 1-D engine is
// replaced by a behavioural "lazy wavelet" engine: forward, it sends even
// samples to the low half and odd samples to the high half of the line;
// inverse, it returns the interleaved input sequence unchanged.  It takes
// samples with random stalls and emits results in random order, often both
// channels in the same cycle (but never more than two results in two
// cycles, the most the real engine produces), so the prefetch, the write queue and the pass
// sequencing are exercised.  With this engine the expected memory contents
// after a multi-level forward transform are a pure permutation of the
// picture, computed here, and the inverse transform must give the picture
// back exactly.  The whole frame (both banks' region of interest) is
// compared, so writes outside the current band would be caught as well.
module tb_dwt2d_ctrl;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int ML = 6;
  localparam int MA = 2 * ML + 1;
  localparam int SZ = 1 << ML;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic            start, busy, done;
  mode_e           cfg_mode;
  logic [ML:0]     cfg_width, cfg_height;
  logic [2:0]      cfg_levels;
  logic            rd_en, wr_en;
  logic [MA-1:0]   rd_addr, wr_addr;
  logic [DW-1:0]   rd_data, wr_data;
  logic            eng_start, eng_done, eng_in_valid, eng_in_ready;
  logic [ML:0]     eng_n;
  mode_e           eng_mode;
  logic signed [DW-1:0] eng_in_data, eng_lo_data, eng_hi_data;
  logic            eng_lo_valid, eng_hi_valid;
  logic [ML-1:0]   eng_lo_pos, eng_hi_pos;

  dwt2d_ctrl #(.MAX_LOG2(ML)) dut (.*);

  frame_mem #(.AWID(MA)) u_mem (
    .clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data
  );

  int checks = 0, failures = 0;
  int nlines = 0, ndouble = 0, maxq = 0;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- engine model
  logic            e_busy, e_emit;
  bit              e_gap;
  int              e_n, e_cnt, e_out;
  mode_e           e_mode;
  logic signed [DW-1:0] e_buf [SZ];
  logic            e_lo_done [SZ], e_hi_done [SZ];

  // a random index below nh whose result is still pending (or any if none)
  function automatic int pick(const ref logic d [SZ], input int nh);
    int s0 = $urandom_range(0, nh - 1);
    for (int i = 0; i < nh; i++) if (!d[(s0 + i) % nh]) return (s0 + i) % nh;
    return s0;
  endfunction

  assign eng_in_ready = e_busy && !e_emit && (e_cnt < e_n) && ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    eng_lo_valid <= 1'b0;
    eng_hi_valid <= 1'b0;
    eng_done <= 1'b0;
    if (rst) begin
      e_busy <= 1'b0;
      e_emit <= 1'b0;
      e_cnt = 0;
      e_gap = 0;
    end else if (!e_busy) begin
      if (eng_start) begin
        e_busy <= 1'b1;
        e_emit <= 1'b0;
        e_n = int'(eng_n);
        e_mode = eng_mode;
        e_cnt = 0;
        e_out = 0;
        for (int i = 0; i < SZ; i++) begin e_lo_done[i] = 0; e_hi_done[i] = 0; end
        nlines++;
      end
    end else if (!e_emit) begin
      if (eng_in_valid && eng_in_ready) begin
        e_buf[e_cnt] = eng_in_data;
        e_cnt++;
        if (e_cnt == e_n) e_emit <= 1'b1;
      end
    end else begin
      // emit one low and/or one high result per cycle, in random order
      int m, k;
      bit lo, hi;
      // like the real engine, never more than two results in two cycles
      lo = $urandom_range(0, 1) && !e_gap;
      hi = $urandom_range(0, 1) && !e_gap;
      if (lo) begin
        m = pick(e_lo_done, e_n / 2);
        if (!e_lo_done[m]) begin
          e_lo_done[m] = 1;
          e_out++;
          eng_lo_valid <= 1'b1;
          // forward: a[m] = x[2m] at m; inverse: even result 2m = w1[2m]
          eng_lo_pos <= ML'((e_mode == MODE_DWT) ? m : 2 * m);
          eng_lo_data <= e_buf[2 * m];
        end else lo = 0;
      end
      if (hi) begin
        k = pick(e_hi_done, e_n / 2);
        if (!e_hi_done[k]) begin
          e_hi_done[k] = 1;
          e_out++;
          eng_hi_valid <= 1'b1;
          // forward: d[k+1] = x[2k+1] at N/2 + k; inverse: odd result 2k+1 = w1[2k+1]
          eng_hi_pos <= ML'((e_mode == MODE_DWT) ? e_n / 2 + k : 2 * k + 1);
          eng_hi_data <= e_buf[2 * k + 1];
        end else hi = 0;
      end
      if (lo && hi) ndouble++;
      e_gap = lo && hi;
      if (e_out == e_n) begin
        e_busy <= 1'b0;
        eng_done <= 1'b1;
      end
    end
  end

  always @(posedge clk) if (!rst && int'(dut.qcnt) > maxq) maxq = int'(dut.qcnt);

  // ---------------------------------------------------------------- reference
  int img [SZ][SZ], expf [SZ][SZ], t [SZ][SZ];

  function automatic void lazy2d(int w, int h, int l);
    for (int lv = 0; lv < l; lv++) begin
      int wl = w >> lv, hl = h >> lv;
      for (int r = 0; r < hl; r++)
        for (int k = 0; k < wl; k++)
          t[r][(k % 2 == 0) ? k / 2 : wl / 2 + k / 2] = expf[r][k];
      for (int c = 0; c < wl; c++)
        for (int k = 0; k < hl; k++)
          expf[(k % 2 == 0) ? k / 2 : hl / 2 + k / 2][c] = t[k][c];
    end
  endfunction

  task automatic run(mode_e md, int w, int h, int l);
    int cyc = 0;
    @(negedge clk);
    cfg_mode = md;
    cfg_width = (ML+1)'(w);
    cfg_height = (ML+1)'(h);
    cfg_levels = 3'(l);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (busy) begin failures++; $display("busy after done"); end
  endtask

  function automatic int rd(int bank, int y, int x);
    return int'(u_mem.mem[(bank << (2 * ML)) | (y << ML) | x]);
  endfunction

  task automatic trial(int w, int h, int l);
    int e = 0;
    for (int r = 0; r < SZ; r++)
      for (int c = 0; c < SZ; c++) begin
        img[r][c] = int'($urandom_range(0, 65535));
        expf[r][c] = img[r][c];
        u_mem.mem[(r << ML) | c] = 16'(img[r][c]);
      end
    lazy2d(w, h, l);
    run(MODE_DWT, w, h, l);
    for (int r = 0; r < SZ; r++)
      for (int c = 0; c < SZ; c++) begin
        checks++;
        if (rd(0, r, c) != expf[r][c]) begin
          failures++;
          if (e++ < 8) $display("%0dx%0d/%0d forward (%0d,%0d): %0d expected %0d", w, h, l, r, c,
                                rd(0, r, c), expf[r][c]);
        end
      end
    run(MODE_IDWT, w, h, l);
    for (int r = 0; r < SZ; r++)
      for (int c = 0; c < SZ; c++) begin
        checks++;
        if (rd(0, r, c) != img[r][c]) begin
          failures++;
          if (e++ < 8) $display("%0dx%0d/%0d inverse (%0d,%0d): %0d expected %0d", w, h, l, r, c,
                                rd(0, r, c), img[r][c]);
        end
      end
    $display("%0dx%0d, %0d levels done", w, h, l);
  endtask

  initial begin
    start = 0;
    cfg_mode = MODE_DWT;
    cfg_width = '0;
    cfg_height = '0;
    cfg_levels = 3'd1;
    repeat (3) @(posedge clk);
    rst = 0;
    trial(64, 48, 3);
    trial(24, 64, 2);
    trial(64, 64, 6 > ML ? ML - 1 : 5);
    trial(12, 12, 1);
    checks++;
    if (ndouble == 0 || maxq < 2) begin
      failures++;
      $display("queue not exercised: %0d double cycles, depth %0d", ndouble, maxq);
    end
    $display("%0d lines, %0d two-result cycles, queue depth reached %0d", nlines, ndouble, maxq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
