// Self-checking testbench for the 1-D EIC engine.
//
// Runs forward and inverse lines of several lengths with random samples
// and compares every result with a direct evaluation of
// y[m] = sum_k f[k] x[2m-k] over the symmetrically extended line.  The
// reference (dwt_ref_pkg) derives its filters from the two 9/7 low-pass
// filters, independently of the design's tables.  It also checks that every output position of a line is
// written exactly once and that a line of N samples takes at most 5N+8 cycles
// (the engine issues one MUL or ADD order per clock, five per sample on
// average).
module tb_eic_1d;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int LOGN = 10;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, busy, done, in_valid, in_ready, lo_valid, hi_valid;
  logic [LOGN:0] cfg_n;
  mode_e cfg_mode;
  logic signed [DW-1:0] in_data, lo_data, hi_data;
  logic [LOGN-1:0] lo_pos, hi_pos;

  eic_1d #(.LOGN(LOGN)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  line_t xs, yl, yh;
  int exp_lo [1024], exp_hi [1024];
  bit seen_lo [1024], seen_hi [1024];
  bit is_lo [1024], is_hi [1024];

  task automatic make_ref(int md, int nn);
    for (int i = 0; i < 1024; i++) begin
      is_lo[i] = 0; is_hi[i] = 0; seen_lo[i] = 0; seen_hi[i] = 0;
    end
    for (int i = 0; i < nn; i++) begin yl[i] = -99999; yh[i] = -99999; end
    line_ch(md, 0, nn, xs, yl);
    line_ch(md, 1, nn, xs, yh);
    for (int i = 0; i < nn; i++) begin
      if (yl[i] != -99999) begin is_lo[i] = 1; exp_lo[i] = yl[i]; end
      if (yh[i] != -99999) begin is_hi[i] = 1; exp_hi[i] = yh[i]; end
    end
  endtask

  // ---- output monitor
  always @(posedge clk) begin
    if (!rst && lo_valid) begin
      checks++;
      if (!is_lo[lo_pos] || seen_lo[lo_pos] || lo_data != exp_lo[lo_pos]) begin
        failures++;
        $display("lo mismatch pos %0d got %0d exp %0d", lo_pos, lo_data, exp_lo[lo_pos]);
      end
      seen_lo[lo_pos] = 1;
    end
    if (!rst && hi_valid) begin
      checks++;
      if (!is_hi[hi_pos] || seen_hi[hi_pos] || hi_data != exp_hi[hi_pos]) begin
        failures++;
        $display("hi mismatch pos %0d got %0d exp %0d", hi_pos, hi_data, exp_hi[hi_pos]);
      end
      seen_hi[hi_pos] = 1;
    end
  end

  task automatic run_line(int md, int nn, bit gaps);
    int t0, idx;
    for (int i = 0; i < nn; i++) xs[i] = $signed(16'($urandom_range(0, 4095))) - (md ? 2048 : 0);
    make_ref(md, nn);
    @(negedge clk);
    cfg_n = (LOGN+1)'(nn);
    cfg_mode = md ? MODE_IDWT : MODE_DWT;
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = cycle;
    idx = 0;
    while (!done) begin
      in_valid = (idx < nn) && (!gaps || ($urandom_range(0, 3) != 0));
      in_data = 16'(xs[idx < nn ? idx : 0]);
      @(posedge clk);
      if (in_valid && in_ready) idx++;
      @(negedge clk);
    end
    in_valid = 0;
    if (!gaps) begin
      checks++;
      if (cycle - t0 > 5 * nn + 8) begin
        failures++;
        $display("line of %0d took %0d cycles", nn, cycle - t0);
      end
    end
    @(negedge clk);
    for (int i = 0; i < nn; i++) begin
      checks++;
      if (is_lo[i] != seen_lo[i] || is_hi[i] != seen_hi[i]) begin
        failures++;
        $display("position %0d not written as expected", i);
      end
    end
  endtask

  initial begin
    start = 0; in_valid = 0; in_data = 0; cfg_n = 0; cfg_mode = MODE_DWT;
    repeat (3) @(posedge clk);
    rst = 0;
    foreach (sizes[i]) begin
      run_line(0, sizes[i], 0);
      run_line(1, sizes[i], 0);
      run_line(0, sizes[i], 1);
      run_line(1, sizes[i], 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int sizes [7] = '{12, 16, 30, 32, 44, 90, 1024};

endmodule
