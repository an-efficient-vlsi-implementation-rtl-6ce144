// End-to-end bench for the 2-D processor (shared by the small and the
// full-size testbench).
//
// Fills bank 0 of the frame memory with a random W x H 8-bit image (stored
// as p << 4), runs the forward transform with L levels and compares every
// word of the W x H area with a reference 2-D transform computed here (rows
// then columns per level, each line through dwt_ref_pkg).  It then runs the
// inverse transform on the result, compares it with the reference inverse,
// and checks reconstruction: every pixel within one grey level of the
// original (the 16-bit intermediate words carry 4 fractional bits, so
// rounding errors of up to about half a grey level build up over six levels).  Cycle
// counts are checked against 5 cycles per sample per line plus a small line
// overhead.  The mechanisms of the design are counted and each must occur:
// both modes, row and column passes, every level, the three code regions,
// LS adds, double adds, GPR wrap-around, both channels finishing in one
// cycle and the write queue holding more than one entry.
module dwt_top_bench #(
  parameter int W = 64,
  parameter int H = 48,
  parameter int L = 3,
  parameter int MAXCYC = 2_000_000
);
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int ML = 10;            // the top's default size
  localparam int MA = 2 * ML + 1;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, busy, done;
  mode_e cfg_mode;
  logic [ML:0] cfg_width, cfg_height;
  logic [2:0] cfg_levels;
  logic mem_rd_en, mem_wr_en;
  logic [MA-1:0] mem_rd_addr, mem_wr_addr;
  logic [15:0] mem_rd_data, mem_wr_data;

  dwt_top dut (.*);

  frame_mem #(.AWID(MA)) u_mem (
    .clk, .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data),
    .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data)
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    while (cycle < MAXCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanisms
  typedef enum int {EV_FWD, EV_INV, EV_ROWLINE, EV_COLLINE, EV_BEGIN, EV_LOOP, EV_END,
                    EV_LS, EV_DOUBLE, EV_WRAP, EV_BOTH_OUT, EV_QUEUE2, EV_NEV} ev_e;
  longint ev [EV_NEV];
  string evname [EV_NEV] = '{"forward run", "inverse run", "row line", "column line",
                             "boundary-begin code", "loop code", "boundary-end code",
                             "LS add", "double add", "GPR wrap-around", "both channels out",
                             "write queue >1"};
  bit lev_seen [8];

  always @(posedge clk) if (!rst) begin
    if (dut.u_ctrl.eng_start) begin
      if (dut.u_ctrl.col_pass) ev[EV_COLLINE]++; else ev[EV_ROWLINE]++;
      lev_seen[dut.u_ctrl.lev] = 1;
    end
    if (dut.u_eng.state == 2'd2 && !dut.u_eng.ph_add && dut.u_eng.slot == 0) begin
      if (dut.u_eng.entry < 6) ev[EV_BEGIN]++;
      else if (dut.u_eng.entry < 8) ev[EV_LOOP]++;
      else ev[EV_END]++;
    end
    if ((dut.u_eng.op_lo.add && dut.u_eng.op_lo.l0.en && dut.u_eng.op_lo.l0.ls) ||
        (dut.u_eng.op_hi.add && dut.u_eng.op_hi.l0.en && dut.u_eng.op_hi.l0.ls)) ev[EV_LS]++;
    if ((dut.u_eng.op_lo.add && dut.u_eng.op_lo.l0.en && dut.u_eng.op_lo.l1.en) ||
        (dut.u_eng.op_hi.add && dut.u_eng.op_hi.l0.en && dut.u_eng.op_hi.l1.en)) ev[EV_DOUBLE]++;
    if (dut.u_eng.accept && dut.u_eng.b5 == 3'd4 && dut.u_eng.n_in[0] == 1'b0) ev[EV_WRAP]++;
    if (dut.u_eng.lo_valid && dut.u_eng.hi_valid) ev[EV_BOTH_OUT]++;
    if (dut.u_ctrl.qcnt > 1) ev[EV_QUEUE2]++;
  end

  // ---------------------------------------------------------------- reference
  int img [][];      // original, Q12.4
  int ref_f [][];    // forward reference
  int ref_i [][];    // inverse reference of ref_f
  int tmp [][];

  function automatic void ref2d(int md, ref int a [][]);
    line_t x, y;
    int wl, hl;
    for (int s = 0; s < L; s++) begin
      int lv = (md == 0) ? s : L - 1 - s;
      wl = W >> lv;
      hl = H >> lv;
      if (md == 0) begin
        for (int r = 0; r < hl; r++) begin
          for (int k = 0; k < wl; k++) x[k] = a[r][k];
          line_xform(0, wl, x, y);
          for (int k = 0; k < wl; k++) tmp[r][k] = y[k];
        end
        for (int c = 0; c < wl; c++) begin
          for (int k = 0; k < hl; k++) x[k] = tmp[k][c];
          line_xform(0, hl, x, y);
          for (int k = 0; k < hl; k++) a[k][c] = y[k];
        end
      end else begin
        for (int c = 0; c < wl; c++) begin
          for (int k = 0; k < hl; k++) x[k] = a[w1_pos(k, hl)][c];
          line_xform(1, hl, x, y);
          for (int k = 0; k < hl; k++) tmp[k][c] = y[k];
        end
        for (int r = 0; r < hl; r++) begin
          for (int k = 0; k < wl; k++) x[k] = tmp[r][w1_pos(k, wl)];
          line_xform(1, wl, x, y);
          for (int k = 0; k < wl; k++) a[r][k] = y[k];
        end
      end
    end
  endfunction

  function automatic int rdmem(int y, int x);
    return int'($signed(u_mem.mem[(y << ML) | x]));
  endfunction

  task automatic run(mode_e md);
    longint t0, bound;
    @(negedge clk);
    cfg_mode = md;
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = cycle;
    while (!done) @(negedge clk);
    bound = 0;
    for (int lv = 0; lv < L; lv++)
      bound += longint'(H >> lv) * (5 * (W >> lv) + 12) + longint'(W >> lv) * (5 * (H >> lv) + 12) + 32;
    checks++;
    if (cycle - t0 > bound) begin
      failures++;
      $display("%s took %0d cycles, bound %0d", md == MODE_DWT ? "forward" : "inverse", cycle - t0, bound);
    end
    $display("%s %0dx%0d, %0d levels: %0d cycles, %0.2f cycles/pixel",
             md == MODE_DWT ? "forward" : "inverse", W, H, L, cycle - t0,
             real'(cycle - t0) / real'(W * H));
    if (md == MODE_DWT) ev[EV_FWD]++; else ev[EV_INV]++;
  endtask

  initial begin
    int e, maxerr;
    start = 0;
    cfg_mode = MODE_DWT;
    cfg_width = (ML+1)'(W);
    cfg_height = (ML+1)'(H);
    cfg_levels = 3'(L);
    img = new[H];
    ref_f = new[H];
    ref_i = new[H];
    tmp = new[H];
    for (int r = 0; r < H; r++) begin
      img[r] = new[W];
      ref_f[r] = new[W];
      ref_i[r] = new[W];
      tmp[r] = new[W];
    end
    // smooth ramp plus noise: a natural-looking 8-bit picture
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        automatic int p = ((r * 3 + c * 5) % 200) + int'($urandom_range(0, 55));
        img[r][c] = p << 4;
        ref_f[r][c] = img[r][c];
      end
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) u_mem.mem[(r << ML) | c] = 16'(img[r][c]);
    ref2d(0, ref_f);
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) ref_i[r][c] = ref_f[r][c];
    ref2d(1, ref_i);

    repeat (3) @(posedge clk);
    rst = 0;

    run(MODE_DWT);
    e = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        checks++;
        if (rdmem(r, c) != ref_f[r][c]) begin
          failures++;
          if (e++ < 10) $display("forward (%0d,%0d): got %0d exp %0d", r, c, rdmem(r, c), ref_f[r][c]);
        end
      end

    run(MODE_IDWT);
    e = 0;
    maxerr = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int d;
        checks += 2;
        if (rdmem(r, c) != ref_i[r][c]) begin
          failures++;
          if (e++ < 10) $display("inverse (%0d,%0d): got %0d exp %0d", r, c, rdmem(r, c), ref_i[r][c]);
        end
        d = rdmem(r, c) - img[r][c];
        if (d < 0) d = -d;
        if (d > maxerr) maxerr = d;
        if (d > 16) begin
          failures++;
          if (e++ < 10) $display("reconstruction (%0d,%0d): got %0d orig %0d", r, c, rdmem(r, c), img[r][c]);
        end
      end

    $display("largest reconstruction error: %0d/16 grey level", maxerr);
    for (int i = 0; i < EV_NEV; i++) begin
      checks++;
      $display("  %-22s %0d", evname[i], ev[i]);
      if (ev[i] == 0) begin
        failures++;
        $display("mechanism never exercised: %s", evname[i]);
      end
    end
    for (int lv = 0; lv < L; lv++) begin
      checks++;
      if (!lev_seen[lv]) begin failures++; $display("level %0d never processed", lv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
