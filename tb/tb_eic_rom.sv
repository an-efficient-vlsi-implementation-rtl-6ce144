// Self-checking testbench for the instruction-code look-up table.
//
// For both modes, both channels and several line lengths it walks every
// input sample n exactly as the engine does (region selection, slots), reads
// the codes and adds up, for each output m, how many times each coefficient
// distance j is applied to sample n (an LS add counts twice).  The result
// must equal the tap count of the direct definition over the symmetrically
// extended line.  It also checks that each output is marked 'last' exactly
// once, at the slot that brings its final contribution, that LS appears only
// on adder 0 and that slots are filled without gaps.
module tb_eic_rom;
  import dwt_pkg::*;

  mode_e mode;
  logic [3:0] entry;
  logic [1:0] slot;
  instr_t ins_lo, ins_hi;
  logic more;

  eic_rom dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ext(int i, int nn);
    if (i < 0) i = -i;
    if (i > nn - 1) i = 2 * (nn - 1) - i;
    return i;
  endfunction

  int got [600][5];     // [m][j] count for the current n
  int lastcnt [600];
  int sizes [5] = '{12, 16, 30, 64, 90};

  task automatic check_line(int md, int ch, int nn);
    int c, hh, mlo, e, m, expc, lastn, lastslot;
    instr_t ins;
    add_t a;
    c = (md == 0) ? ch : -ch;
    hh = (md == 0) ? (ch ? 3 : 4) : (ch ? 4 : 3);
    mlo = (md == 0 && ch == 1) ? 1 : 0;
    for (int i = 0; i < 600; i++) lastcnt[i] = 0;
    for (int n = 0; n < nn; n++) begin
      for (int i = 0; i < 600; i++) for (int j = 0; j < 5; j++) got[i][j] = 0;
      if (n < 6) e = n;
      else if (n >= nn - 6) e = 8 + n - (nn - 6);
      else e = 6 + (n % 2);
      mode = md ? MODE_IDWT : MODE_DWT;
      entry = 4'(e);
      lastslot = -1;
      for (int s = 0; s < 3; s++) begin
        slot = 2'(s);
        #1;
        ins = ch ? ins_hi : ins_lo;
        // slots are used from 0 upwards; 'more' says whether the next one is
        checks++;
        if (more != ((s < 2) && (gen_any(md, e, s + 1)))) begin
          failures++;
          $display("more flag wrong: md %0d e %0d s %0d", md, e, s);
        end
        if (!ins.mul) continue;
        for (int l = 0; l < 2; l++) begin
          a = l ? ins.a1 : ins.a0;
          if (!a.en) continue;
          m = n / 2 + int'(a.off);
          checks++;
          if (m < mlo || m >= mlo + nn / 2 || (l == 1 && a.ls)) begin
            failures++;
            $display("bad target md %0d ch %0d n %0d m %0d", md, ch, n, m);
            continue;
          end
          got[m][ins.j] += a.ls ? 2 : 1;
          if (a.last) lastcnt[m]++;
          if (a.last) begin
            // must be the last tap of m, and no later slot of n may feed m
            lastn = 0;
            for (int k = c - hh; k <= c + hh; k++) if (ext(2 * m - k, nn) > lastn) lastn = ext(2 * m - k, nn);
            checks++;
            if (lastn != n) begin
              failures++;
              $display("early last md %0d ch %0d n %0d m %0d", md, ch, n, m);
            end
          end
        end
      end
      for (m = mlo; m < mlo + nn / 2; m++)
        for (int j = 0; j <= hh; j++) begin
          expc = 0;
          for (int k = c - hh; k <= c + hh; k++)
            if ((k - c == j || c - k == j) && ext(2 * m - k, nn) == n) expc++;
          checks++;
          if (got[m][j] != expc) begin
            failures++;
            $display("md %0d ch %0d N %0d n %0d m %0d j %0d: %0d products, expected %0d",
                     md, ch, nn, n, m, j, got[m][j], expc);
          end
        end
    end
    for (m = mlo; m < mlo + nn / 2; m++) begin
      checks++;
      if (lastcnt[m] != 1) begin
        failures++;
        $display("md %0d ch %0d N %0d: output %0d finished %0d times", md, ch, nn, m, lastcnt[m]);
      end
    end
  endtask

  // does any channel use slot s of entry e?  (independent of 'more')
  function automatic bit gen_any(int md, int e, int s);
    int n, cnt;
    n = (e < 6) ? e : (e < 8) ? e : 64 - 6 + (e - 8);
    // 3 slots only for a 9-tap filter on inputs of one parity
    cnt = 2;
    if (md == 0 && (n % 2) == 0) cnt = 3;
    if (md == 1 && (n % 2) == 1) cnt = 3;
    return s < cnt;
  endfunction

  initial begin
    for (int md = 0; md < 2; md++)
      for (int ch = 0; ch < 2; ch++)
        foreach (sizes[i]) check_line(md, ch, sizes[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
