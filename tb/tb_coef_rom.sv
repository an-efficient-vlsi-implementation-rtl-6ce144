// Self-checking testbench for the coefficient ROM: every (mode, channel, j)
// must hold f[c+j] rounded to Q2.14, where the filters are derived in the
// reference package from the two 9/7 low-pass filters; entries beyond a
// filter's half-length must read zero.  The DC gain of each analysis and
// synthesis filter is checked as well.
module tb_coef_rom;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  mode_e mode;
  logic ch;
  logic [2:0] j;
  logic signed [15:0] coef;

  coef_rom dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, hh, exp_v, sum;
    for (int md = 0; md < 2; md++)
      for (int cc = 0; cc < 2; cc++) begin
        c = (md == 0) ? cc : -cc;
        hh = (md == 0) ? (cc ? 3 : 4) : (cc ? 4 : 3);
        sum = 0;
        for (int jj = 0; jj < 8; jj++) begin
          mode = md ? MODE_IDWT : MODE_DWT;
          ch = cc[0];
          j = 3'(jj);
          #1;
          exp_v = (jj <= hh) ? fq(md, cc, c + jj) : 0;
          checks++;
          if (coef != exp_v) begin
            failures++;
            $display("mode %0d ch %0d j %0d: %0d, expected %0d", md, cc, jj, coef, exp_v);
          end
          if (jj <= hh) sum += (jj == 0) ? coef : 2 * coef;
        end
        // forward low-pass: DC gain 1; forward high-pass: DC gain 0
        checks++;
        if (md == 0 && cc == 0 && (sum < 16380 || sum > 16388)) begin failures++; $display("h DC gain %0d", sum); end
        if (md == 0 && cc == 1 && (sum < -4 || sum > 4)) begin failures++; $display("g DC gain %0d", sum); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
