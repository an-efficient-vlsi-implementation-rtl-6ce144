// Self-checking testbench for the 2M4A PALU (two 1M2As sharing the GPR
// file).  Random streams of MUL / ADD order pairs are applied to both
// channels, each channel touching only its own registers, and a model of the
// products, the nine GPRs and the finished outputs checks every result.  The
// coefficients come from the reference filter definition, so the coefficient
// ROM path is checked as well.
module tb_palu_2m4a;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  mode_e                mode;
  logic signed [DW-1:0] x;
  op_t                  op_lo, op_hi;
  logic                 lo_valid, hi_valid;
  logic [AW-1:0]        lo_acc, hi_acc;

  palu_2m4a dut (.*);

  int checks = 0, failures = 0, nout = 0;
  logic [AW-1:0] gpr [9];
  logic [AW-1:0] prod [2];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic op_t rnd_add(int md, int ch);
    op_t o;
    int base, nreg;
    base = ch_rbase(md[0], ch[0]);
    nreg = ch_nreg(md[0], ch[0]);
    o = '0;
    o.add = 1'b1;
    o.l0.en = 1'($urandom);
    o.l1.en = 1'($urandom);
    o.l0.r = 4'(base + $urandom_range(0, nreg - 1));
    do o.l1.r = 4'(base + $urandom_range(0, nreg - 1)); while (o.l1.r == o.l0.r);
    o.l0.ls = 1'($urandom);
    o.l0.last = ($urandom_range(0, 3) == 0);
    o.l1.last = !o.l0.last && ($urandom_range(0, 3) == 0);
    return o;
  endfunction

  task automatic check_ch(int ch, op_t o, logic v, logic [AW-1:0] acc);
    logic [AW-1:0] s0, s1;
    logic ev;
    s0 = gpr[o.l0.r] + (o.l0.ls ? (prod[ch] << 1) : prod[ch]);
    s1 = gpr[o.l1.r] + prod[ch];
    ev = o.add && ((o.l0.en && o.l0.last) || (o.l1.en && o.l1.last));
    checks++;
    if (v !== ev) begin failures++; $display("ch %0d valid %0d expected %0d", ch, v, ev); end
    if (ev) begin
      nout++;
      checks++;
      if (acc !== ((o.l0.en && o.l0.last) ? s0 : s1)) begin
        failures++;
        if (failures < 10) $display("ch %0d output %h expected %h", ch, acc,
                                    (o.l0.en && o.l0.last) ? s0 : s1);
      end
    end
  endtask

  task automatic update(int ch, op_t o);
    logic [AW-1:0] s0, s1;
    s0 = gpr[o.l0.r] + (o.l0.ls ? (prod[ch] << 1) : prod[ch]);
    s1 = gpr[o.l1.r] + prod[ch];
    if (o.add && o.l0.en) gpr[o.l0.r] = o.l0.last ? '0 : s0;
    if (o.add && o.l1.en) gpr[o.l1.r] = o.l1.last ? '0 : s1;
  endtask

  initial begin
    int md;
    mode = MODE_DWT; x = '0; op_lo = '0; op_hi = '0;
    for (int i = 0; i < 9; i++) gpr[i] = '0;
    prod[0] = '0; prod[1] = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int seq = 0; seq < 40; seq++) begin
      // a new mode starts from cleared registers, as at the start of a line
      @(negedge clk);
      rst = 1; op_lo = '0; op_hi = '0;
      md = seq % 2;
      mode = md ? MODE_IDWT : MODE_DWT;
      @(negedge clk);
      rst = 0;
      for (int i = 0; i < 9; i++) gpr[i] = '0;
      prod[0] = '0; prod[1] = '0;
      for (int it = 0; it < 500; it++) begin
        // MUL order
        @(negedge clk);
        x = DW'($urandom);
        op_lo = '0; op_hi = '0;
        op_lo.mul = 1'b1; op_lo.j = 3'($urandom_range(0, ch_h(md[0], 1'b0)));
        op_hi.mul = 1'b1; op_hi.j = 3'($urandom_range(0, ch_h(md[0], 1'b1)));
        #1;
        check_ch(0, op_lo, lo_valid, lo_acc);
        check_ch(1, op_hi, hi_valid, hi_acc);
        @(posedge clk);
        prod[0] = AW'(longint'(x) * fq(md, 0, ch_c(md[0], 1'b0) + int'(op_lo.j)));
        prod[1] = AW'(longint'(x) * fq(md, 1, ch_c(md[0], 1'b1) + int'(op_hi.j)));
        // ADD order
        @(negedge clk);
        op_lo = rnd_add(md, 0);
        op_hi = rnd_add(md, 1);
        #1;
        check_ch(0, op_lo, lo_valid, lo_acc);
        check_ch(1, op_hi, hi_valid, hi_acc);
        @(posedge clk);
        update(0, op_lo);
        update(1, op_hi);
      end
    end
    checks++;
    if (nout == 0) begin failures++; $display("no output was ever produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
