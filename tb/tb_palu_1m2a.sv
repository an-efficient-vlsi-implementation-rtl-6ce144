// Self-checking testbench for one 1M2A: random MUL and ADD orders with random
// register contents on the read ports.  A model keeps PREG and predicts the
// write enables, the written sums (with the LS doubling on adder 0 and the
// clear-on-last rule) and the finished output.
module tb_palu_1m2a;
  import dwt_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  op_t                   op;
  logic signed [DW-1:0]  x;
  logic signed [CWID-1:0] coef;
  logic [AW-1:0]         rd0, rd1, wd0, wd1, out_acc;
  logic                  we0, we1, out_valid;

  palu_1m2a dut (.*);

  int checks = 0, failures = 0;
  logic [AW-1:0] preg_m;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [AW-1:0] got, logic [AW-1:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("%s: %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    logic [AW-1:0] s0, s1;
    op = '0; x = '0; coef = '0; rd0 = '0; rd1 = '0;
    preg_m = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      op = '0;
      x = DW'($urandom);
      coef = CWID'($urandom);
      rd0 = $urandom;
      rd1 = $urandom;
      if ($urandom_range(0, 1)) begin
        op.mul = 1'b1;
        op.j = 3'($urandom);
      end else begin
        op.add = 1'b1;
        op.l0.en = 1'($urandom);
        op.l1.en = 1'($urandom);
        op.l0.r = 4'($urandom_range(0, 8));
        op.l1.r = 4'($urandom_range(0, 8));
        op.l0.ls = 1'($urandom);
        op.l0.last = ($urandom_range(0, 3) == 0);
        op.l1.last = !op.l0.last && ($urandom_range(0, 3) == 0);
      end
      #1;
      s0 = rd0 + (op.l0.ls ? (preg_m << 1) : preg_m);
      s1 = rd1 + preg_m;
      check("we0", AW'(we0), AW'(op.add && op.l0.en));
      check("we1", AW'(we1), AW'(op.add && op.l1.en));
      if (op.add && op.l0.en) check("wd0", wd0, op.l0.last ? '0 : s0);
      if (op.add && op.l1.en) check("wd1", wd1, op.l1.last ? '0 : s1);
      check("out_valid", AW'(out_valid),
            AW'(op.add && ((op.l0.en && op.l0.last) || (op.l1.en && op.l1.last))));
      if (out_valid) check("out_acc", out_acc, (op.l0.en && op.l0.last) ? s0 : s1);
      @(posedge clk);
      if (op.mul) preg_m = AW'(32'(signed'(x)) * 32'(signed'(coef)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
