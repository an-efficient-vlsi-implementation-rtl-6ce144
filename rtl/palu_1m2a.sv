// One multiplier and two adders (1M2A), half of the parallel ALU.
//
// A MUL order multiplies the current input sample by the fetched coefficient
// and stores the 32-bit product in PREG.  An ADD order adds PREG to up to two
// GPRs at once: adder 0 can take PREG shifted left by one bit (LS, selected
// by a multiplexer) for the doubled products that symmetric extension creates
// at a line boundary; adder 1 always takes PREG as it is.  Because the
// product waits in PREG, the adders of one order use the MUL of the order
// before.  When an ADD carries the 'last' mark the sum is the finished
// output: it is presented on out_acc for that cycle and the register is
// written with zero so that it can start the next output.
//
// Timing: PREG updates on the clock edge that ends a MUL order; GPR writes
// and out_valid belong to the cycle of the ADD order (result registered into
// the GPR file at its end; out_valid/out_acc are combinational).
module palu_1m2a
  import dwt_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  op_t                     op,
  input  logic signed [DW-1:0]    x,
  input  logic signed [CWID-1:0]  coef,
  // GPR access for the two adders
  input  logic [AW-1:0]           rd0,
  input  logic [AW-1:0]           rd1,
  output logic                    we0,
  output logic                    we1,
  output logic [AW-1:0]           wd0,
  output logic [AW-1:0]           wd1,
  // finished output
  output logic                    out_valid,
  output logic [AW-1:0]           out_acc
);

  logic signed [AW-1:0] preg;
  logic [AW-1:0]        addend0, sum0, sum1;

  always_ff @(posedge clk) begin
    if (rst) preg <= '0;
    else if (op.mul) preg <= AW'(x) * AW'(coef);
  end

  always_comb begin
    addend0 = op.l0.ls ? (preg <<< 1) : preg;   // LS + MUX
    sum0 = rd0 + addend0;
    sum1 = rd1 + preg;
    we0 = op.add && op.l0.en;
    we1 = op.add && op.l1.en;
    wd0 = op.l0.last ? '0 : sum0;
    wd1 = op.l1.last ? '0 : sum1;
    out_valid = (we0 && op.l0.last) || (we1 && op.l1.last);
    out_acc = (we0 && op.l0.last) ? sum0 : sum1;
  end

  // at most one output per order and per 1M2A
  property p_one_out;
    @(posedge clk) disable iff (rst) !(we0 && op.l0.last && we1 && op.l1.last);
  endproperty
  a_one_out: assert property (p_one_out);

  // LS only in front of adder 0
  a_ls_lane: assert property (@(posedge clk) disable iff (rst) !(op.add && op.l1.en && op.l1.ls));

endmodule
