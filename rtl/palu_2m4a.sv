// Parallel ALU with two multipliers and four adders (2M4A).
//
// Two 1M2A units work side by side on the same input sample: channel 0
// produces the low-pass outputs (forward) or the even reconstructed samples
// (inverse); channel 1 produces the high-pass outputs or the odd samples.
// Both share the nine GPRs and fetch their coefficients from the coefficient
// ROM with the coefficient distance carried in the MUL order.  The register
// numbers in the orders are absolute (R0..R8); each channel only touches its
// own registers.
//
// Timing: one order per clock per channel.  Outputs are valid in the cycle of
// the ADD order that finishes them (see palu_1m2a).
module palu_2m4a
  import dwt_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  mode_e                 mode,
  input  logic signed [DW-1:0]  x,
  input  op_t                   op_lo,
  input  op_t                   op_hi,
  output logic                  lo_valid,
  output logic [AW-1:0]         lo_acc,
  output logic                  hi_valid,
  output logic [AW-1:0]         hi_acc
);

  logic signed [CWID-1:0] coef_lo, coef_hi;
  logic [3:0][3:0]    raddr, waddr;
  logic [3:0][AW-1:0] rdata, wdata;
  logic [3:0]         we;

  coef_rom u_coef_lo (.mode(mode), .ch(1'b0), .j(op_lo.j), .coef(coef_lo));
  coef_rom u_coef_hi (.mode(mode), .ch(1'b1), .j(op_hi.j), .coef(coef_hi));

  always_comb begin
    raddr[0] = op_lo.l0.r;
    raddr[1] = op_lo.l1.r;
    raddr[2] = op_hi.l0.r;
    raddr[3] = op_hi.l1.r;
    waddr = raddr;
  end

  gpr_file #(.NP(4)) u_gpr (
    .clk, .rst, .raddr, .rdata, .we, .waddr, .wdata
  );

  palu_1m2a u_lo (
    .clk, .rst, .op(op_lo), .x, .coef(coef_lo),
    .rd0(rdata[0]), .rd1(rdata[1]), .we0(we[0]), .we1(we[1]),
    .wd0(wdata[0]), .wd1(wdata[1]), .out_valid(lo_valid), .out_acc(lo_acc)
  );

  palu_1m2a u_hi (
    .clk, .rst, .op(op_hi), .x, .coef(coef_hi),
    .rd0(rdata[2]), .rd1(rdata[3]), .we0(we[2]), .we1(we[3]),
    .wd0(wdata[2]), .wd1(wdata[3]), .out_valid(hi_valid), .out_acc(hi_acc)
  );

endmodule
