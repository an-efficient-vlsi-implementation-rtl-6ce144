// Nine general-purpose accumulator registers R0..R8.
//
// ceil(L/2) registers serve a filter of odd length L (eq. (7) of the
// method): 5 for a 9-tap and 4 for a 7-tap filter, 9 in all.  In the forward
// transform R0..R4 accumulate a1[n] and R5..R8 accumulate d1[n]; in the
// inverse transform R0..R3 accumulate the even and R4..R8 the odd
// reconstructed samples.
//
// Four read ports (one per adder, combinational) and four write ports (one
// per adder, written on the rising clock edge).  The controller never lets
// two adders write the same register in the same cycle; if it did, the
// higher-numbered port would win.  Synchronous active-high reset to zero.
module gpr_file
  import dwt_pkg::*;
#(
  parameter int NP = 4
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [NP-1:0][3:0]            raddr,
  output logic [NP-1:0][AW-1:0]         rdata,
  input  logic [NP-1:0]                 we,
  input  logic [NP-1:0][3:0]            waddr,
  input  logic [NP-1:0][AW-1:0]         wdata
);

  logic [AW-1:0] r [NGPR];

  always_comb
    for (int p = 0; p < NP; p++)
      rdata[p] = (int'(raddr[p]) < NGPR) ? r[raddr[p]] : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NGPR; i++) r[i] <= '0;
    end else begin
      for (int p = 0; p < NP; p++)
        if (we[p] && int'(waddr[p]) < NGPR) r[waddr[p]] <= wdata[p];
    end
  end

endmodule
