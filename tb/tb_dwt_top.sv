// End-to-end test of the 2-D processor on a 64 x 48 image with three levels
// (forward, then inverse and reconstruction check).  See dwt_top_bench.
module tb_dwt_top;
  dwt_top_bench #(.W(64), .H(48), .L(3), .MAXCYC(2_000_000)) bench ();
endmodule
