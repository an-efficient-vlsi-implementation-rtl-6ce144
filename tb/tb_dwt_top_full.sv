// Full-size end-to-end test: a 1024 x 1024 image, six decomposition levels,
// forward and inverse, on the processor at its default size.  See
// dwt_top_bench.
module tb_dwt_top_full;
  dwt_top_bench #(.W(1024), .H(1024), .L(6), .MAXCYC(40_000_000)) bench ();
endmodule
