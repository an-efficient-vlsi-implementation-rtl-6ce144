// End-to-end test at a size that is not a power of two: a 640 x 480 (VGA)
// picture with five decomposition levels, whose smallest band is 40 x 30,
// forward and inverse, on the processor at its default size.  The 30-sample
// columns of the last level have N/2 odd, which takes the boundary-end codes
// through their other alignment.  See dwt_top_bench, which does the checking
// and ends the run; the block below is only an outer watchdog.
module tb_dwt_top_vga;
  dwt_top_bench #(.W(640), .H(480), .L(5), .MAXCYC(10_000_000)) bench ();

  initial begin
    #200ms;
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures + 1);
    $finish;
  end
endmodule
