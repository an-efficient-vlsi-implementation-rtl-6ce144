// Filter coefficient ROM.
//
// A MUL instruction names only the coefficient; the input operand is implied
// by the order of the samples.  This ROM returns f[c+j] (Q2.14) for the
// selected mode, channel and coefficient distance j from the filter centre:
//   forward, channel 0: h[j]        j = 0..4 (9-tap low-pass)
//   forward, channel 1: g[1+j]      j = 0..3 (7-tap high-pass, centre 1)
//   inverse, channel 0: bL[j]       j = 0..3 (7-tap even-output filter)
//   inverse, channel 1: bH[-1+j]    j = 0..4 (9-tap odd-output filter)
// Swapping this table and the instruction codes is all that turns the
// forward transform into the inverse one.  Combinational read.
module coef_rom
  import dwt_pkg::*;
(
  input  mode_e                   mode,
  input  logic                    ch,
  input  logic [2:0]              j,
  output logic signed [CWID-1:0]  coef
);

  typedef logic [15:0][CWID-1:0] tab_t;

  function automatic tab_t build();
    tab_t t;
    for (int md = 0; md < 2; md++)
      for (int c = 0; c < 2; c++)
        for (int jj = 0; jj < 4; jj++)
          t[md * 8 + c * 4 + jj] = coef_val(md[0], c[0], jj);
    return t;
  endfunction

  // j = 4 exists only for the two 9-tap filters and is kept separately
  localparam tab_t TAB = build();
  localparam logic signed [CWID-1:0] H4  = coef_val(MODE_DWT, 1'b0, 4);
  localparam logic signed [CWID-1:0] BH4 = coef_val(MODE_IDWT, 1'b1, 4);

  always_comb begin
    if (j[2]) begin                     // j = 4; no filter reaches 5..7
      if (j[1:0] != 2'd0)               coef = '0;
      else if (mode == MODE_DWT && !ch)     coef = H4;
      else if (mode == MODE_IDWT && ch) coef = BH4;
      else                              coef = '0;
    end else begin
      coef = TAB[{mode, ch, j[1:0]}];
    end
  end

endmodule
