// Shared types, constants and elaboration-time generators for the
// embedded-instruction-code (EIC) wavelet processor.
//
// Number formats (this design's choice; the source gives only a 16-bit
// multiplier, 32-bit adders and 8-bit input pixels):
//   data word  : 16-bit signed, Q12.4 (FD = 4 fractional bits)
//   coefficient: 16-bit signed, Q2.14 (CF = 14 fractional bits)
//   accumulator: 32-bit signed, Q.18
// An accumulator is brought back to a data word by adding 2^(CF-1),
// shifting right by CF and saturating to 16 bits.
//
// Filters: the 9/7 biorthogonal spline pair with the symmetric index ranges
// of the source: h[-4..4], g[-2..4] (centre 1), and for the inverse the
// polyphase filters bL[-3..3] and bH[-5..3] (centre -1), built from the
// synthesis filters as bL[2k]=h~[2k], bL[2k+1]=g~[2k], bH[2k]=h~[2k+1],
// bH[2k+1]=g~[2k+1].  The numeric coefficient values are the usual CDF 9/7
// ones; the source names the filter but prints no values.
//
// Every filtering channel computes y[m] = sum_k f[k] x[2m-k] for
// k in [c-H, c+H], with f[c-j] = f[c+j], and x extended whole-point
// symmetrically at both ends.  A channel is described by its centre c,
// half-length H, first output index MLO, first GPR RBASE and number of GPRs
// NREG = H+1 = ceil(L/2).
package dwt_pkg;

  localparam int DW = 16;   // data word
  localparam int CWID = 16; // coefficient word
  localparam int AW = 32;   // accumulator / adder width
  localparam int FD = 4;    // fractional bits of a data word
  localparam int CF = 14;   // fractional bits of a coefficient
  localparam int NGPR = 9;  // R0..R8

  typedef enum logic {MODE_DWT = 1'b0, MODE_IDWT = 1'b1} mode_e;

  // channel 0 = low-pass / even path (first 1M2A),
  // channel 1 = high-pass / odd path (second 1M2A)
  typedef struct packed {
    logic              en;   // ADD issued on this adder
    logic signed [2:0] off;  // target output index relative to floor(n/2)
    logic              ls;   // shift PREG left by one before adding (lane 0 only)
    logic              last; // final contribution: emit result, clear register
  } add_t;

  typedef struct packed {
    logic       mul;  // MUL issued in this slot
    logic [2:0] j;    // coefficient distance from the filter centre
    add_t       a0;
    add_t       a1;
  } instr_t;

  localparam int IW = $bits(instr_t);

  // Decoded order for one 1M2A: register numbers are absolute GPR indices.
  typedef struct packed {
    logic       en;
    logic [3:0] r;
    logic       ls;
    logic       last;
  } lane_t;

  typedef struct packed {
    logic       mul;  // MUL order: PREG <= x * coef(j)
    logic [2:0] j;
    logic       add;  // ADD order: lanes below use PREG
    lane_t      l0;   // adder with the LS/MUX path in front
    lane_t      l1;
  } op_t;

  // ROM organisation: 6 boundary-begin inputs, 2 loop inputs (even/odd),
  // 6 boundary-end inputs; up to 3 MUL/ADD slots per input.
  localparam int NBEG = 6;
  localparam int NEND = 6;
  localparam int NENT = NBEG + 2 + NEND;
  localparam int NSLOT = 3;
  localparam int NREF = 64; // line length the codes are derived for
  localparam int ROM_DEPTH = 2 * NENT * NSLOT; // per channel: mode x entry x slot

  // channel geometry
  function automatic int ch_c(input logic mode, input logic ch);
    if (mode == MODE_DWT) return ch ? 1 : 0;
    else                  return ch ? -1 : 0;
  endfunction
  function automatic int ch_h(input logic mode, input logic ch);
    if (mode == MODE_DWT) return ch ? 3 : 4;
    else                  return ch ? 4 : 3;
  endfunction
  function automatic int ch_mlo(input logic mode, input logic ch);
    return (mode == MODE_DWT && ch) ? 1 : 0;
  endfunction
  function automatic int ch_rbase(input logic mode, input logic ch);
    if (mode == MODE_DWT) return ch ? 5 : 0;
    else                  return ch ? 4 : 0;
  endfunction
  function automatic int ch_nreg(input logic mode, input logic ch);
    return ch_h(mode, ch) + 1;
  endfunction

  // whole-point symmetric extension of an index into [0, n-1]
  function automatic int sym_idx(input int i, input int n);
    int r;
    r = (i < 0) ? -i : i;
    if (r > n - 1) r = 2 * (n - 1) - r;
    return r;
  endfunction

  // Coefficient f[c+j] in Q2.14.
  function automatic logic signed [CWID-1:0] coef_val(input logic mode, input logic ch,
                                                       input int j);
    logic signed [CWID-1:0] v;
    v = '0;
    if (mode == MODE_DWT && !ch) begin        // h[j]
      case (j)
        0: v = 16'sd9879;  1: v = 16'sd4372;  2: v = -16'sd1282;
        3: v = -16'sd276;  4: v = 16'sd438;   default: v = '0;
      endcase
    end else if (mode == MODE_DWT) begin      // g[1+j]
      case (j)
        0: v = -16'sd18270; 1: v = 16'sd9687; 2: v = 16'sd943;
        3: v = -16'sd1495;  default: v = '0;
      endcase
    end else if (!ch) begin                   // bL[j]
      case (j)
        0: v = 16'sd18270; 1: v = 16'sd4372;  2: v = -16'sd943;
        3: v = -16'sd276;  default: v = '0;
      endcase
    end else begin                            // bH[-1+j]
      case (j)
        0: v = -16'sd9879; 1: v = 16'sd9687;  2: v = 16'sd1282;
        3: v = -16'sd1495; 4: v = -16'sd438;  default: v = '0;
      endcase
    end
    return v;
  endfunction

  // Reference input index (in a line of NREF samples) that a ROM entry describes.
  function automatic int entry_input(input int e);
    if (e < NBEG) return e;
    if (e < NBEG + 2) return NBEG + (e - NBEG);           // 6 (even), 7 (odd)
    return NREF - NEND + (e - NBEG - 2);
  endfunction

  // Derive one instruction of one channel.  For input n the MULs use the
  // coefficient distances j of the parity that input n can meet; each product
  // is routed to the (at most two) outputs m whose taps reach sample n,
  // counting mirrored taps; a doubled contribution becomes an LS add.
  function automatic instr_t gen_instr(input logic mode, input logic ch, input int e,
                                       input int s);
    instr_t ins;
    int c, hh, mlo, n, j, cnt, k, lastn, nt, sl, jj, m;
    bit later;
    add_t tg0, tg1, t;
    ins = '0;
    c = ch_c(mode, ch);
    hh = ch_h(mode, ch);
    mlo = ch_mlo(mode, ch);
    n = entry_input(e);
    // the s-th coefficient distance of matching parity
    j = -1;
    sl = 0;
    for (int jx = 0; jx <= hh; jx++) begin
      if (((jx - n - c) % 2) == 0) begin
        if (sl == s) j = jx;
        sl++;
      end
    end
    if (j < 0) return ins;
    ins.mul = 1'b1;
    ins.j = 3'(j);
    nt = 0;
    tg0 = '0;
    tg1 = '0;
    for (m = mlo; m < mlo + NREF / 2; m++) begin
      cnt = 0;
      for (k = c - hh; k <= c + hh; k++)
        if ((k - c == j || c - k == j) && sym_idx(2 * m - k, NREF) == n) cnt++;
      if (cnt > 0 && nt < 2) begin
        lastn = 0;
        for (k = c - hh; k <= c + hh; k++)
          if (sym_idx(2 * m - k, NREF) > lastn) lastn = sym_idx(2 * m - k, NREF);
        // is there a later slot of this input that also feeds m?
        later = 0;
        for (jj = j + 2; jj <= hh; jj += 2)
          for (k = c - hh; k <= c + hh; k++)
            if ((k - c == jj || c - k == jj) && sym_idx(2 * m - k, NREF) == n) later = 1;
        t.en = 1'b1;
        t.off = 3'(m - n / 2);
        t.ls = (cnt == 2);
        t.last = (lastn == n) && !later;
        if (nt == 0) tg0 = t;
        else tg1 = t;
        nt++;
      end
    end
    // the LS path sits in front of adder 0 only
    if (tg1.ls) begin
      ins.a0 = tg1;
      ins.a1 = tg0;
    end else begin
      ins.a0 = tg0;
      ins.a1 = tg1;
    end
    return ins;
  endfunction

  // Data-word conversion of an accumulator: round, shift, saturate.
  function automatic logic signed [DW-1:0] acc_to_data(input logic signed [AW-1:0] acc);
    logic signed [AW-1:0] r;
    r = (acc + (AW'(1) <<< (CF - 1))) >>> CF;
    if (r > AW'(32767)) return 16'sh7fff;
    if (r < -AW'(32768)) return 16'sh8000;
    return r[DW-1:0];
  endfunction

endpackage
