// 1-D wavelet engine driven by embedded instruction codes (the "1-D control"
// together with its 2M4A PALU).
//
// A line of N samples (N even, 12 <= N <= 2^LOGN) enters one sample at a
// time.  For each sample the engine looks up its instruction codes and issues
// them as orders, one per clock: MUL (product into PREG), then ADD (PREG into
// up to two GPRs per 1M2A), repeated for up to three coefficient slots.  A
// sample thus takes 2 x (number of slots) cycles: in the forward transform 6
// for an even and 4 for an odd sample, in the inverse 4 and 6; a line takes
// 5N cycles.  The next sample is taken in the cycle of the last ADD, so no
// cycle is lost when the input is ready.
//
// Code selection: samples 0..5 use the "boundary in the beginning" entries,
// the last six samples the "boundary in the end" entries, and all others the
// even or odd "loop" entry.  The register of output m is
// RBASE + (m - MLO) mod NREG; the engine keeps floor(n/2) modulo 5 and 4 so
// that this needs only a small add and one correction.
//
// Output layout (position within the line):
//   forward : a1[m] -> m,        d1[m] (m = 1..N/2) -> N/2 + m - 1
//   inverse : even sample 2m -> 2m,  odd sample 2m+1 -> 2m+1
// In the inverse mode the input must be the interleaved sequence
// w1 = a1[0], d1[1], a1[1], d1[2], ...  Results are rounded to Q12.4 and
// saturated.  They appear one cycle after the ADD order that finishes them,
// at most one per channel per cycle.
//
// Handshake: 'start' (while idle) latches cfg_n and cfg_mode; samples are
// taken on in_valid && in_ready; 'done' pulses for one cycle after the last
// result of the line.
module eic_1d
  import dwt_pkg::*;
#(
  parameter int LOGN = 10
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic [LOGN:0]          cfg_n,
  input  mode_e                  cfg_mode,
  output logic                   busy,
  output logic                   done,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [DW-1:0]   in_data,
  output logic                   lo_valid,
  output logic [LOGN-1:0]        lo_pos,
  output logic signed [DW-1:0]   lo_data,
  output logic                   hi_valid,
  output logic [LOGN-1:0]        hi_pos,
  output logic signed [DW-1:0]   hi_data
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RUN} state_e;

  state_e               state;
  mode_e                mode;
  logic [LOGN:0]        len;
  logic [LOGN:0]        n;        // index of the sample being processed
  logic [LOGN:0]        n_in;     // index of the next sample to accept
  logic [1:0]           slot;
  logic                 ph_add;   // 0: MUL order, 1: ADD order
  logic [2:0]           b5;       // floor(n/2) mod 5
  logic [1:0]           b4;       // floor(n/2) mod 4
  logic signed [DW-1:0] x;

  logic [3:0]           entry;
  instr_t               ins_lo, ins_hi;
  logic                 more;
  op_t                  op_lo, op_hi;
  logic                 last_slot, accept, line_end;
  logic                 lo_v, hi_v;
  logic [AW-1:0]        lo_acc, hi_acc;
  logic [LOGN-1:0]      lo_p, hi_p;

  // ---------------------------------------------------------------- codes
  always_comb begin
    if (n < (LOGN+1)'(NBEG))
      entry = 4'(n);
    else if (n >= len - (LOGN+1)'(NEND))
      entry = 4'(NBEG + 2) + 4'(n - (len - (LOGN+1)'(NEND)));
    else
      entry = 4'(NBEG) + 4'(n[0]);
  end

  eic_rom u_rom (.mode(mode), .entry(entry), .slot(slot), .ins_lo(ins_lo), .ins_hi(ins_hi),
                 .more(more));

  assign last_slot = !more;

  // absolute register of output index floor(n/2)+off for one channel
  function automatic logic [3:0] reg_of(input mode_e md, input logic ch,
                                        input logic signed [2:0] off,
                                        input logic [2:0] bm5, input logic [1:0] bm4);
    int nreg, t;
    nreg = ch_nreg(md, ch);
    t = ((nreg == 5) ? int'(bm5) : int'(bm4)) + int'(off) - ch_mlo(md, ch);
    if (t < 0) t += nreg;
    if (t >= nreg) t -= nreg;
    return 4'(ch_rbase(md, ch) + t);
  endfunction

  function automatic op_t decode(input instr_t ins, input logic ch, input logic run,
                                 input logic addph, input mode_e md,
                                 input logic [2:0] bm5, input logic [1:0] bm4);
    op_t o;
    o = '0;
    o.j = ins.j;
    o.mul = run && !addph && ins.mul;
    o.add = run && addph && ins.mul;
    o.l0.en = ins.a0.en;
    o.l0.ls = ins.a0.ls;
    o.l0.last = ins.a0.last;
    o.l0.r = reg_of(md, ch, ins.a0.off, bm5, bm4);
    o.l1.en = ins.a1.en;
    o.l1.ls = ins.a1.ls;
    o.l1.last = ins.a1.last;
    o.l1.r = reg_of(md, ch, ins.a1.off, bm5, bm4);
    return o;
  endfunction

  always_comb begin
    op_lo = decode(ins_lo, 1'b0, state == S_RUN, ph_add, mode, b5, b4);
    op_hi = decode(ins_hi, 1'b1, state == S_RUN, ph_add, mode, b5, b4);
  end

  // ---------------------------------------------------------------- PALU
  palu_2m4a u_palu (
    .clk, .rst, .mode, .x, .op_lo, .op_hi,
    .lo_valid(lo_v), .lo_acc, .hi_valid(hi_v), .hi_acc
  );

  // output positions of the lane that finished
  function automatic logic [LOGN-1:0] pos_of(input add_t a0, input add_t a1, input logic ch,
                                             input mode_e md, input logic [LOGN:0] nn,
                                             input logic [LOGN:0] ln);
    logic [LOGN:0] m;
    logic signed [2:0] off;
    off = (a0.en && a0.last) ? a0.off : a1.off;
    m = (nn >> 1) + {{(LOGN-2){off[2]}}, off};
    if (md == MODE_DWT)
      return ch ? LOGN'((ln >> 1) + m - 1'b1) : LOGN'(m);
    else
      return {m[LOGN-2:0], ch};
  endfunction

  always_comb begin
    lo_p = pos_of(ins_lo.a0, ins_lo.a1, 1'b0, mode, n, len);
    hi_p = pos_of(ins_hi.a0, ins_hi.a1, 1'b1, mode, n, len);
  end

  // ---------------------------------------------------------------- sequencing
  assign line_end = (state == S_RUN) && ph_add && last_slot && (n == len - 1);
  assign in_ready = (state == S_WAIT) ||
                    ((state == S_RUN) && ph_add && last_slot && (n_in < len));
  assign accept = in_valid && in_ready;
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      mode <= MODE_DWT;
      len <= '0;
      n <= '0;
      n_in <= '0;
      slot <= '0;
      ph_add <= 1'b0;
      b5 <= '0;
      b4 <= '0;
      x <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            mode <= cfg_mode;
            len <= cfg_n;
            n_in <= '0;
            state <= S_WAIT;
          end
        end
        S_WAIT, S_RUN: begin
          if (state == S_RUN && !ph_add) begin
            ph_add <= 1'b1;
          end else if (state == S_RUN && !last_slot) begin
            ph_add <= 1'b0;
            slot <= slot + 2'd1;
          end else if (line_end) begin
            state <= S_IDLE;
            done <= 1'b1;
          end else if (accept) begin
            x <= in_data;
            n <= n_in;
            n_in <= n_in + 1'b1;
            slot <= '0;
            ph_add <= 1'b0;
            state <= S_RUN;
            if (n_in == '0) begin
              b5 <= '0;
              b4 <= '0;
            end else if (n_in[0] == 1'b0) begin   // floor(n/2) steps on even n
              b5 <= (b5 == 3'd4) ? 3'd0 : b5 + 3'd1;
              b4 <= b4 + 2'd1;
            end
          end else begin
            state <= S_WAIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // registered outputs
  always_ff @(posedge clk) begin
    if (rst) begin
      lo_valid <= 1'b0;
      hi_valid <= 1'b0;
      lo_pos <= '0;
      hi_pos <= '0;
      lo_data <= '0;
      hi_data <= '0;
    end else begin
      lo_valid <= lo_v;
      hi_valid <= hi_v;
      lo_pos <= lo_p;
      hi_pos <= hi_p;
      lo_data <= acc_to_data(lo_acc);
      hi_data <= acc_to_data(hi_acc);
    end
  end

  a_len_even: assert property (@(posedge clk) disable iff (rst)
                               (state == S_IDLE && start) |-> (cfg_n[0] == 1'b0 && cfg_n >= 12));

endmodule
