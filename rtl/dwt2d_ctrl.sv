// 2-D control: separable multi-level DWT / IDWT over an image held in an
// external two-bank frame memory.
//
// Forward, for level l = 0 .. L-1 on the current LL band of Wl x Hl =
// (W >> l) x (H >> l) pixels:
//   row pass    : each row of bank 0 goes through the 1-D engine and its
//                 result (low half, then high half) is written to bank 1;
//   column pass : each column of bank 1 goes through the engine and is
//                 written back to bank 0.
// After the level, bank 0 holds LL | HL / LH | HH in the usual layout and the
// next level works on the top-left quarter.  Inverse, for l = L-1 .. 0:
// columns first (bank 0 -> bank 1), then rows (bank 1 -> bank 0); the samples
// of a line are fetched interleaved (low half sample k/2 for even k, high
// half sample N/2 + (k-1)/2 for odd k) to form the w1 sequence the engine
// expects.  Pixels outside the current band are never touched, so bank 0
// always holds the complete multi-level picture.
//
// Memory interface (this design's choice): one read port with one cycle of
// latency and one write port, 16-bit words, address {bank, y, x} with
// MAX_LOG2 bits per coordinate.  Samples are prefetched one ahead of the
// engine, so the engine is never starved.  Results go through an 8-entry
// write queue because the two channels of the engine can finish in the same
// cycle; the queue drains one word per cycle.  A pass ends when its last line
// is done and the queue is empty.  The write enable is held low during reset
// so that a power-up queue state can never corrupt the picture.
//
// Configuration (held during operation): cfg_width, cfg_height (even, and
// every level's band at least 12 x 12), cfg_levels 1..6, cfg_mode.
// 'start' begins, 'done' pulses at the end.
module dwt2d_ctrl
  import dwt_pkg::*;
#(
  parameter int MAX_LOG2 = 10,
  localparam int MA = 2 * MAX_LOG2 + 1
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  mode_e                  cfg_mode,
  input  logic [MAX_LOG2:0]      cfg_width,
  input  logic [MAX_LOG2:0]      cfg_height,
  input  logic [2:0]             cfg_levels,
  output logic                   busy,
  output logic                   done,
  // frame memory
  output logic                   rd_en,
  output logic [MA-1:0]          rd_addr,
  input  logic [DW-1:0]          rd_data,
  output logic                   wr_en,
  output logic [MA-1:0]          wr_addr,
  output logic [DW-1:0]          wr_data,
  // 1-D engine
  output logic                   eng_start,
  output logic [MAX_LOG2:0]      eng_n,
  output mode_e                  eng_mode,
  input  logic                   eng_done,
  output logic                   eng_in_valid,
  input  logic                   eng_in_ready,
  output logic signed [DW-1:0]   eng_in_data,
  input  logic                   eng_lo_valid,
  input  logic [MAX_LOG2-1:0]    eng_lo_pos,
  input  logic signed [DW-1:0]   eng_lo_data,
  input  logic                   eng_hi_valid,
  input  logic [MAX_LOG2-1:0]    eng_hi_pos,
  input  logic signed [DW-1:0]   eng_hi_data
);

  typedef enum logic [2:0] {C_IDLE, C_LINE, C_FEED, C_DRAIN, C_NEXT} cstate_e;

  typedef struct packed {
    logic [MA-1:0] addr;
    logic [DW-1:0] data;
  } wreq_t;

  localparam int QD = 8;

  cstate_e             state;
  mode_e               mode;
  logic [2:0]          lev;          // current level
  logic                pass;         // 0: first pass of the level, 1: second
  logic [MAX_LOG2:0]   wl, hl;       // band size of the level
  logic [MAX_LOG2:0]   line;         // line index within the pass
  logic [MAX_LOG2:0]   rcnt;         // samples read for this line
  logic                rd_pend, hv;
  logic signed [DW-1:0] hd;
  logic                col_pass;     // current pass walks columns
  logic [MAX_LOG2:0]   nlen, nlines;
  logic [MAX_LOG2-1:0] kpos;         // position of the sample to read
  logic                consume, issue;

  // write queue
  wreq_t               q [QD];
  logic [$clog2(QD):0] qcnt;
  logic [$clog2(QD)-1:0] qhead, qtail;
  wreq_t               w_lo, w_hi;

  // forward: rows then columns; inverse: columns then rows
  assign col_pass = (mode == MODE_DWT) ? pass : !pass;
  assign nlen = col_pass ? hl : wl;
  assign nlines = col_pass ? wl : hl;
  assign busy = (state != C_IDLE);

  function automatic logic [MA-1:0] addr_of(input logic bank, input logic col,
                                            input logic [MAX_LOG2-1:0] ln,
                                            input logic [MAX_LOG2-1:0] pos);
    // rows: y = line, x = pos;  columns: y = pos, x = line
    if (col) return {bank, pos, ln};
    else     return {bank, ln, pos};
  endfunction

  // sample order within a line: natural (forward) or interleaved (inverse)
  always_comb begin
    if (mode == MODE_DWT)
      kpos = rcnt[MAX_LOG2-1:0];
    else if (!rcnt[0])
      kpos = rcnt[MAX_LOG2:1];
    else
      kpos = MAX_LOG2'(nlen >> 1) + rcnt[MAX_LOG2:1];
  end

  // prefetch: one read in flight, one sample held for the engine
  assign consume = hv && eng_in_ready;
  assign issue = (state == C_FEED) && !rd_pend && (!hv || consume) && (rcnt < nlen);
  assign rd_en = issue;
  // the first pass reads bank 0, the second reads bank 1
  assign rd_addr = addr_of(pass, col_pass, line[MAX_LOG2-1:0], kpos);
  assign eng_in_valid = hv;
  assign eng_in_data = hd;
  assign eng_n = nlen;
  assign eng_mode = mode;
  assign eng_start = (state == C_LINE);

  // results: first pass writes bank 1, second pass writes bank 0
  always_comb begin
    w_lo.addr = addr_of(!pass, col_pass, line[MAX_LOG2-1:0], eng_lo_pos);
    w_lo.data = eng_lo_data;
    w_hi.addr = addr_of(!pass, col_pass, line[MAX_LOG2-1:0], eng_hi_pos);
    w_hi.data = eng_hi_data;
  end

  // the queue count is only defined after the first reset edge
  assign wr_en = (qcnt != 0) && !rst;
  assign wr_addr = q[qhead].addr;
  assign wr_data = q[qhead].data;

  always_ff @(posedge clk) begin
    if (rst) begin
      qcnt <= '0;
      qhead <= '0;
      qtail <= '0;
    end else begin
      automatic logic [$clog2(QD)-1:0] t = qtail;
      automatic int push = 0;
      if (eng_lo_valid) begin
        q[t] <= w_lo;
        t = t + 1'b1;
        push++;
      end
      if (eng_hi_valid) begin
        q[t] <= w_hi;
        t = t + 1'b1;
        push++;
      end
      qtail <= t;
      if (qcnt != 0) qhead <= qhead + 1'b1;
      qcnt <= qcnt + ($clog2(QD)+1)'(push) - (($clog2(QD)+1)'(qcnt != 0));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= C_IDLE;
      mode <= MODE_DWT;
      lev <= '0;
      pass <= 1'b0;
      wl <= '0;
      hl <= '0;
      line <= '0;
      rcnt <= '0;
      rd_pend <= 1'b0;
      hv <= 1'b0;
      hd <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      rd_pend <= issue;
      if (issue) rcnt <= rcnt + 1'b1;
      if (consume) hv <= 1'b0;
      if (rd_pend) begin
        hv <= 1'b1;
        hd <= rd_data;
      end
      unique case (state)
        C_IDLE: begin
          if (start) begin
            mode <= cfg_mode;
            pass <= 1'b0;
            line <= '0;
            if (cfg_mode == MODE_DWT) begin
              lev <= '0;
              wl <= cfg_width;
              hl <= cfg_height;
            end else begin
              lev <= cfg_levels - 3'd1;
              wl <= cfg_width >> (cfg_levels - 3'd1);
              hl <= cfg_height >> (cfg_levels - 3'd1);
            end
            state <= C_LINE;
          end
        end
        C_LINE: begin          // engine latches the line length this cycle
          rcnt <= '0;
          state <= C_FEED;
        end
        C_FEED: begin
          if (eng_done) begin
            if (line == nlines - 1) begin
              state <= C_DRAIN;
            end else begin
              line <= line + 1'b1;
              state <= C_LINE;
            end
          end
        end
        C_DRAIN: begin         // pass complete once its results are written
          if (qcnt == 0 && !eng_lo_valid && !eng_hi_valid) state <= C_NEXT;
        end
        C_NEXT: begin
          line <= '0;
          state <= C_LINE;
          if (!pass) begin
            pass <= 1'b1;
          end else begin
            pass <= 1'b0;
            if (mode == MODE_DWT) begin
              if (lev == cfg_levels - 3'd1) begin
                state <= C_IDLE;
                done <= 1'b1;
              end else begin
                lev <= lev + 3'd1;
                wl <= wl >> 1;
                hl <= hl >> 1;
              end
            end else begin
              if (lev == 3'd0) begin
                state <= C_IDLE;
                done <= 1'b1;
              end else begin
                lev <= lev - 3'd1;
                wl <= wl << 1;
                hl <= hl << 1;
              end
            end
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  a_queue: assert property (@(posedge clk) disable iff (rst) qcnt <= ($clog2(QD)+1)'(QD - 2));
  a_levels: assert property (@(posedge clk) disable iff (rst)
                             (state == C_IDLE && start) |-> (cfg_levels >= 1 && cfg_levels <= 6));

endmodule
