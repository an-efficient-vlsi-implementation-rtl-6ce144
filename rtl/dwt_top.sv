// Two-dimensional DWT / IDWT processor built on embedded instruction codes.
//
// The 2-D control walks an image of up to 2^MAX_LOG2 x 2^MAX_LOG2 pixels
// through a single 1-D engine, row by row and column by column, for up to six
// decomposition levels.  The 1-D engine runs the 9/7 symmetric filter pair
// with one parallel ALU of two multipliers and four adders (2M4A), steered
// by instruction codes from a look-up table; switching between the forward
// and the inverse transform only swaps the code set and the coefficients.
//
// The image lives in an external two-bank frame memory (bank 0 holds the
// image and, at the end, the result; bank 1 is scratch).  Words are 16-bit
// two's complement with 4 fractional bits: an 8-bit pixel p is stored as
// p << 4.  Memory timing: read data one cycle after rd_en; a write takes
// effect at the clock edge where wr_en is high.
//
// Throughput: a line of N samples takes 5N cycles in the engine plus a few
// cycles of line overhead, so one level of a W x H band costs about 10 W H
// cycles and a full six-level transform about 13.3 cycles per pixel.
module dwt_top
  import dwt_pkg::*;
#(
  parameter int MAX_LOG2 = 10,
  localparam int MA = 2 * MAX_LOG2 + 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  mode_e               cfg_mode,
  input  logic [MAX_LOG2:0]   cfg_width,
  input  logic [MAX_LOG2:0]   cfg_height,
  input  logic [2:0]          cfg_levels,
  output logic                busy,
  output logic                done,
  output logic                mem_rd_en,
  output logic [MA-1:0]       mem_rd_addr,
  input  logic [DW-1:0]       mem_rd_data,
  output logic                mem_wr_en,
  output logic [MA-1:0]       mem_wr_addr,
  output logic [DW-1:0]       mem_wr_data
);

  logic                eng_start, eng_done, ctrl_busy, eng_busy;
  logic [MAX_LOG2:0]   eng_n;
  mode_e               eng_mode;
  logic                in_valid, in_ready;
  logic signed [DW-1:0] in_data;
  logic                lo_valid, hi_valid;
  logic [MAX_LOG2-1:0] lo_pos, hi_pos;
  logic signed [DW-1:0] lo_data, hi_data;

  dwt2d_ctrl #(.MAX_LOG2(MAX_LOG2)) u_ctrl (
    .clk, .rst, .start, .cfg_mode, .cfg_width, .cfg_height, .cfg_levels, .busy(ctrl_busy), .done,
    .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data),
    .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .eng_start, .eng_n, .eng_mode, .eng_done,
    .eng_in_valid(in_valid), .eng_in_ready(in_ready), .eng_in_data(in_data),
    .eng_lo_valid(lo_valid), .eng_lo_pos(lo_pos), .eng_lo_data(lo_data),
    .eng_hi_valid(hi_valid), .eng_hi_pos(hi_pos), .eng_hi_data(hi_data)
  );

  eic_1d #(.LOGN(MAX_LOG2)) u_eng (
    .clk, .rst, .start(eng_start), .cfg_n(eng_n), .cfg_mode(eng_mode),
    .busy(eng_busy), .done(eng_done),
    .in_valid, .in_ready, .in_data,
    .lo_valid, .lo_pos, .lo_data, .hi_valid, .hi_pos, .hi_data
  );

  assign busy = ctrl_busy || eng_busy;

endmodule
