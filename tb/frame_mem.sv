// Behavioural model of the external two-bank frame memory (not part of the
// design): 2^AWID words of 16 bits, one read port with one cycle of latency
// and one write port.  A read of a word written in the same cycle returns
// the old value.  All words start at zero.
module frame_mem #(
  parameter int AWID = 21
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [AWID-1:0]  rd_addr,
  output logic [15:0]      rd_data,
  input  logic             wr_en,
  input  logic [AWID-1:0]  wr_addr,
  input  logic [15:0]      wr_data
);
  logic [15:0] mem [2**AWID];

  initial begin
    rd_data = '0;
    foreach (mem[i]) mem[i] = '0;
  end

  always @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end
endmodule
