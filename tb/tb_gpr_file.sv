// Self-checking testbench for the nine GPRs: random writes on the four
// ports (distinct registers per cycle) against a model array, reads on all
// four ports every cycle, reset to zero, and out-of-range addresses ignored.
module tb_gpr_file;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [3:0][3:0] raddr, waddr;
  logic [3:0][31:0] rdata, wdata;
  logic [3:0] we;

  gpr_file #(.NP(4)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [9];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 9; i++) model[i] = 0;
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      // check all reads of the current state
      for (int p = 0; p < 4; p++) begin
        raddr[p] = 4'($urandom_range(0, 9));
      end
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rdata[p] != ((raddr[p] < 9) ? model[raddr[p]] : 32'd0)) begin
          failures++;
          $display("read port %0d reg %0d: %h expected %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      // new writes, distinct addresses
      for (int p = 0; p < 4; p++) begin
        bit clash;
        we[p] = $urandom_range(0, 1);
        do begin
          waddr[p] = 4'($urandom_range(0, 9));
          clash = 0;
          for (int q = 0; q < p; q++) if (we[q] && waddr[q] == waddr[p]) clash = 1;
        end while (clash);
        wdata[p] = $urandom;
      end
      @(posedge clk);
      for (int p = 0; p < 4; p++) if (we[p] && waddr[p] < 9) model[waddr[p]] = wdata[p];
    end
    @(negedge clk);
    we = 0;
    rst = 1;
    @(negedge clk);
    rst = 0;
    for (int r = 0; r < 9; r++) begin
      raddr[0] = 4'(r);
      #1;
      checks++;
      if (rdata[0] != 0) begin failures++; $display("R%0d not cleared by reset", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
