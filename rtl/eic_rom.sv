// Embedded instruction code look-up table.
//
// Holds, for both filter channels of the 2M4A PALU, the MUL/ADD instruction
// codes that process one input sample.  The table has three regions, as in
// the source: "boundary in the beginning" (inputs 0..5), "loop" (one entry for
// an even and one for an odd input; the loop repeats because register numbers
// are taken modulo the number of GPRs of the channel), and "boundary in the
// end" (the last six inputs of a line).  Register fields are offsets of the
// target output index from floor(n/2), so one table serves every even line
// length of at least 12.  Each input uses up to three slots; a slot is one MUL
// order followed by one ADD order.
//
// The codes are derived at elaboration time by dwt_pkg::gen_instr from the
// filter index ranges and the symmetric extension rule, instead of being
// typed in.  Two code sets are stored: forward (DWT) and inverse (IDWT).
//
// Interface: purely combinational read.  addr = {mode, entry, slot}, with
// entry in [0, NENT) and slot in [0, NSLOT).
module eic_rom
  import dwt_pkg::*;
(
  input  mode_e            mode,
  input  logic [3:0]       entry,
  input  logic [1:0]       slot,
  output instr_t           ins_lo,  // channel 0 (low-pass / even outputs)
  output instr_t           ins_hi,  // channel 1 (high-pass / odd outputs)
  output logic             more     // slot+1 of this entry holds a MUL
);

  typedef logic [ROM_DEPTH-1:0][IW-1:0] rom_t;

  function automatic rom_t build(input logic ch);
    rom_t r;
    for (int md = 0; md < 2; md++)
      for (int e = 0; e < NENT; e++)
        for (int s = 0; s < NSLOT; s++)
          r[(md * NENT + e) * NSLOT + s] = gen_instr(md[0], ch, e, s);
    return r;
  endfunction

  localparam rom_t ROM_LO = build(1'b0);
  localparam rom_t ROM_HI = build(1'b1);

  // slot occupancy of every entry, either channel
  function automatic logic [ROM_DEPTH-1:0] build_used();
    logic [ROM_DEPTH-1:0] u;
    for (int a = 0; a < ROM_DEPTH; a++) begin
      instr_t l, h;
      l = ROM_LO[a];
      h = ROM_HI[a];
      u[a] = l.mul || h.mul;
    end
    return u;
  endfunction
  localparam logic [ROM_DEPTH-1:0] USED = build_used();

  logic [$clog2(ROM_DEPTH)-1:0] addr;

  always_comb begin
    addr = ($clog2(ROM_DEPTH))'((int'(mode) * NENT + int'(entry)) * NSLOT + int'(slot));
    ins_lo = '0;
    ins_hi = '0;
    more = 1'b0;
    if (int'(entry) < NENT && int'(slot) < NSLOT) begin
      ins_lo = ROM_LO[addr];
      ins_hi = ROM_HI[addr];
      if (int'(slot) < NSLOT - 1) more = USED[addr + 1'b1];
    end
  end

endmodule
