// ex_operand_path: Execute-stage rebuild of one 64-bit ALU operand.
//
// A register read delivers the lower 34 bits, the upper 30 bits (meaningless
// for a narrow entry, whose upper wordline was gated) and the entry's
// narrow-width flag. The flag steers a 2:1 mux: narrow -> the upper 30 bits are
// copies of bit 33 (sign extension), otherwise -> the upper half as read. The
// rebuilt word then meets the ALU input mux, which takes a bypassed value
// instead when byp_sel is set. Placing this mux in Execute rather than in the
// register-read stage, and the bit-33 sign extension, follow the published
// schematic; the single bypass source per operand is this implementation's
// simplification.
//
// Interface: rf (struct from the register file), byp_sel/byp_data (bypass
// network) -> operand. Purely combinational.
module ex_operand_path
  import aarf_pkg::*;
(
  input  rf_read_t rf,
  input  logic     byp_sel,
  input  word_t    byp_data,
  output word_t    operand
);

  hi_t   hi_sel;
  word_t restored;

  always_comb begin
    hi_sel   = rf.narrow ? {HI_W{rf.lo[LO_W-1]}} : rf.hi;
    restored = {hi_sel, rf.lo};
    operand  = byp_sel ? byp_data : restored;
  end

endmodule
