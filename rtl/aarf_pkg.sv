// aarf_pkg: widths and types shared by the aging-aware register file blocks.
//
// A 64-bit integer register entry is split into a lower half of 34 bits and an
// upper half of 30 bits. A value is "narrow" when its 64 bits are the sign
// extension of its low 34 bits; such a value lives entirely in the lower half
// and the upper half of its entry is idle. The split (64 = 30 + 34) follows the
// design as published; the struct layout below is this implementation's own.
package aarf_pkg;

  parameter int unsigned XLEN = 64;          // register width
  parameter int unsigned LO_W = 34;          // lower (always used) half
  parameter int unsigned HI_W = XLEN - LO_W; // upper (gated, flipped) half = 30

  typedef logic [XLEN-1:0] word_t;
  typedef logic [LO_W-1:0] lo_t;
  typedef logic [HI_W-1:0] hi_t;

  // One register-file read result as it crosses into the Execute stage.
  typedef struct packed {
    logic narrow; // narrow-width flag bit of the entry
    hi_t  hi;     // upper half; zero when its wordline was gated
    lo_t  lo;     // lower half
  } rf_read_t;

endpackage
