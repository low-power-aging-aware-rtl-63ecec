// narrow_detect: leading-0/1 detector that classifies a produced result.
//
// A 64-bit value is narrow when bits [63:33] are all zeros or all ones, i.e.
// the value equals the sign extension of its low 34 bits. Only such values can
// be rebuilt from the lower half by the sign extension in the Execute stage, so
// bit 33 is part of the test. The published design reuses the leading-0/1
// detection already present in the functional units and only names it; this
// module is the simplest circuit with that function (one AND and one NOR
// reduction over the top 31 bits).
//
// Interface: data (result word) -> narrow. Purely combinational, no latency.
module narrow_detect
  import aarf_pkg::*;
(
  input  word_t data,
  output logic  narrow
);

  logic [XLEN-LO_W:0] lead; // bits [63:33]

  always_comb begin
    lead   = data[XLEN-1:LO_W-1];
    narrow = (&lead) | ~(|lead);
  end

endmodule
