// encoder_rom: output encoder of a flash A/D channel, addressed by the
// thermometer-code edge detector.
//
// Each TCED line n >= 1 selects the ROM word n-1 (the NCOMP lines map onto the
// 2^NBITS output codes); line 0, an input below every threshold, selects 0.
// As in a NOR-type ROM, when bubbles activate several lines the selected
// words are ORed. The ROM addressed by the TCED is the document's; the
// code assignment and the OR behaviour are this design's choices.
//
// Interface: d = TCED lines 0..NCOMP; code = NBITS-bit output.
// Timing: combinational.
module encoder_rom #(
  parameter int unsigned NCOMP = 64,
  parameter int unsigned NBITS = 6
) (
  input  logic [NCOMP:0]     d,
  output logic [NBITS-1:0]   code
);
  always_comb begin
    code = '0;
    for (int n = 1; n <= int'(NCOMP); n++)
      if (d[n]) code = code | NBITS'(n - 1);
  end
endmodule
