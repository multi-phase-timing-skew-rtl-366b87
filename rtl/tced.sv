// tced: thermometer-code edge detector of a flash A/D channel.
//
// The NCOMP de-chopped comparator outputs form a thermometer code
// (comparator 1 has the lowest threshold). Line n (1 <= n <= NCOMP) is a
// 3-input AND, d[n] = t(n-1) & t(n) & !t(n+1), which is high where the code
// turns from 1 to 0 above comparator n; requiring two 1s below the edge
// ignores an isolated 1 (a bubble) above the true edge. Line 0 marks an input below every
// threshold. Outside the array t(0) = t(-1) = 1 and t(NCOMP+1) = 0. The
// document gives the 3-input AND array and the edge it marks; which three
// comparators feed each gate and the extra line 0 are this design's choices.
//
// Interface: therm[i] = comparator i+1; d[n] = line n (d[n] for n >= 1 are the
// document's D_c,1..D_c,64). Timing: combinational.
module tced #(
  parameter int unsigned NCOMP = 64
) (
  input  logic [NCOMP-1:0] therm,
  output logic [NCOMP:0]   d
);
  // ext[i+1] = t(i) for i = -1..NCOMP+1
  logic [NCOMP+2:0] ext;
  assign ext = {1'b0, therm, 2'b11};

  always_comb begin
    d[0] = !ext[2];                                   // t(1) = 0
    for (int n = 1; n <= int'(NCOMP); n++)
      d[n] = ext[n] & ext[n+1] & !ext[n+2];           // t(n-1) & t(n) & !t(n+1)
  end
endmodule
