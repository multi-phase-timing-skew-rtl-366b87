// zcd1: simple zero-crossing detector for one sampling interval.
//
// The two comparators that quantise x_j[k] and x_{j+1}[k] against zero sit in
// the analog front end; this block receives their 1-bit outputs c_j[k] and
// c_{j+1}[k] and reports z_j[k] = 1 when the polarities differ, i.e. when at
// least one zero crossing of x(t) happened between the two sampling instants.
// The XOR follows the gate printed in the document's detector diagram.
//
// Interface: cj, cj1 (comparator outputs, 1 = positive sample), z (ZC flag).
// Timing: purely combinational; the caller registers it with its own strobe.
module zcd1 (
  input  logic cj,
  input  logic cj1,
  output logic z
);
  always_comb z = cj ^ cj1;
endmodule
