// offset_pair_decoder: drives N identical offset-trim elements of a
// comparator latch from a signed trim code.
//
// Each element has a control pair (a, b) that takes (0,0), (0,1) or (1,0),
// so N elements give 2N+1 trim steps: 4 current switches give the 9 coarse
// steps and 16 capacitor pairs the 33 fine steps. For code c > 0 the lowest
// c elements get (a,b) = (1,0); for c < 0 the lowest |c| elements get (0,1);
// the rest stay (0,0). The pair values and step counts follow the document;
// which of (1,0)/(0,1) is the positive direction and the thermometer order
// of the elements are this design's choices. Codes beyond +-N are clamped.
//
// Interface: code (signed, CW bits); a, b = N control bits each.
// Timing: combinational.
module offset_pair_decoder #(
  parameter int unsigned N  = 16,
  parameter int unsigned CW = $clog2(N + 1) + 1
) (
  input  logic signed [CW-1:0] code,
  output logic [N-1:0]         a,
  output logic [N-1:0]         b
);
  always_comb begin
    a = '0;
    b = '0;
    for (int i = 0; i < int'(N); i++) begin
      if (code > 0 && i < int'(code))  a[i] = 1'b1;
      if (code < 0 && i < -int'(code)) b[i] = 1'b1;
    end
  end
endmodule
