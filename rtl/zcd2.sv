// zcd2: pseudo zero-crossing detector with reduced sensitivity to the
// comparators' offsets.
//
// Each comparator output c[k] in {0,1} passes through a 1 - z^-1 high-pass
// filter, r[k] = c[k] - c[k-1] in {-1,0,+1}. The ZC logic issues z[k] = 1 when
// r_j[k] * r_{j+1}[k] <= 0, so z[k] = 0 only when both filter outputs are +1
// or both are -1. A static comparator offset shifts both c[k] and c[k-1] alike
// and is removed by the filter. This structure and the ZC rule follow the
// document; the filters' reset value (previous sample = 0) is this design's
// choice.
//
// Interface: en is the sample strobe (one step of the calibration processor);
// cj, cj1 are the comparator outputs of the two channels that bound the
// interval; z is combinational from the present inputs and the stored
// previous samples, valid while en is high. The stored samples update on
// the rising clock edge when en = 1.
module zcd2
  import tsadc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic cj,
  input  logic cj1,
  output logic z
);
  logic  cj_d, cj1_d;   // z^-1 of each comparator output
  trit_t rj, rj1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cj_d  <= 1'b0;
      cj1_d <= 1'b0;
    end else if (en) begin
      cj_d  <= cj;
      cj1_d <= cj1;
    end
  end

  always_comb begin
    rj  = trit_t'($signed({1'b0, cj}))  - trit_t'($signed({1'b0, cj_d}));
    rj1 = trit_t'($signed({1'b0, cj1})) - trit_t'($signed({1'b0, cj1_d}));
    // r_j * r_{j+1} > 0 only when both are +1 or both are -1
    z   = !((rj == rj1) && (rj != TRIT_ZERO));
  end
endmodule
