// tsadc_pkg: types shared by the timing-skew calibration processor and the
// flash-channel back end of the time-interleaved ADC.
//
// trit_t is the three-valued signal {-1, 0, +1} used for the outputs of the
// 1 - z^-1 filters of the pseudo zero-crossing detector, for the bilateral
// peak detector output S[k] and for the AAR output B[k]; it is a 2-bit signed
// number so it can be added to accumulators directly.
// ref_scheme_e selects linear or circular referencing of the clock phases;
// zcd_kind_e selects the simple (ZCD1) or pseudo (ZCD2) zero-crossing
// detector. Both selections and their meaning follow the document; which
// one is the default is decided where the parameter is declared.
package tsadc_pkg;

  typedef logic signed [1:0] trit_t;

  localparam trit_t TRIT_POS  = 2'sb01;
  localparam trit_t TRIT_ZERO = 2'sb00;
  localparam trit_t TRIT_NEG  = 2'sb11;

  typedef enum logic {
    REF_LINEAR   = 1'b0,  // phi_{j+1} is calibrated against phi_j, j = 1..M-1
    REF_CIRCULAR = 1'b1   // phi_2..phi_{M/2+1} forward from phi_1, phi_M..phi_{M/2+2} backward
  } ref_scheme_e;

  typedef enum logic {
    ZCD1 = 1'b0,  // polarity comparison of the two samples
    ZCD2 = 1'b1   // polarity comparison of the 1 - z^-1 filtered comparator outputs
  } zcd_kind_e;

endpackage
