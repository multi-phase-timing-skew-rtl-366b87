// tscp: multi-phase timing-skew calibration processor.
//
// The M clock phases phi_1..phi_M sample a narrow-band reference x(t) that is
// asynchronous to the clocks, and a comparator per channel delivers the sign
// c_j[k]. Because the zero-crossing density of such a reference is uniform,
// the probability of a zero crossing inside an interval is proportional to
// the interval's length. The processor therefore:
//   * runs M zero-crossing detectors, detector j (1 <= j <= M) watching the
//     interval from phi_j to phi_{j+1}; detector M closes the cycle with
//     c_M[k] and c_1[k+1] (input c1_next);
//   * feeds all M detector outputs to the ZC recorder, whose output m[k]
//     has the mean of the nominal interval;
//   * runs M-1 calibration channels (ACC1, bilateral peak detector, ACC2)
//     that move the delay codes T_2..T_M; T_1 is fixed at 0 because phi_1 is
//     the reference phase.
// With linear referencing, channel j adjusts T_{j+1} from detector j. With
// circular referencing (the default, which halves the worst-case timing
// fluctuation) T_2..T_{M/2+1} are adjusted forward from detectors 1..M/2 and
// T_{M/2+2}..T_M backward from detectors M/2+2..M, so for M = 8 the channel
// for T_8 uses x_8/x_1, T_7 uses x_7/x_8 and T_6 uses x_6/x_7, and detector 5
// only feeds the recorder. All of this follows the document; the generalisation
// to any even M, the sign flip of the backward channels and ZCD2 as the
// default detector are this design's choices.
//
// Interface: en is the step strobe (one sample frame per step; on chip the
// processor is decimated to f_c/64 by zc_sample_capture); c[j-1] = c_j[k];
// c1_next = c_1[k+1]. t_code[j-1] = T_j; bpd_up/bpd_dn flag each channel's
// S[k] = +1/-1 during an enabled step. All state updates on the rising edge
// of clk when en = 1.
module tscp
  import tsadc_pkg::*;
#(
  parameter int unsigned M          = 8,
  parameter int unsigned NC         = 1024,
  parameter int unsigned TW         = 8,
  parameter ref_scheme_e REF_SCHEME = REF_CIRCULAR,
  parameter zcd_kind_e   ZCD_KIND   = ZCD2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic [M-1:0]                 c,
  input  logic                         c1_next,
  output logic signed [M-1:0][TW-1:0]  t_code,
  output logic [M-1:0]                 bpd_up,
  output logic [M-1:0]                 bpd_dn
);
  logic [M-1:0] z;      // z[j-1] = z_j[k]
  logic         m;

  // ---- zero-crossing detectors -------------------------------------------
  for (genvar j = 0; j < int'(M); j++) begin : g_zcd
    logic a, b;
    assign a = c[j];
    assign b = (j == int'(M) - 1) ? c1_next : c[(j + 1) % int'(M)];
    if (ZCD_KIND == ZCD1) begin : g_z1
      zcd1 u_zcd (.cj(a), .cj1(b), .z(z[j]));
    end else begin : g_z2
      zcd2 u_zcd (.clk(clk), .rst_n(rst_n), .en(en), .cj(a), .cj1(b), .z(z[j]));
    end
  end

  // ---- ZC recorder ----------------------------------------------------------
  zc_recorder #(.M(M)) u_rec (.clk(clk), .rst_n(rst_n), .en(en), .z(z), .m(m));

  // ---- calibration channels, one per adjusted phase phi_2..phi_M -----------
  assign t_code[0] = '0;
  assign bpd_up[0] = 1'b0;
  assign bpd_dn[0] = 1'b0;

  for (genvar p = 1; p < int'(M); p++) begin : g_ch
    // p is the 0-based index of the adjusted phase phi_{p+1}
    localparam bit BACKWARD = (REF_SCHEME == REF_CIRCULAR) && (p > int'(M) / 2);
    // forward: interval phi_p -> phi_{p+1} (detector p-1);
    // backward: interval phi_{p+1} -> phi_{p+2} (detector p)
    localparam int unsigned ZIDX = BACKWARD ? p : p - 1;
    trit_t s;
    cal_channel #(.NC(NC), .TW(TW)) u_ch (
      .clk(clk), .rst_n(rst_n), .en(en),
      .z(z[ZIDX]), .m(m), .invert(BACKWARD),
      .s(s), .t_code(t_code[p])
    );
    assign bpd_up[p] = en && (s == TRIT_POS);
    assign bpd_dn[p] = en && (s == TRIT_NEG);
  end

  // The circular scheme splits the phases into two halves.
  if (REF_SCHEME == REF_CIRCULAR) begin : g_chk
    if (M % 2 != 0) begin : g_err
      $error("tscp: circular referencing needs an even M");
    end
  end
endmodule
