// ti_adc_top: digital core of an M-channel (default 8) 6-bit time-interleaved
// flash ADC with background timing-skew calibration.
//
// Eight flash A/D channels sample the input s(t) on the phases phi_1..phi_8
// of a DLL; the effective rate is 8*f_c (16 GS/s at f_c = 2 GHz). Any
// mismatch in the clock buffers skews the sampling instants. Each channel
// therefore also samples an on-chip reference x(t) with a replica sampler
// and a comparator; the timing-skew calibration processor (tscp) counts the
// zero crossings of x(t) in every sampling interval and adjusts the delay
// codes T_j of the clock buffers until all intervals are equal. In parallel,
// every flash comparator calibrates its own offset in the background by
// random chopping (flash_channel / bcc_cp).
//
// This module holds everything digital:
//   * flash_channel x M   - de-chopping, TCED, encoder ROM, offset loops;
//   * prbs_gen            - chopping sequences q1/q2 shared by all channels;
//   * zc_sample_capture   - decimates the reference bits to f_c/TSCP_DECIM;
//   * tscp                - skew detection and delay-code generation;
//   * output_decimator    - interleaves s[l] and keeps 1 sample in 513.
// The analog parts (samplers, random-chopping latches, DLL, variable delay
// lines, ring oscillator, reference ladder) are outside; their signals are
// ports. The partitioning and block functions follow the document; the
// shared PRBS, the external enables that stand in for the chip's option
// register, and the port-level encoding are this design's choices.
//
// Timing (one clk = one frame of M samples):
//   latch_raw of the frame sampled at cycle k arrives in cycle k+1 and
//   s_frame shows its codes in cycle k+2; q_chop is the chopping bit for the
//   samples taken in the present cycle. xcmp is the frame of reference bits
//   of the present cycle. t_code changes at most once per TSCP step.
//   phi_1 is the reference phase, so t_code[0] (T_1) and tscp_bpd_up/dn[0]
//   are constant 0 by design; synthesis reports them as undriven-constant
//   outputs, which is intended.
module ti_adc_top
  import tsadc_pkg::*;
#(
  parameter int unsigned M            = 8,
  parameter int unsigned NCOMP        = 64,
  parameter int unsigned NBITS        = 6,
  parameter int unsigned NC           = 1024,
  parameter int unsigned TW           = 8,
  parameter int unsigned TSCP_DECIM   = 64,
  parameter ref_scheme_e REF_SCHEME   = REF_CIRCULAR,
  parameter zcd_kind_e   ZCD_KIND     = ZCD2,
  parameter int unsigned OUT_DECIM_NUM = 513,
  parameter int unsigned AAR_TH       = 16,
  parameter int unsigned FINE_MAX     = 16,
  parameter int unsigned COARSE_MAX   = 4
) (
  input  logic                                         clk,
  input  logic                                         rst_n,
  // option controls
  input  logic                                         tscp_en,
  input  logic                                         ofs_cal_en,
  input  logic                                         coarse_phase,
  // from the analog front end
  input  logic [M-1:0][NCOMP-1:0]                      latch_raw,
  input  logic [M-1:0]                                 xcmp,
  // to the analog front end
  output logic [1:0]                                   q_chop,
  output logic [M-1:0][NCOMP-1:0][COARSE_MAX-1:0]      trim_ca,
  output logic [M-1:0][NCOMP-1:0][COARSE_MAX-1:0]      trim_cb,
  output logic [M-1:0][NCOMP-1:0][FINE_MAX-1:0]        trim_fa,
  output logic [M-1:0][NCOMP-1:0][FINE_MAX-1:0]        trim_fb,
  output logic signed [M-1:0][TW-1:0]                  t_code,
  // data outputs
  output logic [M-1:0][NBITS-1:0]                      s_frame,
  output logic [NBITS-1:0]                             dout,
  output logic [$clog2(M)-1:0]                         dout_ch,
  output logic                                         dout_valid,
  // calibration status
  output logic                                         tscp_step,
  output logic [M-1:0]                                 tscp_bpd_up,
  output logic [M-1:0]                                 tscp_bpd_dn,
  output logic [M-1:0]                                 ofs_b_any
);
  logic [1:0] q_now;

  prbs_gen u_prbs (.clk(clk), .rst_n(rst_n), .q_next(q_chop), .q_now(q_now));

  for (genvar j = 0; j < int'(M); j++) begin : g_ch
    logic [NCOMP-1:0] b_up, b_dn;
    flash_channel #(
      .NCOMP(NCOMP), .NBITS(NBITS), .AAR_TH(AAR_TH),
      .FINE_MAX(FINE_MAX), .COARSE_MAX(COARSE_MAX)
    ) u_flash (
      .clk(clk), .rst_n(rst_n), .cal_en(ofs_cal_en), .coarse_phase(coarse_phase),
      .q_now(q_now), .raw(latch_raw[j]), .s(s_frame[j]),
      .ca(trim_ca[j]), .cb(trim_cb[j]), .fa(trim_fa[j]), .fb(trim_fb[j]),
      .b_up(b_up), .b_dn(b_dn)
    );
    assign ofs_b_any[j] = |(b_up | b_dn);
  end

  logic [M-1:0] c_cap;
  logic         c1_next;
  logic         step;

  zc_sample_capture #(.M(M), .DECIM(TSCP_DECIM)) u_cap (
    .clk(clk), .rst_n(rst_n), .c(xcmp), .c_cap(c_cap), .c1_next(c1_next), .step(step)
  );

  assign tscp_step = step && tscp_en;

  tscp #(.M(M), .NC(NC), .TW(TW), .REF_SCHEME(REF_SCHEME), .ZCD_KIND(ZCD_KIND)) u_tscp (
    .clk(clk), .rst_n(rst_n), .en(tscp_step), .c(c_cap), .c1_next(c1_next),
    .t_code(t_code), .bpd_up(tscp_bpd_up), .bpd_dn(tscp_bpd_dn)
  );

  output_decimator #(.M(M), .NBITS(NBITS), .NUM(OUT_DECIM_NUM)) u_out (
    .clk(clk), .rst_n(rst_n), .s_frame(s_frame),
    .dout(dout), .dout_ch(dout_ch), .dout_valid(dout_valid)
  );
endmodule
