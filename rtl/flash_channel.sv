// flash_channel: digital back end of one 6-bit flash A/D channel with
// background comparator-offset calibration.
//
// The NCOMP comparators are random-chopping latches: an input chopper swaps
// the comparator inputs when q = 1, so each latch output arrives inverted in
// those cycles. This block
//   * de-chops the latch outputs (the output chopper CHP2, an XOR with the
//     q[k] that was applied to the sample): odd-numbered comparators use q1,
//     even-numbered ones q2;
//   * finds the thermometer edge with the TCED and encodes it with the ROM
//     into the channel output s[k];
//   * runs one calibration processor per comparator, fed with D_e derived
//     from the two TCED lines next to that comparator and with its q.
// Structure and sequence assignment follow the document; the pipeline
// register on s and the wiring of D_e are this design's choices.
//
// Interface: raw[i] = latch output of comparator i+1 (still chopped), valid
// one clock after the sampling edge; q_now = {q2, q1} applied to those
// samples. s = channel code, registered: it appears one clock after raw.
// Trim controls per comparator: coarse pairs ca/cb (COARSE_MAX elements),
// fine pairs fa/fb (FINE_MAX elements). b_up/b_dn flag AAR threshold hits.
module flash_channel #(
  parameter int unsigned NCOMP      = 64,
  parameter int unsigned NBITS      = 6,
  parameter int unsigned AAR_TH     = 16,
  parameter int unsigned FINE_MAX   = 16,
  parameter int unsigned COARSE_MAX = 4
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   cal_en,
  input  logic                                   coarse_phase,
  input  logic [1:0]                             q_now,
  input  logic [NCOMP-1:0]                       raw,
  output logic [NBITS-1:0]                       s,
  output logic [NCOMP-1:0][COARSE_MAX-1:0]       ca,
  output logic [NCOMP-1:0][COARSE_MAX-1:0]       cb,
  output logic [NCOMP-1:0][FINE_MAX-1:0]         fa,
  output logic [NCOMP-1:0][FINE_MAX-1:0]         fb,
  output logic [NCOMP-1:0]                       b_up,
  output logic [NCOMP-1:0]                       b_dn
);
  logic [NCOMP-1:0] qsel;    // chopping bit of each comparator
  logic [NCOMP-1:0] dc;      // de-chopped outputs D_c
  logic [NCOMP:0]   d;       // TCED lines
  logic [NBITS-1:0] code;

  always_comb begin
    for (int i = 0; i < int'(NCOMP); i++)
      qsel[i] = (i % 2 == 0) ? q_now[0] : q_now[1];   // comparator i+1 odd -> q1
    dc = raw ^ qsel;
  end

  tced #(.NCOMP(NCOMP)) u_tced (.therm(dc), .d(d));
  encoder_rom #(.NCOMP(NCOMP), .NBITS(NBITS)) u_rom (.d(d), .code(code));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= '0;
    else        s <= code;
  end

  for (genvar i = 0; i < int'(NCOMP); i++) begin : g_bcc
    logic [3:0] tc_unused;
    logic [5:0] tf_unused;
    bcc_cp #(.AAR_TH(AAR_TH), .FINE_MAX(FINE_MAX), .COARSE_MAX(COARSE_MAX)) u_cp (
      .clk(clk), .rst_n(rst_n), .en(cal_en), .coarse_phase(coarse_phase),
      .de_vld(d[i+1] | d[i]), .de_pos(d[i+1]), .q(qsel[i]),
      .t_coarse(tc_unused), .t_fine(tf_unused),
      .ca(ca[i]), .cb(cb[i]), .fa(fa[i]), .fb(fb[i]),
      .b_up(b_up[i]), .b_dn(b_dn[i])
    );
  end
endmodule
