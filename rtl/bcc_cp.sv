// bcc_cp: digital calibration processor of one background-calibrated
// comparator (BCC) in a flash A/D channel.
//
// The comparator is chopped at random by q[k]: its offset reaches the
// de-chopped output as a term multiplied by q[k], while the input term does
// not. Multiplying the edge information D_e[k] by q[k] therefore turns the
// offset back into a dc value. The accumulate-and-reset unit (AAR) sums
// D_e[k]*q[k]; when the sum reaches +AAR_TH or -AAR_TH it issues B[k] = +1
// or -1 for one step and restarts from zero. The accumulator ACC integrates
// B[k] into the trim code T[k] that moves the comparator's threshold.
// D_e[k] is +1 when the TCED edge sits on this comparator (it read 1, the
// next one 0), -1 when the edge sits one below (it read 0, the one below 1),
// and 0 otherwise. AAR, ACC and the threshold of 16 follow the document. The
// definition of D_e, the sign convention (B = +1 raises the threshold), and
// the power-on mode in which B steps the coarse code (9 steps) instead of
// the fine code (33 steps) are this design's reading of the text, which says
// only that the coarse trim is set at power-on and the background loop
// moves the fine trim.
//
// Interface: en = calibration enabled; coarse_phase = power-on coarse mode;
// de_vld/de_pos = D_e[k] != 0 / D_e[k] = +1; q = q[k] (1 = inputs swapped).
// t_coarse, t_fine = signed trim codes; ca/cb and fa/fb = their element
// controls. b_up/b_dn flag B[k] = +1/-1. Timing: one update per clock.
module bcc_cp
  import tsadc_pkg::*;
#(
  parameter int unsigned AAR_TH     = 16,
  parameter int unsigned FINE_MAX   = 16,
  parameter int unsigned COARSE_MAX = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                coarse_phase,
  input  logic                de_vld,
  input  logic                de_pos,
  input  logic                q,
  output logic signed [3:0]   t_coarse,
  output logic signed [5:0]   t_fine,
  output logic [COARSE_MAX-1:0] ca,
  output logic [COARSE_MAX-1:0] cb,
  output logic [FINE_MAX-1:0]   fa,
  output logic [FINE_MAX-1:0]   fb,
  output logic                b_up,
  output logic                b_dn
);
  localparam int unsigned AW = $clog2(AAR_TH + 1) + 2;
  localparam logic signed [AW-1:0] TH_P = AW'(AAR_TH);
  localparam logic signed [AW-1:0] TH_N = -AW'(AAR_TH);
  localparam logic signed [3:0]    C_MAX = 4'(COARSE_MAX);
  localparam logic signed [5:0]    F_MAX = 6'(FINE_MAX);

  logic signed [AW-1:0] aar;
  trit_t                bk;

  always_comb begin
    if (aar >= TH_P)      bk = TRIT_POS;
    else if (aar <= TH_N) bk = TRIT_NEG;
    else                  bk = TRIT_ZERO;
    b_up = en && (bk == TRIT_POS);
    b_dn = en && (bk == TRIT_NEG);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aar      <= '0;
      t_coarse <= '0;
      t_fine   <= '0;
    end else if (en) begin
      // AAR: accumulate D_e*q, reset after a threshold hit
      if (bk != TRIT_ZERO)  aar <= '0;
      else if (de_vld)      aar <= (de_pos ^ q) ? aar + 1'b1 : aar - 1'b1;
      // ACC: integrate B into the trim code selected by the phase
      if (coarse_phase) begin
        if (bk == TRIT_POS && t_coarse < C_MAX)       t_coarse <= t_coarse + 1'b1;
        else if (bk == TRIT_NEG && t_coarse > -C_MAX) t_coarse <= t_coarse - 1'b1;
      end else begin
        if (bk == TRIT_POS && t_fine < F_MAX)           t_fine <= t_fine + 1'b1;
        else if (bk == TRIT_NEG && t_fine > -F_MAX)     t_fine <= t_fine - 1'b1;
      end
    end
  end

  offset_pair_decoder #(.N(COARSE_MAX), .CW(4)) u_coarse (.code(t_coarse), .a(ca), .b(cb));
  offset_pair_decoder #(.N(FINE_MAX),   .CW(6)) u_fine   (.code(t_fine),   .a(fa), .b(fb));

  initial begin
    if (COARSE_MAX > 7 || FINE_MAX > 31) $error("bcc_cp: trim range exceeds the code width");
  end
endmodule
