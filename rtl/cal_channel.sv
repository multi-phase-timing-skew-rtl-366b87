// cal_channel: one calibration channel of the timing-skew calibration
// processor. It compares the zero-crossing rate of one sampling interval
// with the average rate m[k] and moves the delay code of one clock phase.
//
// ACC1 integrates U[k] = m[k] - z[k] into R[k]. The bilateral peak detector
// (BPD) outputs S[k] = +1 when R[k] >= +NC, -1 when R[k] <= -NC, and 0
// otherwise; whenever S[k] is nonzero ACC1 is dumped to zero, so S stays
// nonzero for one step only. ACC2 integrates S[k] into T[k], the delay code.
// All of this follows the document. Two choices are this design's own: with
// invert = 1 the channel uses U[k] = z[k] - m[k], which is needed when the
// adjusted phase is the earlier edge of the measured interval (the backward
// half of circular referencing); and ACC2 saturates at the limits of its
// TW-bit two's-complement range instead of wrapping.
//
// Interface: en = step strobe; z, m = this step's detector output and
// average; s = S[k] (combinational from R[k]); t_code = T[k] (registered).
// Timing: R and T update on the clock edge of each enabled step; a threshold
// hit at step k changes T at step k+1.
module cal_channel
  import tsadc_pkg::*;
#(
  parameter int unsigned NC = 1024,
  parameter int unsigned TW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 z,
  input  logic                 m,
  input  logic                 invert,
  output trit_t                s,
  output logic signed [TW-1:0] t_code
);
  localparam int unsigned RW = $clog2(NC + 1) + 2;
  localparam logic signed [RW-1:0] NC_POS = RW'(NC);
  localparam logic signed [RW-1:0] NC_NEG = -RW'(NC);
  localparam logic signed [TW-1:0] T_MAX  = {1'b0, {(TW - 1){1'b1}}};
  localparam logic signed [TW-1:0] T_MIN  = {1'b1, {(TW - 1){1'b0}}};

  logic signed [RW-1:0] r_acc;   // ACC1 output R[k]
  trit_t                u;       // U[k]

  always_comb begin
    if (z == m)        u = TRIT_ZERO;
    else if (m ^ invert) u = TRIT_POS;   // m=1,z=0 (or z=1,m=0 when inverted)
    else               u = TRIT_NEG;
    if (r_acc >= NC_POS)      s = TRIT_POS;
    else if (r_acc <= NC_NEG) s = TRIT_NEG;
    else                      s = TRIT_ZERO;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_acc  <= '0;
      t_code <= '0;
    end else if (en) begin
      if (s != TRIT_ZERO) r_acc <= '0;            // integrate-and-dump
      else                r_acc <= r_acc + RW'(u);
      if (s == TRIT_POS && t_code != T_MAX)      t_code <= t_code + 1'b1;
      else if (s == TRIT_NEG && t_code != T_MIN) t_code <= t_code - 1'b1;
    end
  end
endmodule
