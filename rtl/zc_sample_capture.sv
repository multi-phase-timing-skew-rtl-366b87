// zc_sample_capture: decimating front end of the timing-skew calibration
// processor.
//
// The processor runs at f_c / DECIM (the document uses f_c/64 to save
// power). Every DECIM cycles this block latches one frame of the M reference
// comparator bits c_1[k]..c_M[k]; one cycle later it latches c_1[k+1], which
// the last zero-crossing detector needs to close the interval from phi_M to
// the next phi_1, and raises step for one cycle. c_cap and c1_next then stay
// constant for the next DECIM-1 cycles. The decimation ratio is the
// document's; capturing whole frames (rather than decimating detector
// outputs) and the one-cycle capture of c_1[k+1] are this design's choices.
//
// Interface: c = comparator bits of the present frame (bit 0 = channel 1);
// c_cap, c1_next = captured values; step = one-cycle strobe, two cycles after
// the frame was presented. DECIM must be at least 2.
module zc_sample_capture #(
  parameter int unsigned M     = 8,
  parameter int unsigned DECIM = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] c,
  output logic [M-1:0] c_cap,
  output logic         c1_next,
  output logic         step
);
  localparam int unsigned CW = (DECIM > 2) ? $clog2(DECIM) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      c_cap   <= '0;
      c1_next <= 1'b0;
      step    <= 1'b0;
    end else begin
      cnt  <= (cnt == CW'(DECIM - 1)) ? '0 : cnt + 1'b1;
      step <= (cnt == CW'(1));
      if (cnt == '0)     c_cap   <= c;
      if (cnt == CW'(1)) c1_next <= c[0];
    end
  end

  initial begin
    if (DECIM < 2) $error("zc_sample_capture: DECIM must be >= 2");
  end
endmodule
