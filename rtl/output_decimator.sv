// output_decimator: interleaving multiplexer and off-chip output decimator.
//
// The M channel words s_1[k]..s_M[k] of one frame are the samples
// s[l], l = M*k .. M*k+M-1, of the interleaved output at f_s = M*f_c. The
// full-rate stream is too fast to leave the chip, so one sample out of every
// NUM is kept: with NUM = 513 and M = 8 the output rate is f_s/513 =
// f_c/64.125, and since 513 = 64*8 + 1 consecutive kept samples come from
// consecutive channels. A down-counter holds the distance to the next kept
// sample; in a frame where that distance is below M it selects the word,
// otherwise it only counts down by M. The rate is the document's; the
// counter and the choice of l = 0 as the first kept sample are this
// design's. NUM must be at least M so at most one sample is kept per frame.
//
// Interface: s_frame[j-1] = s_j[k]; dout/dout_ch/dout_valid are registered,
// one clock after the frame is presented.
module output_decimator #(
  parameter int unsigned M     = 8,
  parameter int unsigned NBITS = 6,
  parameter int unsigned NUM   = 513
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [M-1:0][NBITS-1:0]     s_frame,
  output logic [NBITS-1:0]            dout,
  output logic [$clog2(M)-1:0]        dout_ch,
  output logic                        dout_valid
);
  localparam int unsigned RW = $clog2(NUM + M);
  logic [RW-1:0] rem;   // samples until the next kept one

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem        <= '0;
      dout       <= '0;
      dout_ch    <= '0;
      dout_valid <= 1'b0;
    end else if (rem < RW'(M)) begin
      dout       <= s_frame[rem[$clog2(M)-1:0]];
      dout_ch    <= rem[$clog2(M)-1:0];
      dout_valid <= 1'b1;
      rem        <= rem + RW'(NUM - M);
    end else begin
      dout_valid <= 1'b0;
      rem        <= rem - RW'(M);
    end
  end

  initial begin
    if (NUM < M) $error("output_decimator: NUM must be >= M");
  end
endmodule
