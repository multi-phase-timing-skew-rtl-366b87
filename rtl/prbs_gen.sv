// prbs_gen: the two uncorrelated pseudo-random chopping sequences of the
// flash comparators, q1 for the odd-numbered and q2 for the even-numbered
// comparators (so neighbouring calibration loops do not lock to each other).
//
// q1 comes from a 15-bit maximal-length LFSR (x^15 + x^14 + 1), q2 from a
// 23-bit one (x^23 + x^18 + 1); different lengths keep them uncorrelated.
// The need for two uncorrelated binary sequences is the document's; the
// generators and seeds are this design's choices. The input chopper CHP1
// samples with q[k+1] (output q_next) and, because the latch chain delays
// the decision by one clock, the output chopper CHP2 and the calibration
// processors use q[k] (output q_now, q_next delayed by one clock).
//
// Interface: q_next[0]/q_now[0] = q1, [1] = q2; 1 means the chopper swaps.
module prbs_gen (
  input  logic       clk,
  input  logic       rst_n,
  output logic [1:0] q_next,
  output logic [1:0] q_now
);
  logic [14:0] lfsr1;
  logic [22:0] lfsr2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr1 <= 15'h0001;
      lfsr2 <= 23'h00_0001;
      q_now <= '0;
    end else begin
      lfsr1 <= {lfsr1[13:0], lfsr1[14] ^ lfsr1[13]};
      lfsr2 <= {lfsr2[21:0], lfsr2[22] ^ lfsr2[17]};
      q_now <= q_next;
    end
  end

  assign q_next = {lfsr2[22], lfsr1[14]};
endmodule
