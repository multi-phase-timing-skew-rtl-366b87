// zc_recorder: produces m[k], a 0/1 sequence whose mean equals the average
// zero-crossing rate of all M sampling intervals, i.e. the nominal interval.
//
// Every step the M detector outputs are added to the accumulator a[k]. A
// comparator issues m[k] = 1 whenever a[k] >= M, and M is subtracted from
// the accumulator in the same update that follows, so over time the number of
// m[k] = 1 steps is the total ZC count divided by M. The structure (adder,
// register, comparator against M, feedback of M) follows the document's ZC
// recorder diagram. The accumulator stays within 0..2M-1 and resets to 0.
//
// Interface: en = step strobe; z = z_1..z_M of this step (bit 0 = z_1);
// m = combinational from the registered a[k]. Latency: a ZC counted in step
// k can raise m at step k+1 at the earliest.
module zc_recorder #(
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [M-1:0] z,
  output logic         m
);
  localparam int unsigned AW = $clog2(2 * M);

  logic [AW-1:0] acc;
  logic [AW-1:0] zsum;

  always_comb begin
    zsum = '0;
    for (int i = 0; i < int'(M); i++) zsum = zsum + AW'(z[i]);
    m = (acc >= AW'(M));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc + zsum - (m ? AW'(M) : AW'(0));
  end
endmodule
