// tb_prbs_gen: the chopping sequences. q_now must be q_next delayed by one
// clock; q1 must repeat with period 2^15 - 1 and not earlier; both sequences
// must be balanced; and q1/q2 must be uncorrelated (normalised correlation
// of the +-1 sequences below 0.05).
module tb_prbs_gen;
  localparam int P1 = 32767;
  localparam int NS = 3 * P1;
  logic clk = 0, rst_n = 0;
  logic [1:0] qn, qc;
  int checks = 0, failures = 0;
  logic q1s [NS];

  prbs_gen dut (.clk(clk), .rst_n(rst_n), .q_next(qn), .q_now(qc));

  always #5 clk = ~clk;

  initial begin
    repeat (NS + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones1 = 0, ones2 = 0, corr = 0, dmis = 0;
    logic [1:0] prev;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    prev = qn;
    for (int k = 0; k < NS; k++) begin
      @(posedge clk);
      #1;
      if (qc !== prev) dmis++;
      prev = qn;
      q1s[k] = qn[0];
      ones1 += qn[0];
      ones2 += qn[1];
      corr += (qn[0] == qn[1]) ? 1 : -1;
    end
    checks++;
    if (dmis != 0) failures++;
    checks++;
    for (int k = 0; k < 2 * P1; k++) if (q1s[k] !== q1s[k + P1]) begin failures++; break; end
    for (int p = 1; p < 200; p++) begin
      int same = 1;
      for (int k = 0; k < 1000; k++) if (q1s[k] !== q1s[k + p]) same = 0;
      checks++;
      if (same) failures++;
    end
    checks += 3;
    if (ones1 < NS * 45 / 100 || ones1 > NS * 55 / 100) failures++;
    if (ones2 < NS * 45 / 100 || ones2 > NS * 55 / 100) failures++;
    if (real'(corr) / NS > 0.05 || real'(corr) / NS < -0.05) failures++;
    $display("ones %0d %0d corr %0d", ones1, ones2, corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
