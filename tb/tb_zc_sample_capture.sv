// tb_zc_sample_capture: drives a new random reference frame every clock and
// checks that the decimating capture issues one step every DECIM clocks,
// and that at each step it holds the frame presented DECIM-aligned and bit 0
// of the frame after it. Run with DECIM = 4 and with the default 64.
module tb_zc_sample_capture;
  localparam int M = 8;
  logic clk = 0, rst_n = 0;
  logic [M-1:0] c = '0;
  logic [1:0][M-1:0] cap;
  logic [1:0] c1n, step;
  int checks = 0, failures = 0;
  logic [M-1:0] hist [$];

  zc_sample_capture #(.M(M), .DECIM(4)) dut_a (
    .clk(clk), .rst_n(rst_n), .c(c), .c_cap(cap[0]), .c1_next(c1n[0]), .step(step[0]));
  zc_sample_capture #(.M(M)) dut_b (
    .clk(clk), .rst_n(rst_n), .c(c), .c_cap(cap[1]), .c1_next(c1n[1]), .step(step[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last [2];
    int nstep [2];
    int cyc = 0;
    last = '{-1, -1};
    nstep = '{0, 0};
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      // frame k is presented during cycle k (first edge after reset = k 0)
      c = M'($urandom);
      hist.push_back(c);
      @(posedge clk);
      #1;
      for (int d = 0; d < 2; d++) begin
        int dec;
        dec = (d == 0) ? 4 : 64;
        if (step[d]) begin
          // step rises two edges after the captured frame was presented
          checks += 3;
          if (cap[d] !== hist[k - 1]) failures++;
          if (c1n[d] !== hist[k][0]) failures++;
          if (last[d] >= 0 && k - last[d] != dec) failures++;
          last[d] = k;
          nstep[d]++;
        end
      end
      @(negedge clk);
    end
    checks += 2;
    if (nstep[0] < 400 || nstep[1] < 25) failures++;
    if (hist.size() != 2000) failures++;
    $display("steps %0d %0d", nstep[0], nstep[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
