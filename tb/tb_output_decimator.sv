// tb_output_decimator: frames carry sample numbers (s[l] = l mod 64). The
// decimator must emit exactly the samples l = 513*n, one clock after their
// frame, with channel l mod 8, i.e. one output per 64.125 clocks on average.
module tb_output_decimator;
  localparam int M = 8;
  localparam int NUM = 513;
  localparam int NFR = 20000;
  logic clk = 0, rst_n = 0;
  logic [M-1:0][5:0] sf;
  logic [5:0] dout;
  logic [2:0] dch;
  logic dv;
  int checks = 0, failures = 0;

  output_decimator #(.M(M), .NBITS(6), .NUM(NUM)) dut (
    .clk(clk), .rst_n(rst_n), .s_frame(sf), .dout(dout), .dout_ch(dch), .dout_valid(dv));

  always #5 clk = ~clk;

  initial begin
    repeat (NFR + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint nextl = 0;
    int nout = 0;
    sf = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NFR; k++) begin
      logic exp_v;
      longint l;
      for (int j = 0; j < M; j++) sf[j] = 6'((k * M + j) % 64);
      @(posedge clk);
      #1;
      exp_v = (nextl < longint'(k + 1) * M);
      checks++;
      if (dv !== exp_v) begin failures++; if (failures < 10) $display("valid k=%0d", k); end
      if (exp_v && dv) begin
        l = nextl;
        checks += 2;
        if (dout !== 6'(l % 64)) failures++;
        if (dch !== 3'(l % M)) failures++;
        nextl += NUM;
        nout++;
      end
      @(negedge clk);
    end
    checks++;
    if (nout != (NFR * M + NUM - 1) / NUM) failures++;
    $display("outputs %0d", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
