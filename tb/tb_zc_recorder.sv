// tb_zc_recorder: random ZC patterns into the ZC recorder, compared each step
// with an integer model of the accumulator (a >= M gives m = 1, M is taken
// off in the next update). At the end the number of m pulses must equal
// the total ZC count divided by M, up to the content left in the register.
module tb_zc_recorder;
  localparam int M = 8;
  logic clk = 0, rst_n = 0, en = 0, m;
  logic [M-1:0] z = '0;
  int checks = 0, failures = 0;
  int a = 0, total = 0, npulse = 0;

  zc_recorder #(.M(M)) dut (.clk(clk), .rst_n(rst_n), .en(en), .z(z), .m(m));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      int pop;
      @(negedge clk);
      en = ($urandom % 8) != 0;
      // bursts of dense and sparse ZCs
      for (int i = 0; i < M; i++) z[i] = ((k / 500) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      #1;
      checks++;
      if (m !== (a >= M)) begin
        failures++;
        if (failures < 10) $display("m mismatch k=%0d a=%0d m=%b", k, a, m);
      end
      if (en) begin
        pop = $countones(z);
        total += pop;
        if (a >= M) begin
          npulse++;
          a = a + pop - M;
        end else a = a + pop;
      end
    end
    checks++;
    if (npulse * M + a != total) failures++;
    checks++;
    if (npulse < 1000) failures++;
    $display("pulses=%0d total=%0d", npulse, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
