// tb_encoder_rom: each single active TCED line n >= 1 must give code n-1,
// line 0 and no line give 0, and two active lines give the OR of their
// words (wired-OR ROM behaviour).
module tb_encoder_rom;
  localparam int N = 64;
  logic [N:0] d;
  logic [5:0] code;
  int checks = 0, failures = 0;

  encoder_rom #(.NCOMP(N), .NBITS(6)) dut (.d(d), .code(code));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    #1;
    checks++;
    if (code !== 6'd0) failures++;
    for (int n = 0; n <= N; n++) begin
      d = '0;
      d[n] = 1'b1;
      #1;
      checks++;
      if (code !== ((n == 0) ? 6'd0 : 6'(n - 1))) begin
        failures++;
        $display("line %0d code %0d", n, code);
      end
    end
    for (int k = 0; k < 500; k++) begin
      int a, b;
      a = 1 + $urandom % N;
      b = 1 + $urandom % N;
      d = '0;
      d[a] = 1'b1;
      d[b] = 1'b1;
      #1;
      checks++;
      if (code !== (6'(a - 1) | 6'(b - 1))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
