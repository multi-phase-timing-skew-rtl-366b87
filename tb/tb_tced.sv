// tb_tced: every clean thermometer code 0..64 must activate exactly line v;
// a single isolated 1 above the edge must not move it; random patterns are
// compared with the gate equation written out from the comparator bits.
module tb_tced;
  localparam int N = 64;
  logic [N-1:0] th;
  logic [N:0]   d;
  int checks = 0, failures = 0;

  tced #(.NCOMP(N)) dut (.therm(th), .d(d));

  function automatic logic tb_bit(logic [N-1:0] t, int i);  // t(i), 1-based
    if (i <= 0) return 1'b1;
    if (i > N) return 1'b0;
    return t[i-1];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= N; v++) begin
      logic [N:0] exp_d;
      th = '0;
      for (int i = 0; i < v; i++) th[i] = 1'b1;
      #1;
      exp_d = '0;
      exp_d[v] = 1'b1;
      checks++;
      if (d !== exp_d) begin failures++; $display("clean v=%0d d=%h", v, d); end
      if (v + 2 <= N) begin
        th[v+1] = 1'b1;                 // isolated 1 above the edge
        #1;
        checks++;
        if (d !== exp_d) begin failures++; $display("bubble v=%0d d=%h", v, d); end
      end
    end
    for (int k = 0; k < 2000; k++) begin
      th = {$urandom, $urandom};
      #1;
      for (int n = 0; n <= N; n++) begin
        logic e;
        e = (n == 0) ? !tb_bit(th, 1) : (tb_bit(th, n - 1) && tb_bit(th, n) && !tb_bit(th, n + 1));
        checks++;
        if (d[n] !== e) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
