// tb_zcd2: random test of the pseudo zero-crossing detector against an
// integer model: r = c[k] - c[k-1] per input (only enabled steps count as
// samples), z = 1 when r_j * r_{j+1} <= 0. Also checks that steps with
// en = 0 leave the filter state alone.
module tb_zcd2;
  logic clk = 0, rst_n = 0, en = 0, cj = 0, cj1 = 0, z;
  int checks = 0, failures = 0;
  int pj = 0, pj1 = 0;   // model of the previous samples

  zcd2 dut (.clk(clk), .rst_n(rst_n), .en(en), .cj(cj), .cj1(cj1), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nz = 0, nnz = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      int rj, rj1;
      @(negedge clk);
      en  = ($urandom % 4) != 0;
      cj  = $urandom % 2;
      cj1 = $urandom % 2;
      #1;
      rj  = int'(cj) - pj;
      rj1 = int'(cj1) - pj1;
      if (en) begin
        checks++;
        if (z !== (rj * rj1 <= 0)) begin
          failures++;
          if (failures < 10) $display("zcd2 mismatch k=%0d r=%0d,%0d z=%b", k, rj, rj1, z);
        end
        if (rj * rj1 <= 0) nz++; else nnz++;
        pj  = cj;
        pj1 = cj1;
      end
    end
    checks++;
    if (nz == 0 || nnz == 0) failures++;   // both outcomes exercised
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
