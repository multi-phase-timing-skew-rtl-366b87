// tb_zcd1: exhaustive check of the simple zero-crossing detector. For every
// pair of comparator outputs the expected flag is worked out from the
// definition (a zero crossing lies between two samples of opposite sign).
module tb_zcd1;
  logic cj, cj1, z;
  int checks = 0, failures = 0;

  zcd1 dut (.cj(cj), .cj1(cj1), .z(z));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int v = 0; v < 4; v++) begin
        int sa, sb;
        cj  = v[0];
        cj1 = v[1];
        #1;
        sa = cj ? 1 : -1;
        sb = cj1 ? 1 : -1;
        checks++;
        if (z !== (sa * sb < 0)) begin
          failures++;
          $display("zcd1 mismatch cj=%b cj1=%b z=%b", cj, cj1, z);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
