// tb_offset_pair_decoder: all codes of the 16-element fine decoder and the
// 4-element coarse decoder. The number of (1,0) pairs minus the number of
// (0,1) pairs must equal the (clamped) code, no pair may be (1,1), and the
// active pairs must be the lowest ones.
module tb_offset_pair_decoder;
  logic signed [5:0] fcode;
  logic signed [3:0] ccode;
  logic [15:0] fa, fb;
  logic [3:0]  ca, cb;
  int checks = 0, failures = 0;

  offset_pair_decoder #(.N(16), .CW(6)) dut_f (.code(fcode), .a(fa), .b(fb));
  offset_pair_decoder #(.N(4),  .CW(4)) dut_c (.code(ccode), .a(ca), .b(cb));

  function automatic int clampi(int v, int lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32; v < 32; v++) begin
      int e;
      fcode = 6'(v);
      #1;
      e = clampi(v, 16);
      checks += 3;
      if ($countones(fa) - $countones(fb) != e) begin failures++; $display("fine %0d", v); end
      if ((fa & fb) != 0) failures++;
      if (((fa | fb) & ((fa | fb) + 1'b1)) != 0) failures++;   // contiguous from bit 0
    end
    for (int v = -8; v < 8; v++) begin
      ccode = 4'(v);
      #1;
      checks += 2;
      if ($countones(ca) - $countones(cb) != clampi(v, 4)) begin failures++; $display("coarse %0d", v); end
      if ((ca & cb) != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
