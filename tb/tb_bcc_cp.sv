// tb_bcc_cp: the comparator calibration processor.
// Part 1 (directed): a constant product D_e*q = +1 must give B = +1 exactly
// every 17 clocks (16 accumulations, then the dump; the first one is seen
// after the 16th edge) and step the fine code
// up to +16 where it saturates; D_e*q = -1 (also via q = 1) steps it down;
// D_e = 0 and en = 0 change nothing.
// Part 2 (closed loop): a behavioural chopped comparator with an offset of
// 2.37 LSB, 1 LSB coarse steps and 0.1 LSB fine steps. After the power-on
// coarse phase the coarse code must be 2 or 3 and after the fine phase the
// residual offset must be below 0.25 LSB.
module tb_bcc_cp;
  logic clk = 0, rst_n = 0, en = 0, cph = 0, dv = 0, dp = 0, q = 0;
  logic signed [3:0] tc;
  logic signed [5:0] tf;
  logic [3:0] ca, cb;
  logic [15:0] fa, fb;
  logic bu, bd;
  int checks = 0, failures = 0;

  bcc_cp dut (.clk(clk), .rst_n(rst_n), .en(en), .coarse_phase(cph), .de_vld(dv), .de_pos(dp), .q(q),
              .t_coarse(tc), .t_fine(tf), .ca(ca), .cb(cb), .fa(fa), .fb(fb), .b_up(bu), .b_dn(bd));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, output int nb, output int first);
    nb = 0;
    first = -1;
    for (int k = 0; k < n; k++) begin
      @(posedge clk);
      #1;
      if (bu || bd) begin
        nb++;
        if (first < 0) first = k;
      end
    end
  endtask

  initial begin
    int nb, first;
    real vos, resid;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- part 1 ---------------------------------------------------------
    en = 1; dv = 1; dp = 1; q = 0;
    run(17 * 10, nb, first);
    checks += 3;
    if (nb != 10) failures++;
    if (first != 15) begin failures++; $display("first B after %0d clocks", first); end
    if (tf != 10) failures++;
    run(17 * 10, nb, first);
    checks += 2;
    if (tf != 16) failures++;                 // saturated
    if ($countones(fa) != 16 || fb != 0) failures++;
    q = 1;                                    // D_e = +1, q = -1: product -1
    run(17 * 4, nb, first);
    checks++;
    if (tf != 12) failures++;
    dv = 0;
    run(100, nb, first);
    checks++;
    if (nb != 0 || tf != 12) failures++;
    dv = 1; en = 0;
    run(100, nb, first);
    checks++;
    if (tf != 12) failures++;
    // ---- part 2 ---------------------------------------------------------
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    en = 1;
    cph = 1;
    vos = 2.37;
    for (int phase = 0; phase < 2; phase++) begin
      for (int k = 0; k < 60000; k++) begin
        real vin, d;
        @(negedge clk);
        q   = $urandom % 2;
        vin = (real'($urandom % 2001) / 1000.0) - 1.0;     // within 1 LSB of the threshold
        resid = vos - 1.0 * real'($signed(tc)) - 0.1 * real'($signed(tf));
        d = (q ? -vin : vin) + resid;
        dv = 1;
        dp = (d > 0.0) ^ q;                   // de-chopped decision
      end
      if (phase == 0) begin
        checks++;
        if (tc != 2 && tc != 3) begin failures++; $display("coarse code %0d", tc); end
        cph = 0;
      end
    end
    resid = vos - 1.0 * real'($signed(tc)) - 0.1 * real'($signed(tf));
    $display("coarse %0d fine %0d residual %f LSB", tc, tf, resid);
    checks++;
    if (resid > 0.25 || resid < -0.25) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
