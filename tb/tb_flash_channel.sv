// tb_flash_channel: one flash channel back end with 64 behavioural chopped
// comparators (threshold of comparator n at n - 0.5 LSB).
// Part 1: no offsets, calibration off, random chopping: every code must equal
// the ideal code max(0, round(vin) - 1) one clock after the latch outputs.
// Part 2: random offsets (up to +-3.5 LSB), power-on coarse phase, then the
// fine background phase with a random input. Every comparator's residual
// offset must end below 0.3 LSB, and the code error rate must fall.
module tb_flash_channel;
  localparam int N = 64;
  logic clk = 0, rst_n = 0, cal = 0, cph = 0;
  logic [1:0] qn = '0;
  logic [N-1:0] raw = '0;
  logic [5:0] s;
  logic [N-1:0][3:0]  ca, cb;
  logic [N-1:0][15:0] fa, fb;
  logic [N-1:0] bu, bd;
  int checks = 0, failures = 0;
  real vos [N];

  flash_channel dut (.clk(clk), .rst_n(rst_n), .cal_en(cal), .coarse_phase(cph), .q_now(qn), .raw(raw),
                     .s(s), .ca(ca), .cb(cb), .fa(fa), .fb(fb), .b_up(bu), .b_dn(bd));

  always #5 clk = ~clk;

  function automatic real resid(int n);
    return vos[n] - 1.0 * real'($countones(ca[n]) - $countones(cb[n]))
                  - 0.1 * real'($countones(fa[n]) - $countones(fb[n]));
  endfunction

  function automatic int ideal(real vin);
    int t;
    t = int'($floor(vin + 0.5));
    if (t > N) t = N;
    if (t < 0) t = 0;
    return (t == 0) ? 0 : t - 1;
  endfunction

  // drive one sample: latch outputs for vin under chopping bits q
  task automatic drive(real vin);
    @(negedge clk);
    qn = 2'($urandom);
    for (int n = 0; n < N; n++) begin
      real d;
      logic qb;
      qb = (n % 2 == 0) ? qn[0] : qn[1];
      d = vin - (real'(n) + 0.5);
      if (qb) d = -d;
      raw[n] = (d + resid(n) > 0.0);
    end
  endtask


  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int err_before = 0, err_after = 0, nb = 0, worst = 0;
    real wr = 0.0;
    for (int n = 0; n < N; n++) vos[n] = 0.0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- part 1 -------------------------------------------------------------
    for (int k = 0; k < 3000; k++) begin
      real vin;
      vin = real'($urandom % 66000) / 1000.0 - 1.0;
      drive(vin);
      @(posedge clk);
      #1;
      checks++;
      if (s != 6'(ideal(vin))) begin
        failures++;
        if (failures < 10) $display("vin=%f s=%0d ideal=%0d", vin, s, ideal(vin));
      end
    end
    // ---- part 2 -------------------------------------------------------------
    for (int n = 0; n < N; n++) vos[n] = real'(int'($urandom % 7001) - 3500) / 1000.0;
    for (int k = 0; k < 2000; k++) begin
      real vin;
      vin = real'($urandom % 64000) / 1000.0;
      drive(vin);
      @(posedge clk);
      #1;
      if (s != 6'(ideal(vin))) err_before++;
    end
    cal = 1;
    cph = 1;
    for (int k = 0; k < 200000; k++) begin
      if (k == 30000) cph = 0;
      drive(real'($urandom % 64000) / 1000.0);
      @(posedge clk);
      #1;
      nb += $countones(bu | bd);
    end
    for (int k = 0; k < 2000; k++) begin
      real vin;
      vin = real'($urandom % 64000) / 1000.0;
      drive(vin);
      @(posedge clk);
      #1;
      if (s != 6'(ideal(vin))) err_after++;
    end
    for (int n = 0; n < N; n++) begin
      real r;
      r = resid(n);
      if (r < 0.0) r = -r;
      checks++;
      if (r > 0.3) begin failures++; $display("comparator %0d residual %f", n + 1, resid(n)); end
      if (r > wr) begin wr = r; worst = n + 1; end
    end
    checks += 2;
    if (err_after * 2 > err_before) failures++;
    if (nb == 0) failures++;
    $display("code errors before %0d after %0d of 2000; worst residual %f LSB (comparator %0d); B events %0d",
             err_before, err_after, wr, worst, nb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
