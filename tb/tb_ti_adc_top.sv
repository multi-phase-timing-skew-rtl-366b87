// tb_ti_adc_top: end-to-end test of the time-interleaved ADC core with the
// behavioural analog front end (ti_afe_model).
//
// The front end gets random static clock skews (up to +-0.1 Ts) and random
// comparator offsets (up to +-3 LSB). The core runs the power-on coarse
// offset phase, then the background fine phase, while the timing-skew
// calibration processor equalises the sampling intervals. To fit the
// simulation time the skew loop uses NC = 16 and a decimation of 2 instead
// of 1024 and 64, and the delay step is Ts/64; everything else is at its
// default size. Checks:
//   * T_1 stays 0 and the spread of the sampling intervals falls below a
//     third of its initial value;
//   * at least 95% of the comparators end with a residual offset below
//     0.3 LSB;
//   * the output codes of a 0.1 f_s sinewave deviate from the ideal codes
//     (uniform sampling, no offset) by at most 1 LSB in 97% of the samples at the
//     end, and by clearly less than before calibration;
//   * the off-chip output carries one sample per 513, taken from the
//     previous frame of the channel it names;
//   * each mechanism happened: TSCP steps, ZC recorder pulses, peak
//     detections up and down, offset-loop decisions up and down, coarse
//     trims set in the power-on phase, fine trims moved after the switch,
//     decimated outputs.
module tb_ti_adc_top;
  localparam int M = 8, N = 64, TW = 8;
  localparam int NCYC = 600000;
  localparam int COARSE_CYC = 40000;

  logic clk = 0, rst_n = 0, tscp_en = 0, ofs_en = 0, cph = 0;
  logic [M-1:0][N-1:0] latch_raw;
  logic [M-1:0] xcmp;
  logic [1:0] q_chop;
  logic [M-1:0][N-1:0][3:0]  ca, cb;
  logic [M-1:0][N-1:0][15:0] fa, fb;
  logic signed [M-1:0][TW-1:0] t_code;
  logic [M-1:0][5:0] s_frame;
  logic [5:0] dout;
  logic [2:0] dch;
  logic dv, tstep;
  logic [M-1:0] bup, bdn, obany;
  int checks = 0, failures = 0;

  ti_adc_top #(.NC(16), .TSCP_DECIM(2)) dut (
    .clk(clk), .rst_n(rst_n), .tscp_en(tscp_en), .ofs_cal_en(ofs_en), .coarse_phase(cph),
    .latch_raw(latch_raw), .xcmp(xcmp), .q_chop(q_chop),
    .trim_ca(ca), .trim_cb(cb), .trim_fa(fa), .trim_fb(fb), .t_code(t_code),
    .s_frame(s_frame), .dout(dout), .dout_ch(dch), .dout_valid(dv),
    .tscp_step(tstep), .tscp_bpd_up(bup), .tscp_bpd_dn(bdn), .ofs_b_any(obany));

  ti_afe_model afe (
    .clk(clk), .q_chop(q_chop), .trim_ca(ca), .trim_cb(cb), .trim_fa(fa), .trim_fb(fb),
    .t_code(t_code), .latch_raw(latch_raw), .xcmp(xcmp));

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real spread();
    real iv [M];
    real mean = 0.0, v = 0.0;
    for (int j = 0; j < M; j++) begin
      real a, b;
      a = afe.tau0[j] + afe.mu_t * real'($signed(t_code[j]));
      b = (j == M - 1) ? afe.tau0[0] + afe.mu_t * real'($signed(t_code[0]))
                       : afe.tau0[j+1] + afe.mu_t * real'($signed(t_code[j+1]));
      iv[j] = 1.0 + b - a;
      mean += iv[j];
    end
    mean /= M;
    for (int j = 0; j < M; j++) v += (iv[j] - mean) ** 2;
    return $sqrt(v / M) * 64.0;   // in T_LSB = Ts/64
  endfunction

  function automatic int ideal_code(real v);
    int t;
    t = int'($floor(v + 0.5));
    if (t > N) t = N;
    if (t < 0) t = 0;
    return (t == 0) ? 0 : t - 1;
  endfunction

  // counters of the mechanisms
  int n_step = 0, n_m = 0, n_up = 0, n_dn = 0, n_ob = 0, n_out = 0, n_oup = 0, n_odn = 0;
  logic [M-1:0][5:0] ideal_q [$];

  // offset-loop decisions, counted inside each channel
  int oup [M], odn [M];
  for (genvar j = 0; j < M; j++) begin : g_cnt
    initial begin oup[j] = 0; odn[j] = 0; end
    always @(posedge clk) begin
      oup[j] <= oup[j] + $countones(dut.g_ch[j].b_up);
      odn[j] <= odn[j] + $countones(dut.g_ch[j].b_dn);
    end
  end
  logic [M-1:0][5:0] prev_frame;

  initial begin
    real s0, s1;
    int coarse_set = 0, fine_moved = 0, good = 0, bad_res = 0;
    longint err_before = 0, err_after = 0, n_before = 0, n_after = 0, within1 = 0;
    afe.fin = 0.1 * 1.0123;
    afe.amp = 32.4;   // slightly past full scale so every threshold is crossed
    for (int j = 0; j < M; j++) begin
      afe.tau0[j] = (real'($urandom % 2001) / 1000.0 - 1.0) * 0.1;
      for (int n = 0; n < N; n++) afe.vos[j][n] = real'(int'($urandom % 6001) - 3000) / 1000.0;
    end
    s0 = spread();
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    tscp_en = 1;
    ofs_en = 1;
    cph = 1;
    prev_frame = '0;
    for (int k = 0; k < NCYC; k++) begin
      logic [M-1:0][5:0] id;
      // ideal codes of the frame the front end samples at the coming edge, on
      // a uniform grid anchored at channel 1 (T_1 = 0, so the calibration
      // leaves its instant, and hence a common delay, unchanged)
      for (int j = 0; j < M; j++)
        id[j] = 6'(ideal_code(afe.s_at(real'(afe.frame) * M + j + afe.tau0[0])));
      ideal_q.push_back(id);
      @(posedge clk);
      #1;
      // the frame sampled at the previous edge is now on s_frame
      if (ideal_q.size() > 1) begin
        logic [M-1:0][5:0] e;
        e = ideal_q.pop_front();
        if (k > 100 && k < 10100 || k >= NCYC - 10000) begin
          for (int j = 0; j < M; j++) begin
            int d;
            d = int'(s_frame[j]) - int'(e[j]);
            if (d < 0) d = -d;
            if (k < 10100) begin err_before += d; n_before++; end
            else begin
              err_after += d; n_after++;
              if (d <= 1) within1++;
            end
          end
        end
      end
      if (dv) begin
        n_out++;
        checks++;
        if (dout !== prev_frame[dch]) failures++;
      end
      prev_frame = s_frame;
      if (tstep) n_step++;
      if (tstep && dut.u_tscp.u_rec.m) n_m++;
      n_up += $countones(bup);
      n_dn += $countones(bdn);
      n_ob += $countones(obany);
      if (k % 1000 == 0) begin
        checks++;
        if (t_code[0] != 0) failures++;
      end
      if (k % 100000 == 0) $display("cycle %0d: interval spread %f T_LSB", k, spread());
      if (k == COARSE_CYC) begin
        for (int j = 0; j < M; j++)
          for (int n = 0; n < N; n++) if (ca[j][n] != 0 || cb[j][n] != 0) coarse_set++;
        @(negedge clk);
        cph = 0;
      end
    end
    for (int j = 0; j < M; j++)
      for (int n = 0; n < N; n++) begin
        real r;
        if (fa[j][n] != 0 || fb[j][n] != 0) fine_moved++;
        r = afe.residual(j, n);
        if (r > 0.3 || r < -0.3) bad_res++;
      end
    for (int j = 0; j < M; j++) begin n_oup += oup[j]; n_odn += odn[j]; end
    s1 = spread();
    $display("interval spread %f -> %f T_LSB", s0, s1);
    $display("mean |code error| before %f after %f, within 1 LSB after: %0d of %0d",
             real'(err_before) / n_before, real'(err_after) / n_after, within1, n_after);
    $display("comparators with residual > 0.3 LSB: %0d of %0d", bad_res, M * N);
    $display("steps=%0d m=%0d bpd_up=%0d bpd_dn=%0d ofs_up=%0d ofs_dn=%0d coarse_set=%0d fine_moved=%0d outputs=%0d",
             n_step, n_m, n_up, n_dn, n_oup, n_odn, coarse_set, fine_moved, n_out);
    checks += 5;
    if (!(s1 < s0 / 3.0)) failures++;
    if (bad_res * 20 > M * N) failures++;
    if (within1 * 100 < n_after * 97) failures++;
    if (!(err_after * n_before * 2 < err_before * n_after)) failures++;
    if (n_out < NCYC / 65 || n_out > NCYC / 64 + 2) failures++;
    // every mechanism must have happened
    checks += 9;
    if (n_step == 0) failures++;
    if (n_m == 0) failures++;
    if (n_up == 0) failures++;
    if (n_dn == 0) failures++;
    if (n_oup == 0) failures++;
    if (n_odn == 0) failures++;
    if (coarse_set == 0) failures++;
    if (fine_moved == 0) failures++;
    if (n_ob == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
