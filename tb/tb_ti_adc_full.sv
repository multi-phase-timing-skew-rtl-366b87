// tb_ti_adc_full: full-size run of the time-interleaved ADC core, with every
// parameter at its default (8 channels, 64 comparators, N_C = 1024, TSCP
// decimation 64, output decimation 64.125), driven by the behavioural analog
// front end (ti_afe_model) with the document's delay step of Ts/256.
//
// The clock phases get static skews of about +-0.08 Ts (alternating in sign,
// about 20 delay steps) and the comparators random offsets up to +-3 LSB.
// The timing reference is an asynchronous 0.3/Ts sinewave. At N_C = 1024 the
// full skew settling needs tens of millions of clock cycles (the document
// reports 250-400 x 10^5), more than fits in this run, so the run checks the
// first part of the convergence:
//   * T_1 stays 0; every other channel gets peak detections, and a detection
//     goes in the direction that reduces its interval error whenever that
//     error is above 3 delay steps (at least 90% of such detections);
//   * the spread of the sampling intervals has fallen by the end;
//   * at least 95% of the comparators end with |residual offset| < 0.3 LSB;
//   * the off-chip output carries one sample per 513, equal to the previous
//     frame of the channel it names;
//   * each mechanism happened (TSCP steps, ZC recorder pulses, detections up
//     and down, offset decisions up and down, coarse and fine trims,
//     decimated outputs).
module tb_ti_adc_full;
  localparam int M = 8, N = 64, TW = 8;
  localparam int NCYC = 3000000;
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

  ti_adc_top dut (
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

  // sampling interval from channel j to the next one, in Ts
  function automatic real interval(int j);
    real a, b;
    a = afe.tau0[j] + afe.mu_t * real'($signed(t_code[j]));
    b = (j == M - 1) ? afe.tau0[0] + afe.mu_t * real'($signed(t_code[0]))
                     : afe.tau0[j+1] + afe.mu_t * real'($signed(t_code[j+1]));
    return 1.0 + b - a;
  endfunction

  function automatic real spread();
    real v = 0.0;
    for (int j = 0; j < M; j++) v += (interval(j) - 1.0) ** 2;
    return $sqrt(v / M) * 64.0;   // in T_LSB = Ts/64
  endfunction

  int oup [M], odn [M];
  for (genvar j = 0; j < M; j++) begin : g_cnt
    initial begin oup[j] = 0; odn[j] = 0; end
    always @(posedge clk) begin
      oup[j] <= oup[j] + $countones(dut.g_ch[j].b_up);
      odn[j] <= odn[j] + $countones(dut.g_ch[j].b_dn);
    end
  end

  initial begin
    real s0, s1;
    int n_step = 0, n_m = 0, n_up = 0, n_dn = 0, n_ob = 0, n_out = 0, n_oup = 0, n_odn = 0;
    int n_judged = 0, n_right = 0, coarse_set = 0, fine_moved = 0, bad_res = 0;
    int ev [M];
    logic [M-1:0][5:0] prev_frame;
    afe.mu_t = 1.0 / 256.0;
    afe.fx   = 0.3 * 1.0131;
    afe.amp  = 32.4;
    afe.fin  = 0.0371;
    for (int j = 0; j < M; j++) begin
      ev[j] = 0;
      afe.tau0[j] = (j == 0) ? 0.0
                  : ((j % 2 == 1) ? 0.08 : -0.08) + (real'($urandom % 401) / 10000.0 - 0.02);
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
      @(posedge clk);
      #1;
      if (dv) begin
        n_out++;
        checks++;
        if (dout !== prev_frame[dch]) failures++;
      end
      prev_frame = s_frame;
      if (tstep) n_step++;
      if (tstep && dut.u_tscp.u_rec.m) n_m++;
      n_ob += $countones(obany);
      for (int p = 1; p < M; p++) begin
        if (bup[p] || bdn[p]) begin
          real e;
          logic want_up;
          ev[p]++;
          // forward channels close the interval before them, backward ones
          // (circular referencing, p > M/2) the interval after them
          if (p <= M / 2) begin e = interval(p - 1) - 1.0; want_up = (e < 0.0); end
          else            begin e = interval(p) - 1.0;     want_up = (e > 0.0); end
          if (e > 3.0 * afe.mu_t || e < -3.0 * afe.mu_t) begin
            n_judged++;
            if (bup[p] == want_up) n_right++;
          end
          if (bup[p]) n_up++; else n_dn++;
        end
      end
      if (k % 1000 == 0) begin
        checks++;
        if (t_code[0] != 0) failures++;
      end
      if (k % 500000 == 0) $display("cycle %0d: interval spread %f T_LSB, events %0d", k, spread(), n_up + n_dn);
      if (k == COARSE_CYC) begin
        for (int j = 0; j < M; j++)
          for (int n = 0; n < N; n++) if (ca[j][n] != 0 || cb[j][n] != 0) coarse_set++;
        @(negedge clk);
        cph = 0;
      end
    end
    for (int j = 0; j < M; j++) begin
      n_oup += oup[j];
      n_odn += odn[j];
      for (int n = 0; n < N; n++) begin
        real r;
        if (fa[j][n] != 0 || fb[j][n] != 0) fine_moved++;
        r = afe.residual(j, n);
        if (r > 0.3 || r < -0.3) bad_res++;
      end
    end
    s1 = spread();
    $display("interval spread %f -> %f T_LSB", s0, s1);
    $display("detections: up %0d dn %0d, judged %0d, right direction %0d", n_up, n_dn, n_judged, n_right);
    for (int p = 1; p < M; p++) $display("  channel %0d: %0d detections, T = %0d", p + 1, ev[p], $signed(t_code[p]));
    $display("comparators with residual > 0.3 LSB: %0d of %0d", bad_res, M * N);
    $display("steps=%0d m=%0d ofs_up=%0d ofs_dn=%0d coarse_set=%0d fine_moved=%0d outputs=%0d",
             n_step, n_m, n_oup, n_odn, coarse_set, fine_moved, n_out);
    checks += 4;
    if (!(s1 < s0)) failures++;
    if (n_right * 10 < n_judged * 9) failures++;
    if (bad_res * 20 > M * N) failures++;
    if (n_out < NCYC / 65 || n_out > NCYC / 64 + 2) failures++;
    for (int p = 1; p < M; p++) begin
      checks++;
      if (ev[p] == 0) failures++;
    end
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
