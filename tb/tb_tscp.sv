// tb_tscp: closed-loop test of the timing-skew calibration processor.
//
// Two processors run side by side on the same behavioural 8-phase sampler:
// one with circular referencing and ZCD2 detectors (the default), one with
// linear referencing and ZCD1 detectors. Each sampler has its own random
// static skews tau0 (standard deviation about 6 T_LSB, T_LSB = Ts/64) and
// applies tau_j = tau0_j + MU_T * T_j. The reference is the phase-modulated
// sinewave x(t) = sin(2 pi fi t + 0.1 sin(2 pi fm t)) with fi about 0.25 f_c.
// NC is reduced to 16 so that the loops settle within the simulation. The
// checks: T_1 stays 0; the spatial spread of the sampling intervals must
// shrink below a third of its initial value for both processors; both
// directions of correction happen; the comparator-offset robustness of ZCD2
// is not measured here.
module tb_tscp;
  import tsadc_pkg::*;
  localparam int  M  = 8;
  localparam int  TW = 8;
  localparam int  NC = 16;
  localparam real PI = 3.14159265358979;
  localparam real MU_T = 1.0 / 64.0;            // one T_LSB per code step
  localparam real FX = 0.25 / 8.0 * 1.0131;     // cycles per Ts
  localparam real FM = 0.14 / 8.0;
  localparam int  NSTEP = 400000;

  logic clk = 0, rst_n = 0, en = 0;
  logic [1:0][M-1:0] c;
  logic [1:0]        c1n;
  logic signed [1:0][M-1:0][TW-1:0] t;
  logic [1:0][M-1:0] up, dn;
  int checks = 0, failures = 0;
  real tau0 [2][M];
  longint frame = 0;
  int nup = 0, ndn = 0;

  tscp #(.M(M), .NC(NC), .TW(TW), .REF_SCHEME(REF_CIRCULAR), .ZCD_KIND(ZCD2)) dut_c (
    .clk(clk), .rst_n(rst_n), .en(en), .c(c[0]), .c1_next(c1n[0]),
    .t_code(t[0]), .bpd_up(up[0]), .bpd_dn(dn[0]));
  tscp #(.M(M), .NC(NC), .TW(TW), .REF_SCHEME(REF_LINEAR), .ZCD_KIND(ZCD1)) dut_l (
    .clk(clk), .rst_n(rst_n), .en(en), .c(c[1]), .c1_next(c1n[1]),
    .t_code(t[1]), .bpd_up(up[1]), .bpd_dn(dn[1]));

  always #5 clk = ~clk;

  function automatic real tau(int d, int j);
    return tau0[d][j] + MU_T * real'($signed(t[d][j]));
  endfunction

  function automatic logic xs(real tt);
    return ($sin(2.0 * PI * FX * tt + 0.1 * $sin(2.0 * PI * FM * tt)) > 0.0);
  endfunction

  // spatial standard deviation of the M sampling intervals, in T_LSB
  function automatic real spread(int d);
    real iv [M];
    real mean = 0.0, v = 0.0;
    for (int j = 0; j < M; j++) begin
      iv[j] = 1.0 + ((j == M - 1) ? tau(d, 0) : tau(d, j + 1)) - tau(d, j);
      mean += iv[j];
    end
    mean /= M;
    for (int j = 0; j < M; j++) v += (iv[j] - mean) ** 2;
    return $sqrt(v / M) * 64.0;
  endfunction

  initial begin
    repeat (NSTEP + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sampler: frame k, channel j samples at k*M + j + tau_j (units of Ts)
  always @(negedge clk) begin
    for (int d = 0; d < 2; d++) begin
      for (int j = 0; j < M; j++)
        c[d][j] = xs(real'(frame) * M + j + tau(d, j));
      c1n[d] = xs(real'(frame + 1) * M + tau(d, 0));
    end
    frame <= frame + 1;
  end

  initial begin
    real s0 [2], s1 [2];
    for (int d = 0; d < 2; d++)
      for (int j = 0; j < M; j++)
        tau0[d][j] = (real'($urandom % 2001) / 1000.0 - 1.0) * 0.15;
    repeat (3) @(posedge clk);
    for (int d = 0; d < 2; d++) s0[d] = spread(d);
    rst_n = 1;
    en = 1;
    for (int k = 0; k < NSTEP; k++) begin
      @(posedge clk);
      #1;
      for (int d = 0; d < 2; d++) begin
        nup += $countones(up[d]);
        ndn += $countones(dn[d]);
      end
      if (k % 1000 == 0) begin
        checks += 2;
        if (t[0][0] != 0) failures++;
        if (t[1][0] != 0) failures++;
      end
      if (k % 50000 == 0) $display("step %0d spread circ=%f lin=%f T_LSB", k, spread(0), spread(1));
    end
    for (int d = 0; d < 2; d++) begin
      s1[d] = spread(d);
      $display("scheme %0d: spread %f -> %f T_LSB", d, s0[d], s1[d]);
      checks++;
      if (!(s1[d] < s0[d] / 3.0)) failures++;
    end
    checks++;
    if (nup == 0 || ndn == 0) failures++;
    $display("bpd up=%0d dn=%0d", nup, ndn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
