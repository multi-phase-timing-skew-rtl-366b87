// ti_afe_model: behavioural model of the analog front end around the
// time-interleaved ADC core, for simulation only (not synthesizable).
//
// It stands in for the DLL with its variable-delay clock buffers, the
// per-channel input samplers, the random-chopping comparator latches of the
// flash channels, the replica reference samplers with their comparators and
// the reference oscillator. Per clock (one frame) and per channel j the
// sampling instant is
//     t_j = k*Tc + (j-1)*Ts + tau0[j] + MU_T * T_j,
// with the DLL placing the phases ideally and tau0[j] the static skew. The
// flash input is s(t) = MID + AMP*sin(2*pi*FIN*t) in LSB units; comparator n
// (1..NCOMP) has threshold n - 0.5 LSB, a static offset vos[j][n] in LSB and
// a trim of COARSE_LSB per coarse step and FINE_LSB per fine step that
// subtracts from the offset. The input chopper swaps the inputs when q = 1,
// so the raw latch output is sign(+-(s - thr) + vos - trim). The reference is
// x(t) = sin(2*pi*FX*t + 0.1*sin(2*pi*FM*t)), quantised to its sign. All
// outputs are registered: the decisions for the samples of cycle k appear
// in cycle k+1, together with q[k] inside the core.
// Time is in units of Ts (the interleaved sampling interval).
module ti_afe_model #(
  parameter int unsigned M          = 8,
  parameter int unsigned NCOMP      = 64,
  parameter int unsigned TW         = 8,
  parameter int unsigned COARSE_MAX = 4,
  parameter int unsigned FINE_MAX   = 16
) (
  input  logic                                     clk,
  input  logic [1:0]                               q_chop,
  input  logic [M-1:0][NCOMP-1:0][COARSE_MAX-1:0]  trim_ca,
  input  logic [M-1:0][NCOMP-1:0][COARSE_MAX-1:0]  trim_cb,
  input  logic [M-1:0][NCOMP-1:0][FINE_MAX-1:0]    trim_fa,
  input  logic [M-1:0][NCOMP-1:0][FINE_MAX-1:0]    trim_fb,
  input  logic signed [M-1:0][TW-1:0]              t_code,
  output logic [M-1:0][NCOMP-1:0]                  latch_raw,
  output logic [M-1:0]                             xcmp
);
  localparam real PI = 3.14159265358979;

  // configuration, written by the testbench before reset is released
  real    mu_t       = 1.0 / 64.0;     // delay step in Ts
  real    fin        = 0.0123456;      // data input frequency, cycles per Ts
  real    amp        = 30.0;
  real    mid        = 32.0;
  real    fx         = 0.25 / 8.0 * 1.0131;   // about 0.25 f_c
  real    fm         = 0.14 / 8.0;
  real    coarse_lsb = 1.0;            // 32 mV steps, about 1 LSB of 31.25 mV
  real    fine_lsb   = 0.1;            // 3.2 mV steps
  real    tau0 [M];
  real    vos  [M][NCOMP];
  longint frame      = 0;

  function automatic real sample_time(int j);
    return real'(frame) * real'(M) + real'(j) + tau0[j] + mu_t * real'($signed(t_code[j]));
  endfunction

  function automatic real s_at(real t);
    return mid + amp * $sin(2.0 * PI * fin * t);
  endfunction

  function automatic int trim_count(logic [FINE_MAX-1:0] a, logic [FINE_MAX-1:0] b);
    return $countones(a) - $countones(b);
  endfunction

  // residual offset of comparator n of channel j after trimming, in LSB
  function automatic real residual(int j, int n);
    int c, f;
    c = $countones(trim_ca[j][n]) - $countones(trim_cb[j][n]);
    f = trim_count(trim_fa[j][n], trim_fb[j][n]);
    return vos[j][n] - coarse_lsb * real'(c) - fine_lsb * real'(f);
  endfunction

  initial begin
    for (int j = 0; j < int'(M); j++) begin
      tau0[j] = 0.0;
      for (int n = 0; n < int'(NCOMP); n++) vos[j][n] = 0.0;
    end
    latch_raw = '0;
    xcmp      = '0;
  end

  always @(posedge clk) begin
    for (int j = 0; j < int'(M); j++) begin
      real t, s, x, d;
      t = sample_time(j);
      s = s_at(t);
      x = $sin(2.0 * PI * fx * t + 0.1 * $sin(2.0 * PI * fm * t));
      xcmp[j] <= (x > 0.0);
      for (int n = 0; n < int'(NCOMP); n++) begin
        logic q;
        q = (n % 2 == 0) ? q_chop[0] : q_chop[1];
        d = s - (real'(n) + 0.5);
        if (q) d = -d;
        latch_raw[j][n] <= (d + residual(j, n) > 0.0);
      end
    end
    frame <= frame + 1;
  end
endmodule
