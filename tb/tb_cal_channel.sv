// tb_cal_channel: random z/m streams into one calibration channel with a
// small threshold (NC = 8) and a narrow delay code (TW = 4) so that peak
// detections and saturation both happen. An integer model of ACC1, the
// bilateral peak detector and ACC2 gives the expected S and T every step.
// Drifting streams (z mostly above or below m) exercise both directions, and
// invert = 1 must reverse them.
module tb_cal_channel;
  import tsadc_pkg::*;
  localparam int NC = 8;
  localparam int TW = 4;
  logic clk = 0, rst_n = 0, en = 0, z = 0, m = 0, inv = 0;
  trit_t s;
  logic signed [TW-1:0] t;
  int checks = 0, failures = 0;
  int r = 0, tm = 0, nup = 0, ndn = 0, nsat = 0;

  cal_channel #(.NC(NC), .TW(TW)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .z(z), .m(m), .invert(inv), .s(s), .t_code(t));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 40000; k++) begin
      int u, se, bias;
      @(negedge clk);
      bias = (k / 4000) % 3;          // 0: z-heavy, 1: balanced, 2: m-heavy
      inv  = (k / 12000) % 2;
      en   = ($urandom % 5) != 0;
      z    = (bias == 0) ? ($urandom % 3 != 0) : (bias == 2) ? ($urandom % 3 == 0) : $urandom % 2;
      m    = $urandom % 2;
      #1;
      se = (r >= NC) ? 1 : (r <= -NC) ? -1 : 0;
      checks += 2;
      if (int'(s) != se) begin
        failures++;
        if (failures < 10) $display("S mismatch k=%0d r=%0d s=%0d", k, r, s);
      end
      if (int'(t) != tm) begin
        failures++;
        if (failures < 10) $display("T mismatch k=%0d model=%0d dut=%0d", k, tm, t);
      end
      if (en) begin
        u = inv ? (int'(z) - int'(m)) : (int'(m) - int'(z));
        if (se != 0) r = 0; else r = r + u;
        if (se == 1) nup++;
        if (se == -1) ndn++;
        if (se == 1 && tm == 7 || se == -1 && tm == -8) nsat++;
        if (se == 1 && tm < 7) tm++;
        else if (se == -1 && tm > -8) tm--;
      end
    end
    checks++;
    if (nup == 0 || ndn == 0 || nsat == 0) failures++;
    $display("up=%0d dn=%0d saturated=%0d", nup, ndn, nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
