// tb_ilcm_jitter: jitter suppression by injection, with a noisy ring.
//
// The multiplier runs at its default 1 GHz / 100 MHz operating point, but the
// behavioural DCO adds an independent Gaussian error of 2 ps rms to every
// half period (DCO_JITTER_PS), i.e. sigma_p = 2*sqrt(2) = 2.83 ps per period.
// The statistic is sigma(L), the standard deviation of the time between a
// rising CLK_OUT edge and the one L periods later (its mean, the frequency
// error, is removed):
//
//  * free-running ring (injection and calibration off, codes frozen): the
//    errors add up as a random walk, so sigma(L) = sigma_p*sqrt(L). Checked:
//    sigma(300) within 35 % of 49 ps and sigma(300)/sigma(30) > 2.2
//    (ideal sqrt(10) = 3.16);
//  * locked (injection and calibration on): every injected edge discards the
//    accumulated error, so sigma(L) stops growing beyond about N periods.
//    With L a multiple of N both edges sit at the same place in the
//    injection cycle and sigma(L) is about sigma_p*sqrt(N) = 9 ps, plus the
//    bang-bang dither of the loops (the noise keeps the codes moving by a
//    step or two). Checked: sigma(300) below 0.5x the free-running value
//    and sigma(300)/sigma(30) < 1.5.
//
// Also checked: the loops still settle near their noiseless codes, exactly N
// output edges per reference period while locked (no divider slip despite
// the noise), and no injection while it is disabled. Runs about 25 us.
`timescale 1ps/1fs
module tb_ilcm_jitter;
  import ilcm_pkg::*;

  localparam realtime T_REF  = 10000.0;
  localparam real     JIT_PS = 2.0;
  localparam real     SIG_P  = JIT_PS * 1.4142136;   // rms error of one period
  localparam int      N_MEAS = 1000;                  // reference cycles per window

  logic                clk_ref = 1'b0;
  logic                rst_n   = 1'b1;
  logic                en_inj  = 1'b0;
  logic                en_esed = 1'b0;
  logic [COARSE_W-1:0] coarse_code = COARSE_W'(8);
  logic                clk_out;
  logic [FINE_W-1:0]   fine_code;
  logic [DCDL_W-1:0]   dcdl_code;
  logic [DPER_W-1:0]   dper_code;
  det_mode_e           mode;

  int checks = 0, failures = 0;

  initial #1 rst_n = 1'b0;   // asynchronous reset edge at 1 ps

  ilcm_top #(
    .DCO_JITTER_PS (JIT_PS),
    .DCO_SEED      (12345)
  ) dut (.*);

  always #(T_REF / 2) clk_ref = ~clk_ref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- edge record ----------------
  bit      rec = 1'b0;
  realtime ts[$];

  always @(posedge clk_out) if (rec) ts.push_back($realtime);

  // Standard deviation of ts[k+L] - ts[k] over the recorded window.
  function automatic real sigma(input int L);
    real s = 0.0, s2 = 0.0, d;
    int  n = 0;
    for (int k = 0; k + L < ts.size(); k++) begin
      d   = ts[k+L] - ts[k];
      s  += d;
      s2 += d * d;
      n++;
    end
    if (n < 2) return 0.0;
    s = s / real'(n);
    return $sqrt((s2 / real'(n) - s * s) > 0.0 ? (s2 / real'(n) - s * s) : 0.0);
  endfunction

  // ---------------- mechanism counters ----------------
  int n_inj = 0, n_sel_off = 0;
  always @(posedge dut.sel) begin
    n_inj++;
    if (!en_inj && $realtime > T_REF) n_sel_off++;
  end

  // ---------------- watchdog ----------------
  initial begin
    #(T_REF * 4000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    real lk30, lk300, fr30, fr300;
    int  inj0;
    repeat (3) @(posedge clk_ref);
    rst_n = 1'b1;
    @(negedge clk_ref);
    en_inj  = 1'b1;
    en_esed = 1'b1;

    // Settle the loops with the noisy ring.
    repeat (450) @(posedge clk_ref);
    $display("settled: fine=%0d dcdl=%0d dper=%0d", fine_code, dcdl_code, dper_code);
    check(int'(fine_code) >= 62 && int'(fine_code) <= 66, "fine code near 64 with noise");
    check(int'(dper_code) >= 8  && int'(dper_code) <= 12, "D_PERIOD near 10 with noise");
    check(int'(dcdl_code) >= 97 && int'(dcdl_code) <= 103, "DCDL code near 100 with noise");

    // Locked window.
    inj0 = n_inj;
    rec  = 1'b1;
    repeat (N_MEAS) @(posedge clk_ref);
    rec  = 1'b0;
    lk30  = sigma(30);
    lk300 = sigma(300);
    $display("locked: edges %0d, sigma(30) %0.2f ps, sigma(300) %0.2f ps", ts.size(), lk30, lk300);
    check(ts.size() == N_MEAS * N_DIV, "locked: N edges per reference period");
    check(n_inj - inj0 >= N_MEAS / 2, "locked: injections took place");
    ts.delete();

    // Free-running window: injection and calibration off, codes frozen.
    @(negedge clk_ref);
    en_inj  = 1'b0;
    en_esed = 1'b0;
    repeat (5) @(posedge clk_ref);
    rec = 1'b1;
    repeat (N_MEAS) @(posedge clk_ref);
    rec = 1'b0;
    fr30  = sigma(30);
    fr300 = sigma(300);
    $display("free:   edges %0d, sigma(30) %0.2f ps, sigma(300) %0.2f ps (random walk: %0.2f / %0.2f)",
             ts.size(), fr30, fr300, SIG_P * $sqrt(30.0), SIG_P * $sqrt(300.0));

    check(fr300 > 0.65 * SIG_P * $sqrt(300.0) && fr300 < 1.35 * SIG_P * $sqrt(300.0),
          "free: sigma(300) matches the random walk sigma_p*sqrt(300)");
    check(fr300 / fr30 > 2.2, "free: accumulated jitter keeps growing with L");
    check(lk300 < 0.5 * fr300, "locked: injection removes most of the accumulated jitter");
    check(lk300 / lk30 < 1.5, "locked: accumulated jitter stops growing beyond N periods");
    check(lk30 > 0.5 * SIG_P * $sqrt(real'(N_DIV)), "locked: jitter is present (noise model active)");
    check(n_sel_off == 0, "no injection while disabled");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
