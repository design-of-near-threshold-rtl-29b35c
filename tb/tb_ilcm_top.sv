// tb_ilcm_top: end-to-end test of the injection-locked clock multiplier at
// its default parameters (1 GHz output from a 100 MHz reference, N = 10).
//
// The DCO is started 10 ps slow (coarse code 7 instead of 8) so that the
// frequency loop has real work to do. Phases:
//   A  injection on, calibration off: the output is locked in phase but the
//      period around the injection is far off (large deterministic jitter).
//      The reference spur of a pure frequency error is 20*log10(N*|dT/T|),
//      here 20*log10(10 * 10/1000) = -20 dBc; the estimate must be within
//      2 dB of it (the 6 ps intrinsic pulse distortion adds a little);
//   B  injection and calibration on: the three loops must settle. The
//      expected codes are worked out from the DCO/DCDL model constants:
//      fine = (1112 - 70 - 1000) / 0.5 = 84, D_PERIOD = 16 - 6/1 = 10,
//      DCDL = (1000 - 800) / 2 = 100; afterwards every rising and every
//      falling CLK_OUT period must be 1000 ps within a few ps;
//   C  injection off: the DCO free-runs on the calibrated codes and must
//      still give N edges per reference period, with no SEL activity;
//   D  injection back on: lock again within a few cycles.
// Every mechanism (injection, gated injection, each error type, each code
// moving up and down, frozen codes, free running) is counted and must occur.
`timescale 1ps/1fs
module tb_ilcm_top;
  import ilcm_pkg::*;

  localparam realtime T_REF  = 10000.0;
  localparam real     T_OUT  = 1000.0;
  localparam real     T_FREE = 1010.0;   // DCO period at coarse 7 / fine 64

  logic                clk_ref = 1'b0;
  logic                rst_n = 1'b1;
  logic                en_inj  = 1'b0;
  logic                en_esed = 1'b0;
  logic [COARSE_W-1:0] coarse_code = COARSE_W'(7);
  logic                clk_out;
  logic [FINE_W-1:0]   fine_code;
  logic [DCDL_W-1:0]   dcdl_code;
  logic [DPER_W-1:0]   dper_code;
  det_mode_e           mode;

  int checks = 0, failures = 0;

  initial #1 rst_n = 1'b0;   // asynchronous reset edge at 1 ps

  ilcm_top dut (.*);

  always #(T_REF / 2) clk_ref = ~clk_ref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- edge timing ----------------
  realtime last_rise = 0.0, last_fall = 0.0;
  real     max_rise_dev = 0.0, max_fall_dev = 0.0;
  int      n_rise = 0;

  always @(posedge clk_out) begin
    real d;
    if (last_rise > 0.0) begin
      d = ($realtime - last_rise) - T_OUT;
      if (d < 0.0) d = -d;
      if (d > max_rise_dev) max_rise_dev = d;
    end
    last_rise = $realtime;
    n_rise++;
  end

  always @(negedge clk_out) begin
    real d;
    if (last_fall > 0.0) begin
      d = ($realtime - last_fall) - T_OUT;
      if (d < 0.0) d = -d;
      if (d > max_fall_dev) max_fall_dev = d;
    end
    last_fall = $realtime;
  end

  // Reference spur estimate. The deviation x_k of each rising edge from the
  // ideal grid (k = edge index within the reference period) is correlated
  // with exp(-j*2*pi*k/N); c1 is the f_REF Fourier component of the edge
  // deviation. For small phase modulation the spur at f_out +- f_REF is
  // 2*pi*f_out*|c1| relative to the carrier.
  real spur_re = 0.0, spur_im = 0.0;
  int  spur_n  = 0;
  localparam real PI = 3.14159265358979;

  always @(posedge clk_out) begin
    real t_rel, x;
    int  idx;
    t_rel = $realtime - T_REF / 2.0;                 // first reference rising edge at T_REF/2
    idx   = int'($floor(t_rel / T_OUT + 0.5));
    x     = t_rel - real'(idx) * T_OUT;
    idx   = ((idx % N_DIV) + N_DIV) % N_DIV;
    spur_re += x * $cos(2.0 * PI * idx / N_DIV);
    spur_im -= x * $sin(2.0 * PI * idx / N_DIV);
    spur_n++;
  end

  function automatic real spur_dbc();
    real c1;
    c1 = $sqrt(spur_re * spur_re + spur_im * spur_im) / real'(spur_n);
    return 20.0 * $log10(2.0 * PI * c1 / T_OUT + 1.0e-10);   // floor: -200 dBc
  endfunction

  task automatic clear_stats();
    max_rise_dev = 0.0;
    max_fall_dev = 0.0;
    n_rise       = 0;
    spur_re      = 0.0;
    spur_im      = 0.0;
    spur_n       = 0;
  endtask

  real spur_a, spur_b;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_inj = 0, n_gated = 0, n_freq = 0, n_dcdl = 0, n_dist = 0;
  int n_fine_up = 0, n_fine_dn = 0, n_dcdl_up = 0, n_dcdl_dn = 0, n_dper_up = 0, n_dper_dn = 0;
  int n_sel_freerun = 0;
  logic [FINE_W-1:0] fine_q;
  logic [DCDL_W-1:0] dcdl_q;
  logic [DPER_W-1:0] dper_q;

  always @(posedge dut.sel) begin
    n_inj++;
    if (!en_inj && $realtime > T_REF) begin n_sel_freerun++; $display("sel while disabled at %0t", $realtime); end
  end

  always @(posedge clk_ref) begin
    if (rst_n && en_inj && dut.gate_inj) n_gated++;
    if (rst_n && en_esed) begin
      case (mode)
        MODE_FREQ: n_freq++;
        MODE_DCDL: n_dcdl++;
        default:   n_dist++;
      endcase
    end
  end

  always @(negedge clk_ref) begin
    #1;
    if (fine_code > fine_q) n_fine_up++;
    if (fine_code < fine_q) n_fine_dn++;
    if (dcdl_code > dcdl_q) n_dcdl_up++;
    if (dcdl_code < dcdl_q) n_dcdl_dn++;
    if (dper_code > dper_q) n_dper_up++;
    if (dper_code < dper_q) n_dper_dn++;
    fine_q = fine_code;
    dcdl_q = dcdl_code;
    dper_q = dper_code;
  end

  // ---------------- watchdog ----------------
  initial begin
    #(T_REF * 3000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    int f0, dl0, dp0;
    repeat (3) @(posedge clk_ref);
    rst_n = 1'b1;
    en_inj = 1'b1;

    // A: injection only
    repeat (20) @(posedge clk_ref);
    clear_stats();
    f0 = int'(fine_code); dl0 = int'(dcdl_code); dp0 = int'(dper_code);
    repeat (30) @(posedge clk_ref);
    spur_a = spur_dbc();
    $display("A: rise dev %0.2f ps, fall dev %0.2f ps, edges %0d, spur %0.1f dBc", max_rise_dev, max_fall_dev, n_rise, spur_a);
    check(n_rise == 30 * N_DIV, "A: N edges per reference period");
    check(fabs(spur_a - 20.0 * $log10(real'(N_DIV) * fabs(T_FREE - T_OUT) / T_OUT)) < 2.0,
          "A: spur matches 20*log10(N*|dT/T|) for the frequency error");
    check(max_rise_dev > 50.0, "A: uncalibrated jitter around injection is large");
    check(int'(fine_code) == f0 && int'(dcdl_code) == dl0 && int'(dper_code) == dp0,
          "A: codes frozen with calibration off");

    // B: calibration on
    @(negedge clk_ref);
    en_esed = 1'b1;
    repeat (600) @(posedge clk_ref);
    $display("B: fine=%0d dcdl=%0d dper=%0d", fine_code, dcdl_code, dper_code);
    check(int'(fine_code) >= 83 && int'(fine_code) <= 85, "B: fine code settles at 84 +- 1");
    check(int'(dper_code) >= 9  && int'(dper_code) <= 11, "B: D_PERIOD settles at 10 +- 1");
    check(int'(dcdl_code) >= 99 && int'(dcdl_code) <= 101, "B: DCDL code settles at 100 +- 1");
    clear_stats();
    repeat (60) @(posedge clk_ref);
    spur_b = spur_dbc();
    $display("B: rise dev %0.2f ps, fall dev %0.2f ps, edges %0d, spur %0.1f dBc", max_rise_dev, max_fall_dev, n_rise, spur_b);
    check(spur_b < spur_a - 20.0, "B: reference spur at least 20 dB below the uncalibrated one");
    check(n_rise == 60 * N_DIV, "B: N edges per reference period");
    check(max_rise_dev < 10.0, "B: rising-edge periods within 10 ps of T_REF/N");
    check(max_fall_dev < 10.0, "B: falling-edge periods (incl. after injection) within 10 ps");

    // C: free running
    @(negedge clk_ref);
    en_esed = 1'b0;
    en_inj  = 1'b0;
    repeat (2) @(posedge clk_ref);
    clear_stats();
    repeat (20) @(posedge clk_ref);
    $display("C: free-run edges %0d, rise dev %0.2f", n_rise, max_rise_dev);
    check(n_rise >= 20 * N_DIV - 1 && n_rise <= 20 * N_DIV + 1, "C: free-running frequency held");
    check(n_sel_freerun == 0, "C: no injection while disabled");

    // D: lock again
    @(negedge clk_ref);
    en_inj  = 1'b1;
    en_esed = 1'b1;
    repeat (10) @(posedge clk_ref);
    clear_stats();
    repeat (30) @(posedge clk_ref);
    check(n_rise == 30 * N_DIV, "D: relocked, N edges per reference period");
    check(max_rise_dev < 10.0, "D: relocked, small period error");

    // mechanisms
    $display("inj=%0d gated=%0d freq=%0d dcdl=%0d dist=%0d fine+%0d/-%0d dcdl+%0d/-%0d dper+%0d/-%0d",
             n_inj, n_gated, n_freq, n_dcdl, n_dist, n_fine_up, n_fine_dn,
             n_dcdl_up, n_dcdl_dn, n_dper_up, n_dper_dn);
    check(n_inj > 0,     "mechanism: injection");
    check(n_gated > 0,   "mechanism: gated injection (DCDL calibration)");
    check(n_freq > 0,    "mechanism: frequency detection");
    check(n_dcdl > 0,    "mechanism: DCDL detection");
    check(n_dist > 0,    "mechanism: pulse-distortion detection (EN_Dist)");
    check(n_fine_up > 0 && n_fine_dn > 0, "mechanism: fine code up and down");
    check(n_dcdl_up > 0 && n_dcdl_dn > 0, "mechanism: DCDL code up and down");
    check(n_dper_up > 0 && n_dper_dn > 0, "mechanism: D_PERIOD up and down");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
