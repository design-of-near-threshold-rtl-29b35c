// tb_dco_model: behavioural DCO.
//  1. Free running (no SEL): period = 1112 - 10*coarse - 0.5*fine ps, 50 % duty,
//     for several code pairs.
//  2. Injection at 1 GHz (coarse 8, fine 64, T = 1000 ps, 100 MHz reference):
//     SEL rises with each reference edge and falls at the next falling
//     CLK_OUT edge. The injected falling edge must come 150 ps after the
//     reference edge; the low phase after it must be 500 - 6 - (units on - 16)
//     ps, where the testbench switches a random number of P-RDAC units on for
//     the first cycle after the injection (as the injection pulse does); the
//     next falling edge one period minus that distortion later.
//  3. DCO 10 ps slow (fine 44): the natural falling edge due after the
//     reference edge is replaced by the injected one, still at +150 ps, and
//     there are exactly 10 falling edges per reference period.
`timescale 1ps/1fs
module tb_dco_model;
  logic         clk_ref = 1'b0, sel = 1'b0;
  logic [15:0]  coarse_th;
  logic [127:0] fine_th;
  logic [23:0]  pdac_g;
  logic         clk_out;
  int checks = 0, failures = 0;

  localparam logic [23:0] PDAC_IDLE = {8'hFF, 16'h0000};   // 16 units on

  dco_model dut (.*);

  task automatic set_codes(input int c, input int f);
    coarse_th = '0; fine_th = '0;
    for (int i = 0; i < c; i++) coarse_th[i] = 1'b1;
    for (int i = 0; i < f; i++) fine_th[i] = 1'b1;
  endtask

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $realtime); end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  initial begin
    #(1000.0 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime tr0, tr1, tf0;
  initial begin
    pdac_g = PDAC_IDLE;
    // ---- 1. free running ----
    for (int k = 0; k < 6; k++) begin
      int c, f;
      real t;
      c = 2 * k + 3; f = 20 * k + 10;
      set_codes(c, f);
      t = 1112.0 - 10.0 * c - 0.5 * f;
      repeat (3) @(posedge clk_out);
      @(posedge clk_out); tr0 = $realtime;
      @(negedge clk_out); tf0 = $realtime;
      @(posedge clk_out); tr1 = $realtime;
      chk(near(tr1 - tr0, t), $sformatf("free-run period %0.3f expected %0.3f", tr1 - tr0, t));
      chk(near(tf0 - tr0, t / 2.0), "free-run duty cycle");
    end

    // ---- 2. injection, 1 GHz ----
    set_codes(8, 64);
    for (int k = 0; k < 40; k++) begin
      realtime t_ref;
      int on_units;
      real lo;
      #(10000.0 - ($realtime - 10000.0 * $floor($realtime / 10000.0)));
      clk_ref = 1'b1; t_ref = $realtime;
      sel = 1'b1;
      on_units = (k < 20) ? 16 : int'($urandom_range(24));
      pdac_g = '1;
      for (int i = 0; i < on_units; i++) pdac_g[i] = 1'b0;
      @(negedge clk_out); tf0 = $realtime;
      sel = 1'b0;
      @(posedge clk_out); tr0 = $realtime;
      @(negedge clk_out); tr1 = $realtime;
      pdac_g = PDAC_IDLE;
      #100 clk_ref = 1'b0;
      lo = 500.0 - 6.0 - (on_units - 16);
      if (k >= 2) begin
        chk(near(tf0 - t_ref, 150.0), $sformatf("injected edge at +%0.3f", tf0 - t_ref));
        chk(near(tr0 - tf0, lo), $sformatf("low phase after injection %0.3f expected %0.3f", tr0 - tf0, lo));
        chk(near(tr1 - tf0, lo + 500.0), "period after injection");
      end
    end

    // ---- 3. slow DCO, natural edge suppressed ----
    set_codes(8, 44);
    for (int k = 0; k < 20; k++) begin
      realtime t_ref;
      int nf;
      #(10000.0 - ($realtime - 10000.0 * $floor($realtime / 10000.0)));
      clk_ref = 1'b1; t_ref = $realtime;
      sel = 1'b1;
      @(negedge clk_out); tf0 = $realtime;
      sel = 1'b0;
      #100 clk_ref = 1'b0;
      if (k >= 2) chk(near(tf0 - t_ref, 150.0), $sformatf("slow DCO: injected edge at +%0.3f", tf0 - t_ref));
      nf = 0;
      while ($realtime < t_ref + 10000.0 - 200.0) begin
        @(negedge clk_out or posedge clk_ref);
        if (!clk_out && $realtime < t_ref + 10000.0 - 200.0) nf++;
      end
      if (k >= 2) chk(nf == 9, $sformatf("slow DCO: %0d natural falling edges between injections", nf));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
