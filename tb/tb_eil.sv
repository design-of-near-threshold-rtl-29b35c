// tb_eil: edge injection logic.
// CLK_REF has a 10 ns period, CLK_OUT a 1 ns period whose falling edges fall
// 20 ps after each reference edge (as in lock). Expected: SEL rises at each
// reference edge while en_inj is high, stays high until the next falling edge
// of CLK_OUT and is low at all other times; SELB is its inverse; no SEL at
// all while en_inj is low (gated).
`timescale 1ps/1fs
module tb_eil;
  logic clk_ref = 1'b0, clk_out = 1'b1, rst_n = 1'b1, en_inj = 1'b0;
  logic sel, selb;
  int checks = 0, failures = 0;

  initial #1 rst_n = 1'b0;   // asynchronous reset edge at 1 ps
  int n_sel = 0;

  eil dut (.*);

  always #5000 clk_ref = ~clk_ref;
  initial begin
    #20;
    forever begin
      clk_out = 1'b0; #500;
      clk_out = 1'b1; #500;
    end
  end

  always @(posedge sel) n_sel++;

  initial begin
    #(10000 * 200);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    #2500 rst_n = 1'b1;
    for (int r = 0; r < 30; r++) begin
      en_inj = !(r % 4 == 2);
      @(posedge clk_ref);
      #5;
      chk(sel == en_inj, "sel follows allowed reference edge");
      chk(selb == !sel, "selb is inverse");
      #10;                                          // before the falling edge at +20
      chk(sel == en_inj, "sel held until CLK_OUT falls");
      #10;                                          // after it
      chk(sel == 1'b0, "sel cleared by CLK_OUT falling edge");
      #2000;
      chk(sel == 1'b0 && selb == 1'b1, "sel idle between injections");
      @(negedge clk_ref);
    end
    chk(n_sel == 23, $sformatf("one SEL per allowed reference edge (%0d)", n_sel));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
