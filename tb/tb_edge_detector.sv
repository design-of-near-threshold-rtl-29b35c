// tb_edge_detector: edge selection with EN_Dist.
// CLK_OUT period 1 ns, rising edges at k*1000, falling at k*1000+500.
// CLK_DIV is driven high at a falling edge and low at the next falling edge,
// as the divider does. Expected:
//   EN_Dist = 0: E1 rises at the first rising CLK_OUT edge after CLK_DIV
//                rises (500 ps later), E2 at the next rising edge (1500 ps);
//   EN_Dist = 1: E1 rises at the next falling edge (1000 ps later, the one
//                where CLK_DIV falls), E2 one period later (2000 ps).
// EN_Dist is changed only while CLK_DIV is low, as the loop filter does.
`timescale 1ps/1fs
module tb_edge_detector;
  logic clk_out = 1'b0, clk_div = 1'b0, en_dist = 1'b0, rst_n = 1'b1;
  logic e1, e2;
  int checks = 0, failures = 0;

  initial #1 rst_n = 1'b0;   // asynchronous reset edge at 1 ps
  realtime t_e1, t_e2, t_div;
  int n_e1 = 0, n_e2 = 0;

  edge_detector dut (.*);

  always #500 clk_out = ~clk_out;
  always @(posedge e1) begin t_e1 = $realtime; n_e1++; end
  always @(posedge e2) begin t_e2 = $realtime; n_e2++; end

  initial begin
    #(1000 * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1200 rst_n = 1'b1;
    for (int k = 0; k < 16; k++) begin
      int e1_0, e2_0;
      en_dist = k[0] ^ k[2];
      repeat (3) @(posedge clk_out);
      e1_0 = n_e1; e2_0 = n_e2;
      @(negedge clk_out);
      clk_div <= 1'b1; t_div = $realtime;
      @(negedge clk_out);
      clk_div <= 1'b0;
      repeat (4) @(posedge clk_out);
      checks++;
      if (n_e1 != e1_0 + 1 || n_e2 != e2_0 + 1) begin
        failures++; $display("FAIL k=%0d: %0d E1 and %0d E2 edges", k, n_e1 - e1_0, n_e2 - e2_0);
      end
      checks++;
      if (!en_dist && (t_e1 - t_div != 500.0 || t_e2 - t_div != 1500.0)) begin
        failures++; $display("FAIL rising mode: E1 +%0.1f E2 +%0.1f", t_e1 - t_div, t_e2 - t_div);
      end
      if (en_dist && (t_e1 - t_div != 1000.0 || t_e2 - t_div != 2000.0)) begin
        failures++; $display("FAIL falling mode: E1 +%0.1f E2 +%0.1f", t_e1 - t_div, t_e2 - t_div);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
