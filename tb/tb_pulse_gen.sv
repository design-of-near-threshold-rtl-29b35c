// tb_pulse_gen: injection pulse generator.
// CLK_OUT period 1 ns. SEL is raised 20 ps before a falling edge (the
// injected edge) and dropped at that edge. Expected: PULSE rises with SEL,
// stays high across the injected falling edge and for the full following
// cycle, and falls at the next falling edge, i.e. it is high for 1 ns + 20 ps.
`timescale 1ps/1fs
module tb_pulse_gen;
  logic sel = 1'b0, clk_out = 1'b1, rst_n = 1'b1;
  logic pulse;
  int checks = 0, failures = 0;

  initial #1 rst_n = 1'b0;   // asynchronous reset edge at 1 ps
  realtime t_rise, t_fall;

  pulse_gen dut (.*);

  initial forever begin
    #500 clk_out = 1'b0;
    #500 clk_out = 1'b1;
  end

  always @(posedge pulse) t_rise = $realtime;
  always @(negedge pulse) t_fall = $realtime;

  initial begin
    #(1000 * 500);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1700 rst_n = 1'b1;
    for (int k = 0; k < 20; k++) begin
      // wait for a point 20 ps before a falling edge
      @(posedge clk_out);
      repeat (k % 3) @(posedge clk_out);
      #480 sel = 1'b1;
      #1;
      checks++;
      if (pulse !== 1'b1) begin failures++; $display("FAIL pulse not set by SEL"); end
      @(negedge clk_out);
      sel = 1'b0;
      #10;
      checks++;
      if (pulse !== 1'b1) begin failures++; $display("FAIL pulse dropped at injected edge"); end
      @(negedge clk_out);
      #10;
      checks++;
      if (pulse !== 1'b0) begin failures++; $display("FAIL pulse not cleared one cycle later"); end
      checks++;
      if (t_fall - t_rise < 1015.0 || t_fall - t_rise > 1025.0) begin
        failures++; $display("FAIL pulse width %0.1f", t_fall - t_rise);
      end
      repeat (3) @(posedge clk_out);
      checks++;
      if (pulse !== 1'b0) begin failures++; $display("FAIL pulse without SEL"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
