// tb_dcdl_model: delay of the DCDL model for a range of codes.
// Expected delay from input rise to output rise: 800 ps + 2 ps * code.
`timescale 1ps/1fs
module tb_dcdl_model;
  logic din = 1'b0;
  logic [7:0] code = 8'd0;
  logic dout;
  int checks = 0, failures = 0;
  realtime t_in, t_out;

  dcdl_model dut (.*);

  always @(posedge dout) t_out = $realtime;

  initial begin
    #(1000 * 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c += 5) begin
      code = 8'(c);
      #100;
      din = 1'b1; t_in = $realtime;
      #1000 din = 1'b0;
      #2000;
      checks++;
      if (t_out - t_in != 800.0 + 2.0 * c) begin
        failures++; $display("FAIL code %0d delay %0.3f", c, t_out - t_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
