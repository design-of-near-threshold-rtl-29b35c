// tb_freq_dac_ctrl: exhaustive test of the coarse/fine thermometer decoders.
// For every code the expected enable vector is built bit by bit and the
// number of units on is compared with the code (saturated at the unit count).
`timescale 1ps/1fs
module tb_freq_dac_ctrl;
  localparam int unsigned NC = 16, NF = 128;
  logic [4:0]    coarse_code;
  logic [7:0]    fine_code;
  logic [NC-1:0] coarse_th;
  logic [NF-1:0] fine_th;
  int checks = 0, failures = 0;

  freq_dac_ctrl dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NC-1:0] ec;
    logic [NF-1:0] ef;
    for (int c = 0; c < 32; c++) begin
      coarse_code = 5'(c);
      fine_code   = 8'((c * 37) % 256);
      #10;
      ec = '0;
      for (int i = 0; i < NC; i++) if (i < c) ec[i] = 1'b1;
      checks++;
      if (coarse_th !== ec) begin failures++; $display("FAIL coarse %0d", c); end
    end
    for (int f = 0; f < 256; f++) begin
      fine_code = 8'(f);
      #10;
      ef = '0;
      for (int i = 0; i < NF; i++) if (i < f) ef[i] = 1'b1;
      checks++;
      if (fine_th !== ef) begin failures++; $display("FAIL fine %0d", f); end
      checks++;
      if ($countones(fine_th) != ((f > NF) ? NF : f)) begin failures++; $display("FAIL fine count %0d", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
