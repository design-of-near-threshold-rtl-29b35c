// tb_pdac_driver: exhaustive test of the pulse-distortion DAC gate drive.
// Expected per unit: low units (0..15) are on (gate 0) outside the pulse and,
// during the pulse, only if their thermometer bit is set; high units (16..23)
// are off outside the pulse and, during the pulse, on only if their bit is
// set. So outside the pulse 16 units are on for every code, and during the
// pulse the number of units on equals the code.
`timescale 1ps/1fs
module tb_pdac_driver;
  logic [4:0]  dper_code;
  logic        pulse;
  logic [23:0] pdac_g;
  int checks = 0, failures = 0;

  pdac_driver dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] exp_g;
    for (int k = 0; k <= 24; k++) begin
      for (int p = 0; p < 2; p++) begin
        dper_code = 5'(k);
        pulse     = p[0];
        #10;
        for (int i = 0; i < 24; i++) begin
          if (i < 16) exp_g[i] = (p == 1) ? !(i < k) : 1'b0;
          else        exp_g[i] = (p == 1) ? !(i < k) : 1'b1;
        end
        checks++;
        if (pdac_g !== exp_g) begin failures++; $display("FAIL code %0d pulse %0d: %h", k, p, pdac_g); end
        checks++;
        if ((24 - $countones(pdac_g)) != ((p == 1) ? k : 16)) begin
          failures++; $display("FAIL units on, code %0d pulse %0d", k, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
