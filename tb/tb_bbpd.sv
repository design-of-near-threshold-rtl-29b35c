// tb_bbpd: bang-bang phase detector.
// E2 rises a random offset (-300..+300 ps, never 0) relative to the delayed
// E1 and stays high 1 ns. Expected: UP = 1 exactly when E2 rose first, and
// TOG changes once per comparison.
`timescale 1ps/1fs
module tb_bbpd;
  logic e1d = 1'b0, e2 = 1'b0, rst_n = 1'b1;
  logic up, tog;
  int checks = 0, failures = 0;

  initial #1 rst_n = 1'b0;   // asynchronous reset edge at 1 ps

  bbpd dut (.*);

  initial begin
    #(1000 * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_up = 0;
    logic tog_prev;
    #100 rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      int off;
      off = int'($urandom_range(600)) - 300;
      if (off == 0) off = 1;
      tog_prev = tog;
      #1000;
      fork
        begin #(1000 + off) e2 = 1'b1; #1000 e2 = 1'b0; end
        begin #1000 e1d = 1'b1; #100 e1d = 1'b0; end
      join
      #2000;
      checks++;
      if (up !== (off < 0)) begin failures++; $display("FAIL offset %0d up=%0b", off, up); end
      checks++;
      if (tog === tog_prev) begin failures++; $display("FAIL no toggle"); end
      if (up) n_up++;
    end
    checks++;
    if (n_up < 50 || n_up > 150) begin failures++; $display("FAIL up count %0d", n_up); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
