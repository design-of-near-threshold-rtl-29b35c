// tb_divider: the divider with periodic reset, N = 10.
// CLK_OUT runs at 1 ns. SEL (SELB low) is raised just before every tenth
// falling edge, like an injection, but in some cycles it is skipped (gated).
// A reference model counts falling edges since the last injection and
// predicts CLK_DIV: high exactly from the falling edge before the injection
// to the injected edge. The testbench also starts the divider out of phase
// and checks the first injection pulls it into phase (periodic reset).
`timescale 1ps/1fs
module tb_divider;
  localparam int N = 10;
  logic clk_out = 1'b0, rst_n = 1'b1, selb = 1'b1;
  logic clk_div;
  logic [3:0] cnt;
  int checks = 0, failures = 0;

  initial #1 rst_n = 1'b0;   // asynchronous reset edge at 1 ps
  int n_high = 0, n_resets = 0;

  divider #(.N_DIV(N)) dut (.*);

  always #500 clk_out = ~clk_out;

  initial begin
    #(1000 * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model_cnt;
  initial begin
    repeat (3) @(negedge clk_out);
    #100 rst_n = 1'b1;
    // let it run out of phase for 4 falling edges
    repeat (4) @(negedge clk_out);
    model_cnt = 0;
    for (int cyc = 0; cyc < 40; cyc++) begin
      bit inject = !(cyc % 5 == 3);               // every 5th period is gated
      for (int e = 0; e < N; e++) begin
        // the next falling edge is edge e of this period; e == 0 is the injected one
        @(posedge clk_out);
        #300;
        if (e == 0 && inject) selb = 1'b0;
        @(negedge clk_out);
        #100;
        selb = 1'b1;
        if (e == 0 && inject) begin model_cnt = 0; n_resets++; end
        else model_cnt = (model_cnt + 1) % N;
        if (cyc >= 1) begin
          checks++;
          if (clk_div !== (model_cnt == N - 1)) begin
            failures++;
            $display("FAIL cyc %0d edge %0d clk_div=%0b", cyc, e, clk_div);
          end
          if (clk_div) n_high++;
        end
      end
    end
    checks++;
    if (n_high != 39) begin failures++; $display("FAIL clk_div high %0d times", n_high); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
