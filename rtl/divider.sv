// divider: divide-by-N of CLK_OUT with periodic reset.
//
// The edge detector must pick exactly the edges around the injection, so the
// divided clock may not slip by even one DCO cycle. The counter therefore is
// reset at every injection: at the injected falling edge of CLK_OUT, SELB is
// low and the counter restarts at 0 (RST_DIV = ~SELB). It then counts falling
// edges, and CLK_DIV goes high at the falling edge one cycle before the next
// injection (count N-1) and low again at the injected edge. When the
// injection is gated the counter wraps from N-1 to 0 by itself, so CLK_DIV
// keeps the same phase.
//
// Interface: clk_out, rst_n, selb in; clk_div, cnt out.
// Timing: everything changes on falling edges of CLK_OUT; CLK_DIV is a
// register output, high for one CLK_OUT cycle out of N.
//
// A four-flip-flop counter with a reset derived from SELB and an extra
// flip-flop that retimes CLK_DIV to CLK_OUT follow the original chip; the count
// encoding is this implementation's choice.
`timescale 1ps/1fs
module divider #(
  parameter int unsigned N_DIV = ilcm_pkg::N_DIV,
  parameter int unsigned W     = 4
) (
  input  logic         clk_out,
  input  logic         rst_n,
  input  logic         selb,
  output logic         clk_div,
  output logic [W-1:0] cnt
);

  logic         rst_div;
  logic [W-1:0] cnt_nxt;

  assign rst_div = ~selb;

  always_comb begin
    if (rst_div)                    cnt_nxt = '0;
    else if (cnt == W'(N_DIV - 1))  cnt_nxt = '0;
    else                            cnt_nxt = cnt + W'(1);
  end

  always_ff @(negedge clk_out or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_div <= 1'b0;
    end else begin
      cnt     <= cnt_nxt;
      clk_div <= (cnt_nxt == W'(N_DIV - 1));
    end
  end

  initial begin
    assert (N_DIV >= 3 && N_DIV <= (1 << W))
      else $error("divider: N_DIV=%0d does not fit %0d bits", N_DIV, W);
  end

endmodule
