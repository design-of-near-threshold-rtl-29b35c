// edge_detector: selects the two CLK_OUT edges the shared error detector compares.
//
// CLK_XOR = CLK_OUT ^ EN_Dist. With EN_Dist = 0 its rising edges are the
// rising edges of CLK_OUT (frequency tracking and DCDL calibration); with
// EN_Dist = 1 they are the falling edges (pulse-distortion tracking). Two
// flip-flops on CLK_XOR sample CLK_DIV: E1 rises at the first selected edge
// after CLK_DIV rises, E2 one selected edge later. Because CLK_DIV rises at
// the falling edge one cycle before the injection, E1/E2 are the rising edges
// just before and just after the injected edge, or the injected falling edge
// and the one after it.
//
// Interface: clk_out, clk_div, en_dist, rst_n in; e1, e2 out (each high for
// one CLK_OUT cycle; only their rising edges carry timing).
// Timing: E1 and E2 are clock-to-q after the selected CLK_OUT edges. EN_Dist
// must only change while CLK_DIV, E1 and E2 are low.
//
// The XOR edge selection and the sampling of CLK_DIV follow the original chip; using
// a two-stage shift register to produce E2 is this implementation's reading.
`timescale 1ps/1fs
module edge_detector (
  input  logic clk_out,
  input  logic clk_div,
  input  logic en_dist,
  input  logic rst_n,
  output logic e1,
  output logic e2
);

  logic clk_xor;

  assign clk_xor = clk_out ^ en_dist;

  always_ff @(posedge clk_xor or negedge rst_n) begin
    if (!rst_n) begin
      e1 <= 1'b0;
      e2 <= 1'b0;
    end else begin
      e1 <= clk_div;
      e2 <= e1;
    end
  end

endmodule
