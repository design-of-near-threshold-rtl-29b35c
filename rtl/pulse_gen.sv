// pulse_gen: injection pulse generator.
//
// The pulse-distortion DAC must act only during the first DCO cycle after an
// injection. The pulse rises when SEL rises, stays high through the injected
// falling edge of CLK_OUT, and is pulled down by the following falling edge,
// i.e. it covers exactly the one distorted cycle.
//
// Working: set_q toggles on each rising SEL; on falling CLK_OUT edges an
// armed flag records the first edge (the injected one) and the second edge
// copies set_q into clr_q. pulse = set_q ^ clr_q.
//
// Interface: sel, clk_out, rst_n in; pulse out.
// Timing: rises with SEL, falls one clock-to-q after the second falling
// CLK_OUT edge that follows SEL.
//
// The behaviour (set by SEL, held one cycle, cleared by a falling edge of
// CLK_OUT) follows the original chip; the toggle circuit is this implementation's.
`timescale 1ps/1fs
module pulse_gen (
  input  logic sel,
  input  logic clk_out,
  input  logic rst_n,
  output logic pulse
);

  logic set_q, clr_q, armed_q;

  always_ff @(posedge sel or negedge rst_n) begin
    if (!rst_n) set_q <= 1'b0;
    else        set_q <= ~set_q;
  end

  always_ff @(negedge clk_out or negedge rst_n) begin
    if (!rst_n) begin
      clr_q   <= 1'b0;
      armed_q <= 1'b0;
    end else if (set_q != clr_q) begin
      if (!armed_q) armed_q <= 1'b1;         // injected edge: hold the pulse
      else begin                             // next falling edge: end it
        armed_q <= 1'b0;
        clr_q   <= set_q;
      end
    end
  end

  assign pulse = set_q ^ clr_q;

endmodule
