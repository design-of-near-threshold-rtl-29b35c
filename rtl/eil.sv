// eil: edge injection logic.
//
// On each rising edge of CLK_REF that injection is allowed for, SEL rises and
// switches the DCO's input mux from the ring feedback to the reference path,
// so the reference edge replaces the ring's own falling edge. SEL falls again
// at the next falling edge of CLK_OUT, which in lock is the injected edge,
// and the ring path takes over before that edge has gone round the ring.
// SELB, its inverse, tells the divider that an injection happened.
//
// Working: a two-flag handshake across the two clocks. req toggles on an
// allowed CLK_REF edge while no injection is outstanding; ack copies req on
// the falling edge of CLK_OUT; SEL = req ^ ack.
//
// Interface: clk_ref, clk_out, rst_n, en_inj (injection allowed this
// reference cycle: the global enable with EN_Gating folded in) in; sel, selb out.
// Timing: SEL rises one clock-to-q after CLK_REF rises and falls one
// clock-to-q after the next CLK_OUT falling edge.
//
// That the block detects CLK_REF, drives SEL and is disabled by EN_Gating
// follows the original chip; the handshake circuit is this implementation's choice.
`timescale 1ps/1fs
module eil (
  input  logic clk_ref,
  input  logic clk_out,
  input  logic rst_n,
  input  logic en_inj,
  output logic sel,
  output logic selb
);

  logic req_q, ack_q;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n)                         req_q <= 1'b0;
    else if (en_inj && (req_q == ack_q)) req_q <= ~req_q;
  end

  always_ff @(negedge clk_out or negedge rst_n) begin
    if (!rst_n) ack_q <= 1'b0;
    else        ack_q <= req_q;
  end

  assign sel  = req_q ^ ack_q;
  assign selb = ~sel;

endmodule
