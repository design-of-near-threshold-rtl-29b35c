// bbpd: bang-bang phase detector of the shared error detector.
//
// Compares the delayed E1 with E2. At the rising edge of the delayed E1 it
// samples E2: if E2 has already risen, E2 led and UP = 1, otherwise UP = 0
// (DN). Each decision toggles TOG so the loop filter, in another clock
// domain, can tell a new decision from an old one.
//
// Interface: e1d, e2, rst_n in; up, tog out.
// Timing: UP and TOG change clock-to-q after the rising edge of E1d. E2 must
// stay high for at least the largest lead to be measured (it stays high one
// DCO cycle).
//
// The original chip description gives the PD's function only; a single sampling flip-flop is
// this implementation's choice.
`timescale 1ps/1fs
module bbpd (
  input  logic e1d,
  input  logic e2,
  input  logic rst_n,
  output logic up,
  output logic tog
);

  always_ff @(posedge e1d or negedge rst_n) begin
    if (!rst_n) begin
      up  <= 1'b0;
      tog <= 1'b0;
    end else begin
      up  <= e2;
      tog <= ~tog;
    end
  end

endmodule
