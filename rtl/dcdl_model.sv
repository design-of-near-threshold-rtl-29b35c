// dcdl_model: behavioural model (not synthesizable) of the digitally
// controlled delay line of the error detector.
//
// The DCDL delays E1 by about one DCO period so that the PD can compare it
// with E2. Its delay is D_MIN_PS + K_PS * code. The model reproduces a rising
// edge of its input after that delay, as a pulse of PULSE_PS; the delay is
// read when the input rises. It handles one edge at a time, which is enough
// here because E1 rises once per reference cycle.
//
// Interface: din, code in; dout out.
// The original chip reuses an earlier DCDL circuit and gives no numbers;
// the range (800 ps to 1310 ps in 2 ps steps, covering one period of the
// 1 GHz output) is this model's own.
`timescale 1ps/1fs
module dcdl_model #(
  parameter int unsigned W        = ilcm_pkg::DCDL_W,
  parameter real         D_MIN_PS = 800.0,
  parameter real         K_PS     = 2.0,
  parameter real         PULSE_PS = 100.0
) (
  input  logic         din,
  input  logic [W-1:0] code,
  output logic         dout
);

  initial dout = 1'b0;

  always @(posedge din) begin
    #(D_MIN_PS + K_PS * real'(code));
    dout = 1'b1;
    #(PULSE_PS);
    dout = 1'b0;
  end

endmodule
