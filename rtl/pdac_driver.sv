// pdac_driver: gate drive of the pulse-distortion calibration P-RDAC.
//
// A 24-unit PMOS resistor DAC sits on the last inverter of the DCO ring. It
// only acts while the injection pulse is high, i.e. during the first DCO cycle
// after an injected edge, and so trims the period right after injection
// without touching the steady-state period.
//
// D_PERIOD (0..24) is first made a thermometer d[i] = (i < dper_code). Then
//   low units  0..15 (NOR-type gating): g = pulse & ~d[i]
//   high units 16..23 (NAND gating):    g = ~(pulse & d[i])
// A gate at 0 turns its unit on. Outside the pulse the low 16 units are always
// on and the high 8 always off, whatever the code. During the pulse, codes
// below 16 turn off (16 - code) low units, which weakens the pull-up and
// lengthens the period after injection. Codes above 16 turn on (code - 16)
// high units and shorten it. The number of units on during the pulse equals
// the code, so the period after injection falls monotonically as the code
// rises: it is longest at 0 and shortest at the top code.
//
// Interface: dper_code, pulse in; pdac_g[23:0] gate levels out.
// Timing: combinational.
//
// The 16/8 split, the NOR/NAND gating and the steady levels follow the
// original circuit's description of its timing diagrams; where its printed
// truth table disagrees with that description, the description is followed.
// Letting the code reach 24, so that the last unit can also be used, is this
// implementation's choice.
`timescale 1ps/1fs
module pdac_driver #(
  parameter int unsigned N_LO = ilcm_pkg::N_PDAC_LO,
  parameter int unsigned N_HI = ilcm_pkg::N_PDAC_HI
) (
  input  logic [$clog2(N_LO+N_HI+1)-1:0] dper_code,
  input  logic                           pulse,
  output logic [N_LO+N_HI-1:0]           pdac_g
);

  logic [N_LO+N_HI-1:0] d_th;

  always_comb begin
    for (int unsigned i = 0; i < N_LO + N_HI; i++)
      d_th[i] = (i < 32'(dper_code));
  end

  always_comb begin
    for (int unsigned i = 0; i < N_LO; i++)
      pdac_g[i] = ~(d_th[i] | ~pulse);          // NOR(d, pulse_b)
    for (int unsigned i = N_LO; i < N_LO + N_HI; i++)
      pdac_g[i] = ~(d_th[i] & pulse);           // NAND(d, pulse)
  end

endmodule
