// freq_dac_ctrl: thermometer control of the DCO frequency DACs.
//
// The DCO period is set by a 16-unit coarse and a 128-unit fine resistor DAC
// (unit-element, P- and N-side together so the common mode stays at VDD/2).
// This block turns the binary codes kept by the loop filter and the
// configuration into the unit enables: unit i is on when i < code, so each
// code step switches exactly one unit and the DAC is monotonic. Codes above
// the unit count turn every unit on.
//
// Interface: coarse_code / fine_code binary in; coarse_th / fine_th out,
// bit = 1 means the unit is on (more drive, shorter period).
// Timing: purely combinational.
//
// The unit counts follow the original chip; the binary-to-thermometer decoding is
// the simplest circuit with that function and is this implementation's choice.
`timescale 1ps/1fs
module freq_dac_ctrl #(
  parameter int unsigned N_COARSE = ilcm_pkg::N_COARSE,
  parameter int unsigned N_FINE   = ilcm_pkg::N_FINE
) (
  input  logic [$clog2(N_COARSE+1)-1:0] coarse_code,
  input  logic [$clog2(N_FINE+1)-1:0]   fine_code,
  output logic [N_COARSE-1:0]           coarse_th,
  output logic [N_FINE-1:0]             fine_th
);

  always_comb begin
    for (int unsigned i = 0; i < N_COARSE; i++)
      coarse_th[i] = (i < 32'(coarse_code));
  end

  always_comb begin
    for (int unsigned i = 0; i < N_FINE; i++)
      fine_th[i] = (i < 32'(fine_code));
  end

endmodule
