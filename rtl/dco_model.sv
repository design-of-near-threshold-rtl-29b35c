// dco_model: behavioural model (not synthesizable) of the muxed ring DCO.
//
// The real DCO is a mux with a pre-mux stage followed by a seven-stage
// inverter chain, tuned by resistor DACs; it is analog. This model keeps its
// ports and reproduces the timing the rest of the design relies on:
//
//  * Period T = T_BASE_PS - K_COARSE_PS*(coarse units on) - K_FINE_PS*(fine
//    units on). Half of T is spent high, half low.
//  * Injection. When SEL has risen (the mux selects the reference path), the
//    rising edge of CLK_REF reaches the output D_MUX_PS later as a falling
//    edge of CLK_OUT (D_MUX_PS lumps the slope control of the injection
//    logic, the pre-mux stage and the mux). Meanwhile the ring path is
//    blocked, so a natural falling edge due in that window does not happen;
//    this window is how far the ring edge may stray from the injection and
//    still be replaced. If the output is already low, the low phase restarts
//    at that moment.
//  * Pulse distortion. The low phase that starts at an injected edge is
//    shortened by TAU0_PS (the intrinsic mismatch of the two mux paths and
//    the charging of the mux on the SEL transition). Every low phase is
//    shortened by K_DIST_PS*(P-RDAC units on - 16), counted about 1 ps after
//    the falling edge. The P-RDAC drives the last inverter, so it acts on one
//    transition per period only, and outside the injection pulse exactly 16
//    units are on. So only the edges right after an injection move, as the
//    design requires of its nine-stage ring.
//  * Ring jitter. Each half period gets an independent Gaussian error of
//    JITTER_PS rms (default 0, i.e. noiseless), drawn with $dist_normal from
//    SEED. Left alone the ring accumulates these errors as a random walk; an
//    injected edge discards them, which is what an ILCM is for.
//
// Interface: clk_ref, sel, coarse_th[15:0], fine_th[127:0], pdac_g[23:0] in;
// clk_out out.
// Timing: a time-stepped process (STEP_PS) schedules each edge exactly at its
// computed time with fs resolution.
//
// The structure, DAC sizes and the two oscillation modes follow the original chip;
// every numeric constant is this model's own and can be changed through the
// parameters. The defaults give 1.0 GHz at coarse 8 / fine 64.
`timescale 1ps/1fs
module dco_model #(
  parameter int unsigned N_COARSE    = ilcm_pkg::N_COARSE,
  parameter int unsigned N_FINE      = ilcm_pkg::N_FINE,
  parameter int unsigned N_PDAC      = ilcm_pkg::N_PDAC,
  parameter int unsigned N_PDAC_LO   = ilcm_pkg::N_PDAC_LO,
  parameter real         T_BASE_PS   = 1112.0,
  parameter real         K_COARSE_PS = 10.0,
  parameter real         K_FINE_PS   = 0.5,
  parameter real         K_DIST_PS   = 1.0,
  parameter real         TAU0_PS     = 6.0,
  parameter real         D_MUX_PS    = 150.0,
  parameter real         STEP_PS     = 50.0,
  parameter real         JITTER_PS   = 0.0,
  parameter int          SEED        = 1
) (
  input  logic                clk_ref,
  input  logic                sel,
  input  logic [N_COARSE-1:0] coarse_th,
  input  logic [N_FINE-1:0]   fine_th,
  input  logic [N_PDAC-1:0]   pdac_g,
  output logic                clk_out
);

  localparam real EVAL_PS = 1.0;

  realtime t_next;      // time of the next natural transition
  int      gen;         // bumped by every injection, cancels a pending natural edge
  bit      inj_pend;    // SEL has risen, the reference edge is on its way
  int      seed = SEED; // state of the jitter generator

  // Random error of one half period, in ps.
  function automatic real jitter_ps();
    if (JITTER_PS <= 0.0) return 0.0;
    return JITTER_PS * real'($dist_normal(seed, 0, 1000000)) / 1.0e6;
  endfunction

  function automatic real period_ps();
    return T_BASE_PS - K_COARSE_PS * real'($countones(coarse_th))
                     - K_FINE_PS   * real'($countones(fine_th));
  endfunction

  function automatic real low_phase_ps(input bit injected);
    int unsigned on_units;
    on_units = N_PDAC - $countones(pdac_g);
    return period_ps() / 2.0 + jitter_ps()
           - (injected ? TAU0_PS : 0.0)
           - K_DIST_PS * (real'(on_units) - real'(N_PDAC_LO));
  endfunction

  always @(posedge sel) inj_pend = 1'b1;

  // Reference path of the mux.
  always @(posedge clk_ref) begin
    #(D_MUX_PS);
    if (inj_pend) begin
      inj_pend = 1'b0;
      gen      = gen + 1;
      clk_out  = 1'b0;
      t_next   = $realtime + 1.0e9;          // hold until the low phase is known
      #(EVAL_PS);
      t_next   = $realtime - EVAL_PS + low_phase_ps(1'b1);
    end
  end

  // Ring path.
  initial begin
    int      g;
    realtime t_fall;
    clk_out  = 1'b0;
    gen      = 0;
    inj_pend = 1'b0;
    t_next   = EVAL_PS + period_ps() / 2.0;
    forever begin
      g = gen;
      if (t_next - $realtime > STEP_PS) begin
        #(STEP_PS);
      end else begin
        #((t_next > $realtime) ? (t_next - $realtime) : 0.0);
        if (g == gen) begin
          if (!clk_out) begin
            clk_out = 1'b1;
            t_next  = $realtime + period_ps() / 2.0 + jitter_ps();
          end else if (inj_pend) begin
            t_next  = $realtime + STEP_PS;   // ring path blocked by the mux
          end else begin
            clk_out = 1'b0;
            t_fall  = $realtime;
            t_next  = t_fall + 1.0e9;
            #(EVAL_PS);
            if (g == gen) t_next = t_fall + low_phase_ps(1'b0);
          end
        end
      end
    end
  end

endmodule
