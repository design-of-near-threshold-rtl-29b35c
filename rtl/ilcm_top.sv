// ilcm_top: near-threshold ring-oscillator injection-locked clock multiplier
// with an edge-selective error detector (ESED).
//
// CLK_OUT = N_DIV x CLK_REF. Once per reference cycle the reference edge is
// injected into the DCO through its input mux and replaces one falling edge,
// which wipes out the phase error the ring has accumulated. Three background
// loops keep the injection clean, and all three share one detector:
//
//   frequency   rising CLK_OUT edges just before and just after the injected
//               falling edge are one period apart only if N*T = T_REF. The
//               pulse distortion moves both edges alike and so drops out.
//   DCDL        with the injection gated for a cycle, two free-running rising
//               edges are exactly one period apart; this trims the DCDL to T.
//   distortion  the falling edge after the injected one comes T - tau_err
//               later; comparing it with the DCDL delay drives D_PERIOD, which
//               sets the P-RDAC that acts only in that first cycle.
//
// Path of a measurement: divider (CLK_DIV one cycle before the injection) ->
// edge detector (E1, E2; EN_Dist picks rising or falling edges) -> DCDL
// (E1 delayed by about T) -> bang-bang PD -> loop filter (codes, EN_Dist,
// gating of the injection) -> frequency DACs / P-RDAC of the DCO.
//
// Interface: clk_ref, rst_n, en_inj (injection on), en_esed (calibration on),
// coarse_code (configuration) in; clk_out and the loop state out.
// Timing: the digital loop runs once per reference cycle; each of the three
// loops is updated every third cycle.
// Parameters: N is the multiplication ratio; the DCO_* and DCDL_* constants
// set the behavioural models (defaults: the 0.5 V / 1 GHz operating point;
// the 0.4 V / 300 MHz point needs a slower DCO and a longer DCDL;
// DCO_JITTER_PS adds ring jitter, 0 by default).
//
// The partitioning and the signal flow follow the original chip. The DCO and the
// DCDL are behavioural models, so this top is for simulation; every other
// block is synthesizable.
`timescale 1ps/1fs
module ilcm_top
  import ilcm_pkg::*;
#(
  parameter int unsigned N               = ilcm_pkg::N_DIV,
  // Constants of the behavioural DCO and DCDL (defaults: 0.5 V, 1 GHz corner).
  parameter real         DCO_T_BASE_PS    = 1112.0,
  parameter real         DCO_K_COARSE_PS  = 10.0,
  parameter real         DCO_K_FINE_PS    = 0.5,
  parameter real         DCO_K_DIST_PS    = 1.0,
  parameter real         DCO_TAU0_PS      = 6.0,
  parameter real         DCO_D_MUX_PS     = 150.0,
  parameter real         DCO_JITTER_PS    = 0.0,
  parameter int          DCO_SEED         = 1,
  parameter real         DCDL_D_MIN_PS    = 800.0,
  parameter real         DCDL_K_PS        = 2.0,
  parameter int unsigned DCDL_INIT        = 100
) (
  input  logic                clk_ref,
  input  logic                rst_n,
  input  logic                en_inj,
  input  logic                en_esed,
  input  logic [COARSE_W-1:0] coarse_code,
  output logic                clk_out,
  output logic [FINE_W-1:0]   fine_code,
  output logic [DCDL_W-1:0]   dcdl_code,
  output logic [DPER_W-1:0]   dper_code,
  output det_mode_e           mode
);

  logic                sel, selb, pulse;
  logic                clk_div;
  logic [3:0]          div_cnt;
  logic                e1, e2, e1d;
  logic                pd_up, pd_tog;
  logic                en_dist, gate_inj;
  logic [N_COARSE-1:0] coarse_th;
  logic [N_FINE-1:0]   fine_th;
  logic [N_PDAC-1:0]   pdac_g;

  // ---------------- oscillator control ----------------
  eil u_eil (
    .clk_ref (clk_ref),
    .clk_out (clk_out),
    .rst_n   (rst_n),
    .en_inj  (en_inj && !gate_inj),
    .sel     (sel),
    .selb    (selb)
  );

  pulse_gen u_pulse (
    .sel     (sel),
    .clk_out (clk_out),
    .rst_n   (rst_n),
    .pulse   (pulse)
  );

  freq_dac_ctrl u_fdac (
    .coarse_code (coarse_code),
    .fine_code   (fine_code),
    .coarse_th   (coarse_th),
    .fine_th     (fine_th)
  );

  pdac_driver u_pdac (
    .dper_code (dper_code),
    .pulse     (pulse),
    .pdac_g    (pdac_g)
  );

  dco_model #(
    .T_BASE_PS   (DCO_T_BASE_PS),
    .K_COARSE_PS (DCO_K_COARSE_PS),
    .K_FINE_PS   (DCO_K_FINE_PS),
    .K_DIST_PS   (DCO_K_DIST_PS),
    .TAU0_PS     (DCO_TAU0_PS),
    .D_MUX_PS    (DCO_D_MUX_PS),
    .JITTER_PS   (DCO_JITTER_PS),
    .SEED        (DCO_SEED)
  ) u_dco (
    .clk_ref   (clk_ref),
    .sel       (sel),
    .coarse_th (coarse_th),
    .fine_th   (fine_th),
    .pdac_g    (pdac_g),
    .clk_out   (clk_out)
  );

  // ---------------- shared edge-selective error detector ----------------
  divider #(.N_DIV(N), .W(4)) u_div (
    .clk_out (clk_out),
    .rst_n   (rst_n),
    .selb    (selb),
    .clk_div (clk_div),
    .cnt     (div_cnt)
  );

  edge_detector u_edet (
    .clk_out (clk_out),
    .clk_div (clk_div),
    .en_dist (en_dist),
    .rst_n   (rst_n),
    .e1      (e1),
    .e2      (e2)
  );

  dcdl_model #(.D_MIN_PS(DCDL_D_MIN_PS), .K_PS(DCDL_K_PS)) u_dcdl (
    .din  (e1),
    .code (dcdl_code),
    .dout (e1d)
  );

  bbpd u_pd (
    .e1d   (e1d),
    .e2    (e2),
    .rst_n (rst_n),
    .up    (pd_up),
    .tog   (pd_tog)
  );

  // ---------------- digital loop filter ----------------
  loop_filter #(.DCDL_INIT(DCDL_INIT)) u_lf (
    .clk_ref   (clk_ref),
    .rst_n     (rst_n),
    .en_esed   (en_esed),
    .pd_up     (pd_up),
    .pd_tog    (pd_tog),
    .en_dist   (en_dist),
    .gate_inj  (gate_inj),
    .mode      (mode),
    .fine_code (fine_code),
    .dcdl_code (dcdl_code),
    .dper_code (dper_code)
  );

endmodule
