// loop_filter: digital loop filter and detection sequencer.
//
// One edge-selective error detector serves three calibration loops. This
// block decides, one reference cycle at a time, which error the detector
// looks at, and integrates each PD decision into the matching code:
//
//   MODE_FREQ  EN_Dist=0, injection on.  Rising edges before/after the
//              injection. UP (the pair is closer than the DCDL delay, the
//              DCO is slow) raises the fine frequency code.
//   MODE_DCDL  EN_Dist=0, injection gated. Two free-running rising edges,
//              exactly one DCO period apart. UP (the DCDL is longer than a
//              period) lowers the DCDL code.
//   MODE_DIST  EN_Dist=1, injection on. Injected falling edge and the next
//              one. UP (the period after the injection is short) lowers
//              D_PERIOD, which lengthens that period.
//
// The modes follow each other FREQ -> DCDL -> DIST -> FREQ. Each code is a
// saturating up/down counter (a first-order bang-bang integrator).
// With en_esed = 0 the codes hold, the mode stays FREQ and nothing is gated,
// which leaves a plain injection-locked oscillator.
//
// Interface: clk_ref, rst_n, en_esed, pd_up, pd_tog in; en_dist, gate_inj,
// mode and the three codes out.
// Timing: runs on the falling edge of CLK_REF, half a reference period away
// from the injection, when the detector is idle. A decision made during the
// cycle (pd_tog changed) is applied to the code of the current mode and the
// mode then advances, so EN_Dist and the gating are stable from half a cycle
// before the next injection until half a cycle after it.
//
// Which codes it drives and that it produces EN_Dist and the gating follow
// the original chip. The mode order, the unit step and the initial codes are this
// implementation's choices.
`timescale 1ps/1fs
module loop_filter #(
  parameter int unsigned FINE_W    = ilcm_pkg::FINE_W,
  parameter int unsigned FINE_MAX  = ilcm_pkg::N_FINE,
  parameter int unsigned DCDL_W    = ilcm_pkg::DCDL_W,
  parameter int unsigned DPER_W    = ilcm_pkg::DPER_W,
  parameter int unsigned DPER_MAX  = ilcm_pkg::N_PDAC,
  parameter int unsigned FINE_INIT = 64,
  parameter int unsigned DCDL_INIT = 100,
  parameter int unsigned DPER_INIT = 16
) (
  input  logic              clk_ref,
  input  logic              rst_n,
  input  logic              en_esed,
  input  logic              pd_up,
  input  logic              pd_tog,
  output logic              en_dist,
  output logic              gate_inj,
  output ilcm_pkg::det_mode_e mode,
  output logic [FINE_W-1:0] fine_code,
  output logic [DCDL_W-1:0] dcdl_code,
  output logic [DPER_W-1:0] dper_code
);

  localparam int unsigned DCDL_MAX = (1 << DCDL_W) - 1;

  logic      tog_q;
  logic      valid;
  import ilcm_pkg::*;

  det_mode_e mode_nxt;

  assign valid = (pd_tog != tog_q);

  always_comb begin
    unique case (mode)
      MODE_FREQ: mode_nxt = MODE_DCDL;
      MODE_DCDL: mode_nxt = MODE_DIST;
      default:   mode_nxt = MODE_FREQ;
    endcase
  end

  always_ff @(negedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      tog_q     <= 1'b0;
      mode      <= MODE_FREQ;
      fine_code <= FINE_W'(FINE_INIT);
      dcdl_code <= DCDL_W'(DCDL_INIT);
      dper_code <= DPER_W'(DPER_INIT);
    end else begin
      tog_q <= pd_tog;
      if (!en_esed) begin
        mode <= MODE_FREQ;
      end else begin
        if (valid) begin
          unique case (mode)
            MODE_FREQ:
              if (pd_up) begin
                if (fine_code != FINE_W'(FINE_MAX)) fine_code <= fine_code + 1'b1;
              end else begin
                if (fine_code != '0)                fine_code <= fine_code - 1'b1;
              end
            MODE_DCDL:
              if (pd_up) begin
                if (dcdl_code != '0)                dcdl_code <= dcdl_code - 1'b1;
              end else begin
                if (dcdl_code != DCDL_W'(DCDL_MAX)) dcdl_code <= dcdl_code + 1'b1;
              end
            default:
              if (pd_up) begin
                if (dper_code != '0)                dper_code <= dper_code - 1'b1;
              end else begin
                if (dper_code != DPER_W'(DPER_MAX)) dper_code <= dper_code + 1'b1;
              end
          endcase
        end
        mode <= mode_nxt;
      end
    end
  end

  assign en_dist  = en_esed && (mode == MODE_DIST);
  assign gate_inj = en_esed && (mode == MODE_DCDL);

endmodule
