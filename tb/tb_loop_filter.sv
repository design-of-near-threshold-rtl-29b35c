// tb_loop_filter: sequencer and integrators of the digital loop filter.
// Random PD decisions are delivered in most reference cycles (pd_tog toggles
// shortly after the rising reference edge, as after a real detection); in
// some cycles none comes. A reference model in the testbench tracks the
// expected mode and codes:
//   mode FREQ -> DCDL -> DIST -> FREQ, EN_Dist only in DIST, gating only in DCDL;
//   FREQ: up -> fine+1, dn -> fine-1 (0..128);
//   DCDL: up -> dcdl-1, dn -> dcdl+1 (0..255);
//   DIST: up -> dper-1, dn -> dper+1 (0..24);
//   no decision -> no change; en_esed = 0 -> codes frozen, mode FREQ.
// Long runs of one decision drive the codes into both saturation limits.
`timescale 1ps/1fs
module tb_loop_filter;
  import ilcm_pkg::*;
  logic clk_ref = 1'b0, rst_n = 1'b1, en_esed = 1'b0, pd_up = 1'b0, pd_tog = 1'b0;
  logic en_dist, gate_inj;
  det_mode_e mode;
  logic [7:0] fine_code, dcdl_code;
  logic [4:0] dper_code;
  int checks = 0, failures = 0;

  initial #1 rst_n = 1'b0;   // asynchronous reset edge at 1 ps

  loop_filter dut (.*);

  always #5000 clk_ref = ~clk_ref;

  initial begin
    #(10000 * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  int m_mode = 0, m_fine = 64, m_dcdl = 100, m_dper = 16;
  int sat_hi = 0, sat_lo = 0;

  task automatic cycle(input bit esed, input bit give, input bit up);
    en_esed = esed;
    @(posedge clk_ref);
    #1500;
    chk(int'(mode) == m_mode, "mode sequence");
    chk(en_dist == (esed && m_mode == 2), "EN_Dist");
    chk(gate_inj == (esed && m_mode == 1), "injection gating");
    if (give) begin pd_up = up; pd_tog = ~pd_tog; end
    @(negedge clk_ref);
    #10;
    if (esed) begin
      if (give) begin
        case (m_mode)
          0: m_fine = up ? ((m_fine < 128) ? m_fine + 1 : 128) : ((m_fine > 0) ? m_fine - 1 : 0);
          1: m_dcdl = up ? ((m_dcdl > 0) ? m_dcdl - 1 : 0) : ((m_dcdl < 255) ? m_dcdl + 1 : 255);
          default: m_dper = up ? ((m_dper > 0) ? m_dper - 1 : 0) : ((m_dper < 24) ? m_dper + 1 : 24);
        endcase
      end
      m_mode = (m_mode + 1) % 3;
    end else m_mode = 0;
    chk(int'(fine_code) == m_fine && int'(dcdl_code) == m_dcdl && int'(dper_code) == m_dper,
        $sformatf("codes %0d/%0d/%0d expected %0d/%0d/%0d", fine_code, dcdl_code, dper_code, m_fine, m_dcdl, m_dper));
    if (m_fine == 128 || m_dper == 24 || m_dcdl == 255) sat_hi++;
    if (m_fine == 0 || m_dper == 0 || m_dcdl == 0) sat_lo++;
  endtask

  initial begin
    #2000 rst_n = 1'b1;
    #100;
    chk(fine_code == 8'd64 && dcdl_code == 8'd100 && dper_code == 5'd16, "reset codes");
    repeat (10) cycle(1'b0, 1'b1, $urandom_range(1) == 1);      // frozen
    repeat (300) cycle(1'b1, $urandom_range(9) != 0, $urandom_range(1) == 1);
    repeat (400) cycle(1'b1, 1'b1, 1'b1);                       // all up
    repeat (800) cycle(1'b1, 1'b1, 1'b0);                       // all down
    repeat (5) cycle(1'b0, 1'b1, 1'b1);
    chk(sat_hi > 0 && sat_lo > 0, "both saturation limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
