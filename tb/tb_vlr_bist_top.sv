// tb_vlr_bist_top: full-size end-to-end test of the top at its default
// parameters. All four systems run at the same time, each from its own
// driver:
//   single chain (247 flip-flops, 96 lent): hw_sys_driver, serial path
//     K = 32 + 96 = 128, Reset 1 clock, decompression 247 - 96 = 151 clocks;
//   4 chains of 62 (24 lent per chain): K = 32 + 4*24 = 128, Reset 25
//     clocks, decompression 62 - 24 = 38 clocks;
//   4 chains with phase shifter (chain 0 lent): K = 32 + 62 = 94, Reset 1
//     clock, decompression 62 clocks;
//   software scheme (32 chains of 46, 16-word decompressor): sw_sys_driver,
//     4 groups of 8 patterns.
// Each hardware driver probes its decompressor, encodes random test cubes
// as variable-length seeds in the record format, runs a session with random
// and deterministic patterns and checks cube coverage, clock count and
// signature. The software driver checks every clock against its model.
// Every driver counts its mechanisms (random patterns, Reset, seed shifts,
// decompression, seed-length growth, captures; seed loads, steps,
// concatenated patterns, flush) and counts a failure for one that never
// happened.
module tb_vlr_bist_top;
  import vlr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  initial #23 rst_n = 1;

  // single chain
  logic              s_mem_we, s_mem_wdata, s_start, s_done, s_fin;
  logic [12:0]       s_mem_waddr;
  logic [15:0]       s_nrand, s_ndet;
  logic [9:0]        s_base, s_d;
  ctrl_phase_e       s_phase;
  logic [31:0]       s_signature;
  logic [0:0][246:0] s_scan_q, s_cut_resp;
  int                s_checks, s_failures;
  // four chains
  logic              m_mem_we, m_mem_wdata, m_start, m_done, m_fin;
  logic [12:0]       m_mem_waddr;
  logic [15:0]       m_nrand, m_ndet;
  logic [9:0]        m_base, m_d;
  ctrl_phase_e       m_phase;
  logic [31:0]       m_signature;
  logic [3:0][61:0]  m_scan_q, m_cut_resp;
  int                m_checks, m_failures;
  // four chains, phase shifter
  logic              p_mem_we, p_mem_wdata, p_start, p_done, p_fin;
  logic [12:0]       p_mem_waddr;
  logic [15:0]       p_nrand, p_ndet;
  logic [9:0]        p_base, p_d;
  ctrl_phase_e       p_phase;
  logic [31:0]       p_signature;
  logic [3:0][61:0]  p_scan_q, p_cut_resp;
  int                p_checks, p_failures;
  // software scheme
  logic              w_mem_we, w_start, w_done, w_fin;
  logic [6:0]        w_mem_waddr;
  logic [31:0]       w_mem_wdata, w_signature;
  logic [15:0]       w_ngroups, w_pat_count;
  sw_phase_e         w_phase;
  logic [31:0][45:0] w_scan_q, w_cut_resp;
  int                w_checks, w_failures;

  vlr_bist_top dut (.*);

  hw_sys_driver #(.NS(1), .LS(247), .K(128), .R(1), .DC(151), .NAME("single chain")) drv_s (
    .clk, .rst_n, .mem_we(s_mem_we), .mem_waddr(s_mem_waddr), .mem_wdata(s_mem_wdata),
    .start(s_start), .nrand(s_nrand), .ndet(s_ndet), .base(s_base), .d(s_d),
    .phase(s_phase), .done(s_done), .signature(s_signature), .scan_q(s_scan_q),
    .cut_resp(s_cut_resp), .finished(s_fin), .checks(s_checks), .failures(s_failures));

  hw_sys_driver #(.NS(4), .LS(62), .K(128), .R(25), .DC(38), .NAME("4 chains")) drv_m (
    .clk, .rst_n, .mem_we(m_mem_we), .mem_waddr(m_mem_waddr), .mem_wdata(m_mem_wdata),
    .start(m_start), .nrand(m_nrand), .ndet(m_ndet), .base(m_base), .d(m_d),
    .phase(m_phase), .done(m_done), .signature(m_signature), .scan_q(m_scan_q),
    .cut_resp(m_cut_resp), .finished(m_fin), .checks(m_checks), .failures(m_failures));

  hw_sys_driver #(.NS(4), .LS(62), .K(94), .R(1), .DC(62), .NAME("4 chains, phase shifter")) drv_p (
    .clk, .rst_n, .mem_we(p_mem_we), .mem_waddr(p_mem_waddr), .mem_wdata(p_mem_wdata),
    .start(p_start), .nrand(p_nrand), .ndet(p_ndet), .base(p_base), .d(p_d),
    .phase(p_phase), .done(p_done), .signature(p_signature), .scan_q(p_scan_q),
    .cut_resp(p_cut_resp), .finished(p_fin), .checks(p_checks), .failures(p_failures));

  sw_sys_driver #(.NG(4), .NAME("software scheme")) drv_w (
    .clk, .rst_n, .mem_we(w_mem_we), .mem_waddr(w_mem_waddr), .mem_wdata(w_mem_wdata),
    .start(w_start), .ngroups(w_ngroups), .phase(w_phase), .done(w_done),
    .pat_count(w_pat_count), .signature(w_signature), .scan_q(w_scan_q),
    .cut_resp(w_cut_resp), .finished(w_fin), .checks(w_checks), .failures(w_failures));

  function automatic int total_checks();
    return s_checks + m_checks + p_checks + w_checks;
  endfunction
  function automatic int total_failures();
    return s_failures + m_failures + p_failures + w_failures;
  endfunction

  initial begin : wd
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures() + 1);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (s_fin && m_fin && p_fin && w_fin);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end
endmodule
