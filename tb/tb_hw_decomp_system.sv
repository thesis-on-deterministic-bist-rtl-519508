// tb_hw_decomp_system: the multiple-chain system at its defaults (4 chains
// of 62, 24 flip-flops lent per chain, P0 PRPG) driven end to end by
// hw_sys_driver: probe, encode random test cubes as variable-length seeds,
// run a session and check every pattern against its cube.
module tb_hw_decomp_system;
  import vlr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  initial #23 rst_n = 1;

  logic              mem_we, mem_wdata, start, busy, done, finished;
  logic [12:0]       mem_waddr;
  logic [15:0]       nrand, ndet, pat_count;
  logic [9:0]        base, d, seed_len;
  ctrl_phase_e       phase;
  logic [31:0]       signature, prpg_state;
  logic [3:0][61:0]  scan_q, cut_resp;
  logic              capture;
  int                checks, failures;

  hw_decomp_system dut (
    .clk, .rst_n, .mem_we, .mem_waddr, .mem_wdata,
    .start, .cfg_nrand(nrand), .cfg_ndet(ndet), .cfg_base(base), .cfg_d(d),
    .busy, .done, .phase, .pat_count, .seed_len, .signature, .prpg_state,
    .scan_q, .cut_resp, .capture);

  hw_sys_driver #(.NS(4), .LS(62), .K(128), .R(25), .DC(38), .NAME("4 chains")) drv (
    .clk, .rst_n, .mem_we, .mem_waddr, .mem_wdata, .start, .nrand, .ndet, .base, .d,
    .phase, .done, .signature, .scan_q, .cut_resp, .finished, .checks, .failures);

  initial begin : wd
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
