// tb_sw_decomp_system: the processor-based scheme at its defaults (32 chains
// of 46, 16-word decompressor with X^16 + X^9 + X^5 + 1, tap 15, rotates 1
// and 2, groups of 8 patterns) driven by sw_sys_driver with 3 groups of
// random seed words: phases, chain contents after every clock, pattern
// count and signature are compared with the driver's model.
module tb_sw_decomp_system;
  import vlr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  initial #23 rst_n = 1;

  logic              mem_we, start, busy, done, capture, finished;
  logic [6:0]        mem_waddr;
  logic [31:0]       mem_wdata, signature;
  logic [15:0]       ngroups, pat_count;
  sw_phase_e         phase;
  logic [31:0][45:0] scan_q, cut_resp;
  int                checks, failures;

  sw_decomp_system dut (
    .clk, .rst_n, .mem_we, .mem_waddr, .mem_wdata, .start, .cfg_ngroups(ngroups),
    .busy, .done, .phase, .pat_count, .signature, .scan_q, .cut_resp, .capture);

  sw_sys_driver #(.NG(3), .NAME("software scheme")) drv (
    .clk, .rst_n, .mem_we, .mem_waddr, .mem_wdata, .start, .ngroups,
    .phase, .done, .pat_count, .signature, .scan_q, .cut_resp,
    .finished, .checks, .failures);

  initial begin : wd
    repeat (100000) @(posedge clk);
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
