// tb_hw_workloads: the hardware decompressor on further configurations of
// the experiments, all running at once, each checked end to end by
// hw_sys_driver (probe, encode random cubes as variable-length seeds, run a
// session, check cube coverage, clock count and signature):
//   s9234 with 8, 16 and 32 scan chains (chains of 31, 16 and 8; 96 lent
//     flip-flops in all, i.e. 12, 6 and 3 per chain);
//   s9234 with 4 chains and the alternative PRPG polynomials P1 and P5
//     (P5 = X^32 + 1, where only the chain feedbacks make it an LFSR worth
//     having);
//   s13207 with 4 chains of 175 (192 lent flip-flops, 48 per chain);
//   s15850 with one chain of 611 (256 lent flip-flops);
//   s38417 with one chain of 1664 (480 lent flip-flops, a 512-bit seed path);
//   s38584 with 32 chains of 46 (224 lent flip-flops, 7 per chain).
// Random cubes have up to K - 20 specified bits, K = 32 + lent flip-flops.
// Chain counts, chain lengths and lent flip-flop counts are the published
// configurations; the 32-bit PRPG and the random cubes in place of the real
// ones are this testbench's choices. The copies share one clock and reset;
// the test ends when every copy has finished, or after 3 million clocks
// (watchdog, counted as a failure).
module tb_hw_workloads;
  import vlr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  initial #23 rst_n = 1;

  localparam int NW = 9;
  logic [NW-1:0] fin;
  int ck [NW];
  int fl [NW];

  hw_workload #(.NS(8),  .LS(31),  .SEG(12), .NAME("s9234, 8 chains"))  w0 (.clk, .rst_n, .finished(fin[0]), .checks(ck[0]), .failures(fl[0]));
  hw_workload #(.NS(16), .LS(16),  .SEG(6),  .NAME("s9234, 16 chains")) w1 (.clk, .rst_n, .finished(fin[1]), .checks(ck[1]), .failures(fl[1]));
  hw_workload #(.NS(32), .LS(8),   .SEG(3),  .NAME("s9234, 32 chains")) w2 (.clk, .rst_n, .finished(fin[2]), .checks(ck[2]), .failures(fl[2]));
  hw_workload #(.NS(4),  .LS(62),  .SEG(24), .POLY(POLY_P1), .NAME("s9234, 4 chains, P1")) w3 (.clk, .rst_n, .finished(fin[3]), .checks(ck[3]), .failures(fl[3]));
  hw_workload #(.NS(4),  .LS(62),  .SEG(24), .POLY(POLY_P5), .NAME("s9234, 4 chains, P5")) w4 (.clk, .rst_n, .finished(fin[4]), .checks(ck[4]), .failures(fl[4]));
  hw_workload #(.NS(4),  .LS(175), .SEG(48), .NAME("s13207, 4 chains")) w5 (.clk, .rst_n, .finished(fin[5]), .checks(ck[5]), .failures(fl[5]));
  hw_workload #(.NS(1),  .LS(611), .SEG(256), .NAME("s15850, 1 chain")) w6 (.clk, .rst_n, .finished(fin[6]), .checks(ck[6]), .failures(fl[6]));
  hw_workload #(.NS(1),  .LS(1664), .SEG(480), .NAME("s38417, 1 chain")) w7 (.clk, .rst_n, .finished(fin[7]), .checks(ck[7]), .failures(fl[7]));
  hw_workload #(.NS(32), .LS(46),  .SEG(7),   .NAME("s38584, 32 chains")) w8 (.clk, .rst_n, .finished(fin[8]), .checks(ck[8]), .failures(fl[8]));

  function automatic int sum(input int a [NW]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin : wd
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(ck), sum(fl) + 1);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (&fin);
    $display("TB_RESULT checks=%0d failures=%0d", sum(ck), sum(fl));
    $finish;
  end
endmodule
