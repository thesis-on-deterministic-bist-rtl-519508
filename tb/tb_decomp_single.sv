// tb_decomp_single: single-chain decompressor (P0 PRPG) driving a 40-bit
// scan chain that lends 16 flip-flops. The reference is one flat bit list:
// 32 PRPG stages followed by the 40 chain flip-flops, shifted as a whole.
// Its input is the seed bit under Shift, otherwise the XOR of the P0 taps
// (list positions 31, 28, 20, 2) and, under Decompression, of list position
// 32+15. Reset zeroes the PRPG and the first 16 chain positions.
// Random bursts of the four operations (Reset, seed shift, decompression,
// random mode, plus idle clocks) are applied and both the PRPG state and the
// chain are compared after every clock. Then a seed of length 20 is loaded
// after Reset and the first 20 list positions must hold it, the rest zero.
module tb_decomp_single;
  import vlr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LS = 40, SEG = 16, K = 32 + LS;
  logic rst_n;
  decomp_ctrl_t ctrl;
  logic seg_tail, chain_in, seg_clear;
  logic [31:0] prpg_state;
  logic [LS-1:0] q;
  logic so;

  decomp_single dut (.clk, .rst_n, .ctrl, .seg_tail, .chain_in, .seg_clear, .prpg_state);
  scan_chain #(.LEN(LS), .SEG(SEG)) u_chain (.clk, .rst_n, .en(ctrl.en), .se(1'b1), .si(chain_in),
    .seg_clear, .pi('0), .q, .so, .seg_tail);

  initial begin : wd
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit p [K];     // flat reference list

  task automatic model_clock();
    bit n [K];
    bit in;
    if (!ctrl.en) return;
    in = ctrl.shift ? ctrl.seed_in
                    : (p[31] ^ p[28] ^ p[20] ^ p[2] ^ (ctrl.decomp & p[32 + SEG - 1]));
    n[0] = in;
    for (int k = 1; k < K; k++) n[k] = p[k-1];
    if (ctrl.reset) for (int k = 0; k < 32 + SEG; k++) n[k] = 0;
    p = n;
  endtask

  task automatic compare(input string what);
    automatic int bad = 0;
    for (int k = 0; k < 32; k++) if (prpg_state[k] != p[k]) bad++;
    for (int k = 0; k < LS; k++) if (q[k] != p[32 + k]) bad++;
    checks++;
    if (bad) begin failures++; $display("FAIL: %s (%0d bits differ)", what, bad); end
  endtask

  initial begin
    logic [19:0] seed;
    int op, burst = 0;
    rst_n = 0; ctrl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (p[k]) p[k] = 0;
    p[0] = 1;    // PRPG power-on value INIT = 1
    compare("after power-on reset");
    for (int t = 0; t < 3000; t++) begin
      // operations come in bursts, as a controller issues them
      if (burst == 0) begin
        op    = $urandom_range(0, 12);
        burst = (op == 1) ? $urandom_range(1, 8) : $urandom_range(1, 60);
      end
      burst--;
      ctrl = '0;
      ctrl.en = (op != 0);
      case (op)
        1:       ctrl.reset = 1;
        2, 3:    begin ctrl.shift = 1; ctrl.seed_in = $urandom_range(0, 1); end
        4, 5, 6, 7: ctrl.decomp = 1;
        default: ;
      endcase
      model_clock();
      @(negedge clk);
      compare($sformatf("clock %0d op %0d", t, op));
    end
    // variable-length seed placement
    seed = 20'($urandom());
    ctrl = '0; ctrl.en = 1; ctrl.reset = 1; model_clock(); @(negedge clk);
    ctrl.reset = 0; ctrl.shift = 1;
    for (int b = 0; b < 20; b++) begin ctrl.seed_in = seed[b]; model_clock(); @(negedge clk); end
    ctrl = '0;
    checks++;
    begin
      automatic int bad = 0;
      for (int k = 0; k < 20; k++) if (prpg_state[k] != seed[19 - k]) bad++;
      for (int k = 20; k < 32; k++) if (prpg_state[k]) bad++;
      for (int k = 0; k < SEG; k++) if (q[k]) bad++;
      if (bad) begin failures++; $display("FAIL: seed placement"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
