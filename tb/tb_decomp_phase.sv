// tb_decomp_phase: 4-chain decompressor with a phase shifter; chain 0 (12
// flip-flops) is lent entirely. Reference: a flat list of the 32 PRPG
// stages followed by chain 0 (as for one chain, feedback tap at the last
// flip-flop of chain 0 under Decompression, Reset clearing PRPG and chain 0),
// and chains 1..3 fed by the PRPG output XOR stages 8j-1 and (8j+15) mod 31. Random operation
// sequences are compared after every clock.
module tb_decomp_phase;
  import vlr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NS = 4, LS = 12, SEG = 12, K = 32 + LS;
  logic rst_n;
  decomp_ctrl_t ctrl;
  logic [NS-1:0] chain_in, so, st;
  logic seg_clear;
  logic [31:0] prpg_state;
  logic [NS-1:0][LS-1:0] q;

  decomp_phase #(.NS(NS)) dut (.clk, .rst_n, .ctrl, .seg_tail(st[0]), .chain_in, .seg_clear, .prpg_state);
  for (genvar j = 0; j < NS; j++) begin : g_ch
    scan_chain #(.LEN(LS), .SEG(SEG)) u_chain (.clk, .rst_n, .en(ctrl.en), .se(1'b1),
      .si(chain_in[j]), .seg_clear((j == 0) ? seg_clear : 1'b0), .pi('0), .q(q[j]),
      .so(so[j]), .seg_tail(st[j]));
  end

  initial begin : wd
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit p [K];
  bit ch [NS][LS];

  task automatic model_clock();
    bit n [K];
    bit nch [NS][LS];
    if (!ctrl.en) return;
    for (int j = 1; j < NS; j++) begin
      nch[j][0] = p[31] ^ p[8*j-1] ^ p[(8*j-1+16) % 31];
      for (int k = 1; k < LS; k++) nch[j][k] = ch[j][k-1];
    end
    n[0] = ctrl.shift ? ctrl.seed_in : (p[31] ^ p[28] ^ p[20] ^ p[2] ^ (ctrl.decomp & p[K-1]));
    for (int k = 1; k < K; k++) n[k] = p[k-1];
    if (ctrl.reset) foreach (n[k]) n[k] = 0;
    p = n;
    for (int j = 1; j < NS; j++) ch[j] = nch[j];
  endtask

  task automatic compare(input string what);
    automatic int bad = 0;
    for (int k = 0; k < 32; k++) if (prpg_state[k] != p[k]) bad++;
    for (int k = 0; k < LS; k++) if (q[0][k] != p[32 + k]) bad++;
    for (int j = 1; j < NS; j++) for (int k = 0; k < LS; k++) if (q[j][k] != ch[j][k]) bad++;
    checks++;
    if (bad) begin failures++; $display("FAIL: %s (%0d bits differ)", what, bad); end
  endtask

  initial begin
    int op, burst = 0;
    rst_n = 0; ctrl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (p[k]) p[k] = 0;
    p[0] = 1;
    foreach (ch[j, k]) ch[j][k] = 0;
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
