// tb_decomp_multi: 4-chain decompressor (P0 PRPG) with chains of 12
// flip-flops that lend 5 each. The reference keeps the PRPG and the four
// chains as bit arrays and applies the connection rule written out for four
// chains: the feedback of chain i enters PRPG stages (i+1) mod 4 and
// (i+2) mod 4, i.e. stage s receives chains (s-1) mod 4 and (s-2) mod 4;
// chain 0 takes the PRPG output, chain j the PRPG output XOR stages 8j-1 and (8j+15) mod 31, or
// under Shift the last lent flip-flop of chain j-1 unless Reset is high.
// Random bursts of operations are compared after every clock; then Reset for
// SEG+1 clocks must leave the whole serial path zero, and a 60-bit seed
// shifted in must appear along the path PRPG -> chain 0 -> chain 1 -> ...
module tb_decomp_multi;
  import vlr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NS = 4, LS = 12, SEG = 5;
  logic rst_n;
  decomp_ctrl_t ctrl;
  logic [NS-1:0] seg_tail, chain_in, so;
  logic [31:0] prpg_state;
  logic [NS-1:0][LS-1:0] q;

  decomp_multi #(.NS(NS)) dut (.clk, .rst_n, .ctrl, .seg_tail, .chain_in, .prpg_state);
  for (genvar j = 0; j < NS; j++) begin : g_ch
    scan_chain #(.LEN(LS), .SEG(SEG)) u_chain (.clk, .rst_n, .en(ctrl.en), .se(1'b1),
      .si(chain_in[j]), .seg_clear(1'b0), .pi('0), .q(q[j]), .so(so[j]), .seg_tail(seg_tail[j]));
  end

  initial begin : wd
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit pr [32];
  bit ch [NS][LS];

  task automatic model_clock();
    bit npr [32];
    bit nch [NS][LS];
    bit fb [NS];
    bit cin [NS];
    bit d0;
    if (!ctrl.en) return;
    for (int i = 0; i < NS; i++) fb[i] = ctrl.decomp & ch[i][SEG-1];
    d0 = ctrl.shift ? ctrl.seed_in : (pr[31] ^ pr[28] ^ pr[20] ^ pr[2]);
    npr[0] = d0;
    for (int s = 1; s < 32; s++) npr[s] = pr[s-1];
    for (int s = 0; s < NS; s++) npr[s] ^= fb[(s + 3) % 4] ^ fb[(s + 2) % 4];
    if (ctrl.reset) foreach (npr[s]) npr[s] = 0;
    cin[0] = pr[31];
    for (int j = 1; j < NS; j++)
      cin[j] = ctrl.shift ? (ch[j-1][SEG-1] & !ctrl.reset) : (pr[31] ^ pr[8*j-1] ^ pr[(8*j-1+16) % 31]);
    for (int j = 0; j < NS; j++) begin
      nch[j][0] = cin[j];
      for (int k = 1; k < LS; k++) nch[j][k] = ch[j][k-1];
    end
    pr = npr;
    ch = nch;
  endtask

  task automatic compare(input string what);
    automatic int bad = 0;
    for (int k = 0; k < 32; k++) if (prpg_state[k] != pr[k]) bad++;
    for (int j = 0; j < NS; j++) for (int k = 0; k < LS; k++) if (q[j][k] != ch[j][k]) bad++;
    checks++;
    if (bad) begin failures++; $display("FAIL: %s (%0d bits differ)", what, bad); end
  endtask

  initial begin
    logic [59:0] seed;
    int op, bad, burst = 0;
    rst_n = 0; ctrl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (pr[k]) pr[k] = 0;
    pr[0] = 1;
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
        1:       begin ctrl.reset = 1; ctrl.shift = $urandom_range(0, 1); end
        2, 3:    begin ctrl.shift = 1; ctrl.seed_in = $urandom_range(0, 1); end
        4, 5, 6, 7: ctrl.decomp = 1;
        default: ;
      endcase
      model_clock();
      @(negedge clk);
      compare($sformatf("clock %0d op %0d", t, op));
    end
    // Reset by shifting, then a 60-bit seed along the serial path
    ctrl = '0; ctrl.en = 1; ctrl.shift = 1; ctrl.reset = 1;
    repeat (SEG + 1) begin model_clock(); @(negedge clk); end
    checks++;
    if (prpg_state != 0 || q[0][SEG-1:0] != 0 || q[1][SEG-1:0] != 0 || q[2][SEG-1:0] != 0 || q[3][SEG-1:0] != 0) begin
      failures++; $display("FAIL: serial path not cleared by Reset");
    end
    ctrl.reset = 0;
    seed = {$urandom(), $urandom()};
    for (int b = 0; b < 60; b++) begin ctrl.seed_in = seed[b]; model_clock(); @(negedge clk); end
    ctrl = '0;
    bad = 0;
    // path position x: 0..31 PRPG, then SEG flip-flops per chain
    for (int x = 0; x < 32 + NS * SEG; x++) begin
      logic v, e;
      v = (x < 32) ? prpg_state[x] : q[(x - 32) / SEG][(x - 32) % SEG];
      e = (x < 60) ? seed[59 - x] : 1'b0;
      if (v != e) bad++;
    end
    checks++;
    if (bad) begin failures++; $display("FAIL: seed placement along the serial path (%0d)", bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
