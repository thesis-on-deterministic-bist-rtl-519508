// sw_sys_driver: testbench driver and reference model for one
// sw_decomp_system (alone or inside the top).
//
// It writes NG groups of random seed words into the seed memory, starts a
// session and runs an independent model of the processor-based scheme in
// lock step: the decompressor as a plain list of L words (stage i of all
// segments in word i; one step outputs word 0, appends word 0 XOR the
// feedback words XOR the rotated tap words, and drops word 0), N scan
// chains of LS bits that shift the output word in, and the one's-complement
// sum of every word shifted out. The expected phase of every clock follows
// from the session: per group L load clocks, then G times LS shift clocks
// and one capture; LS flush clocks at the end.
// Checked after every clock: phase and all N*LS chain bits. Checked per
// session: pattern count, final signature against the model, and a second
// session with a different circuit response must change the signature.
// The circuit under test is a stand-in: chain contents rotated by one
// position and XORed with a constant. Mechanisms counted (a failure for
// each one that never happened): seed loads, decompressor steps, captures,
// patterns decompressed without reseeding (concatenation), flush clocks.
module sw_sys_driver
  import vlr_pkg::*;
#(
  parameter int unsigned  N        = 32,
  parameter int unsigned  L        = 16,
  parameter logic [L-1:0] FB_MASK  = L'((1 << 9) | (1 << 5)),
  parameter logic [L-1:0] TAP_MASK = L'(1 << 15),
  parameter logic [N-1:0] ROT_MASK = N'((1 << 1) | (1 << 2)),
  parameter int unsigned  LS       = 46,
  parameter int unsigned  G        = 8,
  parameter int unsigned  AW       = 7,
  parameter int unsigned  NG       = 3,
  parameter string        NAME     = "sw"
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 mem_we,
  output logic [AW-1:0]        mem_waddr,
  output logic [N-1:0]         mem_wdata,
  output logic                 start,
  output logic [15:0]          ngroups,
  input  sw_phase_e            phase,
  input  logic                 done,
  input  logic [15:0]          pat_count,
  input  logic [N-1:0]         signature,
  input  logic [N-1:0][LS-1:0] scan_q,
  output logic [N-1:0][LS-1:0] cut_resp,
  output logic                 finished,
  output int                   checks,
  output int                   failures
);

  logic [N-1:0][LS-1:0] cut_mask;
  logic [N-1:0]         seeds [$];
  int n_load, n_step, n_capt, n_concat, n_flush;

  always_comb
    for (int j = 0; j < N; j++)
      cut_resp[j] = {scan_q[j][LS-2:0], scan_q[(j + 1) % N][LS-1]} ^ cut_mask[j];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%s]: %s", NAME, what); end
  endtask

  function automatic logic [N-1:0] rotl(input logic [N-1:0] w, input int a);
    return (w << a) | (w >> (N - a));
  endfunction

  function automatic logic [N-1:0] oc_add(input logic [N-1:0] a, input logic [N-1:0] b);
    logic [N:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[N-1:0] + N'(s[N]);
  endfunction

  // Runs one session of ng groups against the model; returns the model's
  // signature. Counts mechanisms when count = 1.
  task automatic run(input int ng, input bit count, output logic [N-1:0] msig);
    logic [N-1:0]         q [$];
    logic [N-1:0][LS-1:0] ch;
    logic [N-1:0]         w, so;
    int bad;
    bad = 0;
    ch = scan_q;
    msig = '0;
    q.delete();
    for (int i = 0; i < L; i++) q.push_back('0);
    ngroups = 16'(ng);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int g = 0; g < ng; g++) begin
      for (int i = 0; i < L; i++) begin
        if (phase != SW_LOAD && bad++ < 5) chk(0, $sformatf("group %0d load clock %0d: phase %s", g, i, phase.name()));
        if (count) n_load += (i == 0);
        @(negedge clk);
      end
      q.delete();
      for (int i = 0; i < L; i++) q.push_back(seeds[g * L + i]);
      for (int p = 0; p < G; p++) begin
        for (int c = 0; c < LS; c++) begin
          if (phase != SW_SHIFT && bad++ < 5) chk(0, $sformatf("group %0d pattern %0d shift %0d: phase %s", g, p, c, phase.name()));
          // one decompressor step and one chain shift
          w = q[0];
          for (int f = 1; f < L; f++) if (FB_MASK[f]) w ^= q[f];
          for (int t = 0; t < L; t++)
            if (TAP_MASK[t])
              for (int a = 1; a < N; a++) if (ROT_MASK[a]) w ^= rotl(q[t], a);
          for (int j = 0; j < N; j++) begin
            so[j] = ch[j][LS-1];
            ch[j] = {ch[j][LS-2:0], q[0][j]};
          end
          msig = oc_add(msig, so);
          void'(q.pop_front());
          q.push_back(w);
          if (count) n_step++;
          @(negedge clk);
          if (scan_q != ch && bad++ < 5) chk(0, $sformatf("group %0d pattern %0d shift %0d: chain contents differ", g, p, c));
        end
        if (phase != SW_CAPT && bad++ < 5) chk(0, $sformatf("group %0d pattern %0d: phase %s at capture", g, p, phase.name()));
        chk(scan_q == ch, $sformatf("group %0d pattern %0d applied as decompressed", g, p));
        ch = cut_resp;
        if (count) begin n_capt++; if (p > 0) n_concat++; end
        @(negedge clk);
      end
    end
    for (int c = 0; c < LS; c++) begin
      if (phase != SW_FLUSH && bad++ < 5) chk(0, $sformatf("flush %0d: phase %s", c, phase.name()));
      for (int j = 0; j < N; j++) begin
        so[j] = ch[j][LS-1];
        ch[j] = {ch[j][LS-2:0], q[0][j]};
      end
      msig = oc_add(msig, so);
      if (count) n_flush++;
      @(negedge clk);
    end
    chk(bad == 0, $sformatf("phases and chain contents followed the model (%0d mismatches)", bad));
    chk(done && phase == SW_DONE, "session ends in done");
    chk(int'(pat_count) == ng * int'(G), $sformatf("pattern count %0d, expected %0d", pat_count, ng * G));
    chk(signature == msig, $sformatf("signature %h, model %h", signature, msig));
  endtask

  initial begin
    logic [N-1:0] s1, s2, m;
    mem_we = 0; mem_waddr = '0; mem_wdata = '0; start = 0; ngroups = '0;
    finished = 0; checks = 0; failures = 0;
    n_load = 0; n_step = 0; n_capt = 0; n_concat = 0; n_flush = 0;
    for (int j = 0; j < N; j++) cut_mask[j] = LS'({(LS + 31) / 32{$urandom()}});
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    for (int i = 0; i < int'(NG * L); i++) begin
      logic [N-1:0] v;
      v = N'({(N + 31) / 32{$urandom()}});
      seeds.push_back(v);
      mem_we = 1; mem_waddr = AW'(i); mem_wdata = v;
      @(negedge clk);
    end
    mem_we = 0;
    run(NG, 1, m);
    s1 = signature;
    chk(s1 != '0, "signature is not zero");
    cut_mask[0][0] = ~cut_mask[0][0];
    run(NG, 0, m);
    s2 = signature;
    chk(s2 != s1, "signature depends on the response");
    chk(n_load > 0,   "seed loading was exercised");
    chk(n_step > 0,   "decompressor steps were exercised");
    chk(n_capt > 0,   "captures were exercised");
    chk(n_concat > 0, "patterns were decompressed without reseeding");
    chk(n_flush > 0,  "the flush was exercised");
    $display("[%s] seed loads %0d, decompressor steps %0d, captures %0d, patterns without reseeding %0d, flush clocks %0d",
             NAME, n_load, n_step, n_capt, n_concat, n_flush);
    finished = 1;
  end

endmodule
