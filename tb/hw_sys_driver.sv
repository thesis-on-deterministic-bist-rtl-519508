// hw_sys_driver: testbench driver for one hardware decompression system
// (hw_decomp_system, alone or inside the top). It plays the part of the
// offline seed calculation and of the tester that loads the memory, and
// checks the whole scheme end to end:
//
//  1. Probe: K sessions, each decompressing one seed field of full length K
//     with a single 1 in it. The pattern applied at capture is recorded, so
//     the response of the linear decompressor to every seed variable is known.
//  2. Encode: NP random test cubes (S specified bits each, S up to K-20;
//     the first one cut from the pattern of a random seed of at most 24 bits,
//     so that the seed lengths always spread over several fields) are
//     solved by Gauss-Jordan elimination over GF(2) for the shortest seed
//     length that encodes them (binary search: a longer seed only adds
//     unknowns). Seeds are sorted by length and
//     written in the record format: a size bit, then the seed field, padded
//     to the field length with zeros shifted in first. A size bit of 1 means
//     the next field is d bits longer.
//  3. Run one session (NRAND random patterns, then the NP seeds). Every
//     deterministic pattern must cover its cube; the clock count of the
//     session must match LS+1 per random pattern, 1+R+len+DC+1 per seed and
//     LS for the flush. A second session with a different circuit response
//     must end in a different signature.
// The circuit under test is a stand-in: response = chain contents rotated by
// one position and XORed with a constant (cut_mask).
// It counts how often each mechanism happened (random patterns, Reset
// phases, seed shifts, decompression phases, seed-length growths, captures)
// and counts a failure for one that never did.
module hw_sys_driver
  import vlr_pkg::*;
#(
  parameter int unsigned NS    = 4,
  parameter int unsigned LS    = 62,
  parameter int unsigned K     = 128,   // serial path length = longest seed
  parameter int unsigned R     = 25,    // Reset clocks per seed
  parameter int unsigned DC    = 38,    // decompression clocks per seed
  parameter int unsigned AW    = 13,
  parameter int unsigned NP    = 6,
  parameter int unsigned NRAND = 3,
  parameter int unsigned D     = 8,
  parameter string       NAME  = "hw"
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic                  mem_we,
  output logic [AW-1:0]         mem_waddr,
  output logic                  mem_wdata,
  output logic                  start,
  output logic [15:0]           nrand,
  output logic [15:0]           ndet,
  output logic [9:0]            base,
  output logic [9:0]            d,
  input  ctrl_phase_e           phase,
  input  logic                  done,
  input  logic [31:0]           signature,
  input  logic [NS-1:0][LS-1:0] scan_q,
  output logic [NS-1:0][LS-1:0] cut_resp,
  output logic                  finished,
  output int                    checks,
  output int                    failures
);

  localparam int unsigned NB = NS * LS;

  logic [NS-1:0][LS-1:0] cut_mask;
  logic [NB-1:0]         captured [$];
  int n_rand_pat, n_reset, n_seed, n_decomp, n_grow, n_capt, n_clocks;
  logic [9:0] last_len;
  logic       counting;

  // circuit stand-in
  always_comb
    for (int j = 0; j < NS; j++)
      cut_resp[j] = {scan_q[j][LS-2:0], scan_q[(j + 1) % NS][LS-1]} ^ cut_mask[j];

  // monitor
  always @(negedge clk) begin
    if (counting) n_clocks++;
    case (phase)
      PH_RAND_CAPT: begin n_rand_pat++; n_capt++; end
      PH_DET_CAPT:  begin captured.push_back(NB'(scan_q)); n_capt++; end
      default: ;
    endcase
  end
  ctrl_phase_e prev_phase;
  always @(negedge clk) begin
    if (phase == PH_RESET  && prev_phase != PH_RESET)  n_reset++;
    if (phase == PH_SEED   && prev_phase != PH_SEED)   n_seed++;
    if (phase == PH_DECOMP && prev_phase != PH_DECOMP) n_decomp++;
    prev_phase = phase;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%s]: %s", NAME, what); end
  endtask

  task automatic wr(input int a, input bit v);
    mem_we = 1; mem_waddr = AW'(a); mem_wdata = v;
    @(negedge clk);
    mem_we = 0;
  endtask

  task automatic session(input int nr, input int nd, input int b, input int dd);
    nrand = 16'(nr); ndet = 16'(nd); base = 10'(b); d = 10'(dd);
    start = 1; counting = 1; n_clocks = 0;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    counting = 0;
  endtask

  // response of each seed variable: resp[v][pos]
  bit resp [][];

  // Solve for the cube with a seed field of length n; returns 1 if solvable.
  function automatic bit gf2_solve(input int n, input int pos [$], input bit val [$],
                                   output bit x [$]);
    logic [K:0] rows [$];   // bits 0..n-1: coefficients, bit K: right-hand side
    logic [K:0] row, tmp;
    int pc [$];
    int m, rank, piv;
    m = pos.size();
    rank = 0;
    rows.delete();
    pc.delete();
    for (int r = 0; r < m; r++) begin
      row = '0;
      for (int c = 0; c < n; c++) row[c] = resp[K - n + c][pos[r]];
      row[K] = val[r];
      rows.push_back(row);
    end
    for (int c = 0; c < n && rank < m; c++) begin
      piv = -1;
      for (int r = rank; r < m; r++) if (rows[r][c]) begin piv = r; break; end
      if (piv >= 0) begin
        tmp = rows[piv]; rows[piv] = rows[rank]; rows[rank] = tmp;
        for (int r = 0; r < m; r++)
          if (r != rank && rows[r][c]) rows[r] = rows[r] ^ rows[rank];
        pc.push_back(c);
        rank++;
      end
    end
    x.delete();
    for (int r = rank; r < m; r++) if (rows[r][K]) return 0;
    for (int c = 0; c < n; c++) x.push_back(0);
    for (int i = 0; i < rank; i++) x[pc[i]] = rows[i][K];
    return 1;
  endfunction

  initial begin
    int cube_pos [NP][$];
    bit cube_val [NP][$];
    int need [NP];
    int order [NP];
    int lvl [NP];      // field length of record r
    bit seeds [NP][$];
    int b, addr, expect_clocks, total_len, n_tried;
    logic [31:0] sig_a;
    int bad;

    mem_we = 0; mem_waddr = '0; mem_wdata = 0; start = 0;
    nrand = 0; ndet = 0; base = 0; d = 0;
    finished = 0; checks = 0; failures = 0; counting = 0;
    n_rand_pat = 0; n_reset = 0; n_seed = 0; n_decomp = 0; n_grow = 0; n_capt = 0;
    for (int j = 0; j < NS; j++) cut_mask[j] = LS'({(LS + 31) / 32{$urandom()}});
    @(posedge rst_n);
    repeat (2) @(negedge clk);

    // ---- 1. probe
    resp = new[K];
    for (int v = 0; v < K; v++) begin
      wr(0, 0);
      for (int u = 0; u < K; u++) wr(1 + u, (u == v));
      captured.delete();
      session(0, 1, K, 0);
      chk(captured.size() == 1, "probe session captures once");
      resp[v] = new[NB];
      for (int p = 0; p < NB; p++) resp[v][p] = captured[0][p];
    end

    // ---- 2. encode random cubes
    // A cube the decompressor cannot encode is replaced by a fresh one, as
    // an ATPG flow would regenerate it; at least a quarter must encode.
    n_tried = 0;
    for (int i = 0; i < NP; i++) begin
      int s, pp [$];
      need[i] = -1;
      while (need[i] < 0 && n_tried < 40 * NP) begin
        n_tried++;
        s = $urandom_range(5, K - 20);
        pp.delete();
        cube_pos[i].delete();
        cube_val[i].delete();
        for (int p = 0; p < NB; p++) pp.push_back(p);
        pp.shuffle();
        if (i == 0) begin
          // the first cube is cut from the pattern of a random seed of at
          // most 24 bits, so that the seeds span several lengths and the
          // length counter must step
          bit pat [];
          s = $urandom_range(5, 12);
          pat = new[NB];
          for (int v = K - 24; v < K; v++)
            if ($urandom_range(0, 1) == 1)
              for (int p = 0; p < NB; p++) pat[p] ^= resp[v][p];
          for (int r = 0; r < s; r++) begin
            cube_pos[i].push_back(pp[r]);
            cube_val[i].push_back(pat[pp[r]]);
          end
        end else
          for (int r = 0; r < s; r++) begin
            cube_pos[i].push_back(pp[r]);
            cube_val[i].push_back(1'($urandom_range(0, 1)));
          end
        // the columns for length n include those for n-1, so solvability
        // grows with n: binary search for the shortest length
        begin
          bit x [$];
          int lo, hi, mid;
          if (gf2_solve(K, cube_pos[i], cube_val[i], x)) begin
            lo = 1; hi = K;
            while (lo < hi) begin
              mid = (lo + hi) / 2;
              if (gf2_solve(mid, cube_pos[i], cube_val[i], x)) hi = mid; else lo = mid + 1;
            end
            need[i] = lo;
          end
        end
      end
      chk(need[i] > 0, $sformatf("cube %0d found an encodable cube", i));
      if (need[i] < 0) need[i] = K;
      order[i] = i;
    end
    chk(4 * NP >= n_tried, $sformatf("%0d of %0d random cubes encodable", NP, n_tried));
    $display("[%s] %0d of %0d random cubes (5..%0d specified bits) were encodable", NAME, NP, n_tried, K - 20);
    order.sort() with (need[item]);
    // field lengths: nondecreasing, steps of 0 or d, each >= the need of
    // its cube and <= K; chosen from the longest one backwards
    lvl[NP-1] = need[order[NP-1]];
    for (int r = NP - 2; r >= 0; r--)
      lvl[r] = (lvl[r+1] - int'(D) >= need[order[r]]) ? lvl[r+1] - int'(D) : lvl[r+1];
    b = lvl[0];
    addr = 0;
    total_len = 0;
    for (int r = 0; r < NP; r++) begin
      int len;
      bit x [$];
      x.delete();
      len = lvl[r];
      total_len += len;
      void'(gf2_solve(len, cube_pos[order[r]], cube_val[order[r]], x));
      seeds[r] = x;
      wr(addr, (r < NP - 1) && (lvl[r+1] > lvl[r])); addr++;
      for (int u = 0; u < len; u++) begin wr(addr, x[u]); addr++; end
    end
    $display("[%s] %0d seeds, lengths %0d..%0d, %0d bits of test data for %0d bits of patterns",
             NAME, NP, b, lvl[NP-1], addr, NP * NB);

    // ---- 3. full session
    captured.delete();
    n_grow = 0;
    session(NRAND, NP, b, D);
    chk(captured.size() == NP, "one capture per seed");
    for (int r = 0; r < NP && r < captured.size(); r++) begin
      bad = 0;
      foreach (cube_pos[order[r]][q])
        if (captured[r][cube_pos[order[r]][q]] != cube_val[order[r]][q]) bad++;
      chk(bad == 0, $sformatf("pattern %0d covers its cube (%0d of %0d specified bits wrong)",
                              r, bad, cube_pos[order[r]].size()));
    end
    expect_clocks = 1 + int'(NRAND) * (int'(LS) + 1) + int'(NP) * (1 + int'(R) + int'(DC) + 1) + total_len + int'(LS);
    chk(n_clocks == expect_clocks, $sformatf("session clocks %0d, expected %0d", n_clocks, expect_clocks));
    n_grow = (lvl[NP-1] - lvl[0]) / int'(D);
    sig_a = signature;
    chk(sig_a != 0, "signature is not zero");

    // second session, different circuit response: the signature must change
    cut_mask[0][0] = ~cut_mask[0][0];
    session(NRAND, NP, b, D);
    chk(signature != sig_a, "signature depends on the response");

    // mechanisms
    chk(n_rand_pat > 0, "random mode was exercised");
    chk(n_reset > 0,    "Reset was exercised");
    chk(n_seed > 0,     "seed shifting was exercised");
    chk(n_decomp > 0,   "decompression was exercised");
    chk(n_grow > 0,     "the seed length grew by d at least once");
    $display("[%s] random patterns %0d, Reset phases %0d, seed loads %0d, decompressions %0d, length steps %0d, captures %0d",
             NAME, n_rand_pat, n_reset, n_seed, n_decomp, n_grow, n_capt);
    finished = 1;
  end

endmodule
