// tb_test_controller: checks the session sequencer clock by clock.
//
// A small controller (LS = 10, RESET_CYCLES = 3, DECOMP_CYCLES = 4) reads a
// bit-serial memory model with a one-clock read latency, like the test data
// memory. For each of 40 random sessions (0..3 random patterns, 0..5 seed
// records, base length 0..6, increment 0..3, random size bits and seed
// bits) the testbench builds the expected list of per-clock outputs from the
// record format: LS random shift clocks and a capture per random pattern;
// per record one size-bit clock, RESET_CYCLES Reset clocks, one shift clock
// per seed bit carrying that bit, DECOMP_CYCLES decompression clocks and a
// capture; LS flush clocks; then done. The field length starts at the base
// and grows by d after every record whose size bit is 1. The outputs phase,
// en/shift/reset/decomp/seed_in, chain enable, scan enable, signature enable
// and seed_len (while seeds shift) are compared after every clock, and the
// final pattern count is checked.
module tb_test_controller;
  import vlr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;

  localparam int LS = 10, RC = 3, DC = 4, AW = 8;

  logic          start;
  logic [15:0]   nrand, ndet, pat_count;
  logic [9:0]    base, d, seed_len;
  logic [AW-1:0] raddr;
  logic          rdata;
  decomp_ctrl_t  dctl;
  logic          chain_en, chain_se, misr_en, misr_clear, busy, done;
  ctrl_phase_e   phase;
  bit            mem [1 << AW];

  test_controller #(.LS(LS), .RESET_CYCLES(RC), .DECOMP_CYCLES(DC), .AW(AW)) dut (
    .clk, .rst_n, .start, .cfg_nrand(nrand), .cfg_ndet(ndet), .cfg_base(base), .cfg_d(d),
    .mem_raddr(raddr), .mem_rdata(rdata), .dctl, .chain_en, .chain_se, .misr_en, .misr_clear,
    .phase, .busy, .done, .seed_len, .pat_count);

  always_ff @(posedge clk) rdata <= mem[raddr];

  int checks = 0, failures = 0;

  initial begin : wd
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // one expected clock
  typedef struct {
    ctrl_phase_e ph;
    logic [4:0]  ctl;     // en, shift, reset, decomp, seed_in
    logic        cen, cse, men;
    int          len;     // -1: don't care
  } exp_t;
  exp_t ex [$];

  function automatic exp_t mk(ctrl_phase_e ph, logic [4:0] ctl, logic cen, logic cse,
                              logic men, int len = -1);
    exp_t e;
    e.ph = ph; e.ctl = ctl; e.cen = cen; e.cse = cse; e.men = men; e.len = len;
    return e;
  endfunction

  initial begin
    start = 0; nrand = 0; ndet = 0; base = 0; d = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 40; s++) begin
      int nr, nd, b, dd, len, addr, bad;
      nr = $urandom_range(0, 3);
      nd = $urandom_range(0, 5);
      b  = $urandom_range(0, 6);
      dd = $urandom_range(0, 3);
      foreach (mem[i]) mem[i] = 1'($urandom_range(0, 1));
      ex.delete();
      for (int p = 0; p < nr; p++) begin
        repeat (LS) ex.push_back(mk(PH_RAND_SHIFT, 5'b10000, 1, 1, 1));
        ex.push_back(mk(PH_RAND_CAPT, 5'b00000, 1, 0, 0));
      end
      len = b;
      addr = 0;
      for (int r = 0; r < nd; r++) begin
        bit grow;
        grow = mem[addr]; addr++;
        ex.push_back(mk(PH_READ_SIZE, 5'b00000, 0, 1, 0));
        repeat (RC) ex.push_back(mk(PH_RESET, 5'b11100, 1, 1, 1));
        for (int u = 0; u < len; u++) begin
          ex.push_back(mk(PH_SEED, {4'b1100, mem[addr]}, 1, 1, 1, len));
          addr++;
        end
        repeat (DC) ex.push_back(mk(PH_DECOMP, 5'b10010, 1, 1, 1));
        ex.push_back(mk(PH_DET_CAPT, 5'b00000, 1, 0, 0));
        if (grow) len += dd;
      end
      repeat (LS) ex.push_back(mk(PH_FLUSH, 5'b00000, 1, 1, 1));

      nrand = 16'(nr); ndet = 16'(nd); base = 10'(b); d = 10'(dd);
      start = 1;
      #1;
      checks++;
      if (!misr_clear) begin failures++; $display("FAIL: no signature clear at start"); end
      @(negedge clk);
      start = 0;
      bad = 0;
      foreach (ex[i]) begin
        exp_t e;
        logic [4:0] got;
        e = ex[i];
        got = {dctl.en, dctl.shift, dctl.reset, dctl.decomp, dctl.seed_in};
        checks++;
        if (phase != e.ph || got != e.ctl || chain_en != e.cen || chain_se != e.cse
            || misr_en != e.men || (e.len >= 0 && int'(seed_len) != e.len) || !busy) begin
          failures++;
          if (bad++ < 5)
            $display("FAIL: session %0d clock %0d: phase %s/%s ctl %b/%b cen %b/%b se %b/%b men %b/%b len %0d/%0d",
                     s, i, phase.name(), e.ph.name(), got, e.ctl, chain_en, e.cen, chain_se, e.cse,
                     misr_en, e.men, seed_len, e.len);
        end
        @(negedge clk);
      end
      checks++;
      if (!done || busy || int'(pat_count) != nr + nd) begin
        failures++;
        $display("FAIL: session %0d end: done %b busy %b patterns %0d/%0d", s, done, busy,
                 pat_count, nr + nd);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
