// tb_prpg: self-checking test of the type I PRPG.
//
// 1. A 3-stage instance with polynomial X^3 + X^2 + 1 is loaded with each of
//    the 8 seeds through the seed multiplexer and clocked 7 times; the output
//    bits are compared with the published table of seeds and sequences of
//    that register (sequence strings are written last-bit-first).
// 2. A 4-stage instance with X^4 + X + 1 must have period 15.
// 3. The 32-stage default (P0) is loaded with random seeds and its output is
//    compared with the recurrence a(i+32) = a(i) + a(i+3) + a(i+11) + a(i+29)
//    evaluated on a plain bit list; clear, clock enable, inject and fb_extra
//    are checked against the same kind of list model.
module tb_prpg;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- 3-stage example ----------------
  logic       rst_n;
  logic       s_en, s_shift, s_seed, s_clear;
  logic [2:0] s_state;
  logic       s_out;
  prpg #(.LEN(3), .POLY(3'b101), .INIT(3'b001)) u3 (
    .clk, .rst_n, .en(s_en), .shift(s_shift), .seed_in(s_seed), .clear(s_clear),
    .fb_extra(1'b0), .inject('0), .state(s_state), .out(s_out));

  // ---------------- 4-stage period ----------------
  logic [3:0] f_state;
  logic       f_out;
  prpg #(.LEN(4), .POLY(4'b0011), .INIT(4'b0001)) u4 (
    .clk, .rst_n, .en(1'b1), .shift(1'b0), .seed_in(1'b0), .clear(1'b0),
    .fb_extra(1'b0), .inject('0), .state(f_state), .out(f_out));

  // ---------------- 32-stage P0 ----------------
  logic        p_en, p_shift, p_seed, p_clear, p_fbx;
  logic [31:0] p_inj, p_state;
  logic        p_out;
  prpg u32 (
    .clk, .rst_n, .en(p_en), .shift(p_shift), .seed_in(p_seed), .clear(p_clear),
    .fb_extra(p_fbx), .inject(p_inj), .state(p_state), .out(p_out));

  // table of the 3-stage example: index = seed a2 a1 a0
  string tbl [8] = '{"0000000", "0111001", "1110010", "1001011",
                     "1011100", "1100101", "0101110", "0010111"};

  // list model of a 32-stage register: bit k of the list is stage k
  function automatic logic [31:0] model_step(input logic [31:0] st, input logic sh,
                                             input logic sd, input logic fbx,
                                             input logic [31:0] inj);
    logic fb;
    int exps [4] = '{0, 3, 11, 29};
    fb = fbx;
    foreach (exps[e]) fb ^= st[31 - exps[e]];
    return {st[30:0], (sh ? sd : fb)} ^ inj;
  endfunction

  initial begin : wd
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0]  seed;
    string       got;
    int          period;
    logic [3:0]  first;
    logic [31:0] m;
    logic        bits [$];
    logic [31:0] sd32;

    rst_n = 0; s_en = 0; s_shift = 0; s_seed = 0; s_clear = 0;
    p_en = 0; p_shift = 0; p_seed = 0; p_clear = 0; p_fbx = 0; p_inj = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // ---- 1: the eight seeds of the 3-stage example
    for (int s = 0; s < 8; s++) begin
      seed = 3'(s);
      // a0 goes deepest, so it is shifted first
      @(negedge clk); s_en = 1; s_shift = 1;
      for (int b = 0; b < 3; b++) begin
        s_seed = seed[b];
        @(negedge clk);
      end
      s_shift = 0;
      got = "";
      for (int t = 0; t < 7; t++) begin
        got = {(s_out ? "1" : "0"), got};
        @(negedge clk);
      end
      s_en = 0;
      check(got == tbl[s], $sformatf("3-stage seed %03b: got %s want %s", seed, got, tbl[s]));
    end

    // ---- 2: period of the 4-stage maximum-length register
    @(negedge clk);
    first = f_state;
    period = 0;
    do begin @(negedge clk); period++; end while (f_state != first && period < 100);
    check(period == 15, $sformatf("4-stage period %0d", period));

    // ---- 3a: P0 against the recurrence on the output sequence
    for (int trial = 0; trial < 4; trial++) begin
      sd32 = $urandom();
      if (sd32 == 0) sd32 = 1;
      @(negedge clk); p_en = 1; p_shift = 1;
      // seed list a0..a31: a0 ends in stage 31, so shift a0 first
      for (int b = 0; b < 32; b++) begin p_seed = sd32[b]; @(negedge clk); end
      p_shift = 0;
      bits.delete();
      for (int b = 0; b < 32; b++) bits.push_back(sd32[b]);
      for (int t = 0; t < 150; t++) begin
        if (t + 32 > bits.size() - 1)
          bits.push_back(bits[t] ^ bits[t+3] ^ bits[t+11] ^ bits[t+29]);
        if (p_out !== bits[t]) begin
          check(0, $sformatf("P0 trial %0d bit %0d", trial, t));
          break;
        end
        @(negedge clk);
      end
      check(1, "P0 sequence");
      p_en = 0;
    end

    // ---- 3b: clear, enable, inject and fb_extra
    m = p_state;
    @(negedge clk);
    check(p_state == m, "hold with en = 0");
    p_en = 1;
    for (int t = 0; t < 200; t++) begin
      p_shift = ($urandom_range(0, 3) == 0);
      p_seed  = $urandom_range(0, 1);
      p_fbx   = $urandom_range(0, 1);
      p_inj   = ($urandom_range(0, 1) == 0) ? '0 : 32'($urandom());
      p_clear = ($urandom_range(0, 40) == 0);
      m = p_clear ? '0 : model_step(p_state, p_shift, p_seed, p_fbx, p_inj);
      @(negedge clk);
      if (p_state != m) begin check(0, $sformatf("step %0d: %h vs %h", t, p_state, m)); break; end
    end
    check(1, "random steps");
    p_clear = 1; @(negedge clk); p_clear = 0;
    check(p_state == 0, "clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
