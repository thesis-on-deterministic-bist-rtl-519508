// tb_sw2d_engine: checks the circular-buffer decompressor against a model
// written the other way round, as N separate shift registers (one per LFSR
// segment) with explicit inter-segment taps. Two configurations of the
// experiments are used: s38584 on a 32-bit data path (X^16 + X^9 + X^5 + 1,
// tap 15, rotates 1, 2) and s9234 on an 8-bit data path (X^44 + X^5 + 1,
// tap 43, rotates 1, 2, 4). Each is seeded with random words (loaded at a
// non-zero head position after a first run) and stepped 300 times; every
// output word is compared.
module tb_sw2d_engine;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;

  // configuration A: N = 32, L = 16 (defaults)
  logic        a_load, a_step;
  logic [3:0]  a_idx, a_head;
  logic [31:0] a_word, a_out;
  sw2d_engine ua (.clk, .rst_n, .load(a_load), .load_idx(a_idx), .load_word(a_word),
                  .step(a_step), .out(a_out), .head(a_head));

  // configuration B: N = 8, L = 44
  logic        b_load, b_step;
  logic [5:0]  b_idx, b_head;
  logic [7:0]  b_word, b_out;
  sw2d_engine #(.N(8), .L(44), .FB_MASK(44'(1) << 5), .TAP_MASK(44'(1) << 43),
                .ROT_MASK(8'b0001_0110)) ub (
    .clk, .rst_n, .load(b_load), .load_idx(b_idx), .load_word(b_word),
    .step(b_step), .out(b_out), .head(b_head));

  initial begin : wd
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // segment model: seg[j][i], stage 0 is the output stage
  bit sa [32][16];
  bit sb [8][44];

  task automatic model_step_a();
    bit nw [32];
    int fb [2]  = '{5, 9};
    int rot [2] = '{1, 2};
    for (int j = 0; j < 32; j++) begin
      nw[j] = sa[j][0];
      foreach (fb[k]) nw[j] ^= sa[j][fb[k]];
      foreach (rot[k]) nw[j] ^= sa[(j - rot[k] + 32) % 32][15];
    end
    for (int j = 0; j < 32; j++) begin
      for (int i = 0; i < 15; i++) sa[j][i] = sa[j][i+1];
      sa[j][15] = nw[j];
    end
  endtask

  task automatic model_step_b();
    bit nw [8];
    int rot [3] = '{1, 2, 4};
    for (int j = 0; j < 8; j++) begin
      nw[j] = sb[j][0] ^ sb[j][5];
      foreach (rot[k]) nw[j] ^= sb[(j - rot[k] + 8) % 8][43];
    end
    for (int j = 0; j < 8; j++) begin
      for (int i = 0; i < 43; i++) sb[j][i] = sb[j][i+1];
      sb[j][43] = nw[j];
    end
  endtask

  initial begin
    logic [31:0] ea;
    logic [7:0]  eb;
    int bad;
    rst_n = 0; a_load = 0; a_step = 0; b_load = 0; b_step = 0;
    a_idx = 0; b_idx = 0; a_word = 0; b_word = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      // load seeds
      for (int i = 0; i < 44; i++) begin
        a_load = (i < 16); b_load = 1;
        a_idx = 4'(i); b_idx = 6'(i);
        a_word = $urandom(); b_word = 8'($urandom());
        if (i < 16) for (int j = 0; j < 32; j++) sa[j][i] = a_word[j];
        for (int j = 0; j < 8; j++) sb[j][i] = b_word[j];
        @(negedge clk);
      end
      a_load = 0; b_load = 0;
      bad = 0;
      for (int t = 0; t < 300 + run * 7; t++) begin
        for (int j = 0; j < 32; j++) ea[j] = sa[j][0];
        for (int j = 0; j < 8; j++)  eb[j] = sb[j][0];
        checks++;
        if (a_out != ea || b_out != eb) begin
          failures++;
          if (bad++ < 3) $display("FAIL: run %0d step %0d: %h/%h %h/%h", run, t, a_out, ea, b_out, eb);
        end
        a_step = 1; b_step = 1;
        model_step_a(); model_step_b();
        @(negedge clk);
        a_step = 0; b_step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
