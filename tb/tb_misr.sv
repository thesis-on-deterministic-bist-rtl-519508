// tb_misr: a 32-bit, 4-input signature register (default polynomial P0) is
// fed random words and compared after every clock with a bit-by-bit model;
// then two streams that differ in one bit must end in different signatures,
// and clear must zero it.
module tb_misr;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, en, clr;
  logic [3:0] d;
  logic [31:0] sig;
  misr #(.W(32), .NIN(4)) dut (.clk, .rst_n, .en, .clear(clr), .d, .sig);

  initial begin : wd
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(input logic [31:0] s, input logic [3:0] x);
    logic [31:0] n;
    logic fb;
    fb = s[31] ^ s[28] ^ s[20] ^ s[2];       // X^0, X^3, X^11, X^29
    for (int k = 0; k < 32; k++) begin
      n[k] = (k == 0) ? fb : s[k-1];
      if (k < 4) n[k] ^= x[k];
    end
    return n;
  endfunction

  initial begin
    logic [31:0] m, sig_a;
    logic [3:0]  stream [200];
    int          flip;
    rst_n = 0; en = 0; clr = 0; d = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m = 0;
    foreach (stream[t]) stream[t] = 4'($urandom());
    for (int pass = 0; pass < 2; pass++) begin
      clr = 1; @(negedge clk); clr = 0; m = 0;
      checks++; if (sig != 0) begin failures++; $display("FAIL: clear"); end
      flip = $urandom_range(0, 199);
      for (int t = 0; t < 200; t++) begin
        en = ($urandom_range(0, 7) != 0);
        d  = stream[t];
        if (pass == 1 && t == flip) d[0] = ~d[0];
        if (en) m = model(m, d);
        @(negedge clk);
        checks++;
        if (sig != m) begin failures++; $display("FAIL: pass %0d clock %0d", pass, t); end
      end
      en = 1; d = 0;
      repeat (40) begin m = model(m, 0); @(negedge clk); end
      en = 0;
      if (pass == 0) sig_a = sig;
    end
    checks++;
    if (sig == sig_a) begin failures++; $display("FAIL: a single-bit error aliased"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
