// tb_ones_comp_sig: one's-complement accumulation of random words in a
// 32-bit and an 8-bit accumulator, checked against integer arithmetic
// (sum modulo 2^N - 1 with the end-around carry), including words chosen to
// carry out on every add.
module tb_ones_comp_sig;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, en, clr;
  logic [31:0] d32, s32;
  logic [7:0]  d8, s8;
  ones_comp_sig #(.N(32)) u32 (.clk, .rst_n, .en, .clear(clr), .d(d32), .sig(s32));
  ones_comp_sig #(.N(8))  u8  (.clk, .rst_n, .en, .clear(clr), .d(d8),  .sig(s8));

  initial begin : wd
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned a32, a8;
    rst_n = 0; en = 0; clr = 0; d32 = 0; d8 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    a32 = 0; a8 = 0;
    for (int t = 0; t < 1000; t++) begin
      en  = ($urandom_range(0, 4) != 0);
      d32 = (t % 50 < 5) ? 32'hFFFF_FFF0 | 32'($urandom_range(0, 15)) : $urandom();
      d8  = 8'($urandom());
      if (en) begin
        a32 = a32 + d32; if (a32 >= 64'h1_0000_0000) a32 = a32 - 64'hFFFF_FFFF;
        a8  = a8 + d8;   if (a8 >= 256) a8 = a8 - 255;
      end
      @(negedge clk);
      checks++;
      if (s32 != 32'(a32) || s8 != 8'(a8)) begin
        failures++; $display("FAIL: clock %0d: %h/%h %h/%h", t, s32, a32, s8, a8);
      end
    end
    clr = 1; @(negedge clk); clr = 0;
    checks++; if (s32 != 0 || s8 != 0) begin failures++; $display("FAIL: clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
