// tb_scan_chain: drives a 10-flip-flop chain with a 4-flip-flop borrowed
// segment through random shift, capture, hold and segment-clear clocks and
// compares every flip-flop with an array model after each clock.
module tb_scan_chain;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LEN = 10, SEG = 4;
  logic rst_n, en, se, si, segc;
  logic [LEN-1:0] pi, q;
  logic so, st;
  scan_chain #(.LEN(LEN), .SEG(SEG)) dut (.clk, .rst_n, .en, .se, .si, .seg_clear(segc),
                                          .pi, .q, .so, .seg_tail(st));

  initial begin : wd
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m [LEN];
    bit n [LEN];
    rst_n = 0; en = 0; se = 0; si = 0; segc = 0; pi = '0;
    foreach (m[k]) m[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      en   = ($urandom_range(0, 5) != 0);
      se   = ($urandom_range(0, 3) != 0);
      si   = $urandom_range(0, 1);
      segc = ($urandom_range(0, 10) == 0);
      pi   = LEN'($urandom());
      n = m;
      if (en) begin
        for (int k = 0; k < LEN; k++) n[k] = se ? ((k == 0) ? si : m[k-1]) : pi[k];
        if (segc) for (int k = 0; k < SEG; k++) n[k] = 0;
      end
      @(negedge clk);
      m = n;
      checks++;
      for (int k = 0; k < LEN; k++)
        if (q[k] != m[k]) begin failures++; $display("FAIL: clock %0d ff %0d", t, k); break; end
      checks++;
      if (so != m[LEN-1] || st != m[SEG-1]) begin failures++; $display("FAIL: taps at %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
