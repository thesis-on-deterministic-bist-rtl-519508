// tb_seed_len_counter: loads b = 20, applies a size-bit pattern with d = 8
// and checks the field length b + i*d after each record; then checks that
// load wins over inc and that the length saturates instead of wrapping.
module tb_seed_len_counter;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, load, inc;
  logic [9:0] base, d, len;
  seed_len_counter #(.LW(10)) dut (.clk, .rst_n, .load, .base, .inc, .d, .len);

  initial begin : wd
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit sizebits [10] = '{0, 1, 0, 1, 1, 0, 0, 1, 0, 0};
    int i;
    rst_n = 0; load = 0; inc = 0; base = 20; d = 8;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load = 1; @(negedge clk); load = 0;
    i = 0;
    foreach (sizebits[r]) begin
      checks++;
      if (len != 10'(20 + 8 * i)) begin failures++; $display("FAIL: record %0d len %0d", r, len); end
      inc = sizebits[r]; @(negedge clk); inc = 0;
      if (sizebits[r]) i++;
    end
    load = 1; inc = 1; @(negedge clk); load = 0; inc = 0;
    checks++; if (len != 20) begin failures++; $display("FAIL: load priority"); end
    base = 1000; d = 100; load = 1; @(negedge clk); load = 0;
    inc = 1; @(negedge clk); inc = 0;
    checks++; if (len != 1023) begin failures++; $display("FAIL: saturation %0d", len); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
