// tb_test_data_memory: fills a 1-bit x 8192 and a 32-bit x 128 memory with
// random data, reads everything back in random order and checks each word
// one clock after its address (synchronous read).
module tb_test_data_memory;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        we1, wd1, rd1;
  logic [12:0] wa1, ra1;
  logic        we2;
  logic [6:0]  wa2, ra2;
  logic [31:0] wd2, rd2;
  test_data_memory u1 (.clk, .we(we1), .waddr(wa1), .wdata(wd1), .raddr(ra1), .rdata(rd1));
  test_data_memory #(.W(32), .DEPTH(128)) u2 (.clk, .we(we2), .waddr(wa2), .wdata(wd2), .raddr(ra2), .rdata(rd2));

  initial begin : wd
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit          m1 [8192];
    logic [31:0] m2 [128];
    we1 = 0; we2 = 0; ra1 = 0; ra2 = 0; wa1 = 0; wa2 = 0; wd1 = 0; wd2 = 0;
    @(negedge clk);
    for (int a = 0; a < 8192; a++) begin
      m1[a] = $urandom_range(0, 1);
      we1 = 1; wa1 = 13'(a); wd1 = m1[a];
      if (a < 128) begin m2[a] = $urandom(); we2 = 1; wa2 = 7'(a); wd2 = m2[a]; end
      else we2 = 0;
      @(negedge clk);
    end
    we1 = 0; we2 = 0;
    for (int t = 0; t < 3000; t++) begin
      ra1 = 13'($urandom()); ra2 = 7'($urandom());
      @(negedge clk);
      checks++;
      if (rd1 != m1[ra1] || rd2 != m2[ra2]) begin failures++; $display("FAIL: read %0d/%0d", ra1, ra2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
