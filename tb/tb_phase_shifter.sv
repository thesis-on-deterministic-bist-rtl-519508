// tb_phase_shifter: checks the XOR network for 4 and for 32 outputs on
// random PRPG states (the first 32 states are the unit vectors). Expected:
// output 0 is the last stage; output j is the last stage XOR stage t XOR
// stage (t + 16) mod 31, with t = 8j - 1 for 4 outputs and t = j - 1 for 32.
// Interface: none (self-contained); one check per state.
module tb_phase_shifter;
  int checks = 0, failures = 0;
  logic [31:0] st;
  logic [3:0]  o4;
  logic [31:0] o32;
  phase_shifter #(.LEN(32), .NOUT(4))  u4  (.state(st), .out(o4));
  phase_shifter #(.LEN(32), .NOUT(32)) u32 (.state(st), .out(o32));

  initial begin : wd
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0]  e4;
    logic [31:0] e32;
    for (int t = 0; t < 200; t++) begin
      st = (t < 32) ? (32'd1 << t) : $urandom();
      #1;
      e4[0] = st[31];
      e4[1] = st[31] ^ st[7]  ^ st[23];
      e4[2] = st[31] ^ st[15] ^ st[0];
      e4[3] = st[31] ^ st[23] ^ st[8];
      e32[0] = st[31];
      for (int j = 1; j < 32; j++) e32[j] = st[31] ^ st[j-1] ^ st[(j - 1 + 16) % 31];
      checks++;
      if (o4 != e4 || o32 != e32) begin
        failures++;
        $display("FAIL: state %h: %b/%b %h/%h", st, o4, e4, o32, e32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
