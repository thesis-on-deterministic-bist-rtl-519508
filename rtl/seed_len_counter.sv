// seed_len_counter: keeps the length of the current seed field.
//
// Seeds are stored sorted by length, each as a size bit followed by a seed
// field of b + i*d bits. The counter starts at b (load) and grows by d
// (inc) after a record whose size bit is 1, so the next field is d bits
// longer. Both load and inc take effect at the next clock edge; load wins.
// The adder is LW bits wide and saturates at its maximum rather than wrap
// (overflow handling is this design's choice, the document does not raise
// it).
module seed_len_counter #(
  parameter int unsigned LW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [LW-1:0] base,
  input  logic          inc,
  input  logic [LW-1:0] d,
  output logic [LW-1:0] len
);

  logic [LW:0] sum;

  assign sum = {1'b0, len} + {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    len <= '0;
    else if (load) len <= base;
    else if (inc)  len <= sum[LW] ? '1 : sum[LW-1:0];
  end

endmodule
