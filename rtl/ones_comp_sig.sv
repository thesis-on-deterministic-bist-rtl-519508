// ones_comp_sig: one's-complement signature accumulator.
//
// Every clock with en = 1 it adds the N-bit response word d to the
// accumulator in one's-complement arithmetic: the carry out of the N-bit add
// is added back in at bit 0 (end-around carry), which is what the
// processor's "add, then add 1 on overflow" pair of instructions computes.
// The second add can never overflow again. clear zeroes it synchronously.
// Single-cycle; the result is visible the clock after en.
module ones_comp_sig #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clear,
  input  logic [N-1:0] d,
  output logic [N-1:0] sig
);

  logic [N:0]   sum;
  logic [N-1:0] wrapped;

  always_comb begin
    sum     = {1'b0, sig} + {1'b0, d};
    wrapped = sum[N-1:0] + N'(sum[N]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= wrapped;
  end

endmodule
