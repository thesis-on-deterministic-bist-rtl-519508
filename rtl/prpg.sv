// prpg: type I (external-XOR) pseudo-random pattern generator with a seed
// multiplexer, used as the core of the decompression LFSR.
//
// Stage 0 is the input end and stage LEN-1 the output end. The feedback bit
// is the XOR of the stages selected by POLY (bit j of POLY selects stage
// LEN-1-j, so the output stage is term X^0), XORed with fb_extra, the gated
// feedback from a scan chain. The seed multiplexer in front of stage 0 picks
// seed_in when shift is 1 and the feedback otherwise. inject[s] is XORed into
// the D input of stage s: these are the extra XOR gates between the PRPG
// flip-flops through which scan-chain feedbacks enter in the multiple-chain
// decompressor. clear (the Reset signal) synchronously zeroes every stage.
//
// With a state written as seed (a_0 .. a_{LEN-1}), a_0 in the output stage,
// the output sequence obeys a_{i+LEN} = sum_j h_j a_{i+j} (mod 2).
//
// Timing: everything is registered; out and state change one clock after en.
// rst_n loads INIT so that random mode starts from a non-zero state (the
// document gives no reset value; INIT is this design's choice).
module prpg #(
  parameter int unsigned       LEN  = 32,
  parameter logic [LEN-1:0]    POLY = 32'h2000_0809,   // P0
  parameter logic [LEN-1:0]    INIT = {{(LEN-1){1'b0}}, 1'b1}
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           shift,
  input  logic           seed_in,
  input  logic           clear,
  input  logic           fb_extra,
  input  logic [LEN-1:0] inject,
  output logic [LEN-1:0] state,
  output logic           out
);

  logic fb;
  logic d0;

  always_comb begin
    fb = fb_extra;
    for (int j = 0; j < int'(LEN); j++)
      if (POLY[j]) fb ^= state[LEN-1-j];
    d0 = shift ? seed_in : fb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= INIT;
    else if (en) begin
      if (clear)
        state <= '0;
      else
        state <= {state[LEN-2:0], d0} ^ inject;
    end
  end

  assign out = state[LEN-1];

endmodule
