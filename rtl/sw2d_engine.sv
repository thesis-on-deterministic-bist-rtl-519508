// sw2d_engine: two-dimensional decompressor made of N linearly
// interconnected LFSR segments of length L, kept the way the processor-based
// scheme keeps them: a circular buffer of L words of N bits and a head
// pointer H. Word M[(H+i) mod L] holds stage i of every segment (bit j is
// segment j), so one word is one bit of each of the N segments.
//
// One step (step = 1), all in one clock:
//   out = M[H]                       word shifted into the N scan chains
//   M[H] <= M[H]
//           ^ XOR over f in FB_MASK   of M[(H+f) mod L]
//           ^ XOR over T in TAP_MASK, of rotl(M[(H+T) mod L], a)
//                      a in ROT_MASK
//   H <= (H+1) mod L
// so each segment obeys a_{i+L} = a_i + sum_f a_{i+f} (all segments share
// one polynomial, X^L + sum_f X^f + 1) and segment j also receives the tap
// word bits of segments (j - a) mod N: segment i feeds segments
// (i + a) mod N with a = 1, 2, 4, ... Loading a seed is a plain copy:
// load = 1 writes load_word to M[(H + load_idx) mod L].
// Defaults: circuit s38584 on a 32-bit data path (polynomial X^16 + X^9 +
// X^5 + 1, tap position 15, rotates 1 and 2), a 512-bit decompressor.
// The step, the buffer layout and the interconnection rule follow the
// document; doing a whole step in one clock (the processor needs some tens
// of instructions) and rotating left are this design's choices.
module sw2d_engine #(
  parameter int unsigned      N        = 32,
  parameter int unsigned      L        = 16,
  parameter logic [L-1:0]     FB_MASK  = L'((1 << 9) | (1 << 5)),
  parameter logic [L-1:0]     TAP_MASK = L'(1 << 15),
  parameter logic [N-1:0]     ROT_MASK = N'((1 << 1) | (1 << 2)),
  parameter int unsigned      HW       = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [HW-1:0] load_idx,
  input  logic [N-1:0]  load_word,
  input  logic          step,
  output logic [N-1:0]  out,
  output logic [HW-1:0] head
);

  initial assert (L >= 2 && !FB_MASK[0])
    else $error("sw2d_engine: L >= 2 and FB_MASK[0] (the constant term) must be 0");

  logic [N-1:0] mem [L];
  logic [N-1:0] fresh;

  function automatic logic [HW-1:0] wrap(input int unsigned a);
    return HW'(a % L);
  endfunction

  function automatic logic [N-1:0] rotl(input logic [N-1:0] w, input int unsigned a);
    return (w << a) | (w >> (N - a));   // a in 1 .. N-1
  endfunction

  always_comb begin
    fresh = mem[head];
    for (int unsigned f = 1; f < L; f++)
      if (FB_MASK[f]) fresh ^= mem[wrap(32'(head) + f)];
    for (int unsigned t = 0; t < L; t++)
      if (TAP_MASK[t])
        for (int unsigned a = 1; a < N; a++)
          if (ROT_MASK[a]) fresh ^= rotl(mem[wrap(32'(head) + t)], a);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      head <= '0;
    else if (step)
      head <= wrap(32'(head) + 1);
  end

  always_ff @(posedge clk) begin
    if (load)
      mem[wrap(32'(head) + 32'(load_idx))] <= load_word;
    else if (step)
      mem[head] <= fresh;
  end

  assign out = mem[head];

endmodule
