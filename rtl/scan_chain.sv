// scan_chain: one scan chain of mux-D scan flip-flops of the circuit under
// test. Its first SEG flip-flops are borrowed by the decompressor and become
// part of the decompression LFSR in deterministic mode.
//
// When en is 1 the chain either shifts (se = 1: q[0] <= si, q[k] <= q[k-1])
// or captures the response of the circuit under test (se = 0: q <= pi).
// seg_clear zeroes the first SEG flip-flops, taking priority over shift and
// capture; it is driven by Reset of the single-chain decompressor.
// so is the chain output (to the signature register), seg_tail the last
// flip-flop of the borrowed segment (the feedback into the decompressor).
// rst_n clearing the chain is this design's choice, for a known start.
module scan_chain #(
  parameter int unsigned LEN = 62,
  parameter int unsigned SEG = 24
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           se,
  input  logic           si,
  input  logic           seg_clear,
  input  logic [LEN-1:0] pi,
  output logic [LEN-1:0] q,
  output logic           so,
  output logic           seg_tail
);

  initial assert (LEN >= 2 && SEG >= 1 && SEG <= LEN)
    else $error("scan_chain: need LEN >= 2 and SEG in 1..LEN");

  logic [LEN-1:0] d;

  always_comb begin
    if (se) d = {q[LEN-2:0], si};
    else    d = pi;
    if (seg_clear) d[SEG-1:0] = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

  assign so       = q[LEN-1];
  assign seg_tail = q[SEG-1];

endmodule
