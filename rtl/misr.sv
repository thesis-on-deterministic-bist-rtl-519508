// misr: multiple-input signature register that compacts the scan-chain
// outputs into a signature.
//
// A W-bit type I shift register like the PRPG: the feedback bit is the XOR of
// the stages selected by POLY (bit j selects stage W-1-j), it enters stage 0,
// and input k is XORed into the D input of stage k:
//   next[0] = fb ^ d[0],   next[k] = sig[k-1] ^ d[k]   (k < NIN)
// en advances it by one clock; clear (synchronous) zeroes it.
// The document names the register and its role only; width, polynomial and
// input positions are this design's choices (default: 32 bits, P0).
module misr
  import vlr_pkg::*;
#(
  parameter int unsigned    W    = 32,
  parameter int unsigned    NIN  = 4,
  parameter logic [W-1:0]   POLY = POLY_P0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           clear,
  input  logic [NIN-1:0] d,
  output logic [W-1:0]   sig
);

  initial assert (NIN >= 1 && NIN <= W)
    else $error("misr: NIN must be in 1..W");

  logic         fb;
  logic [W-1:0] din;

  always_comb begin
    fb = 1'b0;
    for (int j = 0; j < int'(W); j++)
      if (POLY[j]) fb ^= sig[W-1-j];
    din = '0;
    din[NIN-1:0] = d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sig <= '0;
    else if (clear)  sig <= '0;
    else if (en)     sig <= {sig[W-2:0], fb} ^ din;
  end

endmodule
