// decomp_multi: decompressor for a circuit with NS = 2^r scan chains, built
// from the PRPG, the first SEG flip-flops of every chain, an XOR network,
// AND gates and multiplexers.
//
// Deterministic mode (shift = 0, decomp = 1): chain 0 is fed by the PRPG
// output, chain j >= 1 by output j of the XOR network. The last borrowed
// flip-flop of chain i is fed back, through an AND gate with Decompression,
// into extra XOR gates in front of PRPG stages (i + 2^v) mod 2^r,
// v = 0 .. r-1. Random mode (decomp = 0) leaves only the PRPG and the XOR
// network.
// Seed loading (shift = 1): the multiplexer in front of chain j >= 1 takes
// the last borrowed flip-flop of chain j-1 through an AND gate with Reset, so
// the PRPG and the NS segments form one serial path of 32 + NS*SEG stages:
// seed_in -> PRPG -> chain 0 -> chain 1 -> ... -> chain NS-1.
// While reset = 1 these links shift zeros into chains 1..NS-1 and the PRPG is
// cleared, so holding Reset for SEG+1 shift clocks zeroes the whole path
// without a reset line on any scan flip-flop.
//
// The feedback rule, the AND gates, the multiplexers and the serial path
// follow the document. Its stage numbering is read literally (site p is the
// D input of PRPG stage p); the AND gate passes its input while Reset is low;
// Reset also clears the PRPG, as in the document's phase-shifter variant.
// Those three readings and the XOR network taps are this design's choices.
module decomp_multi
  import vlr_pkg::*;
#(
  parameter int unsigned           NS   = 4,
  parameter int unsigned           LEN  = PRPG_LEN,
  parameter logic [LEN-1:0]        POLY = POLY_P0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  decomp_ctrl_t   ctrl,
  input  logic [NS-1:0]  seg_tail,
  output logic [NS-1:0]  chain_in,
  output logic [LEN-1:0] prpg_state
);

  localparam int unsigned R = $clog2(NS);

  initial assert (NS >= 2 && (1 << R) == NS && NS <= LEN)
    else $error("decomp_multi: NS must be a power of two in 2..LEN");

  logic [NS-1:0]  fb_gated;
  logic [LEN-1:0] inject;
  logic [NS-1:0]  xnet;
  logic           prpg_out;

  assign fb_gated = ctrl.decomp ? seg_tail : '0;

  always_comb begin
    inject = '0;
    for (int i = 0; i < int'(NS); i++)
      for (int v = 0; v < int'(R); v++)
        inject[(i + (1 << v)) % int'(NS)] ^= fb_gated[i];
  end

  phase_shifter #(.LEN(LEN), .NOUT(NS)) u_xnet (
    .state (prpg_state),
    .out   (xnet)
  );

  always_comb begin
    chain_in[0] = prpg_out;
    for (int j = 1; j < int'(NS); j++)
      chain_in[j] = ctrl.shift ? (seg_tail[j-1] & ~ctrl.reset) : xnet[j];
  end

  prpg #(.LEN(LEN), .POLY(POLY)) u_prpg (
    .clk, .rst_n,
    .en       (ctrl.en),
    .shift    (ctrl.shift),
    .seed_in  (ctrl.seed_in),
    .clear    (ctrl.reset),
    .fb_extra (1'b0),
    .inject   (inject),
    .state    (prpg_state),
    .out      (prpg_out)
  );

endmodule
