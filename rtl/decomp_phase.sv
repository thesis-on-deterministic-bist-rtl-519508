// decomp_phase: decompressor for NS scan chains built as an extended LFSR
// plus a phase shifter.
//
// The decompression LFSR is the PRPG followed by the first SEG flip-flops of
// chain 0, exactly as in the single-chain decompressor: a seed multiplexer
// at the PRPG input, Reset clearing the PRPG and the borrowed segment, and
// the last borrowed flip-flop fed back through an AND gate with
// Decompression into the PRPG feedback. An XOR tree (phase_shifter) drives
// chains 1..NS-1 from the PRPG stages, so that NS bits are produced per
// clock. Since only chain 0 lends flip-flops, the LFSR can grow by at most
// one chain's length. Structure after the document; the XOR-tree taps are
// this design's choice.
module decomp_phase
  import vlr_pkg::*;
#(
  parameter int unsigned           NS   = 4,
  parameter int unsigned           LEN  = PRPG_LEN,
  parameter logic [LEN-1:0]        POLY = POLY_P0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  decomp_ctrl_t   ctrl,
  input  logic           seg_tail,    // last borrowed flip-flop of chain 0
  output logic [NS-1:0]  chain_in,
  output logic           seg_clear,   // clears the borrowed flip-flops
  output logic [LEN-1:0] prpg_state
);

  logic [NS-1:0] xnet;

  phase_shifter #(.LEN(LEN), .NOUT(NS)) u_xnet (
    .state (prpg_state),
    .out   (xnet)
  );

  decomp_single #(.LEN(LEN), .POLY(POLY)) u_core (
    .clk, .rst_n, .ctrl, .seg_tail,
    .chain_in   (),
    .seg_clear,
    .prpg_state
  );

  // xnet[0] is the PRPG output, the same bit the core drives into chain 0.
  assign chain_in = xnet;

endmodule
