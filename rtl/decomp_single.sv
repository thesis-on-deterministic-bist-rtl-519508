// decomp_single: decompressor for a circuit with a single scan chain.
//
// The decompression LFSR is the 32-bit PRPG followed by the first SEG flip-
// flops of the scan chain. Only two things are added to the PRPG: a seed
// multiplexer in front of its first stage and one extra feedback from the
// scan chain (the last borrowed flip-flop), gated by an AND gate with
// Decompression and XORed into the PRPG feedback.
//   random mode        : decomp = 0, shift = 0. The PRPG runs on its own.
//   Reset              : reset = 1 clears the PRPG and (through seg_clear)
//                        the borrowed scan flip-flops in one clock.
//   seed loading       : shift = 1. seed_in enters the PRPG's first stage,
//                        the PRPG and the chain form one shift register.
//   decompression      : shift = 0, decomp = 1. The PRPG and the borrowed
//                        segment run as one LFSR of 32+SEG stages.
// The chain's scan input is always the PRPG output. Structure, controls and
// their meaning follow the document; the clock enable and the tap position
// (the last borrowed flip-flop) are this design's choices.
module decomp_single
  import vlr_pkg::*;
#(
  parameter int unsigned           LEN  = PRPG_LEN,
  parameter logic [LEN-1:0]        POLY = POLY_P0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  decomp_ctrl_t   ctrl,
  input  logic           seg_tail,    // last borrowed scan flip-flop
  output logic           chain_in,    // scan input of the chain
  output logic           seg_clear,   // clears the borrowed flip-flops
  output logic [LEN-1:0] prpg_state
);

  logic fb_scan;

  assign fb_scan   = ctrl.decomp & seg_tail;   // the AND gate of the figure
  assign seg_clear = ctrl.en & ctrl.reset;

  prpg #(.LEN(LEN), .POLY(POLY)) u_prpg (
    .clk, .rst_n,
    .en       (ctrl.en),
    .shift    (ctrl.shift),
    .seed_in  (ctrl.seed_in),
    .clear    (ctrl.reset),
    .fb_extra (fb_scan),
    .inject   ('0),
    .state    (prpg_state),
    .out      (chain_in)
  );

endmodule
