// phase_shifter: XOR network that derives one bit per scan chain from the
// stages of the PRPG, so that several chains are fed in the same clock.
//
// Output 0 is the PRPG output stage itself (the first chain is fed straight
// from the PRPG, as in the drawings of the multiple-chain decompressors).
// Output j >= 1 is the XOR of three stages: the output stage LEN-1, stage
// t = j*LEN/NOUT - 1 and stage (t + LEN/2) mod (LEN-1). A single extra tap
// would make output j a copy of output 0 delayed by only LEN-1-t clocks,
// which ties bits of the same pattern together; the three-tap sum is a shift
// of the PRPG sequence by a far larger, unrelated distance. The document
// describes the network only as an XOR tree; the choice of stages is this
// design's own.
//
// Purely combinational; NOUT must not exceed LEN.
module phase_shifter #(
  parameter int unsigned LEN  = 32,
  parameter int unsigned NOUT = 4
) (
  input  logic [LEN-1:0]  state,
  output logic [NOUT-1:0] out
);

  initial assert (NOUT >= 1 && NOUT <= LEN)
    else $error("phase_shifter: NOUT must be in 1..LEN");

  always_comb begin
    out[0] = state[LEN-1];
    for (int j = 1; j < int'(NOUT); j++)
      out[j] = state[LEN-1] ^ state[j*int'(LEN)/int'(NOUT) - 1]
             ^ state[(j*int'(LEN)/int'(NOUT) - 1 + int'(LEN)/2) % (int'(LEN) - 1)];
  end

endmodule
