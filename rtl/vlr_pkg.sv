// vlr_pkg: constants and types shared by the variable-length reseeding
// decompression hardware.
//
// Polynomial masks use one convention throughout: for a degree-K polynomial
// X^K + h_{K-1} X^{K-1} + ... + h_1 X + 1, bit j of the K-bit mask is h_j
// (bit 0 is the constant term, always 1; the X^K term is implicit).
// P0 is the 32-bit pseudo-random pattern generator polynomial that the
// hardware experiments use as their main PRPG; P1..P5 are the alternatives
// they were repeated with.
package vlr_pkg;

  localparam int unsigned PRPG_LEN = 32;

  // P0 = X^32 + X^29 + X^11 + X^3 + 1
  localparam logic [31:0] POLY_P0 = 32'h2000_0809;
  // P1 = X^32 + X^30 + X^21 + X^19 + X^18 + X^16 + X^14 + X^5 + 1
  localparam logic [31:0] POLY_P1 = 32'h402D_4021;
  // P5 = X^32 + 1 (a plain rotating register)
  localparam logic [31:0] POLY_P5 = 32'h0000_0001;

  // Phases of the test controller.
  typedef enum logic [3:0] {
    PH_IDLE,
    PH_RAND_SHIFT,   // random mode: PRPG free-running, chains shifting
    PH_RAND_CAPT,    // random mode: capture the response
    PH_READ_SIZE,    // read the size bit of the next record
    PH_RESET,        // Reset asserted while the serial path shifts
    PH_SEED,         // seed field shifted in through the seed multiplexer
    PH_DECOMP,       // decompression: extra feedbacks enabled
    PH_DET_CAPT,     // deterministic mode: capture the response
    PH_FLUSH,        // shift the last response into the signature register
    PH_DONE
  } ctrl_phase_e;

  // Phases of the sequencer of the processor-based decompressor.
  typedef enum logic [2:0] {
    SW_IDLE,
    SW_LOAD,         // copy the L seed words into the circular buffer
    SW_SHIFT,        // one decompressor step and one scan shift per clock
    SW_CAPT,         // apply the pattern, capture the response
    SW_FLUSH,        // shift the last response out into the signature
    SW_DONE
  } sw_phase_e;

  // Control word from the test controller to a decompressor.
  typedef struct packed {
    logic en;        // clock enable of the PRPG
    logic shift;     // Shift: seed multiplexer selects the seed input
    logic reset;     // Reset
    logic decomp;    // Decompression: enables the extra feedbacks
    logic seed_in;   // serial seed bit
  } decomp_ctrl_t;

endpackage
