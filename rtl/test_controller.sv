// test_controller: sequences one test session of a chip with a decompressor.
//
// A session is NRAND random patterns followed by NDET deterministic ones.
//   random pattern       : LS shift clocks with the PRPG free-running and the
//                          extra feedbacks off, then one capture clock.
//   deterministic pattern: read the record's size bit (1 clock), hold Reset
//                          for RESET_CYCLES shift clocks, shift the seed field
//                          in through the seed multiplexer (one bit per
//                          clock, current length from seed_len_counter),
//                          decompress for DECOMP_CYCLES clocks, capture
//                          (1 clock).
//   flush                : LS more shift clocks so that the last response
//                          reaches the signature register.
// Scan chains shift in every phase except the size-bit read and the
// captures, so the previous response is compacted while the next seed is
// loaded. The signature register is cleared at start and enabled on every
// shift clock. Records are read in order from a bit-serial memory: the
// address presented is the next pointer value, so rdata always equals the bit
// at the current pointer. A size bit of 1 adds d to the seed length once its
// record is done (the next field is longer), as in the test data format.
//
// DECOMP_CYCLES is LS - SEG when the lent flip-flops head the chains: the
// decompression LFSR then stops with the whole chain holding consecutive
// bits of its output, the lent flip-flops the most recent ones. It is LS
// when chains are fed only through an XOR tree.
// RESET_CYCLES is 1 for the single-chain decompressor, where Reset clears
// the LFSR in one clock, and SEG+1 for the multiple-chain one, where Reset
// zeroes the borrowed segments by shifting. The format, the size-bit rule
// and the Reset/Shift/Decompression controls follow the document; the phase
// order, the clock counts, the random phase length and the flush are this
// design's choices.
module test_controller
  import vlr_pkg::*;
#(
  parameter int unsigned LS           = 62,    // longest scan chain
  parameter int unsigned RESET_CYCLES = 25,
  parameter int unsigned DECOMP_CYCLES = 38,  // clocks of decompression
  parameter int unsigned AW           = 13,    // memory address bits
  parameter int unsigned LW           = 10,    // seed length bits
  parameter int unsigned PW           = 16     // pattern count bits
) (
  input  logic          clk,
  input  logic          rst_n,
  // session configuration, sampled while idle
  input  logic          start,
  input  logic [PW-1:0] cfg_nrand,
  input  logic [PW-1:0] cfg_ndet,
  input  logic [LW-1:0] cfg_base,     // b: length of the shortest seed field
  input  logic [LW-1:0] cfg_d,        // d: length increment
  // memory read port
  output logic [AW-1:0] mem_raddr,
  input  logic          mem_rdata,
  // decompressor, scan chains, signature register
  output decomp_ctrl_t  dctl,
  output logic          chain_en,
  output logic          chain_se,
  output logic          misr_en,
  output logic          misr_clear,
  // status
  output ctrl_phase_e   phase,
  output logic          busy,
  output logic          done,
  output logic [LW-1:0] seed_len,
  output logic [PW-1:0] pat_count
);

  localparam int unsigned CW = 16;

  initial assert (LS >= 1 && LS < (1 << CW) && RESET_CYCLES >= 1 && RESET_CYCLES < (1 << CW)
                  && DECOMP_CYCLES >= 1 && DECOMP_CYCLES < (1 << CW))
    else $error("test_controller: LS, RESET_CYCLES and DECOMP_CYCLES must be in 1..65535");

  ctrl_phase_e   ph_d;
  logic [CW-1:0] cnt, cnt_d;
  logic [AW-1:0] ptr, ptr_d;
  logic [PW-1:0] pc_d;
  logic          grow, grow_d;
  logic          len_load, len_inc;

  seed_len_counter #(.LW(LW)) u_len (
    .clk, .rst_n,
    .load (len_load),
    .base (cfg_base),
    .inc  (len_inc),
    .d    (cfg_d),
    .len  (seed_len)
  );

  always_comb begin
    ph_d       = phase;
    cnt_d      = cnt;
    ptr_d      = ptr;
    pc_d       = pat_count;
    grow_d     = grow;
    len_load   = 1'b0;
    len_inc    = 1'b0;
    dctl       = '0;
    chain_en   = 1'b0;
    chain_se   = 1'b1;
    misr_en    = 1'b0;
    misr_clear = 1'b0;

    unique case (phase)
      PH_IDLE, PH_DONE: begin
        if (start) begin
          misr_clear = 1'b1;
          len_load   = 1'b1;
          ptr_d      = '0;
          pc_d       = '0;
          cnt_d      = CW'(LS);
          if (cfg_nrand != 0)     ph_d = PH_RAND_SHIFT;
          else if (cfg_ndet != 0) ph_d = PH_READ_SIZE;
          else begin ph_d = PH_FLUSH; end
        end
      end

      PH_RAND_SHIFT: begin
        dctl.en  = 1'b1;
        chain_en = 1'b1;
        misr_en  = 1'b1;
        cnt_d    = cnt - 1'b1;
        if (cnt == 1) ph_d = PH_RAND_CAPT;
      end

      PH_RAND_CAPT: begin
        chain_en = 1'b1;
        chain_se = 1'b0;
        pc_d     = pat_count + 1'b1;
        cnt_d    = CW'(LS);
        if (pat_count + 1'b1 != cfg_nrand) ph_d = PH_RAND_SHIFT;
        else if (cfg_ndet != 0)            ph_d = PH_READ_SIZE;
        else                               ph_d = PH_FLUSH;
      end

      PH_READ_SIZE: begin
        grow_d = mem_rdata;
        ptr_d  = ptr + 1'b1;
        cnt_d  = CW'(RESET_CYCLES);
        ph_d   = PH_RESET;
      end

      PH_RESET: begin
        dctl.en    = 1'b1;
        dctl.shift = 1'b1;
        dctl.reset = 1'b1;
        chain_en   = 1'b1;
        misr_en    = 1'b1;
        cnt_d      = cnt - 1'b1;
        if (cnt == 1) begin
          if (seed_len != 0) begin
            cnt_d = CW'(seed_len);
            ph_d  = PH_SEED;
          end else begin
            cnt_d = CW'(DECOMP_CYCLES);
            ph_d  = PH_DECOMP;
          end
        end
      end

      PH_SEED: begin
        dctl.en      = 1'b1;
        dctl.shift   = 1'b1;
        dctl.seed_in = mem_rdata;
        chain_en     = 1'b1;
        misr_en      = 1'b1;
        ptr_d        = ptr + 1'b1;
        cnt_d        = cnt - 1'b1;
        if (cnt == 1) begin
          cnt_d = CW'(DECOMP_CYCLES);
          ph_d  = PH_DECOMP;
        end
      end

      PH_DECOMP: begin
        dctl.en     = 1'b1;
        dctl.decomp = 1'b1;
        chain_en    = 1'b1;
        misr_en     = 1'b1;
        cnt_d       = cnt - 1'b1;
        if (cnt == 1) ph_d = PH_DET_CAPT;
      end

      PH_DET_CAPT: begin
        chain_en = 1'b1;
        chain_se = 1'b0;
        pc_d     = pat_count + 1'b1;
        len_inc  = grow;
        cnt_d    = CW'(LS);
        if (pat_count + 1'b1 != cfg_nrand + cfg_ndet) ph_d = PH_READ_SIZE;
        else                                          ph_d = PH_FLUSH;
      end

      PH_FLUSH: begin
        chain_en = 1'b1;
        misr_en  = 1'b1;
        cnt_d    = cnt - 1'b1;
        if (cnt == 1) ph_d = PH_DONE;
      end

      default: ph_d = PH_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_IDLE;
      cnt       <= '0;
      ptr       <= '0;
      pat_count <= '0;
      grow      <= 1'b0;
    end else begin
      phase     <= ph_d;
      cnt       <= cnt_d;
      ptr       <= ptr_d;
      pat_count <= pc_d;
      grow      <= grow_d;
    end
  end

  assign mem_raddr = ptr_d;
  assign busy      = (phase != PH_IDLE) && (phase != PH_DONE);
  assign done      = (phase == PH_DONE);

  // The seed bit is only ever taken from memory while Shift is asserted.
  a_seed_only_in_shift: assert property (@(posedge clk)
    dctl.seed_in |-> dctl.shift);
  // Extra feedbacks and the seed multiplexer are never enabled together.
  a_decomp_excl_shift: assert property (@(posedge clk)
    !(dctl.decomp && dctl.shift));

endmodule
