// hw_decomp_system: one chip under test with its compressed-pattern source:
// test data memory, test controller, decompressor, NS scan chains and a
// signature register.
//
// The controller reads records (size bit + seed field) from the memory and
// drives Shift, Reset and Decompression of the decompressor, which feeds the
// scan chains; chain outputs are compacted by the MISR. The circuit under
// test itself is outside: the chain contents leave on scan_q (they are what
// the combinational logic sees) and the response enters on cut_resp, which
// the chains capture after each pattern.
//
// Decompressor choice (elaboration time):
//   NS == 1                  : PRPG + one chain segment (decomp_single)
//   NS > 1, PHASE_SHIFTER=0  : chain feedbacks into the PRPG (decomp_multi),
//                              the general form and the default
//   NS > 1, PHASE_SHIFTER=1  : extended LFSR through chain 0 plus an XOR tree
//                              (decomp_phase)
// SEG is the number of flip-flops each chain lends to the decompressor (for
// decomp_phase only chain 0 lends, SEG <= LS). Defaults are those of the
// s9234 circuit with 4 chains: LS = 62 and 96 borrowed flip-flops, 24 per
// chain, with the 32-bit P0 PRPG.
//
// Timing: after start, LS+1 clocks per random pattern; per seed record
// 1 (size bit) + RESET_CYCLES + field length + DECOMP_CYCLES + 1 (capture);
// LS flush clocks; then done. RESET_CYCLES is 1 when Reset clears the whole
// decompressor at once and SEG+1 when it zeroes the lent segments by shifting
// (decomp_multi). DECOMP_CYCLES is LS-SEG when the lent flip-flops head the
// chains (the seed-loaded segments end at the far end of each chain) and LS
// when the chains are fed only through the XOR tree.
// The memory, controller, decompressor, scan chains and MISR and their
// connections follow the document's overall scheme; the clock counts,
// the memory size and the MISR taps are this design's own. With the phase
// shifter only chain 0 lends flip-flops, so the segment tails of the other
// chains are left unread in that configuration.
module hw_decomp_system
  import vlr_pkg::*;
#(
  parameter int unsigned        NS            = 4,
  parameter int unsigned        LS            = 62,
  parameter int unsigned        SEG           = 24,
  parameter bit                 PHASE_SHIFTER = 1'b0,
  parameter int unsigned        LEN           = PRPG_LEN,
  parameter logic [LEN-1:0]     POLY          = POLY_P0,
  parameter int unsigned        MISR_W        = 32,
  parameter int unsigned        MEM_DEPTH     = 8192,
  parameter int unsigned        AW            = $clog2(MEM_DEPTH),
  parameter int unsigned        LW            = 10,
  parameter int unsigned        PW            = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // loading the test data memory
  input  logic                   mem_we,
  input  logic [AW-1:0]          mem_waddr,
  input  logic                   mem_wdata,
  // session control
  input  logic                   start,
  input  logic [PW-1:0]          cfg_nrand,
  input  logic [PW-1:0]          cfg_ndet,
  input  logic [LW-1:0]          cfg_base,
  input  logic [LW-1:0]          cfg_d,
  output logic                   busy,
  output logic                   done,
  output ctrl_phase_e            phase,
  output logic [PW-1:0]          pat_count,
  output logic [LW-1:0]          seed_len,
  output logic [MISR_W-1:0]      signature,
  output logic [LEN-1:0]         prpg_state,
  // circuit under test
  output logic [NS-1:0][LS-1:0]  scan_q,
  input  logic [NS-1:0][LS-1:0]  cut_resp,
  output logic                   capture
);

  localparam int unsigned RESET_CYCLES  = (NS == 1 || PHASE_SHIFTER) ? 1 : SEG + 1;
  localparam int unsigned DECOMP_CYCLES = (NS > 1 && PHASE_SHIFTER) ? LS
                                        : (LS > SEG) ? LS - SEG : 1;

  logic [AW-1:0]  mem_raddr;
  logic           mem_rdata;
  decomp_ctrl_t   dctl;
  logic           chain_en, chain_se, misr_en, misr_clear;
  logic [NS-1:0]  chain_in, seg_tail, so;
  logic [NS-1:0]  seg_clear;

  test_data_memory #(.DEPTH(MEM_DEPTH), .AW(AW)) u_mem (
    .clk,
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata),
    .raddr (mem_raddr),
    .rdata (mem_rdata)
  );

  test_controller #(.LS(LS), .RESET_CYCLES(RESET_CYCLES), .DECOMP_CYCLES(DECOMP_CYCLES), .AW(AW), .LW(LW), .PW(PW)) u_ctrl (
    .clk, .rst_n,
    .start, .cfg_nrand, .cfg_ndet, .cfg_base, .cfg_d,
    .mem_raddr, .mem_rdata,
    .dctl, .chain_en, .chain_se, .misr_en, .misr_clear,
    .phase, .busy, .done, .seed_len, .pat_count
  );

  if (NS == 1) begin : g_single
    decomp_single #(.LEN(LEN), .POLY(POLY)) u_decomp (
      .clk, .rst_n,
      .ctrl       (dctl),
      .seg_tail   (seg_tail[0]),
      .chain_in   (chain_in[0]),
      .seg_clear  (seg_clear[0]),
      .prpg_state
    );
  end else if (PHASE_SHIFTER) begin : g_phase
    decomp_phase #(.NS(NS), .LEN(LEN), .POLY(POLY)) u_decomp (
      .clk, .rst_n,
      .ctrl       (dctl),
      .seg_tail   (seg_tail[0]),
      .chain_in,
      .seg_clear  (seg_clear[0]),
      .prpg_state
    );
    assign seg_clear[NS-1:1] = '0;
  end else begin : g_multi
    decomp_multi #(.NS(NS), .LEN(LEN), .POLY(POLY)) u_decomp (
      .clk, .rst_n,
      .ctrl       (dctl),
      .seg_tail,
      .chain_in,
      .prpg_state
    );
    assign seg_clear = '0;
  end

  for (genvar j = 0; j < NS; j++) begin : g_chain
    scan_chain #(.LEN(LS), .SEG(SEG)) u_chain (
      .clk, .rst_n,
      .en        (chain_en),
      .se        (chain_se),
      .si        (chain_in[j]),
      .seg_clear (seg_clear[j]),
      .pi        (cut_resp[j]),
      .q         (scan_q[j]),
      .so        (so[j]),
      .seg_tail  (seg_tail[j])
    );
  end

  misr #(.W(MISR_W), .NIN(NS), .POLY(MISR_W'(POLY_P0))) u_misr (
    .clk, .rst_n,
    .en    (misr_en),
    .clear (misr_clear),
    .d     (so),
    .sig   (signature)
  );

  assign capture = chain_en & ~chain_se;

endmodule
