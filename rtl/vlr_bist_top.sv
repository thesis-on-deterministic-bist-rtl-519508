// vlr_bist_top: the three decompression schemes side by side, each with its
// own ports and its own circuit-under-test interface.
//
//   u_single : one scan chain of 247 flip-flops, 96 of them lent to the
//              decompressor (PRPG + chain segment), circuit s9234.
//   u_multi  : 4 scan chains of 62 flip-flops, 24 per chain lent, feedbacks
//              from every chain into the PRPG (the general multiple-chain
//              form), circuit s9234.
//   u_phase  : 4 scan chains of 62 flip-flops, chain 0 lent entirely, the
//              other chains fed by an XOR tree.
//   u_sw     : 32 scan chains of 46 flip-flops fed by the two-dimensional
//              decompressor of the processor-based scheme, circuit s38584.
// The four systems share only the clock and the reset; each has its own
// memory write port, session configuration, start, status and signature.
// Ports are prefixed s_ (single chain), m_ (four chains, chain feedbacks),
// p_ (four chains, phase shifter) and w_ (software scheme); scan_q carries
// the chain contents to the circuit under test and cut_resp brings its
// response back, captured at the end of each pattern. Timing is that of
// hw_decomp_system and sw_decomp_system.
// The sizes are those of the experiments (32-bit P0 PRPG, chain lengths and
// lent flip-flops of s9234; 32-bit data path, 16-word decompressor and
// 46-flip-flop chains of s38584). Showing the variants side by side in one
// top is this design's choice; the document presents them as alternatives.
module vlr_bist_top
  import vlr_pkg::*;
#(
  parameter int unsigned S_LS   = 247,
  parameter int unsigned S_SEG  = 96,
  parameter int unsigned M_NS   = 4,
  parameter int unsigned M_LS   = 62,
  parameter int unsigned M_SEG  = 24,
  parameter int unsigned MEM_AW = 13,
  parameter int unsigned SW_N   = 32,
  parameter int unsigned SW_LS  = 46,
  parameter int unsigned SW_AW  = 7
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // single-chain system
  input  logic                        s_mem_we,
  input  logic [MEM_AW-1:0]           s_mem_waddr,
  input  logic                        s_mem_wdata,
  input  logic                        s_start,
  input  logic [15:0]                 s_nrand,
  input  logic [15:0]                 s_ndet,
  input  logic [9:0]                  s_base,
  input  logic [9:0]                  s_d,
  output logic                        s_done,
  output ctrl_phase_e                 s_phase,
  output logic [31:0]                 s_signature,
  output logic [0:0][S_LS-1:0]        s_scan_q,
  input  logic [0:0][S_LS-1:0]        s_cut_resp,
  // multiple-chain system (chain feedbacks into the PRPG)
  input  logic                        m_mem_we,
  input  logic [MEM_AW-1:0]           m_mem_waddr,
  input  logic                        m_mem_wdata,
  input  logic                        m_start,
  input  logic [15:0]                 m_nrand,
  input  logic [15:0]                 m_ndet,
  input  logic [9:0]                  m_base,
  input  logic [9:0]                  m_d,
  output logic                        m_done,
  output ctrl_phase_e                 m_phase,
  output logic [31:0]                 m_signature,
  output logic [M_NS-1:0][M_LS-1:0]   m_scan_q,
  input  logic [M_NS-1:0][M_LS-1:0]   m_cut_resp,
  // multiple-chain system (phase shifter)
  input  logic                        p_mem_we,
  input  logic [MEM_AW-1:0]           p_mem_waddr,
  input  logic                        p_mem_wdata,
  input  logic                        p_start,
  input  logic [15:0]                 p_nrand,
  input  logic [15:0]                 p_ndet,
  input  logic [9:0]                  p_base,
  input  logic [9:0]                  p_d,
  output logic                        p_done,
  output ctrl_phase_e                 p_phase,
  output logic [31:0]                 p_signature,
  output logic [M_NS-1:0][M_LS-1:0]   p_scan_q,
  input  logic [M_NS-1:0][M_LS-1:0]   p_cut_resp,
  // processor-based scheme
  input  logic                        w_mem_we,
  input  logic [SW_AW-1:0]            w_mem_waddr,
  input  logic [SW_N-1:0]             w_mem_wdata,
  input  logic                        w_start,
  input  logic [15:0]                 w_ngroups,
  output logic                        w_done,
  output sw_phase_e                   w_phase,
  output logic [15:0]                 w_pat_count,
  output logic [SW_N-1:0]             w_signature,
  output logic [SW_N-1:0][SW_LS-1:0]  w_scan_q,
  input  logic [SW_N-1:0][SW_LS-1:0]  w_cut_resp
);

  hw_decomp_system #(.NS(1), .LS(S_LS), .SEG(S_SEG), .MEM_DEPTH(1 << MEM_AW)) u_single (
    .clk, .rst_n,
    .mem_we (s_mem_we), .mem_waddr (s_mem_waddr), .mem_wdata (s_mem_wdata),
    .start (s_start), .cfg_nrand (s_nrand), .cfg_ndet (s_ndet), .cfg_base (s_base), .cfg_d (s_d),
    .busy (), .done (s_done), .phase (s_phase), .pat_count (), .seed_len (),
    .signature (s_signature), .prpg_state (),
    .scan_q (s_scan_q), .cut_resp (s_cut_resp), .capture ()
  );

  hw_decomp_system #(.NS(M_NS), .LS(M_LS), .SEG(M_SEG), .MEM_DEPTH(1 << MEM_AW)) u_multi (
    .clk, .rst_n,
    .mem_we (m_mem_we), .mem_waddr (m_mem_waddr), .mem_wdata (m_mem_wdata),
    .start (m_start), .cfg_nrand (m_nrand), .cfg_ndet (m_ndet), .cfg_base (m_base), .cfg_d (m_d),
    .busy (), .done (m_done), .phase (m_phase), .pat_count (), .seed_len (),
    .signature (m_signature), .prpg_state (),
    .scan_q (m_scan_q), .cut_resp (m_cut_resp), .capture ()
  );

  hw_decomp_system #(.NS(M_NS), .LS(M_LS), .SEG(M_LS), .PHASE_SHIFTER(1'b1), .MEM_DEPTH(1 << MEM_AW)) u_phase (
    .clk, .rst_n,
    .mem_we (p_mem_we), .mem_waddr (p_mem_waddr), .mem_wdata (p_mem_wdata),
    .start (p_start), .cfg_nrand (p_nrand), .cfg_ndet (p_ndet), .cfg_base (p_base), .cfg_d (p_d),
    .busy (), .done (p_done), .phase (p_phase), .pat_count (), .seed_len (),
    .signature (p_signature), .prpg_state (),
    .scan_q (p_scan_q), .cut_resp (p_cut_resp), .capture ()
  );

  sw_decomp_system #(.N(SW_N), .LS(SW_LS), .SEED_DEPTH(1 << SW_AW)) u_sw (
    .clk, .rst_n,
    .mem_we (w_mem_we), .mem_waddr (w_mem_waddr), .mem_wdata (w_mem_wdata),
    .start (w_start), .cfg_ngroups (w_ngroups),
    .busy (), .done (w_done), .phase (w_phase), .pat_count (w_pat_count),
    .signature (w_signature),
    .scan_q (w_scan_q), .cut_resp (w_cut_resp), .capture ()
  );

endmodule
