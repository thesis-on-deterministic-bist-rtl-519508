// sw_decomp_system: the processor-based decompression scheme as a datapath.
//
// N scan chains of the circuit under test are accessed through one N-bit
// scan buffer: on each scan shift every chain takes one bit of the buffer
// and returns its output bit. The decompressor is the two-dimensional one
// of sw2d_engine (N segments of length L in a circular buffer), the response
// words are compacted by one's-complement addition (ones_comp_sig), and the
// seeds come from a word memory. Patterns are encoded by concatenation: one
// seed of N*L bits is loaded per group of G patterns, and the decompressor
// then runs on without reseeding for the G patterns of the group.
//
// Sequence, per group: LOAD (L clocks, copy the seed words), then G times:
// SHIFT (LS clocks: one decompressor step, one chain shift and one signature
// add per clock) and CAPT (1 clock, the chains capture the response). After
// the last group, FLUSH (LS shift clocks) compacts the last response.
// The signature adds the chains' output word of every shift clock,
// including the words shifted out while the first pattern is shifted in.
// One clock here does the work of one pass of the processor's loop; the
// scan buffer is modelled as the wires between the decompressor output, the
// chains and the adder. Defaults: s38584 on a 32-bit data path, chains of
// 46 flip-flops, groups of 8 patterns, 7 groups of 16 words stored.
module sw_decomp_system
  import vlr_pkg::*;
#(
  parameter int unsigned      N          = 32,
  parameter int unsigned      L          = 16,
  parameter logic [L-1:0]     FB_MASK    = L'((1 << 9) | (1 << 5)),
  parameter logic [L-1:0]     TAP_MASK   = L'(1 << 15),
  parameter logic [N-1:0]     ROT_MASK   = N'((1 << 1) | (1 << 2)),
  parameter int unsigned      LS         = 46,
  parameter int unsigned      G          = 8,
  parameter int unsigned      SEED_DEPTH = 128,
  parameter int unsigned      AW         = $clog2(SEED_DEPTH),
  parameter int unsigned      PW         = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // loading the seed memory
  input  logic                  mem_we,
  input  logic [AW-1:0]         mem_waddr,
  input  logic [N-1:0]          mem_wdata,
  // session control
  input  logic                  start,
  input  logic [PW-1:0]         cfg_ngroups,
  output logic                  busy,
  output logic                  done,
  output sw_phase_e             phase,
  output logic [PW-1:0]         pat_count,
  output logic [N-1:0]          signature,
  // circuit under test
  output logic [N-1:0][LS-1:0]  scan_q,
  input  logic [N-1:0][LS-1:0]  cut_resp,
  output logic                  capture
);

  localparam int unsigned HW = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned CW = 16;

  initial assert (G >= 1 && LS >= 2 && LS < (1 << CW) && L <= SEED_DEPTH)
    else $error("sw_decomp_system: bad parameters");

  sw_phase_e     ph_d;
  logic [CW-1:0] cnt, cnt_d;
  logic [AW-1:0] ptr, ptr_d;
  logic [PW-1:0] pc_d, grp, grp_d;
  logic [CW-1:0] pin, pin_d;
  logic [HW-1:0] idx, idx_d;
  logic [N-1:0]  rdata;
  logic          eng_load, eng_step;
  logic [N-1:0]  eng_out;
  logic          chain_en, chain_se, sig_en, sig_clear;
  logic [N-1:0]  so;

  test_data_memory #(.W(N), .DEPTH(SEED_DEPTH), .AW(AW)) u_mem (
    .clk,
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata),
    .raddr (ptr_d),
    .rdata
  );

  sw2d_engine #(.N(N), .L(L), .FB_MASK(FB_MASK), .TAP_MASK(TAP_MASK), .ROT_MASK(ROT_MASK), .HW(HW)) u_eng (
    .clk, .rst_n,
    .load      (eng_load),
    .load_idx  (idx),
    .load_word (rdata),
    .step      (eng_step),
    .out       (eng_out),
    .head      ()
  );

  always_comb begin
    ph_d      = phase;
    cnt_d     = cnt;
    ptr_d     = ptr;
    pc_d      = pat_count;
    grp_d     = grp;
    pin_d     = pin;
    idx_d     = idx;
    eng_load  = 1'b0;
    eng_step  = 1'b0;
    chain_en  = 1'b0;
    chain_se  = 1'b1;
    sig_en    = 1'b0;
    sig_clear = 1'b0;

    unique case (phase)
      SW_IDLE, SW_DONE: begin
        if (start) begin
          sig_clear = 1'b1;
          ptr_d     = '0;
          pc_d      = '0;
          grp_d     = '0;
          idx_d     = '0;
          cnt_d     = CW'(LS);
          ph_d      = (cfg_ngroups != 0) ? SW_LOAD : SW_FLUSH;
        end
      end

      SW_LOAD: begin
        eng_load = 1'b1;
        ptr_d    = ptr + 1'b1;
        idx_d    = idx + 1'b1;
        if (idx == HW'(L - 1)) begin
          idx_d = '0;
          pin_d = '0;
          cnt_d = CW'(LS);
          ph_d  = SW_SHIFT;
        end
      end

      SW_SHIFT: begin
        eng_step = 1'b1;
        chain_en = 1'b1;
        sig_en   = 1'b1;
        cnt_d    = cnt - 1'b1;
        if (cnt == 1) ph_d = SW_CAPT;
      end

      SW_CAPT: begin
        chain_en = 1'b1;
        chain_se = 1'b0;
        pc_d     = pat_count + 1'b1;
        pin_d    = pin + 1'b1;
        cnt_d    = CW'(LS);
        ph_d     = SW_SHIFT;
        if (pin + 1'b1 == CW'(G)) begin
          grp_d = grp + 1'b1;
          ph_d  = (grp + 1'b1 == cfg_ngroups) ? SW_FLUSH : SW_LOAD;
        end
      end

      SW_FLUSH: begin
        chain_en = 1'b1;
        sig_en   = 1'b1;
        cnt_d    = cnt - 1'b1;
        if (cnt == 1) ph_d = SW_DONE;
      end

      default: ph_d = SW_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= SW_IDLE;
      cnt       <= '0;
      ptr       <= '0;
      pat_count <= '0;
      grp       <= '0;
      pin       <= '0;
      idx       <= '0;
    end else begin
      phase     <= ph_d;
      cnt       <= cnt_d;
      ptr       <= ptr_d;
      pat_count <= pc_d;
      grp       <= grp_d;
      pin       <= pin_d;
      idx       <= idx_d;
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_chain
    scan_chain #(.LEN(LS), .SEG(1)) u_chain (
      .clk, .rst_n,
      .en        (chain_en),
      .se        (chain_se),
      .si        (eng_out[j]),
      .seg_clear (1'b0),
      .pi        (cut_resp[j]),
      .q         (scan_q[j]),
      .so        (so[j]),
      .seg_tail  ()
    );
  end

  ones_comp_sig #(.N(N)) u_sig (
    .clk, .rst_n,
    .en    (sig_en),
    .clear (sig_clear),
    .d     (so),
    .sig   (signature)
  );

  assign busy    = (phase != SW_IDLE) && (phase != SW_DONE);
  assign done    = (phase == SW_DONE);
  assign capture = chain_en & ~chain_se;

endmodule
