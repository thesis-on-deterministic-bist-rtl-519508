// hw_workload: one hardware decompression system (hw_decomp_system) sized
// for one configuration of the experiments, together with the driver that
// encodes random test cubes for it and checks the session (hw_sys_driver).
// K is the serial seed path, 32 + lent flip-flops; R and DC are the Reset
// and decompression clock counts the system derives from its sizes, which
// the driver needs to predict the session length.
// Ports: the shared clock and active-low reset in; the driver's finished
// flag and check/failure counts out. Timing is that of the driven system.
// The sizing formulas follow the document; the wrapper itself is a
// testbench convenience.
module hw_workload
  import vlr_pkg::*;
#(
  parameter int unsigned    NS    = 4,
  parameter int unsigned    LS    = 62,
  parameter int unsigned    SEG   = 24,
  parameter bit             PHASE = 1'b0,
  parameter logic [31:0]    POLY  = POLY_P0,
  parameter string          NAME  = "workload"
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned K  = 32 + (PHASE ? SEG : NS * SEG);
  localparam int unsigned R  = (NS == 1 || PHASE) ? 1 : SEG + 1;
  localparam int unsigned DC = (NS > 1 && PHASE) ? LS : (LS > SEG ? LS - SEG : 1);

  logic                  mem_we, mem_wdata, start, done;
  logic [12:0]           mem_waddr;
  logic [15:0]           nrand, ndet;
  logic [9:0]            base, d;
  ctrl_phase_e           phase;
  logic [31:0]           signature;
  logic [NS-1:0][LS-1:0] scan_q, cut_resp;

  hw_decomp_system #(.NS(NS), .LS(LS), .SEG(SEG), .PHASE_SHIFTER(PHASE), .POLY(POLY)) dut (
    .clk, .rst_n, .mem_we, .mem_waddr, .mem_wdata,
    .start, .cfg_nrand(nrand), .cfg_ndet(ndet), .cfg_base(base), .cfg_d(d),
    .busy(), .done, .phase, .pat_count(), .seed_len(), .signature, .prpg_state(),
    .scan_q, .cut_resp, .capture());

  hw_sys_driver #(.NS(NS), .LS(LS), .K(K), .R(R), .DC(DC), .NAME(NAME)) drv (
    .clk, .rst_n, .mem_we, .mem_waddr, .mem_wdata, .start, .nrand, .ndet, .base, .d,
    .phase, .done, .signature, .scan_q, .cut_resp, .finished, .checks, .failures);
endmodule
