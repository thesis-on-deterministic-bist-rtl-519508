// test_data_memory: the memory unit that holds the compressed test data.
//
// For the hardware decompressors it is a bit stream (W = 1): records of one
// size bit followed by a seed field. For the processor-based decompressor it
// holds W-bit seed words. DEPTH words of W bits. A write port fills it
// before the test (from a tester or a loader); the read port is synchronous:
// rdata is the word at the raddr presented at the previous clock edge. The
// document leaves the memory's place open (on chip, on separate parts or in
// the tester); its organisation is this design's choice. The default DEPTH
// of 8192 bits holds the largest compressed stream of the default circuit
// (5346 bits, one scan chain).
module test_data_memory #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
