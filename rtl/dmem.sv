// dmem: word-addressed data memory (the L1 data cache of the pipeline,
// modelled as a simple array without misses).
//
// WORDS words of XLEN bits. Byte addresses are used, with the word index
// taken from bits [2 +: log2(WORDS)], so addresses wrap within the array.
// Two combinational read ports (loads, and debug) and one write port that
// lands at the rising edge. Contents are not reset; they are loaded through
// the write port. Size and organisation are this design's choice.
module dmem #(
  parameter int unsigned WORDS = r10k_pkg::DMEM_WORDS,
  parameter int unsigned XLEN  = r10k_pkg::XLEN,
  localparam int unsigned WW = $clog2(WORDS)
) (
  input  logic            clk,
  input  logic [XLEN-1:0] raddr,
  output logic [XLEN-1:0] rdata,
  input  logic [XLEN-1:0] dbg_addr,
  output logic [XLEN-1:0] dbg_data,
  input  logic            we,
  input  logic [XLEN-1:0] waddr,
  input  logic [XLEN-1:0] wdata
);

  logic [XLEN-1:0] mem_q [WORDS];

  assign rdata    = mem_q[raddr[2 +: WW]];
  assign dbg_data = mem_q[dbg_addr[2 +: WW]];

  always_ff @(posedge clk) begin
    if (we) mem_q[waddr[2 +: WW]] <= wdata;
  end

endmodule
