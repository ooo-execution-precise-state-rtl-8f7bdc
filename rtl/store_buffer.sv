// store_buffer: address and data of stores that have executed but not
// retired, one slot per ROB entry.
//
// A store writes its slot (indexed by its ROB index) when it completes;
// memory is written from the slot only when the store retires, so a store
// that is rolled back never reaches memory. Writes land at the rising edge;
// the read port is combinational. Deferring the store to retire is this
// design's answer to undoing a store; the rest is plain storage.
module store_buffer #(
  parameter int unsigned DEPTH = r10k_pkg::ROB_DEPTH,
  parameter int unsigned XLEN  = r10k_pkg::XLEN,
  localparam int unsigned RW = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            we,
  input  logic [RW-1:0]   widx,
  input  logic [XLEN-1:0] waddr,
  input  logic [XLEN-1:0] wdata,
  input  logic [RW-1:0]   ridx,
  output logic [XLEN-1:0] raddr,
  output logic [XLEN-1:0] rdata
);

  logic [XLEN-1:0] addr_q [DEPTH];
  logic [XLEN-1:0] data_q [DEPTH];

  assign raddr = addr_q[ridx];
  assign rdata = data_q[ridx];

  always_ff @(posedge clk) begin
    if (we) begin
      addr_q[widx] <= waddr;
      data_q[widx] <= wdata;
    end
  end

endmodule
