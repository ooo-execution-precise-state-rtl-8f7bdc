// prf: physical register file, the only place values live in the core.
//
// NUM_PREGS registers of XLEN bits with two combinational read ports for
// the operands of the instruction in execute, one write port for the
// result in complete, and a combinational debug read port. A write lands
// at the rising edge, so a value written in complete is read by an
// instruction executing in the next cycle without a bypass. Reset clears
// all registers (own choice), which gives the architectural registers a
// defined initial value of zero.
module prf #(
  parameter int unsigned NUM_PREGS = r10k_pkg::NUM_PREGS,
  parameter int unsigned XLEN      = r10k_pkg::XLEN,
  localparam int unsigned PW = $clog2(NUM_PREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PW-1:0]   ra1,
  output logic [XLEN-1:0] rd1,
  input  logic [PW-1:0]   ra2,
  output logic [XLEN-1:0] rd2,
  input  logic            we,
  input  logic [PW-1:0]   wa,
  input  logic [XLEN-1:0] wd,
  input  logic [PW-1:0]   dbg_ra,
  output logic [XLEN-1:0] dbg_rd
);

  logic [XLEN-1:0] regs_q [NUM_PREGS];

  assign rd1    = regs_q[ra1];
  assign rd2    = regs_q[ra2];
  assign dbg_rd = regs_q[dbg_ra];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NUM_PREGS; i++) regs_q[i] <= '0;
    end else if (we) begin
      regs_q[wa] <= wd;
    end
  end

endmodule
