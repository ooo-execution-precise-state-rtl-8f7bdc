// fu: the execute datapath shared by the five functional units.
//
// Combinational. For the operation issued this cycle it computes:
//   ALU  add / sub / addi  result = a + b, a - b, a + imm
//   FP1/FP2 mulf           result = a * b (low XLEN bits)
//   LD   ldf               addr = b + imm, result = the loaded word
//   ST   stf               addr = b + imm, store data = a
// a is the value of T1 and b the value of T2, read from the physical
// register file. imm is sign-extended. The memory word for a load comes in
// on load_data, read at mem_addr in the same cycle. store_data is the T1
// value unchanged: a store only forwards it to the store buffer.
//
// Every unit takes one cycle (own choice). Values are plain integers, so
// mulf is an integer multiply rather than IEEE floating point (own choice).
module fu
  import r10k_pkg::*;
#(
  parameter int unsigned XLEN = r10k_pkg::XLEN
) (
  input  op_e             op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [15:0]     imm,
  output logic [XLEN-1:0] mem_addr,
  input  logic [XLEN-1:0] load_data,
  output logic [XLEN-1:0] result,
  output logic [XLEN-1:0] store_data
);

  logic [XLEN-1:0] simm;
  assign simm       = XLEN'(signed'(imm));
  assign mem_addr   = b + simm;
  assign store_data = a;

  always_comb begin
    unique case (op)
      OP_ADD:  result = a + b;
      OP_SUB:  result = a - b;
      OP_ADDI: result = a + simm;
      OP_MULF: result = a * b;
      OP_LDF:  result = load_data;
      default: result = '0;           // OP_STF writes no register
    endcase
  end

endmodule
