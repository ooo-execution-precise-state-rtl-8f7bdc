// r10k_pkg: types and default sizes shared by the R10K-style core.
//
// The default sizes are those of the worked example the design follows:
// four architectural registers (f0, f1, f2, r1), eight physical registers
// (PR#1..PR#8) and five reservation stations, one per functional unit (ALU,
// LD, ST, FP1, FP2). The reorder buffer has as many entries as there are
// physical registers beyond the architectural ones, four, so a ROB entry
// always has a free register to go with it. The data width and the
// operation encoding are this design's own choices.
//
// Physical register PR#n of the example is tag n-1 here; architectural
// register i is mapped at reset to tag i, so f0->PR#1 ... r1->PR#4, and the
// free list starts as PR#5..PR#8.
package r10k_pkg;

  localparam int unsigned NUM_ARCH   = 4;   // f0, f1, f2, r1
  localparam int unsigned NUM_PREGS  = 8;   // PR#1..PR#8
  // #physical registers = #architectural registers + #ROB entries
  localparam int unsigned ROB_DEPTH  = NUM_PREGS - NUM_ARCH;
  localparam int unsigned XLEN       = 32;  // data width (own choice)
  localparam int unsigned DMEM_WORDS = 64;  // data memory words (own choice)

  // Functional units, one reservation station each, in table order.
  typedef enum logic [2:0] {
    FU_ALU = 3'd0,
    FU_LD  = 3'd1,
    FU_ST  = 3'd2,
    FU_FP1 = 3'd3,
    FU_FP2 = 3'd4
  } fu_e;

  localparam int unsigned NUM_RS = 5;

  localparam int unsigned AREG_W = $clog2(NUM_ARCH);

  // Operations of the example programs.
  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,   // rd = rs1 + rs2
    OP_SUB  = 3'd1,   // rd = rs1 - rs2
    OP_ADDI = 3'd2,   // rd = rs1 + imm
    OP_MULF = 3'd3,   // rd = rs1 * rs2   (FP1/FP2 unit)
    OP_LDF  = 3'd4,   // rd = mem[rs2 + imm]
    OP_STF  = 3'd5    // mem[rs2 + imm] = rs1
  } op_e;

  // A decoded instruction as it reaches dispatch.
  typedef struct packed {
    op_e         op;
    logic [AREG_W-1:0] rd;   // destination architectural register
    logic [AREG_W-1:0] rs1;   // first source (T1)
    logic [AREG_W-1:0] rs2;   // second source (T2); base address of loads/stores
    logic [15:0] imm;   // sign-extended immediate / address offset
  } insn_t;

  function automatic logic op_has_dest(op_e op);
    return op != OP_STF;
  endfunction

  function automatic logic op_uses_rs1(op_e op);
    return op inside {OP_ADD, OP_SUB, OP_ADDI, OP_MULF, OP_STF};
  endfunction

  function automatic logic op_uses_rs2(op_e op);
    return op inside {OP_ADD, OP_SUB, OP_MULF, OP_LDF, OP_STF};
  endfunction

  // Distance of ROB index idx from the head, i.e. its age rank (0 = oldest).
  function automatic int unsigned rob_age(int unsigned idx, int unsigned head,
                                          int unsigned depth);
    return (idx >= head) ? idx - head : idx + depth - head;
  endfunction

endpackage
