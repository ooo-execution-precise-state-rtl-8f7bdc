// reservation_stations: one reservation station per functional unit
// (ALU, LD, ST, FP1, FP2), holding tags only.
//
// An entry holds the operation, the output tag T, the input tags T1 and T2
// each with a ready bit ("+"), the immediate and the ROB index of its
// instruction. There are no values in it: operands are read from the
// physical register file after issue.
//
//  - Dispatch writes the entry of the unit chosen by the core (disp_slot),
//    which must be free (busy[slot] low).
//  - Wakeup: the tag on the CDB sets the ready bit of every matching input
//    tag. The match also counts in the same cycle, so an instruction can be
//    selected in the cycle its last operand is broadcast.
//  - Select: among the entries whose inputs are both ready, the one whose
//    instruction is oldest (smallest distance from the ROB head) issues when
//    issue_en is high; its entry is freed at the edge. The load entry is
//    held back while ld_blocked is high.
//  - Rollback frees the entry, if any, that belongs to ROB index flush_rob.
//
// One instruction issues per cycle because the single CDB carries one tag
// per cycle and every unit takes one cycle (own choice). Tag matching and
// same-cycle wakeup-and-select follow the R10K scheme.
module reservation_stations
  import r10k_pkg::*;
#(
  parameter int unsigned NUM_PREGS = r10k_pkg::NUM_PREGS,
  parameter int unsigned ROB_DEPTH = r10k_pkg::ROB_DEPTH,
  localparam int unsigned PW = $clog2(NUM_PREGS),
  localparam int unsigned RW = $clog2(ROB_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [NUM_RS-1:0] busy,
  // dispatch
  input  logic              disp_valid,
  input  fu_e               disp_slot,
  input  op_e               disp_op,
  input  logic              disp_has_dest,
  input  logic [PW-1:0]     disp_t,
  input  logic [PW-1:0]     disp_t1,
  input  logic              disp_r1,
  input  logic [PW-1:0]     disp_t2,
  input  logic              disp_r2,
  input  logic [15:0]       disp_imm,
  input  logic [RW-1:0]     disp_rob,
  // CDB wakeup
  input  logic              cdb_valid,
  input  logic [PW-1:0]     cdb_tag,
  // select / issue
  input  logic              issue_en,
  input  logic [RW-1:0]     rob_head,
  input  logic              ld_blocked,
  output logic [RW-1:0]     ld_rob,
  output logic              iss_valid,
  output fu_e               iss_slot,
  output op_e               iss_op,
  output logic              iss_has_dest,
  output logic [PW-1:0]     iss_t,
  output logic [PW-1:0]     iss_t1,
  output logic [PW-1:0]     iss_t2,
  output logic [15:0]       iss_imm,
  output logic [RW-1:0]     iss_rob,
  // rollback
  input  logic              flush_valid,
  input  logic [RW-1:0]     flush_rob
);

  typedef struct packed {
    logic          busy;
    op_e           op;
    logic          has_dest;
    logic [PW-1:0] t;
    logic [PW-1:0] t1;
    logic          r1;
    logic [PW-1:0] t2;
    logic          r2;
    logic [15:0]   imm;
    logic [RW-1:0] rob;
  } entry_t;

  entry_t            rs_q [NUM_RS];
  logic [NUM_RS-1:0] rdy;
  logic [2:0]        sel;

  assign ld_rob = rs_q[FU_LD].rob;

  always_comb begin
    for (int unsigned i = 0; i < NUM_RS; i++) begin
      busy[i] = rs_q[i].busy;
      rdy[i]  = rs_q[i].busy
             && (rs_q[i].r1 || (cdb_valid && rs_q[i].t1 == cdb_tag))
             && (rs_q[i].r2 || (cdb_valid && rs_q[i].t2 == cdb_tag))
             && !(i == int'(FU_LD) && ld_blocked);
    end
  end

  // oldest-first select
  always_comb begin
    int unsigned best_age;
    iss_valid = 1'b0;
    sel       = '0;
    best_age  = ROB_DEPTH;
    for (int unsigned i = 0; i < NUM_RS; i++) begin
      if (rdy[i] && rob_age(int'(rs_q[i].rob), int'(rob_head), ROB_DEPTH) < best_age) begin
        best_age  = rob_age(int'(rs_q[i].rob), int'(rob_head), ROB_DEPTH);
        sel       = 3'(i);
        iss_valid = issue_en;
      end
    end
    iss_slot     = fu_e'(sel);
    iss_op       = rs_q[sel].op;
    iss_has_dest = rs_q[sel].has_dest;
    iss_t        = rs_q[sel].t;
    iss_t1       = rs_q[sel].t1;
    iss_t2       = rs_q[sel].t2;
    iss_imm      = rs_q[sel].imm;
    iss_rob      = rs_q[sel].rob;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NUM_RS; i++) rs_q[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < NUM_RS; i++) begin
        if (cdb_valid && rs_q[i].t1 == cdb_tag) rs_q[i].r1 <= 1'b1;
        if (cdb_valid && rs_q[i].t2 == cdb_tag) rs_q[i].r2 <= 1'b1;
        if (iss_valid && sel == 3'(i)) rs_q[i].busy <= 1'b0;
        if (flush_valid && rs_q[i].busy && rs_q[i].rob == flush_rob) rs_q[i].busy <= 1'b0;
      end
      if (disp_valid) begin
        rs_q[disp_slot] <= '{busy: 1'b1, op: disp_op, has_dest: disp_has_dest,
                             t: disp_t, t1: disp_t1, r1: disp_r1,
                             t2: disp_t2, r2: disp_r2, imm: disp_imm,
                             rob: disp_rob};
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) disp_valid |-> !rs_q[disp_slot].busy);

endmodule
