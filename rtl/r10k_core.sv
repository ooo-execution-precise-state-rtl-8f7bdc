// r10k_core: an out-of-order core organised the R10K way, around one
// physical register file.
//
// All values live in the physical register file (prf). The map table, the
// free list, the reorder buffer (rob) and the reservation stations hold
// only physical register tags; no value moves through them or over the
// CDB, which carries a tag. The pipeline is D, S, X, C, R, one
// instruction per stage per cycle:
//
//   D  dispatch: the source tags and ready bits are read from the map table
//      into the reservation station of the instruction's unit, the old
//      destination tag (Told) goes to the ROB, and a new tag T from the
//      free list goes to the station, the ROB and the map table. Dispatch
//      stalls when the station, the ROB or the free list is exhausted.
//   S  select: the oldest station whose operands are ready issues (at most
//      one per cycle); its station is freed.
//   X  execute: operands are read from the prf by tag; loads read memory.
//   C  complete: the result is written to the prf, T goes out on the CDB,
//      setting the ready bits of the map table and waking stations that
//      wait on it in the same cycle, and the ROB entry is marked complete.
//      Stores put address and data into the store buffer instead.
//   R  retire: when the ROB head is complete it is freed and its Told goes
//      back to the free list; a retiring store writes memory.
//
// Precise state is recovered by serial rollback: undo_req with undo_rob
// undoes every instruction from that ROB entry to the youngest, one per
// cycle, youngest first. Each step frees the instruction's station,
// returns its T to the free list and restores the map table entry of its
// destination to Told. Instructions in flight in X that belong to the
// undone range are dropped. Dispatch, issue and retire wait while a
// rollback runs; in the cycle of the request the head may still retire,
// unless it is itself the first instruction to undo.
//
// Timing of one instruction with ready operands: dispatched in cycle n, it
// issues in n+1, executes in n+2, completes in n+3 and retires at the
// earliest in n+4. A dependent instruction issues in its producer's C cycle
// and executes the cycle after.
//
// Interface: decoded instructions come in on in_valid/in_insn and are taken
// when in_ready is high; disp_rob tells the ROB index given to it. The
// debug ports read an architectural register through the map table and a
// memory word; mem_we loads memory and may only be used while the core is
// idle. Status outputs report the stall reasons, the CDB and retirement.
//
// The structures, their fields, the stage actions and the rollback steps
// follow the R10K scheme. Single issue, one-cycle units, loads waiting
// behind older stores, stores written at retire, the operation set and all
// sizes beyond those of the worked example are this design's choices.
module r10k_core
  import r10k_pkg::*;
#(
  parameter int unsigned NUM_PREGS  = r10k_pkg::NUM_PREGS,
  parameter int unsigned ROB_DEPTH  = r10k_pkg::ROB_DEPTH,
  parameter int unsigned DMEM_WORDS = r10k_pkg::DMEM_WORDS,
  localparam int unsigned PW = $clog2(NUM_PREGS),
  localparam int unsigned RW = $clog2(ROB_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction input (decoded)
  input  logic              in_valid,
  input  insn_t             in_insn,
  output logic              in_ready,
  output logic [RW-1:0]     disp_rob,
  // rollback request
  input  logic              undo_req,
  input  logic [RW-1:0]     undo_rob,
  output logic              rolling,
  // memory load port (idle only) and debug reads
  input  logic              mem_we,
  input  logic [XLEN-1:0]   mem_addr,
  input  logic [XLEN-1:0]   mem_wdata,
  input  logic [XLEN-1:0]   dbg_mem_addr,
  output logic [XLEN-1:0]   dbg_mem_data,
  input  logic [AREG_W-1:0] dbg_areg,
  output logic [XLEN-1:0]   dbg_areg_value,
  output logic [PW-1:0]     dbg_areg_tag,
  // status
  output logic              idle,
  output logic              stall_rs,
  output logic              stall_rob,
  output logic              stall_preg,
  output logic              cdb_valid,
  output logic [PW-1:0]     cdb_tag,
  output logic              retire_valid,
  output logic [RW-1:0]     retire_rob,
  output logic              undo_valid,
  output logic [RW-1:0]     undo_entry,
  output logic              issue_valid,
  output logic [RW-1:0]     issue_rob
);

  // ---------------------------------------------------------------- D stage
  logic [NUM_RS-1:0] rs_busy;
  fu_e               disp_slot;
  logic              need_preg, rob_full, rob_stall, fl_empty, dispatch;
  logic              retire;
  logic [PW-1:0]     fl_head, t1, t2, told;
  logic              r1, r2, t1_ready, t2_ready;

  always_comb begin
    unique case (in_insn.op)
      OP_LDF:  disp_slot = FU_LD;
      OP_STF:  disp_slot = FU_ST;
      OP_MULF: disp_slot = rs_busy[FU_FP1] ? FU_FP2 : FU_FP1;
      default: disp_slot = FU_ALU;
    endcase
  end

  assign need_preg  = op_has_dest(in_insn.op);
  assign stall_rs   = in_valid && !rolling && rs_busy[disp_slot];
  assign rob_stall  = rob_full && !retire;    // a retiring entry is reused
  assign stall_rob  = in_valid && !rolling && rob_stall;
  assign stall_preg = in_valid && !rolling && need_preg && fl_empty;
  assign in_ready   = !rolling && !rs_busy[disp_slot] && !rob_stall
                   && !(need_preg && fl_empty);
  assign dispatch   = in_valid && in_ready;
  assign r1         = !op_uses_rs1(in_insn.op) || t1_ready;
  assign r2         = !op_uses_rs2(in_insn.op) || t2_ready;

  // ------------------------------------------------------- pipeline latches
  typedef struct packed {
    logic          valid;
    op_e           op;
    logic          has_dest;
    logic [PW-1:0] t;
    logic [PW-1:0] t1;
    logic [PW-1:0] t2;
    logic [15:0]   imm;
    logic [RW-1:0] rob;
  } ex_t;

  typedef struct packed {
    logic            valid;
    logic            has_dest;
    logic            is_store;
    logic [PW-1:0]   t;
    logic [RW-1:0]   rob;
    logic [XLEN-1:0] result;
    logic [XLEN-1:0] addr;
  } cp_t;

  ex_t ex_q;
  cp_t cp_q;

  // ------------------------------------------------------------ S stage
  logic          iss_valid, iss_has_dest, ld_blocked;
  fu_e           iss_slot;
  op_e           iss_op;
  logic [PW-1:0] iss_t, iss_t1, iss_t2;
  logic [15:0]   iss_imm;
  logic [RW-1:0] iss_rob, ld_rob, rob_head, rob_alloc_idx;

  // ------------------------------------------------------------ R / undo
  logic          head_complete, head_has_dest, head_is_store;
  logic [PW-1:0] head_told, undo_t, undo_told;
  logic [AREG_W-1:0] undo_rd;
  logic          undo_has_dest, rob_empty;

  assign retire = head_complete && !rolling && !(undo_req && undo_rob == rob_head);

  // ------------------------------------------------------------ X stage
  logic [XLEN-1:0] opa, opb, x_addr, x_result, x_sdata, ld_data;
  logic [XLEN-1:0] sb_addr, sb_data;

  // ------------------------------------------------------------ blocks
  map_table #(.NUM_ARCH(NUM_ARCH), .NUM_PREGS(NUM_PREGS)) u_map (
    .clk, .rst_n,
    .rs1_areg (in_insn.rs1), .rs1_tag(t1), .rs1_ready(t1_ready),
    .rs2_areg (in_insn.rs2), .rs2_tag(t2), .rs2_ready(t2_ready),
    .rd_areg  (in_insn.rd),  .rd_told(told),
    .ren_we   (dispatch && need_preg), .ren_tag(fl_head),
    .cdb_valid, .cdb_tag,
    .rst_we   (undo_valid && undo_has_dest), .rst_areg(undo_rd), .rst_tag(undo_told),
    .dbg_areg, .dbg_tag(dbg_areg_tag), .dbg_ready()
  );

  free_list #(.NUM_ARCH(NUM_ARCH), .NUM_PREGS(NUM_PREGS)) u_fl (
    .clk, .rst_n,
    .pop      (dispatch && need_preg),
    .head_tag (fl_head),
    .empty    (fl_empty),
    .push     ((retire && head_has_dest) || (undo_valid && undo_has_dest)),
    .push_tag (undo_valid ? undo_t : head_told),
    .count    ()
  );

  rob #(.DEPTH(ROB_DEPTH), .NUM_ARCH(NUM_ARCH), .NUM_PREGS(NUM_PREGS)) u_rob (
    .clk, .rst_n,
    .alloc          (dispatch),
    .alloc_t        (fl_head),
    .alloc_told     (told),
    .alloc_rd       (in_insn.rd),
    .alloc_has_dest (need_preg),
    .alloc_is_store (in_insn.op == OP_STF),
    .alloc_idx      (rob_alloc_idx),
    .full           (rob_full),
    .empty          (rob_empty),
    .count          (),
    .cpl_valid      (cp_q.valid),
    .cpl_idx        (cp_q.rob),
    .head_valid     (),
    .head_complete,
    .head_idx       (rob_head),
    .head_told,
    .head_has_dest,
    .head_is_store,
    .retire,
    .undo_req,
    .undo_idx       (undo_rob),
    .rolling,
    .undo_valid,
    .undo_entry,
    .undo_t,
    .undo_told,
    .undo_rd,
    .undo_has_dest,
    .ld_query_idx   (ld_rob),
    .older_store    (ld_blocked)
  );

  reservation_stations #(.NUM_PREGS(NUM_PREGS), .ROB_DEPTH(ROB_DEPTH)) u_rs (
    .clk, .rst_n,
    .busy          (rs_busy),
    .disp_valid    (dispatch),
    .disp_slot,
    .disp_op       (in_insn.op),
    .disp_has_dest (need_preg),
    .disp_t        (fl_head),
    .disp_t1       (t1),
    .disp_r1       (r1),
    .disp_t2       (t2),
    .disp_r2       (r2),
    .disp_imm      (in_insn.imm),
    .disp_rob      (rob_alloc_idx),
    .cdb_valid, .cdb_tag,
    .issue_en      (!rolling),
    .rob_head,
    .ld_blocked,
    .ld_rob,
    .iss_valid, .iss_slot, .iss_op, .iss_has_dest,
    .iss_t, .iss_t1, .iss_t2, .iss_imm, .iss_rob,
    .flush_valid   (undo_valid),
    .flush_rob     (undo_entry)
  );

  prf #(.NUM_PREGS(NUM_PREGS), .XLEN(XLEN)) u_prf (
    .clk, .rst_n,
    .ra1 (ex_q.t1), .rd1(opa),
    .ra2 (ex_q.t2), .rd2(opb),
    .we  (cp_q.valid && cp_q.has_dest), .wa(cp_q.t), .wd(cp_q.result),
    .dbg_ra (dbg_areg_tag), .dbg_rd(dbg_areg_value)
  );

  fu #(.XLEN(XLEN)) u_fu (
    .op (ex_q.op), .a(opa), .b(opb), .imm(ex_q.imm),
    .mem_addr (x_addr), .load_data(ld_data),
    .result (x_result), .store_data(x_sdata)
  );

  store_buffer #(.DEPTH(ROB_DEPTH), .XLEN(XLEN)) u_sb (
    .clk,
    .we    (cp_q.valid && cp_q.is_store),
    .widx  (cp_q.rob), .waddr(cp_q.addr), .wdata(cp_q.result),
    .ridx  (rob_head), .raddr(sb_addr), .rdata(sb_data)
  );

  logic store_commit;
  assign store_commit = retire && head_is_store;

  dmem #(.WORDS(DMEM_WORDS), .XLEN(XLEN)) u_dmem (
    .clk,
    .raddr    (x_addr), .rdata(ld_data),
    .dbg_addr (dbg_mem_addr), .dbg_data(dbg_mem_data),
    .we       (store_commit || mem_we),
    .waddr    (store_commit ? sb_addr : mem_addr),
    .wdata    (store_commit ? sb_data : mem_wdata)
  );

  // ------------------------------------------------------------ latches
  // Instructions of the range being undone are dropped when the request
  // arrives: the one issuing in that cycle and the one in X. Issue is off
  // while the rollback runs, so nothing of the range can enter later.
  logic ex_killed, iss_killed;
  assign ex_killed  = undo_req && !rolling &&
                      rob_age(int'(ex_q.rob), int'(rob_head), ROB_DEPTH) >=
                      rob_age(int'(undo_rob), int'(rob_head), ROB_DEPTH);
  assign iss_killed = undo_req && !rolling &&
                      rob_age(int'(iss_rob), int'(rob_head), ROB_DEPTH) >=
                      rob_age(int'(undo_rob), int'(rob_head), ROB_DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_q <= '0;
      cp_q <= '0;
    end else begin
      ex_q <= '{valid: iss_valid && !iss_killed, op: iss_op, has_dest: iss_has_dest, t: iss_t,
                t1: iss_t1, t2: iss_t2, imm: iss_imm, rob: iss_rob};
      cp_q <= '{valid: ex_q.valid && !ex_killed, has_dest: ex_q.has_dest,
                is_store: ex_q.op == OP_STF, t: ex_q.t, rob: ex_q.rob,
                result: (ex_q.op == OP_STF) ? x_sdata : x_result,
                addr: x_addr};
    end
  end

  // ------------------------------------------------------------ outputs
  assign cdb_valid    = cp_q.valid && cp_q.has_dest;
  assign cdb_tag      = cp_q.t;
  assign retire_valid = retire;
  assign retire_rob   = rob_head;
  assign disp_rob     = rob_alloc_idx;
  assign issue_valid  = iss_valid;
  assign issue_rob    = iss_rob;
  assign idle         = rob_empty && !rolling && !ex_q.valid && !cp_q.valid;

  assert property (@(posedge clk) disable iff (!rst_n) mem_we |-> idle);

endmodule
