// tb_r10k_core: end-to-end test of the R10K-style core at its default sizes.
//
// Phase 1 replays the worked example (ldf / mulf / stf / addi / ldf / mulf /
// stf) and checks, cycle by cycle, the tags given out at dispatch, the
// issue and CDB cycles, the retirement of the first load, and a serial
// rollback of instructions 3-5 requested in cycle 5: one undo step per
// cycle, youngest first, leaving the map table at f1->PR#5, r1->PR#4,
// f2->PR#6 and the free list starting with PR#2.
//
// Phase 2 appends a long random program and requests rollbacks at random
// points, re-sending the undone instructions the way a front end refetches
// after an exception. At the end the architectural registers (read through
// the map table) and the whole data memory are compared with an in-order
// reference model of the program. The test counts how often each mechanism
// of the core happened (stalls on stations, ROB and free registers, CDB
// wakeup, load held behind a store, undo steps, dropped instructions,
// second FP station, full ROB reused by a retiring head) and fails if one
// never did.
module tb_r10k_core;
  import r10k_pkg::*;

  localparam int unsigned PW = $clog2(NUM_PREGS);
  localparam int unsigned RW = $clog2(ROB_DEPTH);
  localparam int N_RAND  = 3000;
  localparam int N_TOTAL = 7 + N_RAND;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid, in_ready, undo_req, rolling, mem_we, idle;
  insn_t             in_insn;
  logic [RW-1:0]     disp_rob, undo_rob, retire_rob, undo_entry, issue_rob;
  logic [XLEN-1:0]   mem_addr, mem_wdata, dbg_mem_addr, dbg_mem_data, dbg_areg_value;
  logic [AREG_W-1:0] dbg_areg;
  logic [PW-1:0]     dbg_areg_tag, cdb_tag;
  logic              stall_rs, stall_rob, stall_preg, cdb_valid, retire_valid;
  logic              undo_valid, issue_valid;

  r10k_core dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- program
  insn_t prog [N_TOTAL];

  function automatic insn_t mk(op_e op, int rd, int rs1, int rs2, int imm);
    insn_t i;
    i.op  = op;
    i.rd  = AREG_W'(rd);
    i.rs1 = AREG_W'(rs1);
    i.rs2 = AREG_W'(rs2);
    i.imm = 16'(imm);
    return i;
  endfunction

  localparam int F0 = 0, F1 = 1, F2 = 2, R1 = 3;

  initial begin
    prog[0] = mk(OP_LDF,  F1, 0,  R1, 0);  // f1 = ldf (r1)
    prog[1] = mk(OP_MULF, F2, F0, F1, 0);  // f2 = mulf f0, f1
    prog[2] = mk(OP_STF,  0,  F2, R1, 0);  // stf f2, (r1)
    prog[3] = mk(OP_ADDI, R1, R1, 0,  4);  // r1 = addi r1, 4
    prog[4] = mk(OP_LDF,  F1, 0,  R1, 0);  // f1 = ldf (r1)
    prog[5] = mk(OP_MULF, F2, F0, F1, 0);  // f2 = mulf f0, f1
    prog[6] = mk(OP_STF,  0,  F2, R1, 0);  // stf f2, (r1)
    for (int n = 7; n < N_TOTAL; n++) begin
      int unsigned k;
      int a, b, c, imm;
      op_e op;
      k = $urandom % 16;
      a = $urandom % 4; b = $urandom % 4; c = $urandom % 4;
      if      (k < 3)  op = OP_ADDI;
      else if (k < 5)  op = OP_ADD;
      else if (k < 6)  op = OP_SUB;
      else if (k < 9)  op = OP_MULF;
      else if (k < 12) op = OP_LDF;
      else             op = OP_STF;
      imm = (op == OP_ADDI) ? int'($urandom % 64) - 16 : int'($urandom % 64) * 4;
      prog[n] = mk(op, a, b, c, imm);
    end
  end

  // ------------------------------------------------------- reference model
  logic [XLEN-1:0] ref_reg [NUM_ARCH];
  logic [XLEN-1:0] ref_mem [DMEM_WORDS];
  logic [XLEN-1:0] init_mem [DMEM_WORDS];

  function automatic int unsigned widx(logic [XLEN-1:0] a);
    return int'(a[7:2]);
  endfunction

  task automatic run_reference();
    for (int i = 0; i < NUM_ARCH; i++) ref_reg[i] = '0;
    for (int i = 0; i < DMEM_WORDS; i++) ref_mem[i] = init_mem[i];
    for (int n = 0; n < N_TOTAL; n++) begin
      insn_t i;
      logic [XLEN-1:0] a, b, s;
      i = prog[n];
      a = ref_reg[i.rs1]; b = ref_reg[i.rs2];
      s = XLEN'(signed'(i.imm));
      case (i.op)
        OP_ADD:  ref_reg[i.rd] = a + b;
        OP_SUB:  ref_reg[i.rd] = a - b;
        OP_ADDI: ref_reg[i.rd] = a + s;
        OP_MULF: ref_reg[i.rd] = a * b;
        OP_LDF:  ref_reg[i.rd] = ref_mem[widx(b + s)];
        OP_STF:  ref_mem[widx(b + s)] = a;
        default: ;
      endcase
    end
  endtask

  // ------------------------------------------------------- event counters
  int n_stall_rs = 0, n_stall_rob = 0, n_stall_preg = 0, n_wakeup_issue = 0;
  int n_ld_blocked = 0, n_undo = 0, n_rollbacks = 0, n_killed = 0, n_fp2 = 0;
  int n_retire = 0, n_disp_bypass = 0, n_store_commit = 0, n_rob_reuse = 0;

  task automatic count_events();
    if (stall_rs)   n_stall_rs++;
    if (stall_rob)  n_stall_rob++;
    if (stall_preg) n_stall_preg++;
    if (issue_valid && cdb_valid &&
        (dut.u_rs.iss_t1 == cdb_tag || dut.u_rs.iss_t2 == cdb_tag)) n_wakeup_issue++;
    if (dut.u_rs.busy[FU_LD] && dut.ld_blocked && dut.u_rs.rdy[FU_LD] == 1'b0
        && dut.u_rs.rs_q[FU_LD].r1 && dut.u_rs.rs_q[FU_LD].r2) n_ld_blocked++;
    if (undo_valid) n_undo++;
    if (undo_req && !rolling) n_rollbacks++;
    if ((dut.ex_killed && dut.ex_q.valid) || (dut.iss_killed && issue_valid)) n_killed++;
    if (dut.dispatch && dut.disp_slot == FU_FP2) n_fp2++;
    if (dut.dispatch && cdb_valid &&
        ((op_uses_rs1(in_insn.op) && dut.t1 == cdb_tag) ||
         (op_uses_rs2(in_insn.op) && dut.t2 == cdb_tag))) n_disp_bypass++;
    if (retire_valid) n_retire++;
    if (dut.store_commit) n_store_commit++;
    if (dut.dispatch && dut.rob_full && retire_valid) n_rob_reuse++;
  endtask

  // ------------------------------------------------------------- driver
  typedef struct { logic [RW-1:0] rob; int pc; } inflight_t;
  inflight_t q [$];
  int pc = 0;
  int cyc = 0;
  int k, tpc;

  initial begin
    in_valid = 0; in_insn = '0; undo_req = 0; undo_rob = '0;
    mem_we = 0; mem_addr = '0; mem_wdata = '0; dbg_mem_addr = '0; dbg_areg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // load data memory while idle
    for (int i = 0; i < DMEM_WORDS; i++) begin
      @(negedge clk);
      init_mem[i] = $urandom;
      if (i == 0) init_mem[i] = 32'd7;
      mem_we = 1; mem_addr = XLEN'(i * 4); mem_wdata = init_mem[i];
    end
    @(negedge clk);
    mem_we = 0;
    run_reference();

    forever begin
      if (cyc > 0) @(negedge clk);
      if (pc >= N_TOTAL && idle) break;
      cyc++;
      in_valid = (pc < N_TOTAL);
      in_insn  = prog[pc < N_TOTAL ? pc : 0];
      undo_req = 0;
      k = -1;
      if (cyc == 5) begin
        undo_req = 1; undo_rob = 3'd2;    // undo instructions 3-5
        k = 2; tpc = q[k].pc;
      end else if (cyc > 12 && !rolling && q.size() > 0 && ($urandom % 23) == 0) begin
        k = int'($urandom % q.size());
        undo_req = 1; undo_rob = q[k].rob; tpc = q[k].pc;
      end
      if (cyc >= 5 && cyc <= 8) in_valid = (cyc == 5);
      #1;
      // ---- phase 1: the worked example, cycle by cycle
      case (cyc)
        1: begin
             check(in_ready && disp_rob == 0, "c1 ldf dispatched to ROB#1");
             check(dut.fl_head == 4 && dut.told == 1, "c1 ldf T=PR#5 Told=PR#2");
           end
        2: begin
             check(in_ready && dut.fl_head == 5 && dut.told == 2, "c2 mulf T=PR#6 Told=PR#3");
             check(issue_valid && issue_rob == 0, "c2 ldf issues");
           end
        3: begin
             check(in_ready && dut.u_rs.disp_slot == FU_ST, "c3 stf dispatched to ST");
             check(!issue_valid, "c3 nothing ready to issue");
             check(dut.u_rs.rs_q[FU_LD].busy == 1'b0, "c3 LD station freed after issue");
           end
        4: begin
             check(cdb_valid && cdb_tag == 4, "c4 CDB carries PR#5");
             check(issue_valid && issue_rob == 1, "c4 mulf woken by CDB and issued");
             check(in_ready && dut.fl_head == 6 && dut.told == 3, "c4 addi T=PR#7 Told=PR#4");
           end
        5: begin
             check(dut.u_map.map_q[1].ready, "c5 map table f1 ready after complete");
             check(retire_valid && retire_rob == 0 && dut.head_told == 1, "c5 ldf retires, frees PR#2");
             check(issue_valid && issue_rob == 3, "c5 addi issues");
             check(in_ready && dut.fl_head == 7 && dut.told == 4, "c5 ldf T=PR#8 Told=PR#5");
           end
        6: check(undo_valid && undo_entry == 0 && dut.undo_t == 7 && dut.undo_told == 4 &&
                 dut.undo_rd == F1, "c6 undo ldf: free PR#8, f1<-PR#5");
        7: check(undo_valid && undo_entry == 3 && dut.undo_t == 6 && dut.undo_told == 3 &&
                 dut.undo_rd == R1, "c7 undo addi: free PR#7, r1<-PR#4");
        8: check(undo_valid && undo_entry == 2 && !dut.undo_has_dest, "c8 undo stf: no registers");
        9: begin
             check(!rolling, "c9 rollback finished");
             check(dut.u_map.map_q[F1].tag == 4 && dut.u_map.map_q[F1].ready, "c9 MT[f1]=PR#5+");
             check(dut.u_map.map_q[R1].tag == 3 && dut.u_map.map_q[R1].ready, "c9 MT[r1]=PR#4+");
             check(dut.u_map.map_q[F2].tag == 5, "c9 MT[f2]=PR#6");
             check(dut.u_fl.count == 3 && dut.u_fl.head_tag == 1, "c9 free list PR#2, PR#8, PR#7");
             check(dut.u_fl.mem_q[(dut.u_fl.head_q + 1) % 4] == 7 &&
                   dut.u_fl.mem_q[(dut.u_fl.head_q + 2) % 4] == 6, "c9 free list order");
           end
        default: ;
      endcase
      count_events();
      // ---- bookkeeping for the coming edge
      if (retire_valid) void'(q.pop_front());
      if (undo_valid) void'(q.pop_back());
      if (in_valid && in_ready) begin
        q.push_back('{rob: disp_rob, pc: pc});
        pc++;
      end
      if (undo_req) pc = tpc;
    end

    // ---- final state against the reference model
    for (int r = 0; r < NUM_ARCH; r++) begin
      dbg_areg = AREG_W'(r);
      #1;
      check(dbg_areg_value == ref_reg[r],
            $sformatf("arch reg %0d = %h, expected %h", r, dbg_areg_value, ref_reg[r]));
    end
    for (int i = 0; i < DMEM_WORDS; i++) begin
      dbg_mem_addr = XLEN'(i * 4);
      #1;
      check(dbg_mem_data == ref_mem[i],
            $sformatf("mem[%0d] = %h, expected %h", i, dbg_mem_data, ref_mem[i]));
    end
    check(q.size() == 0, "no instruction left in flight");

    $display("cycles=%0d retired=%0d rollbacks=%0d undo_steps=%0d killed=%0d",
             cyc, n_retire, n_rollbacks, n_undo, n_killed);
    $display("stall_rs=%0d stall_rob=%0d stall_preg=%0d wakeup_issue=%0d disp_bypass=%0d",
             n_stall_rs, n_stall_rob, n_stall_preg, n_wakeup_issue, n_disp_bypass);
    $display("ld_blocked=%0d fp2=%0d store_commits=%0d rob_reuse=%0d", n_ld_blocked, n_fp2,
             n_store_commit, n_rob_reuse);
    check(n_stall_rs > 0,     "station stall happened");
    check(n_stall_rob > 0,    "ROB-full stall happened");
    check(n_stall_preg > 0,   "free-list stall happened");
    check(n_wakeup_issue > 0, "CDB wakeup and issue in one cycle happened");
    check(n_disp_bypass > 0,  "dispatch saw a tag on the CDB");
    check(n_ld_blocked > 0,   "load held behind an older store");
    check(n_rollbacks > 1 && n_undo > 0, "serial rollback happened");
    check(n_killed > 0,       "in-flight instruction dropped by rollback");
    check(n_fp2 > 0,          "second FP station used");
    check(n_store_commit > 0, "store written at retire");
    check(n_rob_reuse > 0,    "full ROB took a new entry while its head retired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
