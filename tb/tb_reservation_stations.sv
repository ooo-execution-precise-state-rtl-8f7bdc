// tb_reservation_stations: checks the five stations against a model.
//
// Random cycles dispatch into a random free station with random tags,
// ready bits and a ROB index not in use, broadcast random tags on the CDB,
// toggle issue_en and ld_blocked, move the ROB head and flush random ROB
// indices. Every cycle the selected instruction must be the oldest (by
// distance from the ROB head) whose inputs are ready, counting a same-cycle
// CDB match, with the load station held back by ld_blocked; the busy
// vector and all issued fields are compared with the model. Uses 8 ROB
// indices so the five stations can hold distinct ones.
module tb_reservation_stations;
  import r10k_pkg::*;
  localparam int NP = 8, RD = 8;
  localparam int PW = $clog2(NP), RW = $clog2(RD);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NUM_RS-1:0] busy;
  logic disp_valid, disp_has_dest, disp_r1, disp_r2, cdb_valid, issue_en, ld_blocked;
  logic iss_valid, iss_has_dest, flush_valid;
  fu_e disp_slot, iss_slot;
  op_e disp_op, iss_op;
  logic [PW-1:0] disp_t, disp_t1, disp_t2, cdb_tag, iss_t, iss_t1, iss_t2;
  logic [15:0] disp_imm, iss_imm;
  logic [RW-1:0] disp_rob, rob_head, ld_rob, iss_rob, flush_rob;

  reservation_stations #(.NUM_PREGS(NP), .ROB_DEPTH(RD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    bit busy; int op; bit hd; int t; int t1; bit r1; int t2; bit r2; int imm; int rob;
  } ent_t;
  ent_t m [NUM_RS];
  int n_iss = 0, n_wake_iss = 0, n_ld_held = 0, n_flush = 0;

  function automatic bit rob_used(int r);
    for (int i = 0; i < NUM_RS; i++) if (m[i].busy && m[i].rob == r) return 1;
    return 0;
  endfunction

  initial begin
    disp_valid = 0; cdb_valid = 0; issue_en = 0; ld_blocked = 0; flush_valid = 0;
    disp_slot = FU_ALU; disp_op = OP_ADD; disp_has_dest = 0; disp_t = '0; disp_t1 = '0;
    disp_t2 = '0; disp_r1 = 0; disp_r2 = 0; disp_imm = '0; disp_rob = '0;
    cdb_tag = '0; rob_head = '0; flush_rob = '0;
    for (int i = 0; i < NUM_RS; i++) m[i].busy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int sel, best, slot, r;
      @(negedge clk);
      disp_valid = 0;
      slot = $urandom % NUM_RS;
      r = $urandom % RD;
      if (!m[slot].busy && !busy[slot] && !rob_used(r) && ($urandom % 2)) begin
        disp_valid = 1; disp_slot = fu_e'(slot); disp_op = op_e'($urandom % 6);
        disp_has_dest = $urandom % 2; disp_t = PW'($urandom);
        disp_t1 = PW'($urandom); disp_r1 = ($urandom % 3) == 0;
        disp_t2 = PW'($urandom); disp_r2 = ($urandom % 3) == 0;
        disp_imm = 16'($urandom); disp_rob = RW'(r);
      end
      cdb_valid = $urandom % 2; cdb_tag = PW'($urandom);
      issue_en = ($urandom % 4) != 0;
      ld_blocked = ($urandom % 3) == 0;
      rob_head = RW'($urandom);
      flush_valid = ($urandom % 10) == 0; flush_rob = RW'($urandom);
      #1;
      // expected select
      sel = -1; best = RD;
      for (int i = 0; i < NUM_RS; i++) begin
        bit ok;
        int age;
        ok = m[i].busy && (m[i].r1 || (cdb_valid && PW'(m[i].t1) == cdb_tag))
                       && (m[i].r2 || (cdb_valid && PW'(m[i].t2) == cdb_tag))
                       && !(i == int'(FU_LD) && ld_blocked);
        age = (m[i].rob - int'(rob_head) + RD) % RD;
        if (ok && age < best) begin best = age; sel = i; end
        if (m[i].busy && i == int'(FU_LD) && ld_blocked &&
            (m[i].r1 || (cdb_valid && PW'(m[i].t1) == cdb_tag)) &&
            (m[i].r2 || (cdb_valid && PW'(m[i].t2) == cdb_tag))) n_ld_held++;
      end
      for (int i = 0; i < NUM_RS; i++) check(busy[i] == m[i].busy, "busy vector");
      if (m[int'(FU_LD)].busy) check(ld_rob == RW'(m[int'(FU_LD)].rob), "load ROB index");
      check(iss_valid == (issue_en && sel >= 0), "issue valid");
      if (iss_valid && sel >= 0) begin
        check(int'(iss_slot) == sel, $sformatf("selected station %0d, expected %0d", iss_slot, sel));
        check(int'(iss_op) == m[sel].op && iss_has_dest == m[sel].hd && iss_t == PW'(m[sel].t) &&
              iss_t1 == PW'(m[sel].t1) && iss_t2 == PW'(m[sel].t2) &&
              iss_imm == 16'(m[sel].imm) && iss_rob == RW'(m[sel].rob), "issued fields");
        n_iss++;
        if (!(m[sel].r1 && m[sel].r2)) n_wake_iss++;
      end
      // model update
      for (int i = 0; i < NUM_RS; i++) begin
        if (cdb_valid && PW'(m[i].t1) == cdb_tag) m[i].r1 = 1;
        if (cdb_valid && PW'(m[i].t2) == cdb_tag) m[i].r2 = 1;
        if (iss_valid && i == sel) m[i].busy = 0;
        if (flush_valid && m[i].busy && RW'(m[i].rob) == flush_rob) begin m[i].busy = 0; n_flush++; end
      end
      if (disp_valid)
        m[slot] = '{1, int'(disp_op), disp_has_dest, int'(disp_t), int'(disp_t1), disp_r1,
                    int'(disp_t2), disp_r2, int'(disp_imm), int'(disp_rob)};
    end
    $display("issued=%0d wakeup_issue=%0d ld_held=%0d flushed=%0d", n_iss, n_wake_iss, n_ld_held, n_flush);
    check(n_iss > 100 && n_wake_iss > 10 && n_ld_held > 10 && n_flush > 10, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
