// tb_rob: checks the reorder buffer against a queue model.
//
// Random cycles allocate entries with random T/Told/destination/store
// fields (also into a full buffer while its head retires), mark random
// in-flight entries complete, retire the head when it is complete, and
// request rollbacks to a random entry. During a rollback each cycle must
// show exactly the youngest remaining entry on undo_*, and rolling must
// drop once the target entry has been undone. head_*, full/empty/count and
// the older-store query are compared with the model every cycle.
module tb_rob;
  localparam int D = 4, NA = 4, NP = 8;
  localparam int RW = $clog2(D), CW = $clog2(D + 1), AW = $clog2(NA), PW = $clog2(NP);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic alloc, alloc_has_dest, alloc_is_store, full, empty, cpl_valid;
  logic head_valid, head_complete, head_has_dest, head_is_store, retire;
  logic undo_req, rolling, undo_valid, undo_has_dest, older_store;
  logic [PW-1:0] alloc_t, alloc_told, head_told, undo_t, undo_told;
  logic [AW-1:0] alloc_rd, undo_rd;
  logic [RW-1:0] alloc_idx, cpl_idx, head_idx, undo_idx, undo_entry, ld_query_idx;
  logic [CW-1:0] count;

  rob #(.DEPTH(D), .NUM_ARCH(NA), .NUM_PREGS(NP)) dut (.*);

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
    int idx; int t; int told; int rd; bit has_dest; bit is_store; bit complete;
  } ent_t;
  ent_t q [$];
  int   m_tail = 0;
  bit   m_rolling = 0;
  int   m_target = 0;
  int   n_undo = 0, n_rb = 0, n_full_reuse = 0, n_retire = 0;

  initial begin
    {alloc, alloc_has_dest, alloc_is_store, cpl_valid, retire, undo_req} = '0;
    {alloc_t, alloc_told, alloc_rd, cpl_idx, undo_idx, ld_query_idx} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int k;
      @(negedge clk);
      {alloc, cpl_valid, retire, undo_req} = '0;
      alloc_t = PW'($urandom); alloc_told = PW'($urandom); alloc_rd = AW'($urandom);
      alloc_has_dest = $urandom % 2; alloc_is_store = !alloc_has_dest && ($urandom % 2);
      ld_query_idx = (q.size() > 0) ? RW'(q[$urandom % q.size()].idx) : '0;
      k = -1;
      if (!m_rolling) begin
        retire = (q.size() > 0) && q[0].complete && ($urandom % 3 != 0);
        if (q.size() > 0) begin
          cpl_idx = RW'(q[$urandom % q.size()].idx);
          cpl_valid = $urandom % 2;
        end
        if (q.size() > 0 && ($urandom % 12) == 0) begin
          k = $urandom % q.size();
          if (k == 0) retire = 0;
          undo_req = 1; undo_idx = RW'(q[k].idx);
        end
        alloc  = ($urandom % 3 != 0) && (q.size() < D || retire);
      end
      #1;
      check(count == CW'(q.size()) && empty == (q.size() == 0) && full == (q.size() == D),
            "count / empty / full");
      check(alloc_idx == RW'(m_tail), "alloc index is the tail");
      check(rolling == m_rolling, "rolling flag");
      if (q.size() > 0) begin
        check(head_valid && head_idx == RW'(q[0].idx) && head_complete == q[0].complete,
              "head entry");
        check(head_told == PW'(q[0].told) && head_has_dest == q[0].has_dest &&
              head_is_store == q[0].is_store, "head fields");
        begin
          bit exp_os;
          exp_os = 0;
          for (int i = 0; i < q.size() && q[i].idx != int'(ld_query_idx); i++)
            if (q[i].is_store) exp_os = 1;
          check(older_store == exp_os, "older store query");
        end
      end
      check(undo_valid == (m_rolling && q.size() > 0), "undo_valid");
      if (m_rolling) begin
        ent_t y;
        y = q[$];
        check(undo_entry == RW'(y.idx) && undo_t == PW'(y.t) && undo_told == PW'(y.told) &&
              undo_rd == AW'(y.rd) && undo_has_dest == y.has_dest, "undo shows youngest entry");
        void'(q.pop_back());
        m_tail = y.idx;
        n_undo++;
        if (y.idx == m_target) m_rolling = 0;
      end else begin
        if (cpl_valid) foreach (q[i]) if (q[i].idx == int'(cpl_idx)) q[i].complete = 1;
        if (retire) begin void'(q.pop_front()); n_retire++; end
        if (alloc) begin
          if (q.size() == D - 1 && retire) n_full_reuse++;
          q.push_back('{m_tail, int'(alloc_t), int'(alloc_told), int'(alloc_rd),
                        alloc_has_dest, alloc_is_store, 0});
          m_tail = (m_tail + 1) % D;
        end
        if (undo_req) begin m_rolling = 1; m_target = int'(undo_idx); n_rb++; end
      end
    end
    $display("retired=%0d rollbacks=%0d undo_steps=%0d full_reuse=%0d",
             n_retire, n_rb, n_undo, n_full_reuse);
    check(n_rb > 10 && n_undo > n_rb && n_full_reuse > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
