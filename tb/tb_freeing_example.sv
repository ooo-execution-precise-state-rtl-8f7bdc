// tb_freeing_example: renaming with 3 architectural registers (r1..r3)
// and 7 physical registers (p1..p7, tag n-1), driving the map table and the
// free list the way dispatch and retire do.
//
// Program (destination last):  add r2,r3,r1 / sub r2,r1,r3 / mul r2,r3,r3 /
// div r1,4,r1 / add r1,r3,r2, with the first add retiring before the last
// instruction is renamed. Expected renaming: add p2,p3,p4 / sub p2,p4,p5 /
// mul p2,p5,p6 / div p4,4,p7 / add p7,p6,p1. Each retirement must return
// the old mapping of the destination: p1, p3, p5, p4, then p2.
module tb_freeing_example;
  localparam int NA = 3, NP = 7;
  localparam int AW = $clog2(NA), PW = $clog2(NP), CW = $clog2(NP - NA + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] rs1_areg, rs2_areg, rd_areg, rst_areg, dbg_areg;
  logic [PW-1:0] rs1_tag, rs2_tag, rd_told, cdb_tag, rst_tag, dbg_tag, head_tag, push_tag;
  logic rs1_ready, rs2_ready, ren_we, cdb_valid, rst_we, dbg_ready;
  logic pop, push, empty;
  logic [CW-1:0] count;

  map_table #(.NUM_ARCH(NA), .NUM_PREGS(NP)) u_map (
    .clk, .rst_n, .rs1_areg, .rs1_tag, .rs1_ready, .rs2_areg, .rs2_tag, .rs2_ready,
    .rd_areg, .rd_told, .ren_we, .ren_tag(head_tag), .cdb_valid, .cdb_tag,
    .rst_we, .rst_areg, .rst_tag, .dbg_areg, .dbg_tag, .dbg_ready);
  free_list #(.NUM_ARCH(NA), .NUM_PREGS(NP)) u_fl (
    .clk, .rst_n, .pop, .head_tag, .empty, .push, .push_tag, .count);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program: {src1, src2 (-1 = constant), dest}, registers numbered 1..3
  int prog [5][3] = '{'{2, 3, 1}, '{2, 1, 3}, '{2, 3, 3}, '{1, -1, 1}, '{1, 3, 2}};
  // expected renamed form: {T1, T2 (-1 = constant), T}, as p-numbers
  int exp_ren [5][3] = '{'{2, 3, 4}, '{2, 4, 5}, '{2, 5, 6}, '{4, -1, 7}, '{7, 6, 1}};
  int told [5];

  task automatic rename(int n);
    @(negedge clk);
    rs1_areg = AW'(prog[n][0] - 1);
    rs2_areg = AW'((prog[n][1] < 0 ? prog[n][0] : prog[n][1]) - 1);
    rd_areg  = AW'(prog[n][2] - 1);
    ren_we = 1; pop = 1;
    #1;
    if (prog[n][1] < 0) begin
      check(int'(rs1_tag) + 1 == exp_ren[n][0], $sformatf("insn %0d source", n + 1));
    end else begin
      check(int'(rs1_tag) + 1 == exp_ren[n][0] && int'(rs2_tag) + 1 == exp_ren[n][1],
            $sformatf("insn %0d sources p%0d,p%0d", n + 1, rs1_tag + 1, rs2_tag + 1));
    end
    check(int'(head_tag) + 1 == exp_ren[n][2],
          $sformatf("insn %0d destination p%0d, expected p%0d", n + 1, head_tag + 1, exp_ren[n][2]));
    told[n] = int'(rd_told) + 1;
    @(posedge clk);
    #1 ren_we = 0; pop = 0;
  endtask

  task automatic retire(int n, int exp_free);
    @(negedge clk);
    check(told[n] == exp_free, $sformatf("insn %0d frees p%0d, expected p%0d", n + 1, told[n], exp_free));
    push = 1; push_tag = PW'(told[n] - 1);
    @(posedge clk);
    #1 push = 0;
  endtask

  initial begin
    {ren_we, cdb_valid, rst_we, pop, push} = '0;
    {rs1_areg, rs2_areg, rd_areg, rst_areg, dbg_areg} = '0;
    {cdb_tag, rst_tag, push_tag} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check(count == 4 && head_tag == 3, "free list starts p4..p7");
    for (int n = 0; n < 4; n++) rename(n);
    #1 check(empty, "free list empty after four renames");
    retire(0, 1);                       // add retires: free p1
    #1 check(count == 1 && head_tag == 0, "free list holds p1");
    rename(4);
    retire(1, 3);                       // sub: free p3
    retire(2, 5);                       // mul: free p5
    retire(3, 4);                       // div: free p4
    retire(4, 2);                       // add: free p2
    #1 check(count == 4 && head_tag == 2, "free list p3, p5, p4, p2");
    for (int r = 0; r < NA; r++) begin
      dbg_areg = AW'(r);
      #1 check(int'(dbg_tag) + 1 == (r == 0 ? 7 : r == 1 ? 1 : 6), "final map r1=p7 r2=p1 r3=p6");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
