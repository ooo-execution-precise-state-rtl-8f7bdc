// tb_map_table: checks the map table against a reference model.
//
// After reset every architectural register must map to its own tag and be
// ready. Then, for many random cycles, the test drives a random mix of
// rename writes, CDB broadcasts and rollback restores, and compares the
// source, Told and debug lookups (including the same-cycle CDB bypass on
// the source ready bits) with a model that keeps the map, its ready bits
// and the ready state of each physical register.
module tb_map_table;
  localparam int NA = 4, NP = 8;
  localparam int AW = $clog2(NA), PW = $clog2(NP);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] rs1_areg, rs2_areg, rd_areg, rst_areg, dbg_areg;
  logic [PW-1:0] rs1_tag, rs2_tag, rd_told, ren_tag, cdb_tag, rst_tag, dbg_tag;
  logic rs1_ready, rs2_ready, ren_we, cdb_valid, rst_we, dbg_ready;

  map_table #(.NUM_ARCH(NA), .NUM_PREGS(NP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_tag [NA];
  bit m_rdy [NA];
  bit m_prdy [NP];

  initial begin
    {ren_we, cdb_valid, rst_we} = '0;
    {rs1_areg, rs2_areg, rd_areg, rst_areg, dbg_areg} = '0;
    {ren_tag, cdb_tag, rst_tag} = '0;
    for (int i = 0; i < NA; i++) begin m_tag[i] = i; m_rdy[i] = 1; end
    for (int p = 0; p < NP; p++) m_prdy[p] = (p < NA);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      rs1_areg = AW'($urandom); rs2_areg = AW'($urandom);
      rd_areg = AW'($urandom); dbg_areg = AW'($urandom);
      cdb_valid = ($urandom % 3) == 0; cdb_tag = PW'($urandom);
      ren_we = 0; rst_we = 0;
      case ($urandom % 3)
        0: begin ren_we = 1; ren_tag = PW'($urandom); end
        1: begin rst_we = 1; rst_areg = AW'($urandom); rst_tag = PW'($urandom); end
        default: ;
      endcase
      #1;
      check(rs1_tag == PW'(m_tag[rs1_areg]) &&
            rs1_ready == (m_rdy[rs1_areg] || (cdb_valid && cdb_tag == PW'(m_tag[rs1_areg]))),
            "rs1 lookup");
      check(rs2_tag == PW'(m_tag[rs2_areg]) &&
            rs2_ready == (m_rdy[rs2_areg] || (cdb_valid && cdb_tag == PW'(m_tag[rs2_areg]))),
            "rs2 lookup");
      check(rd_told == PW'(m_tag[rd_areg]), "Told lookup");
      check(dbg_tag == PW'(m_tag[dbg_areg]) && dbg_ready == m_rdy[dbg_areg], "debug lookup");
      // model update for the coming edge
      begin
        bit rrdy;
        rrdy = m_prdy[rst_tag] || (cdb_valid && cdb_tag == rst_tag);
        if (cdb_valid) begin
          m_prdy[cdb_tag] = 1;
          for (int i = 0; i < NA; i++) if (PW'(m_tag[i]) == cdb_tag) m_rdy[i] = 1;
        end
        if (ren_we) begin
          m_tag[rd_areg] = ren_tag; m_rdy[rd_areg] = 0; m_prdy[ren_tag] = 0;
        end
        if (rst_we) begin
          m_tag[rst_areg] = rst_tag; m_rdy[rst_areg] = rrdy;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
