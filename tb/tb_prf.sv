// tb_prf: checks the physical register file against an array model:
// all registers read zero after reset, a write is visible on all read ports
// from the next cycle, and random writes and reads agree with the model.
module tb_prf;
  localparam int NP = 8, XL = 32, PW = $clog2(NP);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [PW-1:0] ra1, ra2, wa, dbg_ra;
  logic [XL-1:0] rd1, rd2, wd, dbg_rd;
  logic we;

  prf #(.NUM_PREGS(NP), .XLEN(XL)) dut (.*);

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

  logic [XL-1:0] m [NP];

  initial begin
    we = 0; wa = '0; wd = '0; ra1 = '0; ra2 = '0; dbg_ra = '0;
    for (int i = 0; i < NP; i++) m[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      ra1 = PW'($urandom); ra2 = PW'($urandom); dbg_ra = PW'($urandom);
      we = $urandom % 2; wa = PW'($urandom); wd = $urandom;
      #1;
      check(rd1 == m[ra1], "read port 1");
      check(rd2 == m[ra2], "read port 2");
      check(dbg_rd == m[dbg_ra], "debug port");
      if (we) m[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
