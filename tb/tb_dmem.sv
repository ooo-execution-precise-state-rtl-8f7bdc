// tb_dmem: fills the data memory, then random writes and reads through
// both read ports, comparing with an array model. Byte addresses are
// random in the low bits so the word index bits [7:2] and the wrap-around
// of higher address bits are exercised.
module tb_dmem;
  localparam int W = 64, XL = 32;

  logic clk = 0;
  always #5 clk = ~clk;

  logic we;
  logic [XL-1:0] raddr, rdata, dbg_addr, dbg_data, waddr, wdata;

  dmem #(.WORDS(W), .XLEN(XL)) dut (.*);

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

  logic [XL-1:0] m [W];

  initial begin
    we = 0; raddr = '0; dbg_addr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      we = 1; waddr = 32'(i * 4); wdata = $urandom; m[i] = wdata;
    end
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      we = $urandom % 2; waddr = $urandom; wdata = $urandom;
      raddr = $urandom; dbg_addr = $urandom;
      #1;
      check(rdata == m[raddr[7:2]], "load port");
      check(dbg_data == m[dbg_addr[7:2]], "debug port");
      if (we) m[waddr[7:2]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
