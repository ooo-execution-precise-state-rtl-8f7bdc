// tb_store_buffer: random writes of (address, data) pairs to random ROB
// slots; every read must return what the model holds for that slot.
module tb_store_buffer;
  localparam int D = 4, XL = 32, RW = $clog2(D);

  logic clk = 0;
  always #5 clk = ~clk;

  logic we;
  logic [RW-1:0] widx, ridx;
  logic [XL-1:0] waddr, wdata, raddr, rdata;

  store_buffer #(.DEPTH(D), .XLEN(XL)) dut (.*);

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

  logic [XL-1:0] ma [D], md [D];
  bit valid [D];

  initial begin
    we = 0; widx = '0; ridx = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < D; i++) valid[i] = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      we = $urandom % 2; widx = RW'($urandom); waddr = $urandom; wdata = $urandom;
      ridx = RW'($urandom);
      #1;
      if (valid[ridx]) check(raddr == ma[ridx] && rdata == md[ridx], "slot read");
      if (we) begin ma[widx] = waddr; md[widx] = wdata; valid[widx] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
