// tb_free_list: checks the free list against a queue model.
//
// After reset the list must hold tags 4..7 (PR#5..PR#8) in that order.
// Random cycles then pop (when not empty) and push (when not full) at the
// same time or apart, and the head tag, empty flag and count are compared
// with a SystemVerilog queue.
module tb_free_list;
  localparam int NA = 4, NP = 8, DEPTH = NP - NA;
  localparam int PW = $clog2(NP), CW = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pop, push, empty;
  logic [PW-1:0] head_tag, push_tag;
  logic [CW-1:0] count;

  free_list #(.NUM_ARCH(NA), .NUM_PREGS(NP)) dut (.*);

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

  int q [$];
  int pops = 0, pushes = 0, both = 0;

  initial begin
    pop = 0; push = 0; push_tag = '0;
    for (int i = 0; i < DEPTH; i++) q.push_back(NA + i);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      pop  = (q.size() > 0) && ($urandom % 2);
      push = ((q.size() < DEPTH) || pop) && ($urandom % 2);
      push_tag = PW'($urandom);
      #1;
      check(count == CW'(q.size()), "count");
      check(empty == (q.size() == 0), "empty flag");
      if (q.size() > 0) check(head_tag == PW'(q[0]), $sformatf("head tag %0d vs %0d", head_tag, q[0]));
      if (pop) begin void'(q.pop_front()); pops++; end
      if (push) begin q.push_back(int'(push_tag)); pushes++; end
      if (pop && push) both++;
    end
    check(pops > 100 && pushes > 100 && both > 10, "mix of pops and pushes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
