// tb_fu: checks the execute datapath for every operation with random
// operands: add, sub, addi (sign-extended immediate), integer mulf, the
// load/store address b + imm, the load result and the store data.
module tb_fu;
  import r10k_pkg::*;

  op_e op;
  logic [31:0] a, b, mem_addr, load_data, result, store_data;
  logic [15:0] imm;

  fu #(.XLEN(32)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sx;
    for (int c = 0; c < 3000; c++) begin
      op = op_e'($urandom % 6);
      a = $urandom; b = $urandom; imm = 16'($urandom); load_data = $urandom;
      if (c < 6) begin op = op_e'(c); imm = 16'hfffc; end   // -4
      #1;
      sx = longint'(signed'(imm));
      check(mem_addr == 32'(longint'(b) + sx), "address = b + imm");
      case (op)
        OP_ADD:  check(result == 32'(longint'(a) + longint'(b)), "add");
        OP_SUB:  check(result == 32'(longint'(a) - longint'(b)), "sub");
        OP_ADDI: check(result == 32'(longint'(a) + sx), "addi");
        OP_MULF: check(result == 32'(longint'(a) * longint'(b)), "mulf");
        OP_LDF:  check(result == load_data, "ldf result");
        OP_STF:  check(store_data == a, "stf data");
        default: ;
      endcase
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
