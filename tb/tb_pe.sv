// tb_pe: random operands through every instruction the PE evaluates; results,
// write enables, load/store addresses and the BNE condition are compared with
// values computed in the testbench.
module tb_pe;
  import fgpu_pkg::*;
  int checks = 0, failures = 0;
  opcode_e op;
  logic [31:0] a, b, c, aux, result, addr;
  logic [15:0] imm;
  logic wr_en, ne;

  pe dut (.op, .a, .b, .c, .imm, .aux, .result, .wr_en, .addr, .ne);

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s %s: %h vs %h", op.name(), what, got, exp); end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      a = $urandom; b = $urandom; c = $urandom; aux = $urandom; imm = 16'($urandom);
      if (t % 4 == 0) c = a;
      op = opcode_e'($urandom_range(0, 10));
      #1;
      case (op)
        OP_ADD:  begin chk(result, a + b, "res"); chk(32'(wr_en), 1, "we"); end
        OP_ADDI: begin chk(result, a + 32'(signed'(imm)), "res"); chk(32'(wr_en), 1, "we"); end
        OP_MACC: begin chk(result, c + a * b, "res"); chk(32'(wr_en), 1, "we"); end
        OP_LID, OP_WGOFF, OP_LP: begin chk(result, aux, "res"); chk(32'(wr_en), 1, "we"); end
        default: chk(32'(wr_en), 0, "we");
      endcase
      chk(addr, a + 4 * b, "addr");
      chk(32'(ne), 32'(c != a), "ne");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
