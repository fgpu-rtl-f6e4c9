// pe: one processing element. Computes, for one work-item, the result of the
// arithmetic instructions (ADD, ADDI, MACC), the byte address of LW/SW
// (base + 4*index) and the not-equal condition of BNE. Built-in values (LID,
// WGOFF) and kernel parameters (LP) arrive on `aux` and are passed to the
// result. Purely combinational; the document runs the ALUs at twice the
// pipeline clock, which this single-clock design does not do.
module pe
  import fgpu_pkg::*;
(
  input  opcode_e      op,
  input  logic [31:0]  a,      // rs operand
  input  logic [31:0]  b,      // rt operand
  input  logic [31:0]  c,      // rd operand (accumulator, store data, BNE left side)
  input  logic [15:0]  imm,
  input  logic [31:0]  aux,    // LID / WGOFF / LP value
  output logic [31:0]  result,
  output logic         wr_en,  // result is written to rd
  output logic [31:0]  addr,
  output logic         ne      // c != a, for BNE
);
  always_comb begin
    result = '0;
    wr_en  = 1'b0;
    unique case (op)
      OP_ADD:   begin result = a + b;                 wr_en = 1'b1; end
      OP_ADDI:  begin result = a + {{16{imm[15]}}, imm}; wr_en = 1'b1; end
      OP_MACC:  begin result = c + a * b;             wr_en = 1'b1; end
      OP_LID, OP_WGOFF, OP_LP: begin result = aux;    wr_en = 1'b1; end
      default:  ;
    endcase
    addr = a + (b << 2);
    ne   = (c != a);
  end
endmodule
