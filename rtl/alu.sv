// alu: the arithmetic and logic unit of the base instruction set.
//
// Purely combinational. It adds, subtracts, does bitwise and/or/xor, shifts
// left, right and right arithmetically by b[4:0], compares (equal, not equal,
// signed and unsigned less-than and less-or-equal, giving 1 or 0), and
// handles the conditional moves: movz and movnz pass b when a is zero (or
// non-zero) and otherwise drop the write by clearing `wen`. movhi replaces the
// upper 16 bits of a with b[15:0]; pass-b serves movsi and the immediate
// forms. The operation set is the base ISA of the source design; the
// operation encoding and the movhi reading (keep the low half) are this
// design's choice.
//
// Interface: op, a, b in; y and wen out, in the same cycle (execute stage).
module alu
  import asip_pkg::*;
(
  input  alu_op_e         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y,
  output logic            wen
);

  logic signed [XLEN-1:0] as, bs;
  assign as = signed'(a);
  assign bs = signed'(b);

  always_comb begin
    y   = '0;
    wen = 1'b1;
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = unsigned'(as >>> b[4:0]);
      ALU_EQ:    y = {31'b0, a == b};
      ALU_NEQ:   y = {31'b0, a != b};
      ALU_SLT:   y = {31'b0, as < bs};
      ALU_ULT:   y = {31'b0, a < b};
      ALU_SLE:   y = {31'b0, as <= bs};
      ALU_ULE:   y = {31'b0, a <= b};
      ALU_MOVZ:  begin y = b; wen = (a == '0); end
      ALU_MOVNZ: begin y = b; wen = (a != '0); end
      ALU_PASSB: y = b;
      ALU_MOVHI: y = {b[15:0], a[15:0]};
      default:   y = '0;
    endcase
  end

endmodule
