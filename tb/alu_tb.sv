// alu_tb: checks every ALU operation on random and corner operands against
// a reference model written with plain SystemVerilog operators.
//
// How: for each operation, random operands plus corner values (0, all ones,
// sign boundaries, shift amounts 0 and 31) are applied and y/wen compared
// with the model. Interface: none, self-contained. Timing: combinational
// unit, results sampled after a 1 ns settle; a watchdog ends a hung run.
// The operation list follows the base instruction table of the source
// design; the movhi reading (keep the low half) is this design's.
module alu_tb;
  import asip_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        wen;
  int checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y), .wen(wen));

  function automatic void expect_val(logic [31:0] ey, logic ew);
    checks++;
    if (y !== ey || wen !== ew) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h/%h wen=%b/%b", op.name(), a, b, y, ey, wen, ew);
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h0000_001f};
    for (int n = 0; n < 400; n++) begin
      if (n < 36) begin a = corner[n % 6]; b = corner[n / 6]; end
      else begin a = $urandom; b = $urandom; if (n % 5 == 0) b = a; end
      for (int o = 0; o <= int'(ALU_MOVHI); o++) begin
        int sa, sb;
        op = alu_op_e'(o);
        #1;
        sa = int'(a); sb = int'(b);
        case (op)
          ALU_ADD:   expect_val(a + b, 1);
          ALU_SUB:   expect_val(a - b, 1);
          ALU_AND:   expect_val(a & b, 1);
          ALU_OR:    expect_val(a | b, 1);
          ALU_XOR:   expect_val(a ^ b, 1);
          ALU_SLL:   expect_val(a << (b % 32), 1);
          ALU_SRL:   expect_val(a >> (b % 32), 1);
          ALU_SRA:   expect_val(32'(sa >>> (b % 32)), 1);
          ALU_EQ:    expect_val(32'(a == b), 1);
          ALU_NEQ:   expect_val(32'(a != b), 1);
          ALU_SLT:   expect_val(32'(sa < sb), 1);
          ALU_ULT:   expect_val(32'(a < b), 1);
          ALU_SLE:   expect_val(32'(sa <= sb), 1);
          ALU_ULE:   expect_val(32'(a <= b), 1);
          ALU_MOVZ:  expect_val(b, a == 0);
          ALU_MOVNZ: expect_val(b, a != 0);
          ALU_PASSB: expect_val(b, 1);
          ALU_MOVHI: expect_val({b[15:0], a[15:0]}, 1);
          default: ;
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
