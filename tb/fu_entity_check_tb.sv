// fu_entity_check_tb: random and directed operands against a reference of
// the six status bits.
//
// How: 2000 random operand sets, in which x == y, b == c, z == y, equal
// upper bits of y and z and a zero low byte of x are made frequent, are applied and the six bits compared with a
// model of the example functional unit. Interface: none. Timing:
// combinational, sampled after a 1 ns settle. The logic follows the
// example unit of the source design.
module fu_entity_check_tb;
  import asip_pkg::*;
  logic [1:0] a, b, c;
  logic [17:0] x, y, z;
  logic [5:0] f;
  int checks = 0, failures = 0;

  fu_entity_check dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [5:0] e;
      logic m, w;
      a = 2'($urandom); b = 2'($urandom); c = ($urandom % 2) ? b : 2'($urandom);
      x = 18'($urandom); y = ($urandom % 2) ? x : 18'($urandom); z = ($urandom % 3 == 0) ? y : 18'($urandom);
      if (n % 4 == 0) x[7:0] = 0;
      if (n % 7 == 0) z[17:8] = y[17:8];
      #1;
      m = (a != 1) || (b != c) || (x != y);
      w = (x % 256 == 0) && ((z >> 8) != (y >> 8) || y == z);
      e = {m || w, m, w, x != y, b != c, a != 1};
      checks++;
      if (f !== e) begin failures++; $display("FAIL a=%0d b=%0d c=%0d x=%h y=%h z=%h f=%b exp %b", a, b, c, x, y, z, f, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
