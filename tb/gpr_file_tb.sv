// gpr_file_tb: reset contents, random writes read back on both ports,
// write-through in the write cycle, and the enable gating writes.
//
// How: random write/read traffic with a shadow array as reference.
// Interface: none. Timing: 10 ns clock; reads are checked combinationally in
// the write cycle (write-through) and after the edge; a watchdog ends a hung
// run. Register count and write-through are this design's choices.
module gpr_file_tb;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, we = 0;
  logic [4:0] ra = 0, rb = 0, wa = 0;
  logic [31:0] qa, qb, wd = 0;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  gpr_file dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    foreach (model[i]) model[i] = 0;
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin ra = 5'(i); #1 chk(qa, 0, "reset"); end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = 1; wa = 5'($urandom); wd = $urandom; en = ($urandom % 8) != 0;
      ra = ($urandom % 2) ? wa : 5'($urandom); rb = 5'($urandom);
      #1;
      chk(qa, (ra == wa) ? wd : model[ra], "port a");
      chk(qb, (rb == wa) ? wd : model[rb], "port b");
      @(posedge clk);
      if (en) model[wa] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 32; i++) begin ra = 5'(i); rb = 5'(31 - i); #1 chk(qa, model[i], "final a"); chk(qb, model[31-i], "final b"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
