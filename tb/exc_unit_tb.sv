// exc_unit_tb: error flags accumulate and are cleared by a register write;
// ExceptionHandler jumps to the handler only with a flag set; JumpIfNoError
// jumps only without one and otherwise records the cause.
//
// How: random error bits, register writes and check instructions are
// applied every cycle and compared with a reference model of the bitmap,
// handler address and cause. Interface: none. Timing: 10 ns clock, checks
// sampled each cycle, watchdog against hangs. The error bitmap and the two
// instruction names follow the source design; the cause register and the
// exact JumpIfNoError behaviour are this design's.
module exc_unit_tb;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  logic [31:0] err_set = 0;
  logic exchk_valid = 0, noerr_valid = 0, exc_taken, noerr_taken;
  logic [31:0] exc_target, err_flags, exc_addr, exc_cause;
  asr_wr_t asr_wr = '0;
  int checks = 0, failures = 0;

  exc_unit dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [6:0] idx, logic [31:0] d);
    @(negedge clk); asr_wr = '{we: 1'b1, idx: idx, data: d};
    @(negedge clk); asr_wr = '0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    wr(R_EXC_ADDR, 32'h0000_0300);
    model = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      exchk_valid = ($urandom % 2); noerr_valid = !exchk_valid && ($urandom % 2);
      err_set = ($urandom % 6 == 0) ? (32'h1 << ($urandom % 32)) : 0;
      #1;
      chk(err_flags == model, "flags");
      chk(exc_taken == (exchk_valid && model != 0), "exchk");
      chk(!exc_taken || exc_target == 32'h300, "handler address");
      chk(noerr_taken == (noerr_valid && model == 0), "noerr");
      @(posedge clk); #1;
      if (noerr_valid && model != 0) chk(exc_cause == model, "cause");
      model |= err_set;
      if (n % 40 == 39) begin
        @(negedge clk); exchk_valid = 0; noerr_valid = 0; err_set = 0;
        wr(R_ERR_FLAGS, 0); model = 0;
        chk(err_flags == 0, "cleared");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
