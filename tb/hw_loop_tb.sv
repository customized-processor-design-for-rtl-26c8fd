// hw_loop_tb: main loops of several tasks configured by instruction and by
// register writes, loop-end detection only for the running task, nested
// loop priority, counter decrement per taken iteration and exit at zero.
//
// How: directed sequences drive fetch addresses and configuration writes
// and compare loop_hit/loop_target and the counter with expected values.
// Interface: none. Timing: 10 ns clock; the redirect must be given in the
// same cycle as the fetch of the loop end (zero overhead); a watchdog ends
// a hung run. Per-task main loops and the counted nested loop follow the
// source design; the end-address-0 rule and the N+1 passes are this
// design's.
module hw_loop_tb;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  logic [2:0] cur_task = 0;
  logic [31:0] fetch_addr = 0;
  logic fetch_fire = 0, loop_hit;
  logic [31:0] loop_target;
  logic cfg_valid = 0;
  logic [31:0] cfg_start = 0, cfg_end = 0;
  asr_wr_t asr_wr = '0;
  logic [31:0] loop_start [NTASK];
  logic [31:0] loop_end [NTASK];
  logic [31:0] nest_start, nest_end, nest_cnt;
  int checks = 0, failures = 0;

  hw_loop dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic got, logic exp, logic [31:0] gt, logic [31:0] et, string what);
    checks++;
    if (got !== exp || (exp && gt !== et)) begin
      failures++; $display("FAIL %s hit=%b/%b target=%h/%h", what, got, exp, gt, et);
    end
  endtask

  task automatic wr(logic [6:0] idx, logic [31:0] d);
    @(negedge clk); asr_wr = '{we: 1'b1, idx: idx, data: d};
    @(negedge clk); asr_wr = '0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // no loop configured: nothing hits
    @(negedge clk); fetch_addr = 0; #1 chk(loop_hit, 0, loop_target, 0, "idle");
    // task 0 via instruction, task 3 via register writes
    @(negedge clk); cfg_valid = 1; cfg_start = 32'h40; cfg_end = 32'h5c;
    @(negedge clk); cfg_valid = 0;
    wr(R_LOOP_START + 7'd3, 32'h100);
    wr(R_LOOP_END + 7'd3, 32'h120);
    checks++; if (loop_start[0] !== 32'h40 || loop_end[3] !== 32'h120) begin failures++; $display("FAIL regs"); end
    for (int t = 0; t < 8; t++) begin
      cur_task = 3'(t);
      fetch_addr = 32'h5c; #1 chk(loop_hit, t == 0, loop_target, 32'h40, "task0 end");
      fetch_addr = 32'h120; #1 chk(loop_hit, t == 3, loop_target, 32'h100, "task3 end");
      fetch_addr = 32'h58; #1 chk(loop_hit, 0, loop_target, 0, "not end");
    end
    // nested loop inside task 0's loop, counter 3
    cur_task = 0;
    wr(R_NEST_START, 32'h48);
    wr(R_NEST_END, 32'h50);
    wr(R_NEST_CNT, 32'd3);
    for (int it = 3; it >= 0; it--) begin
      @(negedge clk); fetch_addr = 32'h50; fetch_fire = 1; #1
      chk(loop_hit, it != 0, loop_target, 32'h48, "nested");
      checks++; if (nest_cnt !== 32'(it)) begin failures++; $display("FAIL count %0d exp %0d", nest_cnt, it); end
    end
    @(negedge clk); fetch_fire = 0;
    // nested wins over main loop when both ends coincide
    wr(R_NEST_END, 32'h5c);
    wr(R_NEST_CNT, 32'd1);
    fetch_addr = 32'h5c; #1 chk(loop_hit, 1, loop_target, 32'h48, "priority");
    // no decrement without fetch_fire or with en low
    @(negedge clk); fetch_fire = 1; en = 0;
    @(negedge clk); en = 1; fetch_fire = 0;
    checks++; if (nest_cnt !== 1) begin failures++; $display("FAIL en gating"); end
    @(negedge clk); fetch_fire = 1;
    @(negedge clk); fetch_fire = 0; #1
    chk(loop_hit, 1, loop_target, 32'h40, "main after nested exhausted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
