// ctx_sched_tb: scheduler decisions against a reference priority model with
// random IO event patterns; checks sleep, stay, switch, saved context and
// restored context.
//
// How: random io_ready patterns and wait instructions against a reference
// priority model, with counts of sleep, stay and switch outcomes that must
// all be non-zero. Interface: none. Timing: 10 ns clock; the decision is
// checked combinationally in the wait cycle, saved state after the edge; a
// watchdog ends a hung run. Static priority 0..7, saved PC/instruction and
// sleep follow the source design; the status layout is this design's.
module ctx_sched_tb;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  logic [15:0] io_ready = 0;
  logic wait_valid = 0;
  logic [3:0] wait_event = 0;
  logic [31:0] save_pc = 0, save_ins = 0;
  logic sleep, do_switch;
  logic [31:0] restore_pc, restore_ins;
  logic [2:0] cur_task;
  asr_wr_t asr_wr = '0;
  logic [31:0] saved_pc [NTASK];
  logic [31:0] saved_ins [NTASK];
  logic [31:0] io_status [NTASK];
  int checks = 0, failures = 0;
  // reference state
  int m_cur;
  logic m_park [8];
  int m_ev [8];
  logic [31:0] m_pc [8], m_ins [8];
  int n_switch = 0, n_stay = 0, n_sleep = 0;

  ctx_sched dut (.*);
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    m_cur = 0;
    // park tasks 1..7 on events 1..7, entry points 0x100*t
    for (int t = 0; t < 8; t++) begin m_park[t] = 0; m_ev[t] = 0; m_pc[t] = 0; m_ins[t] = 0; end
    for (int t = 1; t < 8; t++) begin
      wr(R_SAVED_PC + 7'(t), 32'h100 * t);
      wr(R_SAVED_INS + 7'(t), 32'hA000_0000 + t);
      wr(R_IO_STATUS + 7'(t), 32'h10 | t);
      m_park[t] = 1; m_ev[t] = t; m_pc[t] = 32'h100 * t; m_ins[t] = 32'hA000_0000 + t;
    end
    chk(cur_task == 0, "reset task");
    for (int n = 0; n < 600; n++) begin
      int pick;
      logic [15:0] r;
      @(negedge clk);
      r = 16'($urandom) & 16'($urandom) & 16'($urandom);
      if (n % 10 == 0) r = 0;
      io_ready = r;
      wait_valid = 1; wait_event = 4'($urandom % 8);
      save_pc = $urandom; save_ins = $urandom;
      #1;
      pick = -1;
      for (int t = 7; t >= 0; t--) begin
        if (t == m_cur ? r[wait_event] : (m_park[t] && r[m_ev[t]])) pick = t;
      end
      if (pick < 0) begin
        chk(sleep && !do_switch, "sleep"); n_sleep++;
      end else if (pick == m_cur) begin
        chk(!sleep && !do_switch, "stay"); n_stay++;
      end else begin
        chk(!sleep && do_switch, "switch");
        chk(restore_pc == m_pc[pick] && restore_ins == m_ins[pick], "restore values");
        n_switch++;
      end
      @(posedge clk); #1;
      if (pick >= 0 && pick != m_cur) begin
        m_pc[m_cur] = save_pc; m_ins[m_cur] = save_ins; m_park[m_cur] = 1; m_ev[m_cur] = wait_event;
        m_park[pick] = 0;
        m_cur = pick;
      end
      chk(cur_task == 3'(m_cur), "current task");
      for (int t = 0; t < 8; t++) begin
        if (t != m_cur && m_park[t])
          chk(saved_pc[t] == m_pc[t] && saved_ins[t] == m_ins[t] && io_status[t][4:0] == {1'b1, 4'(m_ev[t])}, "saved context");
      end
      chk(io_status[m_cur][4] == 0, "running task not parked");
    end
    @(negedge clk); wait_valid = 0;
    chk(n_switch > 20 && n_stay > 5 && n_sleep > 5, "all outcomes seen");
    $display("switch=%0d stay=%0d sleep=%0d", n_switch, n_stay, n_sleep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
