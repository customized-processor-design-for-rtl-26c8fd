// asip_task_round_tb: cycle cost of one firmware round, in the form used to
// budget the layer-2 tasks (one task's loop from its wait to its last
// instruction, counted at one cycle per instruction).
//
// How: the processor at its default parameters runs a release task of eight
// instructions inside a zero-overhead main loop: wait for event 1, load the
// PDCP entity, SetReleaseFlag, entity check of the returned flag,
// ExceptionHandler, count the round, add the flag to a total, deallocate
// the SDU. Like the budgeted tasks it keeps its state in registers and
// makes no data-memory access (each load or store would add one cycle,
// since fetch shares the bus). A small SoC model answers
// at once, never busy, and keeps event 1 ready, so the task never leaves
// the core. Entities are chosen so that every third round fails the entity
// check; those rounds take the exception path (handler of four
// instructions ending in a jump back to the wait). Checked: a round without
// exception takes exactly 8 cycles from one wait to the next (one per
// instruction, no loop cost); a round with exception takes 9 instructions
// plus two taken jumps of 3 cycles, 13 cycles; the round counter register and
// the handler's error counter match, as does the flag total.
// Interface: none. Timing: 10 ns clock,
// watchdog. The 8-instruction round without exception and one cycle per
// instruction are the budget of the source design; the firmware itself and
// the exception path are this design's.
module asip_task_round_tb;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic         soc_strobe, soc_read, halted, sleeping, retired;
  logic [7:0]   soc_opcode;
  logic [319:0] soc_wdata, soc_rdata;
  logic [2:0]   cur_task;

  asip_top dut (
    .clk(clk), .rst_n(rst_n), .io_ready(16'h0002), .soc_busy(1'b0),
    .soc_strobe(soc_strobe), .soc_read(soc_read), .soc_opcode(soc_opcode),
    .soc_wdata(soc_wdata), .soc_rdata(soc_rdata), .halted(halted),
    .sleeping(sleeping), .cur_task(cur_task), .retired(retired));

  localparam int ROUNDS = 12;
  localparam int L = 6, H = 16;

  // SoC: entity load answers with an entity whose check passes unless this
  // is every third load; GetReleaseFlag answers 1
  int n_load = 0;
  bit err_round [$];
  always @(posedge clk) begin
    if (!rst_n) soc_rdata <= '0;
    else if (soc_strobe && soc_opcode == CMD_LOAD_PDCP) begin
      logic [PDCP_ENT_W-1:0] e;
      logic [SN_W-1:0] rn, wm, tx;
      e  = PDCP_ENT_W'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      rn = SN_W'($urandom);
      wm = SN_W'((1 << (4 + $urandom % 14)) - 1);
      tx = (rn + 1'b1) & wm;
      if (n_load % 3 == 2) tx = tx ^ 18'h1;
      e[ENT_RC_REL_NEXT_LSB +: SN_W] = rn;
      e[ENT_WINMASK_LSB +: SN_W]     = wm;
      e[ENT_RC_TX_NEXT_LSB +: SN_W]  = tx;
      err_round.push_back(n_load % 3 == 2);
      n_load++;
      soc_rdata <= SOC_W'(e);
    end else if (soc_strobe && soc_opcode == CMD_GET_REL_FLAG) soc_rdata <= SOC_W'(1);
    else soc_rdata <= '0;
  end

  // round boundaries: retirement of the wait instruction
  int wait_at [$];
  always @(posedge clk) if (rst_n && retired && dut.u_core.ex_pc == L * 4) wait_at.push_back(cycle);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] p [32];
    int n_err;
    foreach (p[i]) p[i] = mk_i(OP_NOP, 0, 16'd0);
    p[0]  = mk_i(OP_MOVSI, 12, 16'h0000);
    p[1]  = mk_i(OP_MOVSI, 9, 16'd1);
    p[2]  = mk_i(OP_MOVSI, 35, 16'(H * 4));
    p[3]  = mk_i(OP_MOVSI, 21, 16'(L * 4));
    p[4]  = mk_i(OP_MOVSI, 22, 16'((L + 7) * 4));
    p[5]  = mk_r(OP_HWLOOP, 0, 21, 22);
    p[L]     = mk_i(OP_WAIT, 0, 16'd1);
    p[L + 1] = mk_r(OP_LDPDCP, 0, 10, 0);
    p[L + 2] = mk_r(OP_SETREL, 0, 0, 0);
    p[L + 3] = mk_r(OP_CHKENT, 0, 33, 0);     // a = release flag (1), x/y from the entity
    p[L + 4] = mk_r(OP_EXCHK, 0, 0, 0);
    p[L + 5] = mk_addi(10, 10, 11'd1);
    p[L + 6] = mk_r(OP_ADD, 12, 12, 33);       // total of release flags
    p[L + 7] = mk_r(OP_DEALLOC, 0, 9, 0);
    p[H]     = mk_addi(16, 16, 11'd1);
    p[H + 1] = mk_i(OP_MOVSI, 52, 16'd0);
    p[H + 2] = mk_r(OP_DEALLOC, 0, 9, 0);
    p[H + 3] = mk_i(OP_JUMP, 0, 16'(L * 4));
    for (int w = 0; w < 1024; w++) dut.u_mem.mem[w] = 32'h0;
    for (int w = 0; w < 32; w++) dut.u_mem.mem[w] = p[w];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (wait_at.size() == ROUNDS + 1);
    n_err = 0;
    for (int k = 0; k < ROUNDS; k++) begin
      int d;
      d = wait_at[k + 1] - wait_at[k];
      if (err_round[k]) begin
        n_err++;
        chk(d == 13, $sformatf("round %0d with exception: %0d cycles, expected 13", k, d));
      end else begin
        chk(d == 8, $sformatf("round %0d without exception: %0d cycles, expected 8", k, d));
      end
    end
    $display("rounds=%0d with exception=%0d, first round %0d cycles", ROUNDS, n_err, wait_at[1] - wait_at[0]);
    chk(n_err == ROUNDS / 3, "every third round takes the exception path");
    chk(dut.u_core.u_gpr.regs[16] == 32'(n_err), "handler counted the errors");
    chk(dut.u_core.u_gpr.regs[10] == 32'(ROUNDS - n_err), "rounds without exception counted");
    chk(dut.u_core.u_gpr.regs[12] == 32'(ROUNDS - n_err), "release flags added up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
