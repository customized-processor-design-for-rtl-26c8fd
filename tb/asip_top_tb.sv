// asip_top_tb: end-to-end test of the complete processor, run twice side by side.
//
// Bench 0 is the processor at its default parameters; bench 1 is the same
// processor with one memory wait state on every bus transfer. Each bench
// has its own SoC model (soc_env: random busy, PDCP entity loads, release
// flags, SDU deallocation clearing IO events) and mechanism counter
// (asip_probe). Both run the three-task firmware of asip_fw_pkg: task 2
// checks headers alone, task 1 releases SDUs alone, then both are made
// ready together so that priority decides, then event 0 ends the run.
// Checked: every SoC command, the counts of good and failed checks against
// the model's prediction, the stored release flags, the exception cause,
// the loop counts, the two-cycle context switch and one-cycle wait (probe),
// and that every mechanism happened at least once; bench 1 must also have
// seen memory wait states and SoC read data held through one. A watchdog
// ends a run that hangs.
module asip_top_tb;
  import asip_pkg::*;
  import asip_fw_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [31:0] fw [FW_WORDS];
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- bench 0
  logic         soc_busy0, soc_strobe0, soc_read0, halted0, sleeping0, retired0, done0;
  logic [7:0]   soc_opcode0;
  logic [319:0] soc_wdata0, soc_rdata0;
  logic [15:0]  io_ready0;
  logic [2:0]   cur_task0;

  asip_top dut0 (
    .clk(clk), .rst_n(rst_n), .io_ready(io_ready0), .soc_busy(soc_busy0),
    .soc_strobe(soc_strobe0), .soc_read(soc_read0), .soc_opcode(soc_opcode0),
    .soc_wdata(soc_wdata0), .soc_rdata(soc_rdata0), .halted(halted0),
    .sleeping(sleeping0), .cur_task(cur_task0), .retired(retired0));

  soc_env env0 (
    .clk(clk), .rst_n(rst_n), .soc_strobe(soc_strobe0), .soc_read(soc_read0),
    .soc_opcode(soc_cmd_e'(soc_opcode0)), .soc_wdata(soc_wdata0), .soc_rdata(soc_rdata0),
    .soc_busy(soc_busy0), .io_ready(io_ready0), .sleeping(sleeping0),
    .halted(halted0), .done(done0));

  asip_probe prb0 (
    .clk(clk), .rst_n(rst_n), .en(dut0.u_core.en), .ex_v(dut0.u_core.ex_v), .ex_pc(dut0.u_core.ex_pc),
    .soc_stall(dut0.u_core.ex_v && dut0.u_core.is_soc && dut0.u_core.soc_stall),
    .sleeping(sleeping0), .sw_switch(dut0.u_core.sw_switch), .restore_pc(dut0.u_core.restore_pc),
    .wait_fire(dut0.u_core.ex_fire && dut0.u_core.ex_op == OP_WAIT),
    .main_loop(dut0.u_core.fetch_en && dut0.u_core.loop_hit && !dut0.u_core.u_loop.nest_hit),
    .nest_loop(dut0.u_core.fetch_en && dut0.u_core.u_loop.nest_hit),
    .exc_taken(dut0.u_core.u_exc.exc_taken), .noerr_taken(dut0.u_core.u_exc.noerr_taken),
    .noerr_valid(dut0.u_core.u_exc.noerr_valid),
    .fwd(dut0.u_core.ex_v && (dut0.u_core.gpa != dut0.u_core.ex_a || dut0.u_core.gpb != dut0.u_core.ex_b)),
    .ent_bypass(dut0.u_core.u_pdcp.setrel_valid && dut0.u_core.u_pdcp.wb_valid && dut0.u_core.u_pdcp.wb_tag == TAG_PDCP),
    .bus_data(dut0.u_core.bus_data), .br_taken(dut0.u_core.br_taken),
    .soc_strobe(soc_strobe0), .hold_v(dut0.u_core.u_soc.hold_v));

  task automatic load0();
    for (int w = 0; w < 1024; w++) dut0.u_mem.mem[w] = 32'h0;
    for (int w = 0; w < int'(FW_WORDS); w++) dut0.u_mem.mem[w] = fw[w];
    for (int k = 0; k < int'(NARGS); k++) dut0.u_mem.mem[ARG_BASE / 4 + k] = arg_word(k);
  endtask

  task automatic check0(bit need_wait_states);
    int n;
    checks += env0.checks + prb0.checks;
    failures += env0.failures + prb0.failures;
    $display("runs chk=%0d setrel=%0d load=%0d r10=%0d", env0.n_chk, env0.n_setrel, env0.n_load, dut0.u_core.u_gpr.regs[10]);
    chk(env0.n_chk == 12 && env0.n_setrel == 10 && env0.n_load == 10, "0: number of task runs");
    chk(dut0.u_core.u_gpr.regs[13] == 32'(env0.exp_ok), "0: good checks counted");
    chk(dut0.u_core.u_gpr.regs[16] == 32'(env0.exp_err), "0: errors counted");
    chk(dut0.u_mem.mem[OK_ADDR / 4] == 32'(env0.exp_ok), "0: good-check word");
    chk(dut0.u_mem.mem[ERR_ADDR / 4] == 32'(env0.exp_err), "0: error word");
    chk(dut0.u_core.u_gpr.regs[19] == 32'h1, "0: exception cause");
    chk(dut0.u_core.u_gpr.regs[10] == 32'd10, "0: task 1 iterations");
    chk(dut0.u_core.u_gpr.regs[27] == 32'd4, "0: nested loop passes");
    n = env0.flags.size();
    for (int k = 0; k < n; k++)
      chk(dut0.u_mem.mem[FLAG_BASE / 4 + k] == 32'(env0.flags[k]), "0: release flag stored");
    $display("0: busy=%0d sleep=%0d switch=%0d stay=%0d hwloop=%0d nested=%0d exc=%0d noerr=%0d err_seen=%0d fwd=%0d bypass=%0d bus=%0d jump=%0d soc=%0d waitstate=%0d hold=%0d",
      prb0.n_busy, prb0.n_sleep, prb0.n_switch, prb0.n_stay, prb0.n_loop, prb0.n_nest,
      prb0.n_exc, prb0.n_noerr, prb0.n_err_seen, prb0.n_fwd, prb0.n_bypass, prb0.n_bus,
      prb0.n_jump, prb0.n_soc, prb0.n_wait_state, prb0.n_hold);
    chk(prb0.n_busy > 0, "0: SoC busy stall happened");
    chk(prb0.n_sleep > 0, "0: sleep happened");
    chk(prb0.n_switch > 0, "0: context switch happened");
    chk(prb0.n_stay > 0, "0: wait without switch happened");
    chk(prb0.n_loop > 0, "0: main hardware loop happened");
    chk(prb0.n_nest > 0, "0: nested hardware loop happened");
    chk(prb0.n_exc > 0, "0: exception taken");
    chk(prb0.n_noerr > 0, "0: JumpIfNoError taken");
    chk(prb0.n_err_seen > 0, "0: JumpIfNoError found errors");
    chk(prb0.n_fwd > 0, "0: operand forwarding happened");
    chk(prb0.n_bypass > 0, "0: entity bypass happened");
    chk(prb0.n_bus > 0, "0: data access took the bus");
    chk(prb0.n_jump > 0, "0: taken jump happened");
    chk(prb0.n_soc > 0, "0: SoC command happened");
    if (need_wait_states) begin
      chk(prb0.n_wait_state > 0, "0: memory wait state happened");
      chk(prb0.n_hold > 0, "0: SoC read data held through a wait state");
    end
  endtask

  // ---------------------------------------------------------------- bench 1
  logic         soc_busy1, soc_strobe1, soc_read1, halted1, sleeping1, retired1, done1;
  logic [7:0]   soc_opcode1;
  logic [319:0] soc_wdata1, soc_rdata1;
  logic [15:0]  io_ready1;
  logic [2:0]   cur_task1;

  asip_top #(.MEM_WAIT(1)) dut1 (
    .clk(clk), .rst_n(rst_n), .io_ready(io_ready1), .soc_busy(soc_busy1),
    .soc_strobe(soc_strobe1), .soc_read(soc_read1), .soc_opcode(soc_opcode1),
    .soc_wdata(soc_wdata1), .soc_rdata(soc_rdata1), .halted(halted1),
    .sleeping(sleeping1), .cur_task(cur_task1), .retired(retired1));

  soc_env env1 (
    .clk(clk), .rst_n(rst_n), .soc_strobe(soc_strobe1), .soc_read(soc_read1),
    .soc_opcode(soc_cmd_e'(soc_opcode1)), .soc_wdata(soc_wdata1), .soc_rdata(soc_rdata1),
    .soc_busy(soc_busy1), .io_ready(io_ready1), .sleeping(sleeping1),
    .halted(halted1), .done(done1));

  asip_probe prb1 (
    .clk(clk), .rst_n(rst_n), .en(dut1.u_core.en), .ex_v(dut1.u_core.ex_v), .ex_pc(dut1.u_core.ex_pc),
    .soc_stall(dut1.u_core.ex_v && dut1.u_core.is_soc && dut1.u_core.soc_stall),
    .sleeping(sleeping1), .sw_switch(dut1.u_core.sw_switch), .restore_pc(dut1.u_core.restore_pc),
    .wait_fire(dut1.u_core.ex_fire && dut1.u_core.ex_op == OP_WAIT),
    .main_loop(dut1.u_core.fetch_en && dut1.u_core.loop_hit && !dut1.u_core.u_loop.nest_hit),
    .nest_loop(dut1.u_core.fetch_en && dut1.u_core.u_loop.nest_hit),
    .exc_taken(dut1.u_core.u_exc.exc_taken), .noerr_taken(dut1.u_core.u_exc.noerr_taken),
    .noerr_valid(dut1.u_core.u_exc.noerr_valid),
    .fwd(dut1.u_core.ex_v && (dut1.u_core.gpa != dut1.u_core.ex_a || dut1.u_core.gpb != dut1.u_core.ex_b)),
    .ent_bypass(dut1.u_core.u_pdcp.setrel_valid && dut1.u_core.u_pdcp.wb_valid && dut1.u_core.u_pdcp.wb_tag == TAG_PDCP),
    .bus_data(dut1.u_core.bus_data), .br_taken(dut1.u_core.br_taken),
    .soc_strobe(soc_strobe1), .hold_v(dut1.u_core.u_soc.hold_v));

  task automatic load1();
    for (int w = 0; w < 1024; w++) dut1.u_mem.mem[w] = 32'h0;
    for (int w = 0; w < int'(FW_WORDS); w++) dut1.u_mem.mem[w] = fw[w];
    for (int k = 0; k < int'(NARGS); k++) dut1.u_mem.mem[ARG_BASE / 4 + k] = arg_word(k);
  endtask

  task automatic check1(bit need_wait_states);
    int n;
    checks += env1.checks + prb1.checks;
    failures += env1.failures + prb1.failures;
    $display("runs chk=%0d setrel=%0d load=%0d r10=%0d", env1.n_chk, env1.n_setrel, env1.n_load, dut1.u_core.u_gpr.regs[10]);
    chk(env1.n_chk == 12 && env1.n_setrel == 10 && env1.n_load == 10, "1: number of task runs");
    chk(dut1.u_core.u_gpr.regs[13] == 32'(env1.exp_ok), "1: good checks counted");
    chk(dut1.u_core.u_gpr.regs[16] == 32'(env1.exp_err), "1: errors counted");
    chk(dut1.u_mem.mem[OK_ADDR / 4] == 32'(env1.exp_ok), "1: good-check word");
    chk(dut1.u_mem.mem[ERR_ADDR / 4] == 32'(env1.exp_err), "1: error word");
    chk(dut1.u_core.u_gpr.regs[19] == 32'h1, "1: exception cause");
    chk(dut1.u_core.u_gpr.regs[10] == 32'd10, "1: task 1 iterations");
    chk(dut1.u_core.u_gpr.regs[27] == 32'd4, "1: nested loop passes");
    n = env1.flags.size();
    for (int k = 0; k < n; k++)
      chk(dut1.u_mem.mem[FLAG_BASE / 4 + k] == 32'(env1.flags[k]), "1: release flag stored");
    $display("1: busy=%0d sleep=%0d switch=%0d stay=%0d hwloop=%0d nested=%0d exc=%0d noerr=%0d err_seen=%0d fwd=%0d bypass=%0d bus=%0d jump=%0d soc=%0d waitstate=%0d hold=%0d",
      prb1.n_busy, prb1.n_sleep, prb1.n_switch, prb1.n_stay, prb1.n_loop, prb1.n_nest,
      prb1.n_exc, prb1.n_noerr, prb1.n_err_seen, prb1.n_fwd, prb1.n_bypass, prb1.n_bus,
      prb1.n_jump, prb1.n_soc, prb1.n_wait_state, prb1.n_hold);
    chk(prb1.n_busy > 0, "1: SoC busy stall happened");
    chk(prb1.n_sleep > 0, "1: sleep happened");
    chk(prb1.n_switch > 0, "1: context switch happened");
    chk(prb1.n_stay > 0, "1: wait without switch happened");
    chk(prb1.n_loop > 0, "1: main hardware loop happened");
    chk(prb1.n_nest > 0, "1: nested hardware loop happened");
    chk(prb1.n_exc > 0, "1: exception taken");
    chk(prb1.n_noerr > 0, "1: JumpIfNoError taken");
    chk(prb1.n_err_seen > 0, "1: JumpIfNoError found errors");
    chk(prb1.n_fwd > 0, "1: operand forwarding happened");
    chk(prb1.n_bypass > 0, "1: entity bypass happened");
    chk(prb1.n_bus > 0, "1: data access took the bus");
    chk(prb1.n_jump > 0, "1: taken jump happened");
    chk(prb1.n_soc > 0, "1: SoC command happened");
    if (need_wait_states) begin
      chk(prb1.n_wait_state > 0, "1: memory wait state happened");
      chk(prb1.n_hold > 0, "1: SoC read data held through a wait state");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    asip_fw_pkg::build(fw);
    load0();
    load1();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done0 && done1);
    check0(0);
    check1(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
