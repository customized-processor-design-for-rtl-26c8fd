// asip_top_full_tb: the processor at its default parameters (1024-word memory,
// no wait states) through one complete run of the three-task firmware.
//
// The SoC model (soc_env) answers entity loads and release-flag reads,
// stalls the port at random and raises the IO events: header checks alone,
// SDU releases alone, both together, then the event that ends the run.
// Checked: the SoC commands and the data they carry, the results the
// firmware leaves in memory and registers, the two-cycle context switch and
// the one-cycle wait, and that each mechanism of the design happened.
module asip_top_full_tb;
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

  // ---------------------------------------------------------------- bench 
  logic         soc_busy, soc_strobe, soc_read, halted, sleeping, retired, done;
  logic [7:0]   soc_opcode;
  logic [319:0] soc_wdata, soc_rdata;
  logic [15:0]  io_ready;
  logic [2:0]   cur_task;

  asip_top dut (
    .clk(clk), .rst_n(rst_n), .io_ready(io_ready), .soc_busy(soc_busy),
    .soc_strobe(soc_strobe), .soc_read(soc_read), .soc_opcode(soc_opcode),
    .soc_wdata(soc_wdata), .soc_rdata(soc_rdata), .halted(halted),
    .sleeping(sleeping), .cur_task(cur_task), .retired(retired));

  soc_env env (
    .clk(clk), .rst_n(rst_n), .soc_strobe(soc_strobe), .soc_read(soc_read),
    .soc_opcode(soc_cmd_e'(soc_opcode)), .soc_wdata(soc_wdata), .soc_rdata(soc_rdata),
    .soc_busy(soc_busy), .io_ready(io_ready), .sleeping(sleeping),
    .halted(halted), .done(done));

  asip_probe prb (
    .clk(clk), .rst_n(rst_n), .en(dut.u_core.en), .ex_v(dut.u_core.ex_v), .ex_pc(dut.u_core.ex_pc),
    .soc_stall(dut.u_core.ex_v && dut.u_core.is_soc && dut.u_core.soc_stall),
    .sleeping(sleeping), .sw_switch(dut.u_core.sw_switch), .restore_pc(dut.u_core.restore_pc),
    .wait_fire(dut.u_core.ex_fire && dut.u_core.ex_op == OP_WAIT),
    .main_loop(dut.u_core.fetch_en && dut.u_core.loop_hit && !dut.u_core.u_loop.nest_hit),
    .nest_loop(dut.u_core.fetch_en && dut.u_core.u_loop.nest_hit),
    .exc_taken(dut.u_core.u_exc.exc_taken), .noerr_taken(dut.u_core.u_exc.noerr_taken),
    .noerr_valid(dut.u_core.u_exc.noerr_valid),
    .fwd(dut.u_core.ex_v && (dut.u_core.gpa != dut.u_core.ex_a || dut.u_core.gpb != dut.u_core.ex_b)),
    .ent_bypass(dut.u_core.u_pdcp.setrel_valid && dut.u_core.u_pdcp.wb_valid && dut.u_core.u_pdcp.wb_tag == TAG_PDCP),
    .bus_data(dut.u_core.bus_data), .br_taken(dut.u_core.br_taken),
    .soc_strobe(soc_strobe), .hold_v(dut.u_core.u_soc.hold_v));

  task automatic load();
    for (int w = 0; w < 1024; w++) dut.u_mem.mem[w] = 32'h0;
    for (int w = 0; w < int'(FW_WORDS); w++) dut.u_mem.mem[w] = fw[w];
    for (int k = 0; k < int'(NARGS); k++) dut.u_mem.mem[ARG_BASE / 4 + k] = arg_word(k);
  endtask

  task automatic check(bit need_wait_states);
    int n;
    checks += env.checks + prb.checks;
    failures += env.failures + prb.failures;
    $display("runs chk=%0d setrel=%0d load=%0d r10=%0d", env.n_chk, env.n_setrel, env.n_load, dut.u_core.u_gpr.regs[10]);
    chk(env.n_chk == 12 && env.n_setrel == 10 && env.n_load == 10, ": number of task runs");
    chk(dut.u_core.u_gpr.regs[13] == 32'(env.exp_ok), ": good checks counted");
    chk(dut.u_core.u_gpr.regs[16] == 32'(env.exp_err), ": errors counted");
    chk(dut.u_mem.mem[OK_ADDR / 4] == 32'(env.exp_ok), ": good-check word");
    chk(dut.u_mem.mem[ERR_ADDR / 4] == 32'(env.exp_err), ": error word");
    chk(dut.u_core.u_gpr.regs[19] == 32'h1, ": exception cause");
    chk(dut.u_core.u_gpr.regs[10] == 32'd10, ": task 1 iterations");
    chk(dut.u_core.u_gpr.regs[27] == 32'd4, ": nested loop passes");
    n = env.flags.size();
    for (int k = 0; k < n; k++)
      chk(dut.u_mem.mem[FLAG_BASE / 4 + k] == 32'(env.flags[k]), ": release flag stored");
    $display(": busy=%0d sleep=%0d switch=%0d stay=%0d hwloop=%0d nested=%0d exc=%0d noerr=%0d err_seen=%0d fwd=%0d bypass=%0d bus=%0d jump=%0d soc=%0d waitstate=%0d hold=%0d",
      prb.n_busy, prb.n_sleep, prb.n_switch, prb.n_stay, prb.n_loop, prb.n_nest,
      prb.n_exc, prb.n_noerr, prb.n_err_seen, prb.n_fwd, prb.n_bypass, prb.n_bus,
      prb.n_jump, prb.n_soc, prb.n_wait_state, prb.n_hold);
    chk(prb.n_busy > 0, ": SoC busy stall happened");
    chk(prb.n_sleep > 0, ": sleep happened");
    chk(prb.n_switch > 0, ": context switch happened");
    chk(prb.n_stay > 0, ": wait without switch happened");
    chk(prb.n_loop > 0, ": main hardware loop happened");
    chk(prb.n_nest > 0, ": nested hardware loop happened");
    chk(prb.n_exc > 0, ": exception taken");
    chk(prb.n_noerr > 0, ": JumpIfNoError taken");
    chk(prb.n_err_seen > 0, ": JumpIfNoError found errors");
    chk(prb.n_fwd > 0, ": operand forwarding happened");
    chk(prb.n_bypass > 0, ": entity bypass happened");
    chk(prb.n_bus > 0, ": data access took the bus");
    chk(prb.n_jump > 0, ": taken jump happened");
    chk(prb.n_soc > 0, ": SoC command happened");
    if (need_wait_states) begin
      chk(prb.n_wait_state > 0, ": memory wait state happened");
      chk(prb.n_hold > 0, ": SoC read data held through a wait state");
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
    load();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done);
    check(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
