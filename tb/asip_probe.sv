// asip_probe: counts how often each mechanism of the processor happens and
// checks the cycle cost of the wait instruction, for testing.
//
// Inputs are the core's internal strobes, connected by hierarchical names
// in the testbench. Counted per cycle in which the pipeline advances:
// SoC-busy stalls, sleep cycles, context switches, waits that keep the
// running task, main and nested hardware-loop jumps, exceptions taken,
// JumpIfNoError taken and not taken, operand forwarding, the entity
// bypass, bus cycles taken by loads and stores, taken jumps, SoC commands,
// and independently of the pipeline: memory wait states and read data held
// through one. When CHECK_TIMING is set, every wait that switches task must
// leave EX empty for exactly one cycle with the resumed instruction in EX
// the cycle after (a two-cycle switch), and every wait that keeps its task
// must be followed directly by the next instruction (one cycle).
module asip_probe #(
  parameter bit CHECK_TIMING = 1
) (
  input logic        clk,
  input logic        rst_n,
  input logic        en,
  input logic        ex_v,
  input logic [31:0] ex_pc,
  input logic        soc_stall,
  input logic        sleeping,
  input logic        sw_switch,
  input logic [31:0] restore_pc,
  input logic        wait_fire,
  input logic        main_loop,
  input logic        nest_loop,
  input logic        exc_taken,
  input logic        noerr_taken,
  input logic        noerr_valid,
  input logic        fwd,
  input logic        ent_bypass,
  input logic        bus_data,
  input logic        br_taken,
  input logic        soc_strobe,
  input logic        hold_v
);
  int n_busy = 0, n_sleep = 0, n_switch = 0, n_stay = 0, n_loop = 0, n_nest = 0;
  int n_exc = 0, n_noerr = 0, n_err_seen = 0, n_fwd = 0, n_bypass = 0, n_bus = 0;
  int n_jump = 0, n_soc = 0, n_wait_state = 0, n_hold = 0;
  int checks = 0, failures = 0;
  int pend = 0;
  logic [31:0] exp_pc;

  always @(posedge clk) if (rst_n) begin
    if (!en) n_wait_state++;
    if (hold_v) n_hold++;
    if (en) begin
      if (soc_stall)  n_busy++;
      if (sleeping)   n_sleep++;
      if (sw_switch)  n_switch++;
      if (wait_fire && !sw_switch) n_stay++;
      if (main_loop)  n_loop++;
      if (nest_loop)  n_nest++;
      if (exc_taken)  n_exc++;
      if (noerr_taken) n_noerr++;
      if (noerr_valid && !noerr_taken) n_err_seen++;
      if (fwd)        n_fwd++;
      if (ent_bypass) n_bypass++;
      if (bus_data)   n_bus++;
      if (br_taken)   n_jump++;
      if (soc_strobe) n_soc++;
      if (CHECK_TIMING) begin
        if (pend == 2) begin
          checks++;
          if (ex_v) begin failures++; $display("FAIL switch: EX not idle"); end
          pend = 1;
        end else if (pend == 1) begin
          checks++;
          if (!(ex_v && ex_pc == exp_pc)) begin failures++; $display("FAIL switch: resumed instruction late"); end
          pend = 0;
        end else if (pend == 3) begin
          checks++;
          if (!ex_v) begin failures++; $display("FAIL wait without switch took more than one cycle"); end
          pend = 0;
        end
        if (wait_fire && sw_switch) begin pend = 2; exp_pc = restore_pc - 32'd4; end
        else if (wait_fire)         pend = 3;
      end
    end
  end
endmodule
