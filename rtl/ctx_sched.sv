// ctx_sched: hardware task scheduler behind the zero-overhead context switch.
//
// Firmware is split into tasks (priority 0 highest .. 7 lowest). When the
// running task executes the wait instruction with an IO event number, the
// scheduler looks at every task at once: the running task is ready if its
// requested event is flagged on `io_ready` (sent by the SoC every cycle); any
// other task is ready if it is parked (valid bit of its IO status register)
// and the event it is parked on is flagged. The lowest-numbered ready task
// wins.
//   - winner is the running task: no switch, the wait costs one cycle;
//   - winner is another task: the running task is parked - its fetch PC,
//     the instruction already in decode and the awaited event are saved in
//     its own registers - and the winner's saved PC and instruction are
//     handed to the pipeline (`restore_pc`, `restore_ins`); the pipeline
//     inserts them the next cycle and stalls execute once, two cycles in all;
//   - no task ready: `sleep` is raised, the pipeline holds the wait
//     instruction in execute and the decision is retried every cycle until an
//     IO event arrives.
// A resumed task's valid bit is cleared.
//
// The mechanism (saved PC and decode instruction, IO status per task, static
// priority, two-cycle switch, one cycle without switch, sleep until an IO
// event) follows the source design. This design's own choices: 16 events,
// the status register layout ([4] parked, [3:0] event), that firmware starts
// the other tasks by writing their saved PC and status through the base ISA,
// and the register indices (saved PC r64+t, saved instruction r72+t, IO
// status r80+t, current task r32 read only).
//
// Timing: the decision is combinational in the cycle the wait instruction is
// in execute; state updates at the clock edge when `en` is high.
module ctx_sched
  import asip_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [NEVENT-1:0] io_ready,
  // wait instruction in execute
  input  logic              wait_valid,
  input  logic [EVENT_W-1:0] wait_event,
  input  logic [XLEN-1:0]   save_pc,
  input  logic [XLEN-1:0]   save_ins,
  // decision
  output logic              sleep,
  output logic              do_switch,
  output logic [XLEN-1:0]   restore_pc,
  output logic [XLEN-1:0]   restore_ins,
  output logic [TASK_W-1:0] cur_task,
  // base ISA access
  input  asr_wr_t           asr_wr,
  output logic [XLEN-1:0]   saved_pc  [NTASK],
  output logic [XLEN-1:0]   saved_ins [NTASK],
  output logic [XLEN-1:0]   io_status [NTASK]
);

  logic [NTASK-1:0]  cand;
  logic              any;
  logic [TASK_W-1:0] pick;

  always_comb begin
    for (int t = 0; t < NTASK; t++) begin
      if (TASK_W'(t) == cur_task) cand[t] = io_ready[wait_event];
      else cand[t] = io_status[t][EVENT_W] && io_ready[io_status[t][EVENT_W-1:0]];
    end
    any  = |cand;
    pick = '0;
    for (int t = NTASK - 1; t >= 0; t--) begin
      if (cand[t]) pick = TASK_W'(t);
    end
  end

  assign sleep       = wait_valid && !any;
  assign do_switch   = wait_valid && any && (pick != cur_task);
  assign restore_pc  = saved_pc[pick];
  assign restore_ins = saved_ins[pick];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_task <= '0;
      for (int t = 0; t < NTASK; t++) begin
        saved_pc[t]  <= '0;
        saved_ins[t] <= '0;
        io_status[t] <= '0;
      end
    end else if (en) begin
      if (do_switch) begin
        saved_pc[cur_task]  <= save_pc;
        saved_ins[cur_task] <= save_ins;
        io_status[cur_task] <= XLEN'({1'b1, wait_event});
        io_status[pick][EVENT_W] <= 1'b0;
        cur_task <= pick;
      end
      if (asr_wr.we) begin
        for (int t = 0; t < NTASK; t++) begin
          if (asr_wr.idx == R_SAVED_PC + RIDX_W'(t))  saved_pc[t]  <= asr_wr.data;
          if (asr_wr.idx == R_SAVED_INS + RIDX_W'(t)) saved_ins[t] <= asr_wr.data;
          if (asr_wr.idx == R_IO_STATUS + RIDX_W'(t)) io_status[t] <= asr_wr.data;
        end
      end
    end
  end


endmodule
