// hw_loop: zero-overhead loop unit, consulted by the fetch stage.
//
// Each task owns a main loop: a start and an end address held in application
// specific registers (task t: start at r36+t, end at r44+t). Every cycle the
// address being fetched is compared with the running task's end address; on
// a match the next fetch address becomes the task's start address, so the
// jump back costs no cycle. A nested counted loop adds a start (r53), an end
// (r54) and a counter (r34): when the fetched address equals the nested end
// and the counter is non-zero, the next fetch goes to the nested start and
// the counter is decremented; a zero counter lets the loop fall through. The
// nested loop takes priority over the main loop.
//
// Following the source design: per-task start/end registers, comparison in
// the fetch stage, the ASI that configures the running task's main loop, the
// counter that exits at zero and is decremented each iteration, and the
// indices r36 (start of task 0's loop). This design's choices: the other
// indices, an end address of 0 meaning "no main loop", a single nested loop
// shared by all tasks, and the counter being tested before it is decremented
// (a counter of N repeats the body N+1 times).
//
// Interface: `fetch_addr`/`fetch_fire` from the fetch stage; `loop_hit` and
// `loop_target` back to it in the same cycle. `cfg_*` is the loop
// configuration instruction in the execute stage, `asr_wr` the base-ISA
// writes to this unit's registers. State changes when `en` is high.
//
// Timing: a configuration written by an instruction in execute is seen by the
// fetch of the instruction three slots later (fetch runs two instructions
// ahead of execute), so a loop must be configured at least three
// instructions before its last instruction. The nested counter decrements
// when the loop end is fetched, even if that fetch is later discarded by a
// taken jump; programs leave the nested loop only by running out the count.
module hw_loop
  import asip_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [TASK_W-1:0] cur_task,
  // fetch stage
  input  logic [XLEN-1:0]   fetch_addr,
  input  logic              fetch_fire,
  output logic              loop_hit,
  output logic [XLEN-1:0]   loop_target,
  // configuration instruction (execute stage)
  input  logic              cfg_valid,
  input  logic [XLEN-1:0]   cfg_start,
  input  logic [XLEN-1:0]   cfg_end,
  // base ISA register writes
  input  asr_wr_t           asr_wr,
  // register contents for base ISA reads
  output logic [XLEN-1:0]   loop_start [NTASK],
  output logic [XLEN-1:0]   loop_end   [NTASK],
  output logic [XLEN-1:0]   nest_start,
  output logic [XLEN-1:0]   nest_end,
  output logic [XLEN-1:0]   nest_cnt
);

  logic nest_hit, main_hit;

  assign nest_hit = (nest_cnt != '0) && (fetch_addr == nest_end);
  assign main_hit = (loop_end[cur_task] != '0) && (fetch_addr == loop_end[cur_task]);

  assign loop_hit    = nest_hit || main_hit;
  assign loop_target = nest_hit ? nest_start : loop_start[cur_task];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < NTASK; t++) begin
        loop_start[t] <= '0;
        loop_end[t]   <= '0;
      end
      nest_start <= '0;
      nest_end   <= '0;
      nest_cnt   <= '0;
    end else if (en) begin
      // counter decrement on a taken nested loop; an explicit write wins
      if (fetch_fire && nest_hit) nest_cnt <= nest_cnt - 1'b1;
      if (cfg_valid) begin
        loop_start[cur_task] <= cfg_start;
        loop_end[cur_task]   <= cfg_end;
      end
      if (asr_wr.we) begin
        for (int t = 0; t < NTASK; t++) begin
          if (asr_wr.idx == R_LOOP_START + RIDX_W'(t)) loop_start[t] <= asr_wr.data;
          if (asr_wr.idx == R_LOOP_END + RIDX_W'(t))   loop_end[t]   <= asr_wr.data;
        end
        if (asr_wr.idx == R_NEST_START) nest_start <= asr_wr.data;
        if (asr_wr.idx == R_NEST_END)   nest_end   <= asr_wr.data;
        if (asr_wr.idx == R_NEST_CNT)   nest_cnt   <= asr_wr.data;
      end
    end
  end

endmodule
