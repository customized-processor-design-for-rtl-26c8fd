// asip_core: four-stage application specific processor for layer-2 (PDCP and
// RLC) bookkeeping.
//
// A small RISC base instruction set (33 instructions) is extended with
// instructions that work directly on application specific registers (ASRs):
// hardware loops, exception checks, a hardware context switch, SoC commands
// and PDCP entity processing. All ASRs also appear in the register index
// space r32..r127, so ordinary instructions can read and modify them.
//
// Pipeline (one instruction per cycle when nothing stalls):
//   FE  presents the program counter on the AHB-Lite bus and picks the next
//       PC: PC+4, or a hardware-loop start when the fetched address is a loop
//       end (hw_loop), or a redirect from EX.
//   ID  takes the instruction from the bus data phase (or from a holding
//       register when the pipeline stalled or a task was resumed), decodes it
//       and reads the general purpose registers.
//   EX  runs the ALU, resolves jumps, issues loads and stores on the bus,
//       drives SoC commands and runs the ASIs' functional units, which read
//       and write their ASRs in this stage. A taken jump is applied to the
//       PC register at the end of the cycle: the jump and the two younger
//       instructions behind it cost three cycles in all.
//   WB  writes ALU results and load data to the general purpose registers and
//       SoC read data to its ASR.
// Program and data share the bus; a load or store takes the bus from fetch
// for one cycle. A value produced in EX or loaded in WB is forwarded to the
// next instruction in EX; the register file writes through for the one after
// that. A wait state on the bus (HREADY low) freezes the whole pipeline.
//
// Stalls: EX holds its instruction while the SoC port is busy for a SoC
// instruction, and while a wait instruction finds no ready task (sleep).
// Context switch: when the scheduler picks another task, the running task's
// fetch PC and decode-stage instruction are saved, the new task's saved
// instruction is placed in ID and its saved PC in FE, and EX idles one cycle.
//
// Following the source design: the four stages and what each does, the
// shared 32-bit AHB-Lite bus, ASRs mapped into the register index space
// (r36 loop start of task 0, r52 error flags), the base instruction list,
// jumps resolved in EX, the two-cycle SoC read finished in WB, the hardware
// loops checked in FE, the context switch sequence and its costs, and the
// SetReleaseFlag instruction. This design's own choices: the binary
// encoding and opcode numbers, 32 general purpose registers, forwarding,
// the operand roles of the application specific instructions other than
// SetReleaseFlag, that loads only write general purpose registers, and that
// a resumed instruction is taken to sit 4 bytes below its task's saved PC.
//
// Interface: AHB-Lite master (single outstanding transfer, HREADY freezes the
// core), the SoC port (strobe/opcode/write data out, busy and read data in),
// `io_ready` events, and status outputs. The full entity and release-flag
// registers of pdcp_unit are reached through the register map rather than
// used directly, so those two outputs of pdcp_unit are not used here.
module asip_core
  import asip_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // AHB-Lite master
  output logic [31:0]       HADDR,
  output logic [1:0]        HTRANS,
  output logic              HWRITE,
  output logic [2:0]        HSIZE,
  output logic [31:0]       HWDATA,
  input  logic [31:0]       HRDATA,
  input  logic              HREADY,
  // SoC
  input  logic [NEVENT-1:0] io_ready,
  input  logic              soc_busy,
  output logic              soc_strobe,
  output logic              soc_read,
  output soc_cmd_e          soc_opcode,
  output logic [SOC_W-1:0]  soc_wdata,
  input  logic [SOC_W-1:0]  soc_rdata,
  // status
  output logic              halted,
  output logic              sleeping,
  output logic [TASK_W-1:0] cur_task,
  output logic              retired
);

  localparam logic [1:0] HT_IDLE   = 2'b00;
  localparam logic [1:0] HT_NONSEQ = 2'b10;

  logic en;
  assign en = HREADY;

  // ---------------------------------------------------------------- state
  logic [XLEN-1:0] pc;
  logic            f_pend;
  logic [XLEN-1:0] f_pc;
  logic            id_hold_v;
  logic [XLEN-1:0] id_hold, id_hold_pc;

  logic              ex_v;
  opcode_e           ex_op;
  logic [RIDX_W-1:0] ex_rd, ex_ai, ex_bi;
  logic [XLEN-1:0]   ex_a, ex_b, ex_pc;
  logic [15:0]       ex_imm;

  logic              wb_v, wb_we, wb_load;
  logic [4:0]        wb_rd;
  logic [XLEN-1:0]   wb_res;
  opcode_e           wb_op;
  logic [1:0]        wb_lane;
  logic [XLEN-1:0]   st_data_q;

  logic              bus_data, fetch_en, loop_hit;
  logic [XLEN-1:0]   loop_target;

  // ---------------------------------------------------------------- ID
  logic            id_valid;
  logic [XLEN-1:0] id_ins, id_pc;
  opcode_e         id_op;
  logic [RIDX_W-1:0] id_rd, id_rs1, id_rs2, id_ai, id_bi;
  logic [XLEN-1:0] gpr_qa, gpr_qb;

  assign id_valid = id_hold_v || f_pend;
  assign id_ins   = id_hold_v ? id_hold : HRDATA;
  assign id_pc    = id_hold_v ? id_hold_pc : f_pc;
  assign id_op    = opcode_e'(id_ins[31:25]);
  assign id_rd    = id_ins[24:18];
  assign id_rs1   = id_ins[17:11];
  assign id_rs2   = id_ins[10:4];

  always_comb begin
    id_ai = id_rs1;
    id_bi = id_rs2;
    unique case (id_op)
      OP_MOVHI, OP_JUMPZ, OP_JUMPNZ: id_ai = id_rd;
      OP_ST, OP_STH, OP_STB: begin id_ai = id_rd; id_bi = id_rs1; end
      default: ;
    endcase
  end

  // WB write port
  logic [XLEN-1:0] ld_val, wb_val;
  logic            gpr_we;

  gpr_file u_gpr (
    .clk(clk), .rst_n(rst_n), .en(en),
    .ra(id_ai[4:0]), .rb(id_bi[4:0]), .qa(gpr_qa), .qb(gpr_qb),
    .we(gpr_we), .wa(wb_rd), .wd(wb_val)
  );

  // ---------------------------------------------------------------- EX
  // unit interfaces
  asr_wr_t         asr_wr;
  logic [XLEN-1:0] loop_start [NTASK];
  logic [XLEN-1:0] loop_end   [NTASK];
  logic [XLEN-1:0] nest_start, nest_end, nest_cnt;
  logic [XLEN-1:0] saved_pc  [NTASK];
  logic [XLEN-1:0] saved_ins [NTASK];
  logic [XLEN-1:0] io_status [NTASK];
  logic [XLEN-1:0] err_flags, exc_addr, exc_cause, exc_target, err_set;
  logic            exc_taken, noerr_taken;
  logic [PDCP_ENT_W-1:0] entity, rd_entity, ent_next;
  logic            rel_flag, rd_rel_flag;
  logic [5:0]      chk_flags;
  logic            sw_sleep, sw_switch;
  logic [XLEN-1:0] restore_pc, restore_ins;
  logic            soc_stall, soc_rd_v;
  soc_tag_e        soc_rd_tag;
  logic [SOC_W-1:0] soc_rd_data;

  function automatic logic [XLEN-1:0] asr_read(logic [RIDX_W-1:0] idx);
    logic [XLEN-1:0] v;
    logic [PDCP_CHUNKS*XLEN-1:0] ent_w;
    ent_w = (PDCP_CHUNKS*XLEN)'(rd_entity);
    v = '0;
    if (idx == R_CUR_TASK)  v = XLEN'(cur_task);
    if (idx == R_REL_FLAG)  v = XLEN'(rd_rel_flag);
    if (idx == R_NEST_CNT)  v = nest_cnt;
    if (idx == R_EXC_ADDR)  v = exc_addr;
    if (idx == R_ERR_FLAGS) v = err_flags;
    if (idx == R_NEST_START) v = nest_start;
    if (idx == R_NEST_END)  v = nest_end;
    if (idx == R_EXC_CAUSE) v = exc_cause;
    if (idx == R_CHK_FLAGS) v = XLEN'(chk_flags);
    for (int t = 0; t < NTASK; t++) begin
      if (idx == R_LOOP_START + RIDX_W'(t)) v = loop_start[t];
      if (idx == R_LOOP_END + RIDX_W'(t))   v = loop_end[t];
      if (idx == R_SAVED_PC + RIDX_W'(t))   v = saved_pc[t];
      if (idx == R_SAVED_INS + RIDX_W'(t))  v = saved_ins[t];
      if (idx == R_IO_STATUS + RIDX_W'(t))  v = io_status[t];
    end
    for (int k = 0; k < PDCP_CHUNKS; k++) begin
      if (idx == R_PDCP_ENT + RIDX_W'(k)) v = ent_w[k*XLEN +: XLEN];
    end
    return v;
  endfunction

  // operands with forwarding from WB
  logic [XLEN-1:0] opa, opb, gpa, gpb;
  assign gpa = (wb_v && wb_we && {2'b00, wb_rd} == ex_ai) ? wb_val : ex_a;
  assign gpb = (wb_v && wb_we && {2'b00, wb_rd} == ex_bi) ? wb_val : ex_b;
  assign opa = ex_ai[RIDX_W-1 -: 2] != 2'b00 ? asr_read(ex_ai) : gpa;
  assign opb = ex_bi[RIDX_W-1 -: 2] != 2'b00 ? asr_read(ex_bi) : gpb;

  // decode of the EX instruction
  logic is_alu, is_load, is_store, is_soc, soc_rd, ex_stall, ex_fire;
  alu_op_e alu_op;
  logic [XLEN-1:0] alu_b, alu_y;
  logic alu_wen;
  soc_cmd_e soc_cmd;
  soc_tag_e soc_tag;
  logic [SOC_W-1:0] soc_wd;
  logic [2:0] mem_size;

  always_comb begin
    is_alu  = 1'b1;
    alu_op  = ALU_ADD;
    alu_b   = opb;
    unique case (ex_op)
      OP_MOVSI:  begin alu_op = ALU_PASSB; alu_b = XLEN'(signed'(ex_imm)); end
      OP_MOVHI:  begin alu_op = ALU_MOVHI; alu_b = XLEN'(ex_imm); end
      OP_MOVZ:   alu_op = ALU_MOVZ;
      OP_MOVNZ:  alu_op = ALU_MOVNZ;
      OP_ADDI:   begin alu_op = ALU_ADD; alu_b = XLEN'(signed'(ex_imm[10:0])); end
      OP_ADD:    alu_op = ALU_ADD;
      OP_SUB:    alu_op = ALU_SUB;
      OP_AND:    alu_op = ALU_AND;
      OP_OR:     alu_op = ALU_OR;
      OP_XOR:    alu_op = ALU_XOR;
      OP_SLL:    alu_op = ALU_SLL;
      OP_SRL:    alu_op = ALU_SRL;
      OP_SRA:    alu_op = ALU_SRA;
      OP_EQ:     alu_op = ALU_EQ;
      OP_NEQ:    alu_op = ALU_NEQ;
      OP_SLT:    alu_op = ALU_SLT;
      OP_ULT:    alu_op = ALU_ULT;
      OP_SLE:    alu_op = ALU_SLE;
      OP_ULE:    alu_op = ALU_ULE;
      default:   is_alu = 1'b0;
    endcase
  end

  alu u_alu (.op(alu_op), .a(opa), .b(alu_b), .y(alu_y), .wen(alu_wen));

  always_comb begin
    is_load  = ex_op inside {OP_LD, OP_LDHU, OP_LDHS, OP_LDBU, OP_LDBS};
    is_store = ex_op inside {OP_ST, OP_STH, OP_STB};
    unique case (ex_op)
      OP_LDHU, OP_LDHS, OP_STH: mem_size = 3'd1;
      OP_LDBU, OP_LDBS, OP_STB: mem_size = 3'd0;
      default:                  mem_size = 3'd2;
    endcase
    is_soc  = 1'b1;
    soc_rd  = 1'b1;
    soc_cmd = CMD_NONE;
    soc_tag = TAG_NONE;
    soc_wd  = '0;
    unique case (ex_op)
      OP_SETREL: begin soc_cmd = CMD_GET_REL_FLAG; soc_tag = TAG_RELFLAG; soc_wd = SOC_W'(ent_next); end
      OP_LDPDCP: begin soc_cmd = CMD_LOAD_PDCP; soc_tag = TAG_PDCP; soc_wd = SOC_W'({opb, opa}); end
      OP_DEALLOC: begin soc_cmd = CMD_DEALLOC_SDU; soc_rd = 1'b0; soc_wd = SOC_W'(opa); end
      default: begin is_soc = 1'b0; soc_rd = 1'b0; end
    endcase
  end

  assign ex_stall = ex_v && ((is_soc && soc_stall) || (ex_op == OP_WAIT && sw_sleep));
  assign ex_fire  = ex_v && !ex_stall;

  // jumps and redirects
  logic            br_taken, redirect, halt_now;
  logic [XLEN-1:0] br_target;
  always_comb begin
    br_taken  = 1'b0;
    br_target = XLEN'(ex_imm);
    unique case (ex_op)
      OP_JUMP, OP_CALL: br_taken = 1'b1;
      OP_JUMPZ:    br_taken = (opa == '0);
      OP_JUMPNZ:   br_taken = (opa != '0);
      OP_EXCHK:    begin br_taken = exc_taken; br_target = exc_target; end
      OP_JMPNOERR: br_taken = noerr_taken;
      default: ;
    endcase
    br_taken = br_taken && ex_fire;
  end
  assign halt_now = ex_fire && ex_op == OP_HALT;
  assign redirect = br_taken || sw_switch || halt_now;

  // ASR writes by base instructions happen in EX
  always_comb begin
    asr_wr.we   = ex_fire && is_alu && alu_wen && (ex_rd[RIDX_W-1 -: 2] != 2'b00);
    asr_wr.idx  = ex_rd;
    asr_wr.data = alu_y;
  end

  hw_loop u_loop (
    .clk(clk), .rst_n(rst_n), .en(en), .cur_task(cur_task),
    .fetch_addr(pc), .fetch_fire(fetch_en), .loop_hit(loop_hit), .loop_target(loop_target),
    .cfg_valid(ex_fire && ex_op == OP_HWLOOP), .cfg_start(opa), .cfg_end(opb),
    .asr_wr(asr_wr), .loop_start(loop_start), .loop_end(loop_end),
    .nest_start(nest_start), .nest_end(nest_end), .nest_cnt(nest_cnt)
  );

  ctx_sched u_sched (
    .clk(clk), .rst_n(rst_n), .en(en), .io_ready(io_ready),
    .wait_valid(ex_v && ex_op == OP_WAIT), .wait_event(ex_imm[EVENT_W-1:0]),
    .save_pc(pc), .save_ins(id_valid ? id_ins : '0),
    .sleep(sw_sleep), .do_switch(sw_switch), .restore_pc(restore_pc), .restore_ins(restore_ins),
    .cur_task(cur_task), .asr_wr(asr_wr),
    .saved_pc(saved_pc), .saved_ins(saved_ins), .io_status(io_status)
  );

  exc_unit u_exc (
    .clk(clk), .rst_n(rst_n), .en(en), .err_set(err_set),
    .exchk_valid(ex_fire && ex_op == OP_EXCHK), .noerr_valid(ex_fire && ex_op == OP_JMPNOERR),
    .exc_taken(exc_taken), .noerr_taken(noerr_taken), .exc_target(exc_target),
    .asr_wr(asr_wr), .err_flags(err_flags), .exc_addr(exc_addr), .exc_cause(exc_cause)
  );

  pdcp_unit u_pdcp (
    .clk(clk), .rst_n(rst_n), .en(en),
    .setrel_valid(ex_fire && ex_op == OP_SETREL),
    .chk_valid(ex_fire && ex_op == OP_CHKENT), .chk_arg(opa), .err_set(err_set),
    .wb_valid(soc_rd_v), .wb_tag(soc_rd_tag), .wb_data(soc_rd_data),
    .asr_wr(asr_wr), .entity(entity), .rel_flag(rel_flag), .chk_flags(chk_flags),
    .rd_entity(rd_entity), .rd_rel_flag(rd_rel_flag), .ent_next(ent_next)
  );

  soc_port u_soc (
    .clk(clk), .rst_n(rst_n), .en(en),
    .req_valid(ex_v && is_soc), .req_read(soc_rd), .req_cmd(soc_cmd), .req_wdata(soc_wd),
    .req_tag(soc_tag), .req_stall(soc_stall),
    .rd_valid(soc_rd_v), .rd_tag(soc_rd_tag), .rd_data(soc_rd_data),
    .soc_strobe(soc_strobe), .soc_read(soc_read), .soc_opcode(soc_opcode),
    .soc_wdata(soc_wdata), .soc_rdata(soc_rdata), .soc_busy(soc_busy)
  );

  // ---------------------------------------------------------------- FE / bus

  assign bus_data = ex_fire && (is_load || is_store);
  assign fetch_en = !halted && !ex_stall && !bus_data && !redirect;

  assign HTRANS = (bus_data || fetch_en) ? HT_NONSEQ : HT_IDLE;
  assign HADDR  = bus_data ? opa : pc;
  assign HWRITE = bus_data && is_store;
  assign HSIZE  = bus_data ? mem_size : 3'd2;
  assign HWDATA = st_data_q;

  // ---------------------------------------------------------------- WB
  always_comb begin
    logic [31:0] sh;
    sh = HRDATA >> {wb_lane, 3'b000};
    unique case (wb_op)
      OP_LDHU: ld_val = {16'b0, sh[15:0]};
      OP_LDHS: ld_val = {{16{sh[15]}}, sh[15:0]};
      OP_LDBU: ld_val = {24'b0, sh[7:0]};
      OP_LDBS: ld_val = {{24{sh[7]}}, sh[7:0]};
      default: ld_val = HRDATA;
    endcase
  end
  assign wb_val = wb_load ? ld_val : wb_res;
  assign gpr_we = wb_v && wb_we;

  assign sleeping = ex_v && ex_op == OP_WAIT && sw_sleep;
  assign retired  = ex_fire && en;

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc         <= '0;
      halted     <= 1'b0;
      f_pend     <= 1'b0;
      f_pc       <= '0;
      id_hold_v  <= 1'b0;
      id_hold    <= '0;
      id_hold_pc <= '0;
      ex_v       <= 1'b0;
      ex_op      <= OP_NOP;
      ex_rd      <= '0;
      ex_ai      <= '0;
      ex_bi      <= '0;
      ex_a       <= '0;
      ex_b       <= '0;
      ex_pc      <= '0;
      ex_imm     <= '0;
      wb_v       <= 1'b0;
      wb_we      <= 1'b0;
      wb_load    <= 1'b0;
      wb_rd      <= '0;
      wb_res     <= '0;
      wb_op      <= OP_NOP;
      wb_lane    <= '0;
      st_data_q  <= '0;
    end else if (en) begin
      // FE
      f_pend <= fetch_en;
      f_pc   <= pc;
      if (br_taken)       pc <= br_target;
      else if (sw_switch) pc <= restore_pc;
      else if (fetch_en)  pc <= loop_hit ? loop_target : pc + 32'd4;
      if (halt_now) halted <= 1'b1;

      // ID holding register
      if (sw_switch) begin
        id_hold_v  <= 1'b1;
        id_hold    <= restore_ins;
        id_hold_pc <= restore_pc - 32'd4;
      end else if (ex_stall && id_valid) begin
        id_hold_v  <= 1'b1;
        id_hold    <= id_ins;
        id_hold_pc <= id_pc;
      end else begin
        id_hold_v  <= 1'b0;
      end

      // ID -> EX
      if (ex_stall) begin
        ex_a <= gpa;
        ex_b <= gpb;
      end else begin
        ex_v   <= id_valid && !redirect;
        ex_op  <= id_op;
        ex_rd  <= id_rd;
        ex_ai  <= id_ai;
        ex_bi  <= id_bi;
        ex_a   <= gpr_qa;
        ex_b   <= gpr_qb;
        ex_pc  <= id_pc;
        ex_imm <= id_ins[15:0];
      end

      // EX -> WB
      wb_v    <= ex_fire;
      wb_op   <= ex_op;
      wb_lane <= opa[1:0];
      wb_load <= is_load;
      if (ex_op == OP_CALL) begin
        wb_we  <= 1'b1;
        wb_rd  <= R_LINK[4:0];
        wb_res <= ex_pc + 32'd4;
      end else begin
        wb_we  <= (is_load || (is_alu && alu_wen)) && (ex_rd[RIDX_W-1 -: 2] == 2'b00);
        wb_rd  <= ex_rd[4:0];
        wb_res <= alu_y;
      end
      if (bus_data && is_store) begin
        unique case (mem_size)
          3'd0:    st_data_q <= {4{opb[7:0]}};
          3'd1:    st_data_q <= {2{opb[15:0]}};
          default: st_data_q <= opb;
        endcase
      end
    end
  end

  a_one_bus_user: assert property (@(posedge clk) disable iff (!rst_n)
    !(bus_data && fetch_en));
  a_no_fetch_when_halted: assert property (@(posedge clk) disable iff (!rst_n)
    halted |-> HTRANS == HT_IDLE);

endmodule
