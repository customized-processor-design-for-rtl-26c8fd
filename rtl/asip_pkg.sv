// asip_pkg: types and constants shared by the layer-2 ASIP.
//
// Holds the instruction encoding, the opcode list, the register index map
// (general purpose registers and the application specific registers, ASRs,
// that the base ISA reaches through the same index space), the SoC command
// codes and the PDCP entity field layout.
//
// From the source design: 32-bit data and addresses, the 33 base instructions
// of the RISC subset, the ASR indices r36 (main-loop start of task 0) and
// r52 (error flags), eight task priority levels, a 320-bit SoC port and the
// PDCP entity register with its 18-bit release pointer and window mask.
// This design's own choices: the binary encoding, the opcode numbers, the
// other ASR indices, the SoC command codes and the exact bit positions of the
// PDCP entity fields.
//
// Interface and timing: none; the package holds no logic. The mk_* helper
// functions assemble instruction words for firmware images.
package asip_pkg;

  localparam int unsigned XLEN        = 32;
  localparam int unsigned RIDX_W      = 7;    // register index: r0..r127
  localparam int unsigned NGPR        = 32;   // r0..r31 are general purpose
  localparam int unsigned NTASK       = 8;    // priority levels 0 (highest) .. 7
  localparam int unsigned TASK_W      = 3;
  localparam int unsigned NEVENT      = 16;   // IO events the SoC reports
  localparam int unsigned EVENT_W     = 4;
  localparam int unsigned SOC_W       = 320;  // width of the SoC read/write ports
  localparam int unsigned SOC_CMD_W   = 8;
  localparam int unsigned PDCP_ENT_W  = 170;  // PDCP entity register
  localparam int unsigned SN_W        = 18;   // sequence-number style fields

  // PDCP entity fields (bit positions)
  localparam int unsigned ENT_RC_REL_NEXT_LSB = 120;  // [137:120]
  localparam int unsigned ENT_WINMASK_LSB     = 102;  // [119:102]
  localparam int unsigned ENT_RC_TX_NEXT_LSB  = 84;   // [101:84]

  // Instruction fields:
  //   [31:25] opcode  [24:18] rd  [17:11] rs1  [10:4] rs2
  //   [15:0]  imm16 (movsi, movhi, jumps, JumpIfNoError, wait)
  //   [10:0]  imm11, signed (addi)
  typedef enum logic [6:0] {
    OP_NOP    = 7'd0,
    OP_HALT   = 7'd1,
    OP_MOVSI  = 7'd2,
    OP_MOVHI  = 7'd3,
    OP_MOVZ   = 7'd4,
    OP_MOVNZ  = 7'd5,
    OP_ADDI   = 7'd6,
    OP_ADD    = 7'd7,
    OP_SUB    = 7'd8,
    OP_AND    = 7'd9,
    OP_OR     = 7'd10,
    OP_XOR    = 7'd11,
    OP_SLL    = 7'd12,
    OP_SRL    = 7'd13,
    OP_SRA    = 7'd14,
    OP_EQ     = 7'd15,
    OP_NEQ    = 7'd16,
    OP_SLT    = 7'd17,
    OP_ULT    = 7'd18,
    OP_SLE    = 7'd19,
    OP_ULE    = 7'd20,
    OP_LD     = 7'd21,
    OP_LDHU   = 7'd22,
    OP_LDHS   = 7'd23,
    OP_LDBU   = 7'd24,
    OP_LDBS   = 7'd25,
    OP_ST     = 7'd26,
    OP_STH    = 7'd27,
    OP_STB    = 7'd28,
    OP_JUMP   = 7'd29,
    OP_CALL   = 7'd30,
    OP_JUMPZ  = 7'd31,
    OP_JUMPNZ = 7'd32,
    // application specific instructions
    OP_HWLOOP   = 7'd64,  // configure the main hardware loop of the running task
    OP_EXCHK    = 7'd65,  // ExceptionHandler
    OP_JMPNOERR = 7'd66,  // JumpIfNoError
    OP_WAIT     = 7'd67,  // context switch: wait for IO event imm[3:0]
    OP_SETREL   = 7'd68,  // SetReleaseFlag
    OP_LDPDCP   = 7'd69,  // load PDCP entity state from the SoC
    OP_DEALLOC  = 7'd70,  // deallocate a PDCP SDU in the SoC
    OP_CHKENT   = 7'd71   // entity check functional unit
  } opcode_e;

  // ALU operations of the base ISA
  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_SRA,
    ALU_EQ, ALU_NEQ, ALU_SLT, ALU_ULT, ALU_SLE, ALU_ULE,
    ALU_MOVZ, ALU_MOVNZ, ALU_PASSB, ALU_MOVHI
  } alu_op_e;

  // SoC command codes
  typedef enum logic [SOC_CMD_W-1:0] {
    CMD_NONE          = 8'h00,
    CMD_GET_REL_FLAG  = 8'h01,
    CMD_LOAD_PDCP     = 8'h02,
    CMD_DEALLOC_SDU   = 8'h03
  } soc_cmd_e;

  // Where the read data of a SoC read command is written in WB
  typedef enum logic [1:0] {
    TAG_NONE    = 2'd0,
    TAG_RELFLAG = 2'd1,
    TAG_PDCP    = 2'd2
  } soc_tag_e;

  // One write to an application specific register, broadcast to all units
  typedef struct packed {
    logic              we;
    logic [RIDX_W-1:0] idx;
    logic [XLEN-1:0]   data;
  } asr_wr_t;

  // Application specific register indices
  localparam logic [RIDX_W-1:0] R_CUR_TASK   = 7'd32;  // read only
  localparam logic [RIDX_W-1:0] R_REL_FLAG   = 7'd33;
  localparam logic [RIDX_W-1:0] R_NEST_CNT   = 7'd34;
  localparam logic [RIDX_W-1:0] R_EXC_ADDR   = 7'd35;
  localparam logic [RIDX_W-1:0] R_LOOP_START = 7'd36;  // 36..43, one per task
  localparam logic [RIDX_W-1:0] R_LOOP_END   = 7'd44;  // 44..51, one per task
  localparam logic [RIDX_W-1:0] R_ERR_FLAGS  = 7'd52;
  localparam logic [RIDX_W-1:0] R_NEST_START = 7'd53;
  localparam logic [RIDX_W-1:0] R_NEST_END   = 7'd54;
  localparam logic [RIDX_W-1:0] R_EXC_CAUSE  = 7'd55;
  localparam logic [RIDX_W-1:0] R_PDCP_ENT   = 7'd56;  // 56..61, 32-bit chunks
  localparam logic [RIDX_W-1:0] R_CHK_FLAGS  = 7'd62;  // read only
  localparam logic [RIDX_W-1:0] R_SAVED_PC   = 7'd64;  // 64..71, one per task
  localparam logic [RIDX_W-1:0] R_SAVED_INS  = 7'd72;  // 72..79, one per task
  localparam logic [RIDX_W-1:0] R_IO_STATUS  = 7'd80;  // 80..87, one per task

  localparam int unsigned PDCP_CHUNKS = (PDCP_ENT_W + XLEN - 1) / XLEN;  // 6

  // general purpose register written by call with the return address
  localparam logic [RIDX_W-1:0] R_LINK = 7'd4;

  function automatic logic [XLEN-1:0] mk_r(opcode_e op, int unsigned rd, int unsigned rs1,
                                           int unsigned rs2);
    return {op, rd[6:0], rs1[6:0], rs2[6:0], 4'b0};
  endfunction

  function automatic logic [XLEN-1:0] mk_i(opcode_e op, int unsigned rd, logic [15:0] imm);
    return {op, rd[6:0], 2'b00, imm};
  endfunction

  function automatic logic [XLEN-1:0] mk_addi(int unsigned rd, int unsigned rs1, logic [10:0] imm);
    return {OP_ADDI, rd[6:0], rs1[6:0], imm};
  endfunction

endpackage
