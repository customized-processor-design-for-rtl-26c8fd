// asip_fw_pkg: test firmware for the complete processor, written with the
// instruction builders of asip_pkg.
//
// Three tasks share the core:
//   task 0 (highest priority) starts the other two by writing their saved
//     PC and parked event, sets the exception handler address, runs a
//     nested hardware loop four times, then waits for event 0 and halts.
//   task 1 (event 1) models SDU release: in a zero-overhead main loop it
//     loads the PDCP entity from the SoC, runs SetReleaseFlag, stores the
//     returned release flag to memory (0x900 upwards) and deallocates the
//     SDU, which acknowledges the event.
//   task 2 (event 2) models header checking: it loads an argument word
//     (0xB00 upwards), runs the entity check, and either counts a good
//     check (JumpIfNoError taken) or reaches the exception handler through
//     ExceptionHandler, which counts the error, copies the cause and clears
//     the error flags.
// Result words: 0xA04 good checks, 0xA08 errors. The argument words come
// from arg_word(), so a testbench can predict every outcome.
package asip_fw_pkg;
  import asip_pkg::*;

  localparam int unsigned FW_WORDS   = 64;
  localparam int unsigned T1_ENTRY   = 24;
  localparam int unsigned T2_ENTRY   = 40;
  localparam int unsigned T1_WAIT    = 27;
  localparam int unsigned T1_END     = 34;
  localparam int unsigned T2_WAIT    = 43;
  localparam int unsigned T2_END     = 51;
  localparam int unsigned HANDLER    = 56;
  localparam int unsigned NEST_BODY  = 16;
  localparam int unsigned FLAG_BASE  = 32'h900;
  localparam int unsigned OK_ADDR    = 32'hA04;
  localparam int unsigned ERR_ADDR   = 32'hA08;
  localparam int unsigned ARG_BASE   = 32'hB00;
  localparam int unsigned NARGS      = 32;

  // argument for the k-th entity check: a in [1:0], b in [3:2], c in [5:4],
  // z in [31:14]; every third one has a != 1, every fifth one b != c
  function automatic logic [31:0] arg_word(int unsigned k);
    logic [31:0] h;
    h = 32'(k) * 32'h9E37_79B9 + 32'h1234_5678;
    h[1:0] = (k % 3 == 0) ? 2'd2 : 2'd1;
    h[3:2] = 2'd1;
    h[5:4] = (k % 5 == 4) ? 2'd3 : 2'd1;
    return h;
  endfunction

  function automatic void build(output logic [31:0] p [FW_WORDS]);
    foreach (p[i]) p[i] = mk_i(OP_NOP, 0, 16'd0);
    // task 0
    p[0]  = mk_i(OP_MOVSI, 64 + 1, 16'(T1_ENTRY * 4));  // saved PC of task 1
    p[1]  = mk_i(OP_MOVSI, 80 + 1, 16'h0011);           // task 1 parked on event 1
    p[2]  = mk_i(OP_MOVSI, 64 + 2, 16'(T2_ENTRY * 4));
    p[3]  = mk_i(OP_MOVSI, 80 + 2, 16'h0012);
    p[4]  = mk_i(OP_MOVSI, 35, 16'(HANDLER * 4));       // exception handler address
    p[5]  = mk_i(OP_MOVSI, 11, 16'(FLAG_BASE));
    p[6]  = mk_i(OP_MOVSI, 12, 16'(ARG_BASE));
    p[7]  = mk_i(OP_MOVSI, 15, 16'd2);
    p[8]  = mk_i(OP_MOVSI, 9, 16'd1);
    p[9]  = mk_i(OP_MOVSI, 14, 16'(OK_ADDR));
    p[10] = mk_i(OP_MOVSI, 17, 16'(ERR_ADDR));
    p[11] = mk_i(OP_MOVSI, 34, 16'd3);                  // nested count: 4 passes
    p[12] = mk_i(OP_MOVSI, 53, 16'(NEST_BODY * 4));
    p[13] = mk_i(OP_MOVSI, 54, 16'(NEST_BODY * 4));
    p[14] = mk_i(OP_MOVSI, 27, 16'd0);
    p[15] = mk_i(OP_MOVSI, 28, 16'h0055);
    p[16] = mk_addi(27, 27, 11'd1);
    p[17] = mk_i(OP_WAIT, 0, 16'd0);
    p[18] = mk_i(OP_HALT, 0, 16'd0);
    // task 1
    p[24] = mk_i(OP_MOVSI, 21, 16'(T1_WAIT * 4));
    p[25] = mk_i(OP_MOVSI, 22, 16'(T1_END * 4));
    p[26] = mk_r(OP_HWLOOP, 0, 21, 22);
    p[27] = mk_i(OP_WAIT, 0, 16'd1);
    p[28] = mk_r(OP_LDPDCP, 0, 10, 0);
    p[29] = mk_r(OP_SETREL, 0, 0, 0);
    p[30] = mk_r(OP_ADD, 5, 33, 0);                     // release flag
    p[31] = mk_r(OP_ST, 11, 5, 0);
    p[32] = mk_addi(11, 11, 11'd4);
    p[33] = mk_addi(10, 10, 11'd1);
    p[34] = mk_r(OP_DEALLOC, 0, 9, 0);
    // task 2
    p[40] = mk_i(OP_MOVSI, 25, 16'(T2_WAIT * 4));
    p[41] = mk_i(OP_MOVSI, 26, 16'(T2_END * 4));
    p[42] = mk_r(OP_HWLOOP, 0, 25, 26);
    p[43] = mk_i(OP_WAIT, 0, 16'd2);
    p[44] = mk_r(OP_LD, 7, 12, 0);
    p[45] = mk_addi(12, 12, 11'd4);
    p[46] = mk_r(OP_CHKENT, 0, 7, 0);
    p[47] = mk_i(OP_JMPNOERR, 0, 16'(49 * 4));
    p[48] = mk_r(OP_EXCHK, 0, 0, 0);
    p[49] = mk_addi(13, 13, 11'd1);
    p[50] = mk_r(OP_ST, 14, 13, 0);
    p[51] = mk_r(OP_DEALLOC, 0, 15, 0);
    // exception handler
    p[56] = mk_addi(16, 16, 11'd1);
    p[57] = mk_r(OP_ST, 17, 16, 0);
    p[58] = mk_r(OP_ADD, 19, 55, 0);                    // cause
    p[59] = mk_i(OP_MOVSI, 52, 16'd0);                  // clear error flags
    p[60] = mk_r(OP_DEALLOC, 0, 15, 0);
    p[61] = mk_i(OP_JUMP, 0, 16'(T2_WAIT * 4));
  endfunction
endpackage
