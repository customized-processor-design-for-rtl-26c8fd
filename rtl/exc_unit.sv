// exc_unit: error flags and the two exception-handling instructions.
//
// Data processing instructions report faults by setting bits of an error
// bitmap register (r52); the bits stay set until firmware clears them with an
// ordinary register write. Two instructions consult the bitmap so that the
// main loop needs no compare-and-branch sequence:
//   - ExceptionHandler: if any error bit is set, jump to the exception
//     routine whose address is held in r35; otherwise do nothing.
//   - JumpIfNoError: if no error bit is set, jump to the immediate target;
//     otherwise fall through and copy the bitmap into the cause register
//     (r55) for the exception routine.
// Both decisions are combinational in the execute stage; the jump itself is
// performed by the pipeline.
//
// Following the source design: the error bitmap register r52, the
// instruction names, the jump out of the main loop when a flag is set. This
// design's own choices: the handler address register, the cause register,
// the exact behaviour of JumpIfNoError and the register indices other than
// r52.
//
// Interface: `err_set` ORs bits into the bitmap at the clock edge when `en`
// is high; an explicit register write to r52 in the same cycle takes
// precedence.
module exc_unit
  import asip_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [XLEN-1:0] err_set,
  input  logic            exchk_valid,
  input  logic            noerr_valid,
  output logic            exc_taken,
  output logic            noerr_taken,
  output logic [XLEN-1:0] exc_target,
  input  asr_wr_t         asr_wr,
  output logic [XLEN-1:0] err_flags,
  output logic [XLEN-1:0] exc_addr,
  output logic [XLEN-1:0] exc_cause
);

  logic any_err;
  assign any_err     = (err_flags != '0);
  assign exc_taken   = exchk_valid && any_err;
  assign noerr_taken = noerr_valid && !any_err;
  assign exc_target  = exc_addr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      err_flags <= '0;
      exc_addr  <= '0;
      exc_cause <= '0;
    end else if (en) begin
      err_flags <= err_flags | err_set;
      if (noerr_valid && any_err) exc_cause <= err_flags;
      if (asr_wr.we) begin
        if (asr_wr.idx == R_ERR_FLAGS) err_flags <= asr_wr.data;
        if (asr_wr.idx == R_EXC_ADDR)  exc_addr  <= asr_wr.data;
        if (asr_wr.idx == R_EXC_CAUSE) exc_cause <= asr_wr.data;
      end
    end
  end

endmodule
