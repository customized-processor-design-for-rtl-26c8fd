// gpr_file: the general purpose register file of the base ISA.
//
// NREGS registers of XLEN bits, two asynchronous read ports used by the
// decode stage and one synchronous write port driven by the write-back stage.
// A read of the register being written in the same cycle returns the new
// value (write-through), so an instruction two places behind a producer reads
// the right data without a further bypass. Every register is cleared by
// reset. The source design reads registers in decode and writes them in
// write-back; the register count and the write-through are this design's
// choice.
//
// Timing: reads are combinational; a write with we=1 takes effect at the
// rising clock edge when en=1.
module gpr_file
  import asip_pkg::*;
#(
  parameter int unsigned NREGS = NGPR
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [$clog2(NREGS)-1:0] ra,
  input  logic [$clog2(NREGS)-1:0] rb,
  output logic [XLEN-1:0]          qa,
  output logic [XLEN-1:0]          qb,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [XLEN-1:0]          wd
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (en && we) begin
      regs[wa] <= wd;
    end
  end

  assign qa = (we && wa == ra) ? wd : regs[ra];
  assign qb = (we && wa == rb) ? wd : regs[rb];

endmodule
