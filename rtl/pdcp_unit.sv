// pdcp_unit: PDCP entity state held in application specific registers, and
// the functional units that update it.
//
// The unit keeps one PDCP entity (170 bits) in a register rather than in
// memory, a reference-count release flag and the status bits of the entity
// check unit. Its work:
//   - SetReleaseFlag (execute stage): advances the entity's release pointer
//     RcRelNext to (RcRelNext + 1) & WinMask, leaving every other entity bit
//     unchanged. The pipeline issues the GetReleaseFlag read on the SoC port
//     in the same cycle, sending the updated entity (`ent_next`); the flag
//     bit returned in write-back is stored here.
//   - entity load (write-back): the PDCP state read from the SoC replaces the
//     entity register.
//   - entity check (execute stage): runs fu_entity_check on the instruction
//     argument and the entity's RcRelNext and RcTxNext fields, stores the six
//     status bits and reports bit 4 as error flag 0.
// Reads through the base ISA see the entity in 32-bit chunks (r56..r61), the
// release flag at r33 and the check bits at r62. A read in execute in the
// same cycle as a write-back to the same register returns the new value.
//
// Following the source design: the entity register and its 18-bit release
// pointer and window mask, the SetReleaseFlag update and its flag read in
// write-back, the mapping of wide registers onto 32-bit chunks. This design's
// own choices: the field positions inside the entity, the entity load and
// check instructions' operands, and the register indices.
//
// Only error bit 0 is ever raised by this unit (`err_set` is a full flag
// word so that more units can share the bitmap); bits 13:6 of the check
// argument are not used.
module pdcp_unit
  import asip_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  // execute stage
  input  logic                   setrel_valid,
  input  logic                   chk_valid,
  input  logic [XLEN-1:0]        chk_arg,
  output logic [XLEN-1:0]        err_set,
  // write-back stage: SoC read data
  input  logic                   wb_valid,
  input  soc_tag_e               wb_tag,
  input  logic [SOC_W-1:0]       wb_data,
  // base ISA access
  input  asr_wr_t                asr_wr,
  output logic [PDCP_ENT_W-1:0]  entity,
  output logic                   rel_flag,
  output logic [5:0]             chk_flags,
  output logic [PDCP_ENT_W-1:0]  rd_entity,
  output logic                   rd_rel_flag,
  output logic [PDCP_ENT_W-1:0]  ent_next
);

  logic [PDCP_ENT_W-1:0] ent_upd;
  logic [SN_W-1:0]       rel_next, winmask, tx_next, rel_new;
  logic [5:0]            f;

  // values as seen by an instruction in execute (write-back bypass)
  assign rd_entity   = (wb_valid && wb_tag == TAG_PDCP) ? wb_data[PDCP_ENT_W-1:0] : entity;
  assign rd_rel_flag = (wb_valid && wb_tag == TAG_RELFLAG) ? wb_data[0] : rel_flag;

  assign rel_next = rd_entity[ENT_RC_REL_NEXT_LSB +: SN_W];
  assign winmask  = rd_entity[ENT_WINMASK_LSB +: SN_W];
  assign tx_next  = rd_entity[ENT_RC_TX_NEXT_LSB +: SN_W];
  assign rel_new  = (rel_next + 1'b1) & winmask;

  always_comb begin
    ent_upd = rd_entity;
    if (setrel_valid) ent_upd[ENT_RC_REL_NEXT_LSB +: SN_W] = rel_new;
  end

  assign ent_next = ent_upd;

  fu_entity_check u_chk (
    .a(chk_arg[1:0]), .b(chk_arg[3:2]), .c(chk_arg[5:4]),
    .x(rel_next), .y(tx_next), .z(chk_arg[31:14]),
    .f(f)
  );

  assign err_set = chk_valid ? XLEN'(f[4]) : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      entity    <= '0;
      rel_flag  <= 1'b0;
      chk_flags <= '0;
    end else if (en) begin
      logic [PDCP_ENT_W-1:0] e;
      e = ent_upd;
      rel_flag <= rd_rel_flag;
      if (chk_valid) chk_flags <= f;
      if (asr_wr.we) begin
        for (int k = 0; k < PDCP_CHUNKS; k++) begin
          if (asr_wr.idx == R_PDCP_ENT + RIDX_W'(k)) begin
            for (int b = 0; b < XLEN; b++) begin
              if (k * XLEN + b < PDCP_ENT_W) e[k * XLEN + b] = asr_wr.data[b];
            end
          end
        end
        if (asr_wr.idx == R_REL_FLAG) rel_flag <= asr_wr.data[0];
      end
      entity <= e;
    end
  end

endmodule
