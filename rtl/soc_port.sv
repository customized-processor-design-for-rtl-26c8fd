// soc_port: the wide full-duplex parallel port to the surrounding SoC blocks.
//
// Instructions that talk to the SoC issue their command from the execute
// stage. A write command takes one cycle: strobe, opcode and the 320-bit
// write data are driven in that cycle. A read command takes two: the request
// (strobe, opcode, `soc_read`) goes out in the first cycle and the SoC drives
// the answer on `soc_rdata` in the second, which is the cycle the instruction
// spends in write-back. The port tags each pending read with the register it
// is destined for and hands data and tag to write-back. While the SoC
// reports `soc_busy`, no command is sent and the pipeline is told to stall.
// If the pipeline is frozen (`en` low) in the cycle the read data arrives,
// the data is captured so that it is not lost.
//
// Following the source design: the very wide full-duplex port, one-cycle
// writes, two-cycle reads, a command strobe with an opcode, the busy test
// before a command and read data consumed in write-back. This design's own
// choices: the 320-bit width for both directions (the largest transfer the
// design's comparison assumes per cycle), the `soc_read` marker, the tagging
// and the capture register.
//
// Interface: the `req_*` inputs come from the execute stage and are acted on
// in the same cycle; `rd_*` outputs go to write-back one cycle later.
module soc_port
  import asip_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  // from execute
  input  logic                 req_valid,
  input  logic                 req_read,
  input  soc_cmd_e             req_cmd,
  input  logic [SOC_W-1:0]     req_wdata,
  input  soc_tag_e             req_tag,
  output logic                 req_stall,
  // to write-back
  output logic                 rd_valid,
  output soc_tag_e             rd_tag,
  output logic [SOC_W-1:0]     rd_data,
  // SoC side
  output logic                 soc_strobe,
  output logic                 soc_read,
  output soc_cmd_e             soc_opcode,
  output logic [SOC_W-1:0]     soc_wdata,
  input  logic [SOC_W-1:0]     soc_rdata,
  input  logic                 soc_busy
);

  logic             pend;
  soc_tag_e         pend_tag;
  logic             hold_v;
  logic [SOC_W-1:0] hold;

  assign req_stall  = req_valid && soc_busy;
  assign soc_strobe = req_valid && !soc_busy && en;
  assign soc_read   = soc_strobe && req_read;
  assign soc_opcode = soc_strobe ? req_cmd : CMD_NONE;
  assign soc_wdata  = soc_strobe ? req_wdata : '0;

  assign rd_valid = pend;
  assign rd_tag   = pend_tag;
  assign rd_data  = hold_v ? hold : soc_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend     <= 1'b0;
      pend_tag <= TAG_NONE;
      hold_v   <= 1'b0;
      hold     <= '0;
    end else if (en) begin
      pend     <= soc_read;
      pend_tag <= soc_read ? req_tag : TAG_NONE;
      hold_v   <= 1'b0;
    end else if (pend && !hold_v) begin
      hold   <= soc_rdata;
      hold_v <= 1'b1;
    end
  end

  a_no_cmd_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    soc_strobe |-> !soc_busy);
  a_read_is_strobed: assert property (@(posedge clk) disable iff (!rst_n)
    soc_read |-> soc_strobe);

endmodule
