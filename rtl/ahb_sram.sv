// ahb_sram: the processor's program and data memory, an AHB-Lite slave.
//
// Instructions and data share this one memory and one bus (a von Neumann
// arrangement). A transfer is accepted in its address phase (HSEL, HTRANS
// NONSEQ or SEQ, HREADY high); in the data phase the memory returns the
// addressed word on HRDATA, or writes HWDATA into the byte lanes selected by
// HSIZE and the low address bits. With WAIT = 0 every transfer completes in
// its first data-phase cycle; WAIT > 0 inserts that many wait states
// (HREADYOUT low) to model a slower memory. HRESP is always OKAY. The array
// is cleared by nothing: a testbench or loader fills it.
//
// Following the source design: one memory for program and data, reached
// over AMBA 3 AHB-Lite with the processor as master, 32-bit addresses. This
// design's own choices: the size (1024 words, enough for a firmware of about
// a thousand instructions), the wait-state parameter and the alignment rule.
//
// Address bits above the array size and HTRANS[0] (SEQ versus NONSEQ) are
// not needed and are ignored; HRESP is constant OKAY.
module ahb_sram
  import asip_pkg::*;
#(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned WAIT  = 0
) (
  input  logic            HCLK,
  input  logic            HRESETn,
  input  logic            HSEL,
  input  logic [31:0]     HADDR,
  input  logic [1:0]      HTRANS,
  input  logic            HWRITE,
  input  logic [2:0]      HSIZE,
  input  logic [31:0]     HWDATA,
  input  logic            HREADY,
  output logic [31:0]     HRDATA,
  output logic            HREADYOUT,
  output logic            HRESP
);

  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned CW = (WAIT > 0) ? $clog2(WAIT + 1) : 1;

  logic [31:0]   mem [WORDS];
  logic          dp_v, dp_write;
  logic [AW-1:0] dp_word;
  logic [1:0]    dp_lane;
  logic [2:0]    dp_size;
  logic [CW-1:0] wait_cnt;
  logic [3:0]    be;

  assign HREADYOUT = !dp_v || (wait_cnt == '0);
  assign HRESP     = 1'b0;
  assign HRDATA    = mem[dp_word];

  always_comb begin
    unique case (dp_size)
      3'd0:    be = 4'b0001 << dp_lane;
      3'd1:    be = dp_lane[1] ? 4'b1100 : 4'b0011;
      default: be = 4'b1111;
    endcase
  end

  always_ff @(posedge HCLK) begin
    if (!HRESETn) begin
      dp_v     <= 1'b0;
      dp_write <= 1'b0;
      dp_word  <= '0;
      dp_lane  <= '0;
      dp_size  <= '0;
      wait_cnt <= '0;
    end else if (HREADY) begin
      dp_v     <= HSEL && HTRANS[1];
      dp_write <= HWRITE;
      dp_word  <= HADDR[AW+1:2];
      dp_lane  <= HADDR[1:0];
      dp_size  <= HSIZE;
      wait_cnt <= (HSEL && HTRANS[1]) ? CW'(WAIT) : '0;
    end else if (wait_cnt != '0) begin
      wait_cnt <= wait_cnt - 1'b1;
    end
  end

  always_ff @(posedge HCLK) begin
    if (dp_v && dp_write && HREADYOUT) begin
      for (int b = 0; b < 4; b++) begin
        if (be[b]) mem[dp_word][b*8 +: 8] <= HWDATA[b*8 +: 8];
      end
    end
  end

  a_aligned: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (HSEL && HTRANS[1] && HREADY) |->
      ((HSIZE == 3'd0) || (HSIZE == 3'd1 && !HADDR[0]) || (HSIZE == 3'd2 && HADDR[1:0] == 2'b00)));

endmodule
