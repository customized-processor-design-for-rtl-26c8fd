// asip_top: the layer-2 ASIP subsystem as it sits in the SoC.
//
// The processor core (asip_core) is the AHB-Lite master of a single memory
// (ahb_sram) that holds both its firmware and any data it loads or stores.
// Everything else the core needs from the SoC comes through two plain
// interfaces brought out as ports: the 320-bit command/read port to the
// SoC's protocol hardware (strobe, opcode, write data, busy, read data one
// cycle after a read command) and the IO event flags that wake parked tasks.
// `halted`, `sleeping`, `cur_task` and `retired` report what the core is
// doing.
//
// The memory has no loader port: firmware is placed in the memory array
// before reset is released.
//
// Following the source design: one processor with a shared program/data
// memory on AHB-Lite, and a wide SoC port. This design's own choices: the
// memory size, the optional memory wait states and the status outputs.
//
// Timing: one instruction per cycle when nothing stalls; a taken jump costs
// three cycles, a context switch two, a SoC read returns its data in the
// cycle after the command, and each memory wait state (MEM_WAIT) freezes the
// core for one cycle per bus transfer. HRESP is not used: the memory always
// answers OKAY.
module asip_top
  import asip_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024,
  parameter int unsigned MEM_WAIT  = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NEVENT-1:0] io_ready,
  input  logic              soc_busy,
  output logic              soc_strobe,
  output logic              soc_read,
  output logic [SOC_CMD_W-1:0] soc_opcode,
  output logic [SOC_W-1:0]  soc_wdata,
  input  logic [SOC_W-1:0]  soc_rdata,
  output logic              halted,
  output logic              sleeping,
  output logic [TASK_W-1:0] cur_task,
  output logic              retired
);

  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hready, hresp;
  logic [2:0]  hsize;
  soc_cmd_e    opcode;

  asip_core u_core (
    .clk(clk), .rst_n(rst_n),
    .HADDR(haddr), .HTRANS(htrans), .HWRITE(hwrite), .HSIZE(hsize), .HWDATA(hwdata),
    .HRDATA(hrdata), .HREADY(hready),
    .io_ready(io_ready), .soc_busy(soc_busy), .soc_strobe(soc_strobe), .soc_read(soc_read),
    .soc_opcode(opcode), .soc_wdata(soc_wdata), .soc_rdata(soc_rdata),
    .halted(halted), .sleeping(sleeping), .cur_task(cur_task), .retired(retired)
  );

  assign soc_opcode = opcode;

  ahb_sram #(.WORDS(MEM_WORDS), .WAIT(MEM_WAIT)) u_mem (
    .HCLK(clk), .HRESETn(rst_n), .HSEL(1'b1), .HADDR(haddr), .HTRANS(htrans),
    .HWRITE(hwrite), .HSIZE(hsize), .HWDATA(hwdata), .HREADY(hready),
    .HRDATA(hrdata), .HREADYOUT(hready), .HRESP(hresp)
  );

endmodule
