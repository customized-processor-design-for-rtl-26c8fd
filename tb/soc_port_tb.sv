// soc_port_tb: write commands take one cycle, read data is handed to
// write-back in the cycle after the request with its tag, busy holds
// commands back and stalls, and read data is kept across a frozen cycle.
//
// How: directed command sequences with random busy and freeze cycles,
// compared with the expected strobe/opcode and read-data timing.
// Interface: none. Timing: 10 ns clock; a read's data must reach write-back
// exactly one cycle after the request, a write occupies one cycle; a
// watchdog ends a hung run. One-cycle writes and two-cycle reads follow the
// source design; the tags and capture register are this design's.
module soc_port_tb;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  logic req_valid = 0, req_read = 0, req_stall;
  soc_cmd_e req_cmd = CMD_NONE;
  logic [319:0] req_wdata = 0;
  soc_tag_e req_tag = TAG_NONE;
  logic rd_valid;
  soc_tag_e rd_tag;
  logic [319:0] rd_data;
  logic soc_strobe, soc_read, soc_busy = 0;
  soc_cmd_e soc_opcode;
  logic [319:0] soc_wdata, soc_rdata = 0;
  int checks = 0, failures = 0;

  soc_port dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [319:0] d;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // write command: one cycle, nothing pending afterwards
    @(negedge clk); req_valid = 1; req_read = 0; req_cmd = CMD_DEALLOC_SDU; req_wdata = 320'h1234; #1
    chk(soc_strobe && !soc_read && soc_opcode == CMD_DEALLOC_SDU && soc_wdata == 320'h1234 && !req_stall, "write cmd");
    @(negedge clk); req_valid = 0; #1
    chk(!soc_strobe && !rd_valid && soc_opcode == CMD_NONE, "write done");
    // read command: data next cycle, tagged
    for (int n = 0; n < 20; n++) begin
      d = {10{$urandom}};
      @(negedge clk); req_valid = 1; req_read = 1; req_cmd = CMD_LOAD_PDCP; req_tag = (n % 2) ? TAG_PDCP : TAG_RELFLAG; #1
      chk(soc_strobe && soc_read, "read request");
      @(negedge clk); req_valid = 0; soc_rdata = d; #1
      chk(rd_valid && rd_tag == ((n % 2) ? TAG_PDCP : TAG_RELFLAG) && rd_data == d, "read data");
      @(negedge clk); soc_rdata = '1; #1 chk(!rd_valid, "read done");
    end
    // busy: no strobe, stall
    @(negedge clk); soc_busy = 1; req_valid = 1; req_read = 1; req_tag = TAG_PDCP; #1
    chk(!soc_strobe && req_stall, "busy stall");
    @(negedge clk); #1 chk(!rd_valid, "nothing pending while busy");
    @(negedge clk); soc_busy = 0; #1 chk(soc_strobe && !req_stall, "released");
    // frozen in the data cycle: data captured and held
    d = {10{$urandom}};
    @(negedge clk); req_valid = 0; en = 0; soc_rdata = d; #1 chk(rd_valid && rd_data == d, "data while frozen");
    @(negedge clk); soc_rdata = 0; #1 chk(rd_valid && rd_data == d, "data held");
    @(negedge clk); en = 1; #1 chk(rd_valid && rd_data == d, "data held until consumed");
    @(negedge clk); #1 chk(!rd_valid, "consumed");
    // no strobe while frozen
    en = 0; req_valid = 1; #1 chk(!soc_strobe, "no strobe when frozen");
    @(negedge clk); en = 1; req_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
