// ahb_sram_tb: pipelined AHB-Lite word, halfword and byte writes and reads
// against a byte-array model, with zero and with two wait states.
//
// How: a driver issues single AHB-Lite transfers with random size, address
// and data, waits in the data phase while HREADYOUT is low, and compares
// every read with the model. Interface: none; two memory instances
// (WAIT = 0 and WAIT = 2). Timing: 10 ns clock; each transfer must complete
// in exactly WAIT + 1 data-phase cycles; a watchdog ends a hung run. The
// bus protocol follows AMBA 3 AHB-Lite as the source design uses it; the
// wait-state parameter is this design's.
module ahb_sram_tb;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // two memories: no wait states and two wait states
  logic [31:0] haddr [2], hwdata [2], hrdata [2];
  logic [1:0]  htrans [2];
  logic        hwrite [2], hready [2], hresp [2];
  logic [2:0]  hsize [2];

  ahb_sram #(.WORDS(64), .WAIT(0)) m0 (.HCLK(clk), .HRESETn(rst_n), .HSEL(1'b1), .HADDR(haddr[0]),
    .HTRANS(htrans[0]), .HWRITE(hwrite[0]), .HSIZE(hsize[0]), .HWDATA(hwdata[0]), .HREADY(hready[0]),
    .HRDATA(hrdata[0]), .HREADYOUT(hready[0]), .HRESP(hresp[0]));
  ahb_sram #(.WORDS(64), .WAIT(2)) m1 (.HCLK(clk), .HRESETn(rst_n), .HSEL(1'b1), .HADDR(haddr[1]),
    .HTRANS(htrans[1]), .HWRITE(hwrite[1]), .HSIZE(hsize[1]), .HWDATA(hwdata[1]), .HREADY(hready[1]),
    .HRDATA(hrdata[1]), .HREADYOUT(hready[1]), .HRESP(hresp[1]));

  logic [7:0] model [2][256];

  // one transfer: address phase, then data phase until HREADY
  task automatic xfer(int m, logic wr, logic [7:0] a, logic [2:0] sz, logic [31:0] wd, int exp_wait);
    int waits = 0;
    logic [31:0] exp;
    @(negedge clk);
    haddr[m] = 32'(a); htrans[m] = 2'b10; hwrite[m] = wr; hsize[m] = sz;
    @(posedge clk); #1;
    htrans[m] = 2'b00;
    hwdata[m] = wd;
    while (!hready[m]) begin @(posedge clk); #1; waits++; end
    checks++;
    if (waits != exp_wait) begin failures++; $display("FAIL wait states %0d exp %0d", waits, exp_wait); end
    if (wr) begin
      for (int b = 0; b < (1 << sz); b++) model[m][a + b] = wd[8*((a + b) % 4) +: 8];
    end else begin
      for (int b = 0; b < 4; b++) exp[8*b +: 8] = model[m][(a & 8'hfc) + b];
      checks++;
      if (hrdata[m] !== exp) begin failures++; $display("FAIL m%0d read %h got %h exp %h", m, a, hrdata[m], exp); end
    end
    if (hresp[m] !== 1'b0) begin failures++; $display("FAIL HRESP"); end
  endtask

  initial begin
    for (int m = 0; m < 2; m++) begin
      htrans[m] = 0; haddr[m] = 0; hwrite[m] = 0; hsize[m] = 0; hwdata[m] = 0;
      foreach (model[m][i]) model[m][i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // fill with words so the model is defined
    for (int m = 0; m < 2; m++)
      for (int w = 0; w < 64; w++) xfer(m, 1, 8'(4 * w), 3'd2, $urandom, m * 2);
    for (int n = 0; n < 300; n++) begin
      int m;
      logic [2:0] sz;
      logic [7:0] a;
      m = n % 2;
      sz = 3'($urandom % 3);
      a = 8'($urandom) & ~8'((1 << sz) - 1);
      xfer(m, ($urandom % 2), a, sz, $urandom, m * 2);
      xfer(m, 0, a & 8'hfc, 3'd2, 0, m * 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
