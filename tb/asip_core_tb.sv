// asip_core_tb: runs a base-ISA program on two cores, one with a zero-wait
// memory and one whose memory inserts a wait state on every transfer. The
// program exercises every base instruction, back-to-back dependencies
// (forwarding), a load right after a store, sub-word loads and stores,
// taken and untaken jumps, call, a zero-overhead main loop configured by the
// loop instruction, and a nested counted loop configured through ordinary
// writes to its registers. Final register and memory contents are compared
// with values worked out here; on the zero-wait core the cycle costs are
// checked too: a taken jump costs three cycles, a loop back costs none, and
// every load or store costs one extra cycle (fetch waits for the shared bus).
module asip_core_tb;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // two core + memory pairs
  logic [31:0] haddr [2], hwdata [2], hrdata [2];
  logic [1:0]  htrans [2];
  logic        hwrite [2], hready [2], hresp [2];
  logic [2:0]  hsize [2];
  logic        halted [2], sleeping [2], retired [2], soc_strobe [2], soc_read [2];
  logic [2:0]  cur_task [2];
  soc_cmd_e    soc_opcode [2];
  logic [319:0] soc_wdata [2];

  asip_core c0 (.clk(clk), .rst_n(rst_n), .HADDR(haddr[0]), .HTRANS(htrans[0]), .HWRITE(hwrite[0]),
    .HSIZE(hsize[0]), .HWDATA(hwdata[0]), .HRDATA(hrdata[0]), .HREADY(hready[0]),
    .io_ready(16'h0), .soc_busy(1'b0), .soc_strobe(soc_strobe[0]), .soc_read(soc_read[0]),
    .soc_opcode(soc_opcode[0]), .soc_wdata(soc_wdata[0]), .soc_rdata(320'h0),
    .halted(halted[0]), .sleeping(sleeping[0]), .cur_task(cur_task[0]), .retired(retired[0]));
  ahb_sram #(.WORDS(1024), .WAIT(0)) m0 (.HCLK(clk), .HRESETn(rst_n), .HSEL(1'b1), .HADDR(haddr[0]),
    .HTRANS(htrans[0]), .HWRITE(hwrite[0]), .HSIZE(hsize[0]), .HWDATA(hwdata[0]), .HREADY(hready[0]),
    .HRDATA(hrdata[0]), .HREADYOUT(hready[0]), .HRESP(hresp[0]));
  asip_core c1 (.clk(clk), .rst_n(rst_n), .HADDR(haddr[1]), .HTRANS(htrans[1]), .HWRITE(hwrite[1]),
    .HSIZE(hsize[1]), .HWDATA(hwdata[1]), .HRDATA(hrdata[1]), .HREADY(hready[1]),
    .io_ready(16'h0), .soc_busy(1'b0), .soc_strobe(soc_strobe[1]), .soc_read(soc_read[1]),
    .soc_opcode(soc_opcode[1]), .soc_wdata(soc_wdata[1]), .soc_rdata(320'h0),
    .halted(halted[1]), .sleeping(sleeping[1]), .cur_task(cur_task[1]), .retired(retired[1]));
  ahb_sram #(.WORDS(1024), .WAIT(1)) m1 (.HCLK(clk), .HRESETn(rst_n), .HSEL(1'b1), .HADDR(haddr[1]),
    .HTRANS(htrans[1]), .HWRITE(hwrite[1]), .HSIZE(hsize[1]), .HWDATA(hwdata[1]), .HREADY(hready[1]),
    .HRDATA(hrdata[1]), .HREADYOUT(hready[1]), .HRESP(hresp[1]));

  // program
  logic [31:0] prog [72];
  initial begin
    foreach (prog[i]) prog[i] = 32'h0;
    prog[0]  = mk_i(OP_MOVSI, 1, 16'h1234);
    prog[1]  = mk_i(OP_MOVHI, 1, 16'hABCD);
    prog[2]  = mk_i(OP_MOVSI, 2, 16'hFFFB);
    prog[3]  = mk_addi(3, 2, 11'd100);
    prog[4]  = mk_r(OP_ADD, 5, 1, 3);
    prog[5]  = mk_r(OP_SUB, 6, 1, 3);
    prog[6]  = mk_r(OP_AND, 7, 1, 2);
    prog[7]  = mk_r(OP_OR, 8, 1, 3);
    prog[8]  = mk_r(OP_XOR, 9, 1, 2);
    prog[9]  = mk_i(OP_MOVSI, 11, 16'd4);
    prog[10] = mk_r(OP_SLL, 10, 1, 11);
    prog[11] = mk_r(OP_SRL, 12, 1, 11);
    prog[12] = mk_r(OP_SRA, 13, 1, 11);
    prog[13] = mk_r(OP_EQ, 14, 3, 3);
    prog[14] = mk_r(OP_NEQ, 15, 3, 2);
    prog[15] = mk_r(OP_SLT, 16, 2, 3);
    prog[16] = mk_r(OP_ULT, 17, 2, 3);
    prog[17] = mk_r(OP_SLE, 18, 3, 3);
    prog[18] = mk_r(OP_ULE, 19, 3, 2);
    prog[19] = mk_i(OP_MOVSI, 20, 16'd7);
    prog[20] = mk_r(OP_MOVZ, 20, 0, 3);
    prog[21] = mk_i(OP_MOVSI, 21, 16'd9);
    prog[22] = mk_r(OP_MOVNZ, 21, 0, 3);
    prog[23] = mk_i(OP_MOVSI, 22, 16'h0800);
    prog[24] = mk_r(OP_ST, 22, 1, 0);
    prog[25] = mk_r(OP_LD, 23, 22, 0);
    prog[26] = mk_addi(24, 22, 11'd2);
    prog[27] = mk_r(OP_LDHU, 25, 24, 0);
    prog[28] = mk_r(OP_LDHS, 26, 24, 0);
    prog[29] = mk_addi(24, 22, 11'd3);
    prog[30] = mk_r(OP_LDBS, 29, 24, 0);
    prog[31] = mk_addi(24, 22, 11'd1);
    prog[32] = mk_r(OP_LDBU, 27, 24, 0);
    prog[33] = mk_addi(24, 22, 11'd4);
    prog[34] = mk_r(OP_STH, 24, 3, 0);
    prog[35] = mk_addi(30, 24, 11'd2);
    prog[36] = mk_r(OP_STB, 30, 2, 0);
    prog[37] = mk_r(OP_LD, 31, 24, 0);
    prog[38] = mk_i(OP_JUMP, 0, 16'(40 * 4));
    prog[39] = mk_i(OP_MOVSI, 31, 16'hDEAD);
    prog[40] = mk_i(OP_JUMPZ, 0, 16'(43 * 4));
    prog[41] = mk_i(OP_MOVSI, 31, 16'hBEEF);
    prog[42] = mk_i(OP_MOVSI, 31, 16'hBEEF);
    prog[43] = mk_i(OP_JUMPNZ, 0, 16'(50 * 4));
    prog[44] = mk_i(OP_CALL, 0, 16'(47 * 4));
    prog[45] = mk_i(OP_MOVSI, 31, 16'h0001);
    prog[46] = mk_i(OP_MOVSI, 31, 16'h0002);
    prog[47] = mk_i(OP_MOVSI, 11, 16'd0);
    prog[48] = mk_i(OP_MOVSI, 14, 16'd5);
    prog[49] = mk_i(OP_MOVSI, 15, 16'(52 * 4));
    prog[50] = mk_i(OP_MOVSI, 19, 16'(54 * 4));
    prog[51] = mk_r(OP_HWLOOP, 0, 15, 19);
    prog[52] = mk_addi(11, 11, 11'd1);
    prog[53] = mk_r(OP_EQ, 18, 11, 14);
    prog[54] = mk_i(OP_JUMPNZ, 18, 16'(56 * 4));
    prog[55] = mk_i(OP_MOVSI, 31, 16'h0BAD);
    prog[56] = mk_i(OP_MOVSI, 34, 16'd3);          // nested loop counter (ASR)
    prog[57] = mk_i(OP_MOVSI, 53, 16'(61 * 4));    // nested start (ASR)
    prog[58] = mk_i(OP_MOVSI, 54, 16'(61 * 4));    // nested end (ASR)
    prog[59] = mk_i(OP_MOVSI, 20, 16'd0);
    prog[60] = mk_i(OP_MOVSI, 28, 16'd0);          // spacing: loop registers take effect 3 slots later
    prog[61] = mk_addi(20, 20, 11'd10);
    prog[62] = mk_r(OP_ADD, 21, 20, 0);
    prog[63] = mk_r(OP_ADD, 24, 36, 0);            // read task 0 loop start (ASR r36)
    prog[64] = mk_i(OP_HALT, 0, 16'd0);
  end

  logic [31:0] exp_r [32];
  initial begin
    logic [31:0] r1;
    r1 = 32'hABCD1234;
    exp_r = '{default: 32'h0};
    exp_r[1] = r1;            exp_r[2] = 32'hFFFF_FFFB;  exp_r[3] = 32'd95;
    exp_r[4] = 32'(44 * 4 + 4);
    exp_r[5] = r1 + 95;       exp_r[6] = r1 - 95;       exp_r[7] = r1 & 32'hFFFF_FFFB;
    exp_r[8] = r1 | 95;       exp_r[9] = r1 ^ 32'hFFFF_FFFB;
    exp_r[10] = r1 << 4;      exp_r[11] = 5;            exp_r[12] = r1 >> 4;
    exp_r[13] = {4'hF, r1[31:4]};
    exp_r[14] = 5;            exp_r[15] = 52 * 4;       exp_r[16] = 1;   exp_r[17] = 0;
    exp_r[18] = 1;            exp_r[19] = 54 * 4;       exp_r[20] = 40;  exp_r[21] = 40;
    exp_r[22] = 32'h800;      exp_r[23] = r1;           exp_r[24] = 52 * 4;
    exp_r[25] = 32'hABCD;     exp_r[26] = 32'hFFFF_ABCD; exp_r[27] = 32'h12;
    exp_r[29] = 32'hFFFF_FFAB; exp_r[30] = 32'h806;     exp_r[31] = 32'h00FB_005F;
  end

  // retire trace of the zero-wait core
  int rt_cycle [$];
  logic [31:0] rt_pc [$];
  always @(posedge clk) if (rst_n && retired[0]) begin rt_cycle.push_back(cycle); rt_pc.push_back(c0.ex_pc); end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int first_retire(logic [31:0] pc, int from);
    for (int i = from; i < rt_pc.size(); i++) if (rt_pc[i] == pc) return i;
    return -1;
  endfunction

  initial begin
    int i, j;
    for (int w = 0; w < 1024; w++) begin m0.mem[w] = 0; m1.mem[w] = 0; end
    for (int w = 0; w < 72; w++) begin m0.mem[w] = prog[w]; m1.mem[w] = prog[w]; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (halted[0] && halted[1]);
    repeat (2) @(posedge clk);
    for (int c = 0; c < 2; c++) begin
      for (int r = 1; r < 32; r++) begin
        logic [31:0] v;
        v = (c == 0) ? c0.u_gpr.regs[r] : c1.u_gpr.regs[r];
        checks++;
        if (v !== exp_r[r]) begin failures++; $display("FAIL core%0d r%0d = %h exp %h", c, r, v, exp_r[r]); end
      end
      chk(((c == 0) ? m0.mem[512] : m1.mem[512]) == 32'hABCD1234, "mem 0x800");
      chk(((c == 0) ? m0.mem[513] : m1.mem[513]) == 32'h00FB005F, "mem 0x804");
    end
    // cycle costs on the zero-wait core
    i = first_retire(38 * 4, 0); j = first_retire(40 * 4, 0);
    chk(i >= 0 && j == i + 1 && rt_cycle[j] - rt_cycle[i] == 3, "jump costs three cycles");
    // straight-line code 23..38 holds 9 loads and stores: each costs one extra cycle
    i = first_retire(23 * 4, 0); j = first_retire(38 * 4, 0);
    chk(i >= 0 && j > i && rt_cycle[j] - rt_cycle[i] == 15 + 9, $sformatf("loads and stores cost one extra cycle each (%0d)", rt_cycle[j] - rt_cycle[i]));
    i = first_retire(54 * 4, 0);
    chk(i >= 0 && rt_pc[i + 1] == 52 * 4 && rt_cycle[i + 1] - rt_cycle[i] == 1, "main loop back costs no cycle");
    j = 0;
    for (int k = 0; k < rt_pc.size(); k++) if (rt_pc[k] == 52 * 4) j++;
    chk(j == 5, "main loop iterations");
    i = first_retire(61 * 4, 0);
    chk(i >= 0 && rt_pc[i + 3] == 61 * 4 && rt_pc[i + 4] == 62 * 4 && rt_cycle[i + 4] - rt_cycle[i] == 4,
        "nested loop: four passes back to back");
    chk(first_retire(55 * 4, 0) < 0 && first_retire(39 * 4, 0) < 0, "skipped instructions never retire");
    $display("zero-wait core: %0d instructions retired", rt_pc.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
