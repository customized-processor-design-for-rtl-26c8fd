// pdcp_unit_tb: SetReleaseFlag pointer update (wrap through the window
// mask), entity load and flag capture from write-back, bypass of write-back
// data to execute-stage reads, chunk writes, and the entity check flags.
//
// How: directed cases plus random entities compared with a model of the
// entity register, release flag and check bits. Interface: none. Timing:
// 10 ns clock; execute-stage outputs are checked in their cycle, register
// contents after the edge; a watchdog ends a hung run. The SetReleaseFlag
// update follows the source design; field positions are this design's.
module pdcp_unit_tb;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  logic setrel_valid = 0, chk_valid = 0, wb_valid = 0;
  logic [31:0] chk_arg = 0, err_set;
  soc_tag_e wb_tag = TAG_NONE;
  logic [319:0] wb_data = 0;
  asr_wr_t asr_wr = '0;
  logic [169:0] entity, rd_entity, ent_next;
  logic rel_flag, rd_rel_flag;
  logic [5:0] chk_flags;
  int checks = 0, failures = 0;

  pdcp_unit dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [169:0] mk_ent(logic [17:0] rel, logic [17:0] mask, logic [17:0] tx);
    logic [169:0] e;
    e = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    e[137:120] = rel; e[119:102] = mask; e[101:84] = tx;
    return e;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [169:0] e, exp;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // load an entity from the SoC (write-back) and check the bypass
    e = mk_ent(18'd5, 18'h0000f, 18'd9);
    @(negedge clk); wb_valid = 1; wb_tag = TAG_PDCP; wb_data = 320'(e); #1
    chk(rd_entity == e, "bypass entity");
    @(negedge clk); wb_valid = 0; chk(entity == e, "entity loaded");
    // release pointer walks 5 -> 15 then wraps to 0 through the mask
    exp = e;
    for (int k = 0; k < 14; k++) begin
      @(negedge clk); setrel_valid = 1; #1
      exp[137:120] = (exp[137:120] + 1) & 18'hf;
      chk(ent_next == exp, "ent_next");
      @(negedge clk); setrel_valid = 0;
      chk(entity == exp, "SetReleaseFlag update");
    end
    chk(entity[137:120] == 18'd3, "wrapped");
    // release flag from write-back, with bypass
    @(negedge clk); wb_valid = 1; wb_tag = TAG_RELFLAG; wb_data = 320'd1; #1 chk(rd_rel_flag == 1, "flag bypass");
    @(negedge clk); wb_valid = 0; chk(rel_flag == 1, "flag stored");
    @(negedge clk); wb_valid = 1; wb_tag = TAG_RELFLAG; wb_data = 320'd2;
    @(negedge clk); wb_valid = 0; chk(rel_flag == 0, "flag cleared");
    // write-back load and SetReleaseFlag in the same cycle: update applies on top
    e = mk_ent(18'd7, 18'h3ffff, 18'd7);
    @(negedge clk); wb_valid = 1; wb_tag = TAG_PDCP; wb_data = 320'(e); setrel_valid = 1;
    @(negedge clk); wb_valid = 0; setrel_valid = 0;
    exp = e; exp[137:120] = 18'd8; chk(entity == exp, "load+update");
    // chunk write through the register map
    @(negedge clk); asr_wr = '{we: 1'b1, idx: R_PDCP_ENT + 7'd5, data: 32'hffff_ffff};
    @(negedge clk); asr_wr = '0; exp[169:160] = '1; chk(entity == exp, "chunk 5 write");
    // entity check: x = RcRelNext (8), y = RcTxNext (7)
    @(negedge clk); chk_valid = 1; chk_arg = 32'h0000_0001; #1  // a=1,b=0,c=0
    chk(err_set == 1, "check error (x != y)");
    @(negedge clk); chk_valid = 0;
    chk(chk_flags == 6'b110100, "check flags");
    e = mk_ent(18'd7, 18'h3ffff, 18'd7);
    @(negedge clk); wb_valid = 1; wb_tag = TAG_PDCP; wb_data = 320'(e);
    @(negedge clk); wb_valid = 0; chk_valid = 1; chk_arg = 32'h0000_0001; #1
    chk(err_set == 0, "check no error");
    @(negedge clk); chk_valid = 0; chk(chk_flags == 6'b000000, "clean flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
