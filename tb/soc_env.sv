// soc_env: behavioural model of the SoC around the processor, for testing.
//
// It answers the processor's SoC port and drives the IO-ready events:
//   - LOAD_PDCP (read): returns a new PDCP entity in the next cycle, with a
//     random release pointer and window mask; every other entity has its
//     transmit pointer one ahead of the release pointer so that the release
//     step makes them equal.
//   - GET_REL_FLAG (read): checks that the entity sent along is the loaded
//     one with the release pointer advanced by one under the window mask,
//     and returns a random release flag, remembered in `flags`.
//   - DEALLOC_SDU (write): clears the IO-ready event named in its data.
// Outside the answer cycle the read data is random, so data that the port
// failed to capture would show. `soc_busy` is random (about one cycle in
// four) when BUSY is set. The initial block runs the event script: task 2
// alone, task 1 alone, both together, then event 0, after which it waits
// for the core to halt and raises `done`. For every task-2 check it records
// whether the check should fail, from the argument and the modelled entity.
module soc_env
  import asip_pkg::*;
  import asip_fw_pkg::*;
#(
  parameter bit BUSY = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              soc_strobe,
  input  logic              soc_read,
  input  soc_cmd_e          soc_opcode,
  input  logic [SOC_W-1:0]  soc_wdata,
  output logic [SOC_W-1:0]  soc_rdata,
  output logic              soc_busy,
  output logic [NEVENT-1:0] io_ready,
  input  logic              sleeping,
  input  logic              halted,
  output logic              done
);
  int failures = 0, checks = 0;
  int n_load = 0, n_setrel = 0, n_dealloc = 0, n_chk = 0, exp_err = 0, exp_ok = 0;
  logic flags [$];
  logic [PDCP_ENT_W-1:0] ent = '0;
  logic [NEVENT-1:0] raise_req = '0;

  function automatic logic [SN_W-1:0] fld(logic [PDCP_ENT_W-1:0] e, int lsb);
    return e[lsb +: SN_W];
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      soc_rdata <= '0;
      soc_busy  <= 1'b0;
      io_ready  <= '0;
    end else begin
      soc_busy  <= BUSY && ($urandom % 4 == 0);
      soc_rdata <= {$urandom, $urandom, $urandom, $urandom, $urandom,
                    $urandom, $urandom, $urandom, $urandom, $urandom};
      io_ready  <= io_ready | raise_req;
      if (soc_strobe) begin
        checks++;
        if (soc_busy) begin failures++; $display("FAIL command while busy"); end
        unique case (soc_opcode)
          CMD_LOAD_PDCP: begin
            logic [PDCP_ENT_W-1:0] e;
            logic [SN_W-1:0] rn, wm;
            e  = PDCP_ENT_W'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
            rn = SN_W'($urandom);
            wm = SN_W'((1 << (4 + $urandom % 14)) - 1);
            e[ENT_RC_REL_NEXT_LSB +: SN_W] = rn;
            e[ENT_WINMASK_LSB +: SN_W]     = wm;
            if (n_load % 2 == 0) e[ENT_RC_TX_NEXT_LSB +: SN_W] = (rn + 1'b1) & wm;
            if (!soc_read) begin failures++; $display("FAIL load without read"); end
            soc_rdata <= SOC_W'(e);
            ent = e;
            n_load++;
          end
          CMD_GET_REL_FLAG: begin
            logic [PDCP_ENT_W-1:0] e;
            logic f;
            e = ent;
            e[ENT_RC_REL_NEXT_LSB +: SN_W] = (fld(ent, ENT_RC_REL_NEXT_LSB) + 1'b1) & fld(ent, ENT_WINMASK_LSB);
            checks++;
            if (soc_wdata[PDCP_ENT_W-1:0] !== e) begin
              failures++;
              $display("FAIL SetReleaseFlag sent %h expected %h", soc_wdata[PDCP_ENT_W-1:0], e);
            end
            ent = e;
            f = 1'($urandom);
            flags.push_back(f);
            begin
              logic [SOC_W-1:0] r;
              r = {$urandom, $urandom, $urandom, $urandom, $urandom,
                   $urandom, $urandom, $urandom, $urandom, $urandom};
              r[0] = f;
              soc_rdata <= r;
            end
            n_setrel++;
          end
          CMD_DEALLOC_SDU: begin
            if (soc_read) begin failures++; $display("FAIL dealloc marked as read"); end
            io_ready[soc_wdata[EVENT_W-1:0]] <= 1'b0;
            if (soc_wdata[EVENT_W-1:0] == 2) begin
              logic [31:0] a;
              logic err;
              a = arg_word(n_chk);
              err = (a[1:0] != 2'd1) || (a[3:2] != a[5:4]) ||
                    (fld(ent, ENT_RC_REL_NEXT_LSB) != fld(ent, ENT_RC_TX_NEXT_LSB));
              if (err) exp_err++; else exp_ok++;
              n_chk++;
            end
            n_dealloc++;
          end
          default: begin failures++; $display("FAIL unknown SoC opcode %0d", soc_opcode); end
        endcase
      end
    end
  end

  task automatic raise(int ev);
    raise_req[ev] <= 1'b1;
    @(posedge clk);
    raise_req[ev] <= 1'b0;
    @(posedge clk);
  endtask

  task automatic wait_cleared(int ev);
    while (io_ready[ev]) @(posedge clk);
  endtask

  initial begin
    done = 1'b0;
    wait (rst_n);
    repeat (40) @(posedge clk);
    // task 2 alone
    for (int i = 0; i < 6; i++) begin
      if (i % 2 == 1) wait (sleeping);
      raise(2);
      wait_cleared(2);
      repeat ($urandom % 6) @(posedge clk);
    end
    // task 1 alone
    for (int i = 0; i < 4; i++) begin
      if (i % 2 == 0) wait (sleeping);
      raise(1);
      wait_cleared(1);
      repeat ($urandom % 6) @(posedge clk);
    end
    // both: task 1 runs first
    for (int i = 0; i < 6; i++) begin
      wait (sleeping);
      raise_req[1] <= 1'b1; raise_req[2] <= 1'b1;
      @(posedge clk);
      raise_req <= '0;
      @(posedge clk);
      wait_cleared(1);
      wait_cleared(2);
    end
    wait (sleeping);
    raise(0);
    wait (halted);
    repeat (4) @(posedge clk);
    done = 1'b1;
  end
endmodule
