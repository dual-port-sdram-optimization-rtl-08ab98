// tb_sam_cmd_fsm: self-checking test of the command FSM (T_RCD 2, CL 2,
// T_WR 2, T_RP 2). For random reads and writes it checks the command
// sequence on its output (BANK ACTIVE with bank and row, then T_RCD cycles
// later READ/WRITE with the column and A10 set for auto-precharge, NOPs in
// between), the data path strobes, the done pulse with the access kind, and
// the occupancy: a read takes T_RCD + CL + T_RP + 2 = 8 cycles and a write
// T_RCD + T_WR + T_RP + 1 = 7 cycles from acceptance to the next acceptance.
// It also checks that nothing is accepted before init_done and that a
// refresh request is acknowledged between accesses and blocks new ones until
// the refresh FSM is no longer busy.
module tb_sam_cmd_fsm;
  import sam_pkg::*;
  localparam int DW = 32, T_RCD = 2, CL = 2, T_WR = 2, T_RP = 2;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic init_done = 0, acc_valid = 0, acc_ready, ref_req = 0, ref_ack, ref_busy = 0;
  access_t acc = '0;
  logic [DW-1:0] acc_wdata = '0, wdata;
  pin_cmd_t cmd;
  logic wr_en, rd_launch, done, busy;
  op_kind_e rd_kind, done_kind;
  sam_cmd_fsm #(.DW(DW), .T_RCD(T_RCD), .CL(CL), .T_WR(T_WR), .T_RP(T_RP)) u_dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    access_t a;
    int t_acc, t_next, n_ref;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); acc_valid = 1; acc = '0;
    repeat (3) @(negedge clk);
    check(!acc_ready && cmd.cmd == SD_NOP, "nothing before init_done");
    init_done = 1; acc_valid = 0;
    n_ref = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (i % 37 == 5) begin
        // refresh handshake between accesses
        ref_req = 1;
        while (!ref_ack) @(negedge clk);
        check(!acc_ready, "no access while refresh requested");
        @(negedge clk);   // acknowledge taken at the edge in between
        ref_req = 0; ref_busy = 1;
        repeat (4) begin @(negedge clk); check(!acc_ready && cmd.cmd == SD_NOP, "blocked during refresh"); end
        ref_busy = 0; n_ref++;
        @(negedge clk);
      end
      a.kind = op_kind_e'($urandom_range(0, 4)); a.write = $urandom; a.bank = BA_W'($urandom);
      a.row = ROW_W'($urandom); a.col = COL_W'($urandom);
      acc = a; acc_wdata = $urandom; acc_valid = 1;
      #1;
      check(acc_ready, "ready when idle");
      check(cmd.cmd == SD_ACT && cmd.ba == a.bank && cmd.addr == a.row, "ACTIVE with bank and row");
      t_acc = cyc;
      @(negedge clk); acc_valid = 0;
      for (int k = 1; k < T_RCD; k++) begin check(cmd.cmd == SD_NOP, "NOP during tRCD"); @(negedge clk); end
      check(cmd.cmd == (a.write ? SD_WR : SD_RD) && cmd.ba == a.bank &&
            cmd.addr[COL_W-1:0] == a.col && cmd.addr[10], "READ/WRITE with auto-precharge");
      check(wr_en == a.write && rd_launch == !a.write && rd_kind == a.kind, "data path strobes");
      if (a.write) check(wdata == acc_wdata, "write data");
      while (!done) begin @(negedge clk); check(cmd.cmd == SD_NOP, "NOP while waiting"); end
      check(done_kind == a.kind, "done kind");
      @(negedge clk);
      t_next = cyc;
      check(acc_ready, "ready again");
      check(t_next - t_acc == (a.write ? T_RCD + T_WR + T_RP + 1 : T_RCD + CL + T_RP + 2),
            $sformatf("occupancy %0d for %s", t_next - t_acc, a.write ? "write" : "read"));
    end
    check(n_ref > 0, "refreshes interleaved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
