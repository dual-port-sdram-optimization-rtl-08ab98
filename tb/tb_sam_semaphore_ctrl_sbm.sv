// tb_sam_semaphore_ctrl_sbm: self-checking test of the semaphore control of
// port A built as the traditional controller (SAM_EN = 0), the baseline the
// SAM algorithms are measured against. The testbench plays the shared bank
// control, the command FSM and the semaphore copy, as in tb_sam_semaphore_ctrl.
// It checks that this mode trusts no duplicated semaphore (a semaphore read
// before every shared-bank command, even while the copy shows authority, and
// the permission is used up by one command), sends no request ahead of the
// shared command and never releases on its own, even in the slave role; that
// without authority it checks, requests and polls; and that it still releases
// on the other port's request.
module tb_sam_semaphore_ctrl_sbm;
  import sam_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic role_master = 0, own = 0, head_shared = 0, shared_pending = 0, mbox_pending = 0;
  logic shared_pop = 0, have;
  logic sem_valid, sem_accept = 0, done = 0, rvalid = 0;
  op_kind_e sem_op, done_kind = OP_PROC, rkind = OP_PROC;
  logic [WORD_W-1:0] rdata = '0;
  logic semreg_load, semreg_value, rel_done, mbox_rd_start, idle, req_outstanding;
  logic ev_sem_read, ev_sem_wait, ev_request, ev_prefetch, ev_release_on_req, ev_auto_release;
  sam_semaphore_ctrl #(.PORT_ID(1'b0), .SAM_EN(1'b0)) u_dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // offer check and one-cycle accept; returns the event flags seen
  task automatic take(input op_kind_e op, input string what, output logic [5:0] ev);
    @(negedge clk); #1;
    check(sem_valid && sem_op == op, $sformatf("%s: offered %s (got %0d/%s)", what, op.name(), sem_valid, sem_op.name()));
    sem_accept = 1; #1;
    ev = {ev_sem_read, ev_sem_wait, ev_request, ev_prefetch, ev_release_on_req, ev_auto_release};
    check(mbox_rd_start == (op == OP_MBOX_RD), "mailbox read start only with the mailbox read");
    @(negedge clk); sem_accept = 0; #1;
    check(!sem_valid, "one operation at a time");
  endtask
  // completion; reads return data one cycle before done
  task automatic finish(input op_kind_e op, input logic [WORD_W-1:0] d);
    @(negedge clk);
    if (op == OP_SEM_READ || op == OP_MBOX_RD) begin
      rvalid = 1; rkind = op; rdata = d; #1;
      if (op == OP_SEM_READ) check(semreg_load && semreg_value == d[0], "semaphore copy loaded");
      else check(!semreg_load, "no copy load on a mailbox read");
      @(negedge clk); rvalid = 0;
    end
    done = 1; done_kind = op; #1;
    check(rel_done == (op == OP_SEM_REL), "rel_done only for the release");
    @(negedge clk); done = 0;
  endtask
  task automatic quiet(input int n, input string what);
    repeat (n) begin @(negedge clk); #1; check(!sem_valid, what); end
  endtask

  initial begin
    logic [5:0] ev;
    repeat (2) @(posedge clk); rst_n = 1;
    quiet(3, "nothing to do without need");
    // holds authority by the copy, yet every shared command needs a check
    own = 1; role_master = 0;
    shared_pending = 1; head_shared = 0;
    quiet(4, "no prefetch, even in the slave role");
    check(!have, "no permission without a read");
    head_shared = 1;
    for (int k = 0; k < 3; k++) begin
      take(OP_SEM_READ, "check before each shared command", ev);
      check(ev == 6'b100000, "check counted as a plain read");
      finish(OP_SEM_READ, 32'd0);
      #1 check(have, "permission after reading own");
      quiet(2, "no more reads while permitted");
      @(negedge clk); shared_pop = 1; @(negedge clk); shared_pop = 0; #1;
      check(!have, "permission used up by the shared command");
    end
    // no auto-release
    head_shared = 0; shared_pending = 0;
    quiet(6, "no auto release");
    // without authority: check, request, poll
    own = 0; shared_pending = 1; head_shared = 1;
    take(OP_SEM_READ, "check", ev);
    finish(OP_SEM_READ, 32'd1);
    take(OP_MBOX_REQ, "request", ev);
    check(ev == 6'b001000, "request, not a prefetch");
    finish(OP_MBOX_REQ, '0);
    take(OP_SEM_READ, "wait poll", ev);
    check(ev == 6'b110000, "poll counted as wait");
    finish(OP_SEM_READ, 32'd1);
    take(OP_SEM_READ, "wait poll 2", ev);
    finish(OP_SEM_READ, 32'd0);
    own = 1; #1;
    check(have && !req_outstanding, "permission after the wait");
    @(negedge clk); shared_pop = 1; @(negedge clk); shared_pop = 0;
    head_shared = 0; shared_pending = 0;
    // release on request still works
    mbox_pending = 1;
    take(OP_MBOX_RD, "mailbox read", ev);
    finish(OP_MBOX_RD, MBOX_REQ);
    mbox_pending = 0;
    take(OP_SEM_REL, "release on request", ev);
    check(ev == 6'b000010, "counted as release on request");
    finish(OP_SEM_REL, '0);
    own = 0;
    quiet(3, "idle afterwards");
    check(idle, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
