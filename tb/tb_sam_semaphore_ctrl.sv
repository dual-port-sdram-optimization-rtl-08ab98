// tb_sam_semaphore_ctrl: self-checking test of the semaphore control for
// port A. The testbench plays the shared bank control, the command FSM and
// the semaphore copy: it accepts each operation offered, returns read data
// and then the completion, and sets own as the semaphore copy would. It walks
// through the slave sequence (request sent ahead of the shared command, wait
// by polling once the shared command reaches the head, automatic release once
// no shared command is left), the release on the other port's request, the
// master sequence (semaphore check first, then the request, no prefetch and no
// automatic release), a request that arrives when the bank has already gone,
// and a mailbox message that is not a request.
module tb_sam_semaphore_ctrl;
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
  sam_semaphore_ctrl #(.PORT_ID(1'b0)) u_dut (.*);

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
    check(have == own, "SAM: shared commands go on the duplicated semaphore");
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
    check(idle, "idle after reset");

    // ---- slave: prefetch request
    shared_pending = 1; head_shared = 0;
    take(OP_MBOX_REQ, "slave prefetch", ev);
    check(ev == 6'b001100, "request counted as prefetch");
    check(!idle, "busy with an operation");
    finish(OP_MBOX_REQ, '0);
    check(req_outstanding, "request outstanding");
    quiet(3, "no polling while the shared command is not at the head");
    head_shared = 1;
    take(OP_SEM_READ, "slave wait", ev);
    check(ev == 6'b110000, "poll counted as wait");
    finish(OP_SEM_READ, 32'd1);
    check(req_outstanding, "still waiting after a not-own read");
    take(OP_SEM_READ, "slave wait 2", ev);
    finish(OP_SEM_READ, 32'd0);
    check(!req_outstanding, "authority seen");
    own = 1;
    quiet(3, "holds authority while shared commands remain");
    // ---- slave: auto release
    head_shared = 0; shared_pending = 0;
    take(OP_SEM_REL, "auto release", ev);
    check(ev == 6'b000001, "counted as auto release");
    finish(OP_SEM_REL, '0);
    own = 0;
    quiet(2, "nothing after release");
    check(idle, "idle after release");

    // ---- release on the other port's request
    own = 1; role_master = 1;
    mbox_pending = 1;
    take(OP_MBOX_RD, "mailbox read", ev);
    finish(OP_MBOX_RD, MBOX_REQ);
    mbox_pending = 0;
    take(OP_SEM_REL, "release on request", ev);
    check(ev == 6'b000010, "counted as release on request");
    finish(OP_SEM_REL, '0);
    own = 0;
    quiet(2, "nothing after release on request");
    check(idle, "idle after release on request");

    // ---- master: no prefetch, check then request then wait
    shared_pending = 1; head_shared = 0;
    quiet(4, "master does not prefetch");
    head_shared = 1;
    take(OP_SEM_READ, "master check", ev);
    check(ev == 6'b100000, "check is a read, not a wait");
    finish(OP_SEM_READ, 32'd1);
    take(OP_MBOX_REQ, "master request", ev);
    check(ev == 6'b001000, "master request is not a prefetch");
    finish(OP_MBOX_REQ, '0);
    take(OP_SEM_READ, "master wait", ev);
    check(ev == 6'b110000, "master poll counted as wait");
    finish(OP_SEM_READ, 32'd0);
    own = 1;
    shared_pending = 0; head_shared = 0;
    quiet(5, "master keeps authority");

    // ---- request arriving after the bank has gone
    own = 0; mbox_pending = 1;
    take(OP_MBOX_RD, "mailbox read 2", ev);
    finish(OP_MBOX_RD, MBOX_REQ);
    mbox_pending = 0;
    take(OP_SEM_READ, "semaphore read for a request", ev);
    finish(OP_SEM_READ, 32'd1);
    quiet(3, "request dropped, bank not ours");
    check(idle, "idle after dropped request");

    // ---- other mailbox message
    own = 1; mbox_pending = 1;
    take(OP_MBOX_RD, "mailbox read 3", ev);
    finish(OP_MBOX_RD, 32'h1234_5678);
    mbox_pending = 0;
    quiet(3, "no release for another message");
    check(idle, "idle after other message");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
