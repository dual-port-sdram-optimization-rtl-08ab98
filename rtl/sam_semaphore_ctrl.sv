// sam_semaphore_ctrl: semaphore control of the SAM controller.
//
// Runs the semaphore procedures that keep the two ports from using the shared
// bank at the same time, with the three SAM algorithms:
//   * duplication of the semaphore register: authority is judged from the
//     local copy (sam_sem_reg); the device semaphore is read only while this
//     port lacks authority;
//   * adaptive command prefetching (slave role): as soon as any queued command
//     targets the shared bank and this port lacks authority, an authority
//     request is sent, even while dedicated-bank commands are still ahead of
//     it in the FIFO; those run while the other port releases, and the
//     semaphore is read (waited on) only once the shared command reaches the
//     head;
//   * auto-release of authority (slave role): once this port holds authority
//     and no queued command targets the shared bank any more, authority is
//     given back without being asked for.
// The master role keeps authority until the other port asks for it and asks
// only when the shared command is at the head. Because the slave may have
// released without telling, a master that lacks authority first reads the
// semaphore and sends a request only if it still lacks it.
// Both roles give authority away (release write) when the other port's
// request arrives in the mailbox; a port that is asked but finds by reading
// the semaphore that it no longer holds authority drops the request.
//
// One operation at a time: sem_valid/sem_op ask the shared bank control for
// an access; the operation counts as finished at the command FSM's done.
// Priority: mailbox read, release on request, auto-release, authority check,
// request, wait poll. The algorithms, the master/slave split and the
// request/release sequence follow the document; the priority order, the
// drop rule and the master's initial check are this design's.
//
// SAM_EN = 0 turns the block into the traditional controller the document
// compares against: a semaphore read before every shared-bank command (the
// permission it gives, "have", is used up by that one command, shared_pop),
// no prefetch and no automatic release whatever the role, a request only
// when the shared command is at the head, release only on request. With
// SAM_EN = 1, "have" is simply the duplicated semaphore's own.
//
// Lint note: rst_n is both the asynchronous reset of the flip-flops and the
// disable condition of the assertion below, which samples it on the clock;
// the linter reports that double use (SYNCASYNCNET). It is intended and
// touches simulation checks only.
module sam_semaphore_ctrl
  import sam_pkg::*;
#(
  parameter bit PORT_ID = 1'b0,
  parameter bit SAM_EN  = 1'b1   // 0: traditional controller, for comparison
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              role_master,
  input  logic              own,
  input  logic              head_shared,
  input  logic              shared_pending,
  input  logic              mbox_pending,
  input  logic              shared_pop,     // a shared-bank command left the FIFO
  output logic              have,           // shared-bank commands may go
  // towards the shared bank control
  output logic              sem_valid,
  output op_kind_e          sem_op,
  input  logic              sem_accept,
  // completion and read data
  input  logic              done,
  input  op_kind_e          done_kind,
  input  logic              rvalid,
  input  op_kind_e          rkind,
  input  logic [WORD_W-1:0] rdata,
  // towards sem_reg and the interrupt control
  output logic              semreg_load,
  output logic              semreg_value,
  output logic              rel_done,
  output logic              mbox_rd_start,
  // status
  output logic              idle,
  output logic              req_outstanding,
  output logic              ev_sem_read,
  output logic              ev_sem_wait,
  output logic              ev_request,
  output logic              ev_prefetch,
  output logic              ev_release_on_req,
  output logic              ev_auto_release
);
  logic op_busy;      // an operation has been accepted and is not done
  logic req_out;      // request sent, authority not yet seen
  logic checked;      // master: semaphore read, still without authority
  logic rel_pending;  // the other port asked for authority
  logic need;
  logic perm;         // traditional mode: semaphore read showed authority
  logic master_like;  // no prefetch, no auto-release, check before request

  assign master_like = role_master || !SAM_EN;
  assign need        = master_like ? head_shared : shared_pending;
  // SAM trusts the duplicated semaphore; the traditional controller needs a
  // fresh semaphore read for every shared-bank command.
  assign have        = SAM_EN ? own : perm;

  always_comb begin
    sem_valid = 1'b0;
    sem_op    = OP_SEM_READ;
    if (!op_busy) begin
      if (mbox_pending) begin
        sem_valid = 1'b1; sem_op = OP_MBOX_RD;
      end else if (rel_pending) begin
        sem_valid = 1'b1; sem_op = own ? OP_SEM_REL : OP_SEM_READ;
      end else if (!master_like && own && !shared_pending) begin
        sem_valid = 1'b1; sem_op = OP_SEM_REL;
      end else if (!have && need) begin
        if (!req_out) begin
          sem_valid = 1'b1;
          sem_op    = (master_like && !checked) ? OP_SEM_READ : OP_MBOX_REQ;
        end else if (head_shared) begin
          sem_valid = 1'b1; sem_op = OP_SEM_READ;
        end
      end
    end
  end

  logic sem_rd_back;
  assign sem_rd_back  = rvalid && (rkind == OP_SEM_READ);
  assign semreg_load  = sem_rd_back;
  assign semreg_value = rdata[0];
  assign rel_done     = done && (done_kind == OP_SEM_REL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_busy     <= 1'b0;
      req_out     <= 1'b0;
      checked     <= 1'b0;
      rel_pending <= 1'b0;
      perm        <= 1'b0;
    end else begin
      if (sem_rd_back && rdata[0] == PORT_ID) perm <= 1'b1;
      else if (shared_pop || rel_done || sem_rd_back) perm <= 1'b0;

      if (sem_accept) op_busy <= 1'b1;
      else if (done && done_kind != OP_PROC) op_busy <= 1'b0;

      if (sem_rd_back) begin
        if (rdata[0] == PORT_ID) begin
          req_out <= 1'b0;
          checked <= 1'b0;
        end else begin
          if (!req_out) checked <= 1'b1;
          rel_pending <= 1'b0;   // asked, but the bank is no longer ours
        end
      end
      if (rvalid && rkind == OP_MBOX_RD && rdata == MBOX_REQ) rel_pending <= 1'b1;
      if (rel_done) rel_pending <= 1'b0;
      if (done && done_kind == OP_MBOX_REQ) begin
        req_out <= 1'b1;
        checked <= 1'b0;
      end
    end
  end

  assign mbox_rd_start     = sem_accept && sem_op == OP_MBOX_RD;
  assign idle              = !op_busy && !rel_pending && !req_out;
  assign req_outstanding   = req_out;
  assign ev_sem_read       = sem_accept && sem_op == OP_SEM_READ;
  assign ev_sem_wait       = ev_sem_read && req_out;
  assign ev_request        = sem_accept && sem_op == OP_MBOX_REQ;
  assign ev_prefetch       = ev_request && !head_shared;
  assign ev_release_on_req = sem_accept && sem_op == OP_SEM_REL && rel_pending;
  assign ev_auto_release   = sem_accept && sem_op == OP_SEM_REL && !rel_pending;

  // Never ask the other port for authority while holding it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (sem_accept && sem_op == OP_MBOX_REQ) |-> !own);
endmodule
