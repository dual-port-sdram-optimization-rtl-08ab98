// sam_shared_bank_ctrl: shared bank control of the SAM controller.
//
// Sits between the command FIFO, the semaphore control and the command FSM and
// decides which access the command FSM gets next:
//   * a semaphore operation asked for by the semaphore control goes first; this
//     block turns it into an access to the reserved register row of the shared
//     bank (semaphore read, release write, mailbox request write, mailbox read);
//   * otherwise the head of the command FIFO goes, if it targets a dedicated
//     bank, or the shared bank while the duplicated semaphore (sem_reg) says
//     this port holds authority. No semaphore read is needed for that check,
//     which is the point of the duplicated register.
// A shared-bank head without authority simply waits; the semaphore control is
// then busy getting authority. The document gives the job ("handle commands
// for accessing the shared bank"); the priority order is this design's.
//
// Interface: combinational; acc_valid/acc_ready towards the command FSM,
// fifo_pop and sem_accept are high in the cycle the access is accepted.
module sam_shared_bank_ctrl
  import sam_pkg::*;
#(
  parameter bit          PORT_ID     = 1'b0,
  parameter int unsigned DW          = 32,
  parameter int unsigned SHARED_BANK = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            own,
  // command FIFO head
  input  logic            head_valid,
  input  proc_cmd_t       head_cmd,
  input  logic [DW-1:0]   head_wdata,
  input  logic            head_shared,
  output logic            fifo_pop,
  // semaphore control
  input  logic            sem_valid,
  input  op_kind_e        sem_op,
  output logic            sem_accept,
  // command FSM
  output logic            acc_valid,
  input  logic            acc_ready,
  output access_t         acc,
  output logic [DW-1:0]   acc_wdata,
  // events
  output logic            shared_direct
);
  localparam logic [BA_W-1:0]  SB       = BA_W'(SHARED_BANK);
  localparam logic [COL_W-1:0] MBOX_OUT = PORT_ID ? COL_MBOX_BA : COL_MBOX_AB;
  localparam logic [COL_W-1:0] MBOX_IN  = PORT_ID ? COL_MBOX_AB : COL_MBOX_BA;

  logic    head_go;
  access_t sem_acc;
  logic [DW-1:0] sem_wdata;

  assign head_go = head_valid && (!head_shared || own);

  always_comb begin
    sem_acc      = '0;
    sem_acc.kind = sem_op;
    sem_acc.bank = SB;
    sem_acc.row  = ROW_SPECIAL;
    sem_wdata    = '0;
    unique case (sem_op)
      OP_SEM_READ: begin sem_acc.col = COL_SEM; end
      OP_SEM_REL:  begin sem_acc.col = COL_SEM; sem_acc.write = 1'b1; sem_wdata[0] = !PORT_ID; end
      OP_MBOX_REQ: begin sem_acc.col = MBOX_OUT; sem_acc.write = 1'b1; sem_wdata[WORD_W-1:0] = MBOX_REQ; end
      OP_MBOX_RD:  begin sem_acc.col = MBOX_IN; end
      default:     ;
    endcase
  end

  always_comb begin
    acc_valid = sem_valid || head_go;
    if (sem_valid) begin
      acc       = sem_acc;
      acc_wdata = sem_wdata;
    end else begin
      acc       = '{kind: OP_PROC, write: head_cmd.write, bank: head_cmd.bank,
                    row: head_cmd.row, col: head_cmd.col};
      acc_wdata = head_wdata;
    end
    sem_accept    = sem_valid && acc_ready;
    fifo_pop      = !sem_valid && head_go && acc_ready;
    shared_direct = fifo_pop && head_shared;
  end

  // A processor command reaches the shared bank only with authority.
  assert property (@(posedge clk) disable iff (!rst_n) (fifo_pop && head_shared) |-> own);
endmodule
