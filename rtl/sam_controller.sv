// sam_controller: semaphore authority management (SAM) controller for one
// port of a dual-port SDRAM.
//
// The processor queues reads and writes; the controller runs them on its port
// of the DPSDRAM and takes care of the semaphore that guards the shared bank,
// so the processor never reads the semaphore or writes the mailbox itself.
// Its parts are the ten units of the document's block diagram plus the
// configuration logic of the reconfigurable version:
//   sam_cmd_fsm (1), sam_init_fsm (2), sam_refresh_fsm (3),
//   sam_signal_path (4), sam_data_path (5), sam_cmd_fifo (6),
//   sam_shared_bank_ctrl (7), sam_semaphore_ctrl (8), sam_interrupt_ctrl (9),
//   sam_sem_reg (10), sam_config_ctrl (master/slave choice).
//
// Processor side: cmd_valid/cmd_ready push a command (write flag, bank, row,
// column) with its write data; reads return in order on rd_valid/rd_data.
// Bank SHARED_BANK is the shared bank; its top row is reserved for the
// semaphore and mailboxes. cfg_valid/cfg_master choose master or slave.
// DPSDRAM side: SDRAM command pins, a data bus of DW = 32 x BL bits with
// separate in/out and an output enable, and the active-low mailbox interrupt.
// For the DDR port (BL = 2) the two beats of a burst travel side by side in one
// 64-bit word per clock, an abstraction of the double-data-rate pins.
// SAM_EN = 0 builds the traditional controller instead (semaphore read before
// every shared-bank command, no prefetch, no auto-release), for comparisons.
// The document fixes the structure, the semaphore algorithms, the x32 ports,
// the burst lengths (SDR 1, DDR 2) and the 66 MHz clock; the SDRAM timing
// values, address widths and handshakes are this design's.
//
// Lint note: the linter reports rst_n as used both synchronously and
// asynchronously (SYNCASYNCNET) here because assertions inside the sub-blocks
// sample it on the clock to disable themselves during reset; all flip-flops
// use it only as an asynchronous reset.
module sam_controller
  import sam_pkg::*;
#(
  parameter bit          PORT_ID        = 1'b0,
  parameter int unsigned BL             = 1,
  parameter int unsigned FIFO_DEPTH     = 4,
  parameter bit          SEM_DEFAULT    = 1'b1,
  parameter bit          DEFAULT_MASTER = 1'b0,
  parameter bit          SAM_EN         = 1'b1,
  parameter int unsigned SHARED_BANK    = 3,
  parameter int unsigned INIT_WAIT      = 13200,
  parameter int unsigned INIT_REFS      = 2,
  parameter int unsigned REF_INTERVAL   = 515,
  parameter int unsigned T_RCD          = 2,
  parameter int unsigned T_RP           = 2,
  parameter int unsigned CL             = 2,
  parameter int unsigned T_WR           = 2,
  parameter int unsigned T_RFC          = 5,
  parameter int unsigned T_MRD          = 2,
  localparam int unsigned DW            = WORD_W * BL
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  proc_cmd_t         cmd,
  input  logic [DW-1:0]     cmd_wdata,
  output logic              rd_valid,
  output logic [DW-1:0]     rd_data,
  input  logic              cfg_valid,
  input  logic              cfg_master,
  output logic              role_master,
  output logic              own,
  output logic              auth_pending,   // request sent, authority not yet seen
  output logic              cfg_pending,    // role change waiting for idle
  output logic              init_done,
  output sam_events_t       events,
  // DPSDRAM port
  output logic              sd_cke,
  output logic              sd_cs_n,
  output logic              sd_ras_n,
  output logic              sd_cas_n,
  output logic              sd_we_n,
  output logic [BA_W-1:0]   sd_ba,
  output logic [ADDR_W-1:0] sd_addr,
  output logic [DW-1:0]     sd_dq_out,
  output logic              sd_dq_oe,
  input  logic [DW-1:0]     sd_dq_in,
  input  logic              sd_int_n
);
  // command FIFO
  logic       head_valid, fifo_pop, head_shared, shared_pending;
  proc_cmd_t  head_cmd;
  logic [DW-1:0] head_wdata;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  // semaphore side
  logic       sem_valid, sem_accept, mbox_pending, mbox_rd_start, irq_event;
  op_kind_e   sem_op;
  logic       semreg_load, semreg_value, rel_done, sem_idle, req_out;
  logic       ev_sem_read, ev_sem_wait, ev_request, ev_prefetch, ev_rel_req, ev_auto_rel;

  // command FSM side
  logic       acc_valid, acc_ready, shared_direct;
  logic       have;               // shared-bank commands may go
  access_t    acc;
  logic [DW-1:0] acc_wdata, fsm_wdata;
  logic       ref_req, ref_ack, ref_busy, ref_event, fsm_busy;
  pin_cmd_t   init_cmd, ref_cmd, fsm_cmd;
  logic       wr_en, rd_launch, done;
  op_kind_e   rd_kind, done_kind;
  logic       sem_rvalid;
  op_kind_e   sem_rkind;
  logic [WORD_W-1:0] sem_rdata;

  // configuration
  logic       ctrl_idle, role_event;

  sam_cmd_fifo #(.DEPTH(FIFO_DEPTH), .DW(DW), .SHARED_BANK(SHARED_BANK)) u_fifo (
    .clk, .rst_n,
    .in_valid(cmd_valid), .in_ready(cmd_ready), .in_cmd(cmd), .in_wdata(cmd_wdata),
    .out_valid(head_valid), .out_pop(fifo_pop), .out_cmd(head_cmd), .out_wdata(head_wdata),
    .head_shared, .shared_pending, .count(fifo_count));

  sam_sem_reg #(.PORT_ID(PORT_ID), .SEM_DEFAULT(SEM_DEFAULT)) u_sem_reg (
    .clk, .rst_n, .rel_done, .rd_valid(semreg_load), .rd_value(semreg_value),
    .own);

  sam_interrupt_ctrl u_irq (
    .clk, .rst_n, .int_n(sd_int_n), .rd_start(mbox_rd_start),
    .mbox_pending, .irq_event);

  sam_config_ctrl #(.DEFAULT_MASTER(DEFAULT_MASTER)) u_cfg (
    .clk, .rst_n, .cfg_valid, .cfg_master, .ctrl_idle,
    .role_master, .change_pending(cfg_pending), .role_event);

  sam_semaphore_ctrl #(.PORT_ID(PORT_ID), .SAM_EN(SAM_EN)) u_sem (
    .clk, .rst_n, .role_master, .own, .head_shared, .shared_pending, .mbox_pending,
    .shared_pop(shared_direct), .have,
    .sem_valid, .sem_op, .sem_accept,
    .done, .done_kind, .rvalid(sem_rvalid), .rkind(sem_rkind), .rdata(sem_rdata),
    .semreg_load, .semreg_value, .rel_done, .mbox_rd_start,
    .idle(sem_idle), .req_outstanding(req_out),
    .ev_sem_read, .ev_sem_wait, .ev_request, .ev_prefetch,
    .ev_release_on_req(ev_rel_req), .ev_auto_release(ev_auto_rel));

  sam_shared_bank_ctrl #(.PORT_ID(PORT_ID), .DW(DW), .SHARED_BANK(SHARED_BANK)) u_sbc (
    .clk, .rst_n, .own(have),
    .head_valid, .head_cmd, .head_wdata, .head_shared, .fifo_pop,
    .sem_valid, .sem_op, .sem_accept,
    .acc_valid, .acc_ready, .acc, .acc_wdata, .shared_direct);

  sam_init_fsm #(.INIT_WAIT(INIT_WAIT), .INIT_REFS(INIT_REFS), .T_RP(T_RP), .T_RFC(T_RFC),
                 .T_MRD(T_MRD), .BL(BL), .CL(CL)) u_init (
    .clk, .rst_n, .cmd(init_cmd), .init_done);

  sam_refresh_fsm #(.REF_INTERVAL(REF_INTERVAL), .T_RFC(T_RFC)) u_ref (
    .clk, .rst_n, .enable(init_done), .ref_req, .ref_ack, .busy(ref_busy),
    .cmd(ref_cmd), .ref_event);

  sam_cmd_fsm #(.DW(DW), .T_RCD(T_RCD), .CL(CL), .T_WR(T_WR), .T_RP(T_RP)) u_fsm (
    .clk, .rst_n, .init_done, .acc_valid, .acc_ready, .acc, .acc_wdata,
    .ref_req, .ref_ack, .ref_busy, .cmd(fsm_cmd), .wr_en, .wdata(fsm_wdata),
    .rd_launch, .rd_kind, .done, .done_kind, .busy(fsm_busy));

  sam_signal_path u_sig (
    .clk, .rst_n, .init_done, .init_cmd, .ref_busy, .ref_cmd, .fsm_cmd,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_addr);

  sam_data_path #(.DW(DW), .CL(CL)) u_dp (
    .clk, .rst_n, .wr_en, .wdata(fsm_wdata), .rd_launch, .rd_kind,
    .dq_out(sd_dq_out), .dq_oe(sd_dq_oe), .dq_in(sd_dq_in),
    .proc_rvalid(rd_valid), .proc_rdata(rd_data),
    .sem_rvalid, .sem_rkind, .sem_rdata);

  assign auth_pending = req_out;
  assign ctrl_idle = init_done && (fifo_count == '0) && !fsm_busy && sem_idle && !mbox_pending;

  always_comb begin
    events                = '0;
    events.proc_issue     = fifo_pop;
    events.shared_direct  = shared_direct;
    events.sem_read       = ev_sem_read;
    events.sem_wait       = ev_sem_wait;
    events.auth_request   = ev_request;
    events.prefetch_req   = ev_prefetch;
    events.release_on_req = ev_rel_req;
    events.auto_release   = ev_auto_rel;
    events.mbox_irq       = irq_event;
    events.refresh        = ref_event;
    events.role_change    = role_event;
  end
endmodule
