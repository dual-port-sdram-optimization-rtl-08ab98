// sam_dual_port_system: the two SAM controllers that connect two processors
// to one dual-port SDRAM (OneDRAM-style).
//
// Port A serves the baseband processor over an SDR x32 port (burst length 1);
// port B serves the application processor over a DDR x32 port (burst length
// 2, carried as one 64-bit word per clock). Each controller can act as master
// or slave; by default port A is the slave and port B the master, the pairing
// the document found fastest for data flowing from the baseband to the
// application processor, and the DPSDRAM's semaphore is expected to boot at 1
// (port B owns the shared bank). Both controllers and their configuration
// logic are reconfigurable at run time through the cfg inputs.
//
// SAM_EN = 0 builds both controllers as traditional controllers (the
// comparison baseline: a semaphore read before every shared-bank command, no
// prefetch, no auto-release).
//
// The DPSDRAM itself is not part of this RTL: both of its ports, with the
// mailbox interrupts, are brought out. Everything runs on one clock (the
// document's measurements use 66 MHz for both ports and both controllers).
//
// Lint note: the linter reports rst_n as used both synchronously and
// asynchronously (SYNCASYNCNET) here because assertions inside the sub-blocks
// sample it on the clock to disable themselves during reset; all flip-flops
// use it only as an asynchronous reset.
module sam_dual_port_system
  import sam_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH   = 4,
  parameter bit          SEM_DEFAULT  = 1'b1,
  parameter int unsigned BL_A         = 1,
  parameter int unsigned BL_B         = 2,
  parameter bit          A_MASTER     = 1'b0,
  parameter bit          B_MASTER     = 1'b1,
  parameter int unsigned SHARED_BANK  = 3,
  parameter int unsigned INIT_WAIT    = 13200,
  parameter int unsigned REF_INTERVAL = 515,
  parameter bit          SAM_EN       = 1'b1,   // 0: traditional controllers, for comparison
  localparam int unsigned DWA         = WORD_W * BL_A,
  localparam int unsigned DWB         = WORD_W * BL_B
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---- port A: baseband processor side
  input  logic              a_cmd_valid,
  output logic              a_cmd_ready,
  input  proc_cmd_t         a_cmd,
  input  logic [DWA-1:0]    a_cmd_wdata,
  output logic              a_rd_valid,
  output logic [DWA-1:0]    a_rd_data,
  input  logic              a_cfg_valid,
  input  logic              a_cfg_master,
  output logic              a_role_master,
  output logic              a_own,
  output logic              a_auth_pending,
  output logic              a_cfg_pending,
  output logic              a_init_done,
  output sam_events_t       a_events,
  // ---- port A: DPSDRAM side
  output logic              a_sd_cke,
  output logic              a_sd_cs_n,
  output logic              a_sd_ras_n,
  output logic              a_sd_cas_n,
  output logic              a_sd_we_n,
  output logic [BA_W-1:0]   a_sd_ba,
  output logic [ADDR_W-1:0] a_sd_addr,
  output logic [DWA-1:0]    a_sd_dq_out,
  output logic              a_sd_dq_oe,
  input  logic [DWA-1:0]    a_sd_dq_in,
  input  logic              a_sd_int_n,
  // ---- port B: application processor side
  input  logic              b_cmd_valid,
  output logic              b_cmd_ready,
  input  proc_cmd_t         b_cmd,
  input  logic [DWB-1:0]    b_cmd_wdata,
  output logic              b_rd_valid,
  output logic [DWB-1:0]    b_rd_data,
  input  logic              b_cfg_valid,
  input  logic              b_cfg_master,
  output logic              b_role_master,
  output logic              b_own,
  output logic              b_auth_pending,
  output logic              b_cfg_pending,
  output logic              b_init_done,
  output sam_events_t       b_events,
  // ---- port B: DPSDRAM side
  output logic              b_sd_cke,
  output logic              b_sd_cs_n,
  output logic              b_sd_ras_n,
  output logic              b_sd_cas_n,
  output logic              b_sd_we_n,
  output logic [BA_W-1:0]   b_sd_ba,
  output logic [ADDR_W-1:0] b_sd_addr,
  output logic [DWB-1:0]    b_sd_dq_out,
  output logic              b_sd_dq_oe,
  input  logic [DWB-1:0]    b_sd_dq_in,
  input  logic              b_sd_int_n
);
  sam_controller #(
    .PORT_ID(1'b0), .BL(BL_A), .FIFO_DEPTH(FIFO_DEPTH), .SEM_DEFAULT(SEM_DEFAULT),
    .DEFAULT_MASTER(A_MASTER), .SHARED_BANK(SHARED_BANK),
    .INIT_WAIT(INIT_WAIT), .REF_INTERVAL(REF_INTERVAL), .SAM_EN(SAM_EN)
  ) u_port_a (
    .clk, .rst_n,
    .cmd_valid(a_cmd_valid), .cmd_ready(a_cmd_ready), .cmd(a_cmd), .cmd_wdata(a_cmd_wdata),
    .rd_valid(a_rd_valid), .rd_data(a_rd_data),
    .cfg_valid(a_cfg_valid), .cfg_master(a_cfg_master), .role_master(a_role_master),
    .own(a_own), .auth_pending(a_auth_pending), .cfg_pending(a_cfg_pending), .init_done(a_init_done), .events(a_events),
    .sd_cke(a_sd_cke), .sd_cs_n(a_sd_cs_n), .sd_ras_n(a_sd_ras_n), .sd_cas_n(a_sd_cas_n),
    .sd_we_n(a_sd_we_n), .sd_ba(a_sd_ba), .sd_addr(a_sd_addr),
    .sd_dq_out(a_sd_dq_out), .sd_dq_oe(a_sd_dq_oe), .sd_dq_in(a_sd_dq_in), .sd_int_n(a_sd_int_n));

  sam_controller #(
    .PORT_ID(1'b1), .BL(BL_B), .FIFO_DEPTH(FIFO_DEPTH), .SEM_DEFAULT(SEM_DEFAULT),
    .DEFAULT_MASTER(B_MASTER), .SHARED_BANK(SHARED_BANK),
    .INIT_WAIT(INIT_WAIT), .REF_INTERVAL(REF_INTERVAL), .SAM_EN(SAM_EN)
  ) u_port_b (
    .clk, .rst_n,
    .cmd_valid(b_cmd_valid), .cmd_ready(b_cmd_ready), .cmd(b_cmd), .cmd_wdata(b_cmd_wdata),
    .rd_valid(b_rd_valid), .rd_data(b_rd_data),
    .cfg_valid(b_cfg_valid), .cfg_master(b_cfg_master), .role_master(b_role_master),
    .own(b_own), .auth_pending(b_auth_pending), .cfg_pending(b_cfg_pending), .init_done(b_init_done), .events(b_events),
    .sd_cke(b_sd_cke), .sd_cs_n(b_sd_cs_n), .sd_ras_n(b_sd_ras_n), .sd_cas_n(b_sd_cas_n),
    .sd_we_n(b_sd_we_n), .sd_ba(b_sd_ba), .sd_addr(b_sd_addr),
    .sd_dq_out(b_sd_dq_out), .sd_dq_oe(b_sd_dq_oe), .sd_dq_in(b_sd_dq_in), .sd_int_n(b_sd_int_n));
endmodule
