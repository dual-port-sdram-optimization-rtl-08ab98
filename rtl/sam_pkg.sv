// sam_pkg: types and constants shared by the semaphore authority management
// (SAM) controller.
//
// A dual-port SDRAM (DPSDRAM, e.g. OneDRAM) has banks dedicated to each port
// and one shared bank. Only the port that holds the 1-bit semaphore may use
// the shared bank; semaphore value 0 gives the bank to port A, value 1 to
// port B. Two 32-bit mailboxes (A->B and B->A) carry authority requests and
// raise an interrupt at the reading port. The semaphore polarity and the
// 32-bit mailbox width follow the device description; everything else here is
// this design's own choice:
//   * bank/row/column widths (2/13/9 bits),
//   * the semaphore and mailboxes live in the top row of the shared bank at
//     columns 0, 1 (A->B) and 2 (B->A) and are reached with ordinary
//     ACTIVE + READ/WRITE commands; processors must not use that row,
//   * the request message code written into a mailbox,
//   * the SDRAM command encoding is the JEDEC {CS#,RAS#,CAS#,WE#} truth table.
//
// Lint note: a module that imports this package and does not use every
// constant gets unused-parameter warnings (UNUSEDPARAM) for the rest; they are
// harmless.
package sam_pkg;

  localparam int BA_W   = 2;
  localparam int ROW_W  = 13;
  localparam int COL_W  = 9;
  localparam int ADDR_W = ROW_W;        // address pins carry row or column
  localparam int WORD_W = 32;           // x32 organisation on both ports

  // Reserved row/columns holding the semaphore and mailbox registers.
  localparam logic [ROW_W-1:0] ROW_SPECIAL = '1;
  localparam logic [COL_W-1:0] COL_SEM     = COL_W'(0);
  localparam logic [COL_W-1:0] COL_MBOX_AB = COL_W'(1);
  localparam logic [COL_W-1:0] COL_MBOX_BA = COL_W'(2);

  // Mailbox message meaning "please release the shared bank to me".
  localparam logic [WORD_W-1:0] MBOX_REQ = 32'h5EA0_0001;

  // JEDEC SDRAM commands, encoded as {cs_n, ras_n, cas_n, we_n}.
  typedef enum logic [3:0] {
    SD_LMR  = 4'b0000,   // load mode register
    SD_REF  = 4'b0001,   // auto refresh
    SD_PRE  = 4'b0010,   // precharge (A10=1: all banks)
    SD_ACT  = 4'b0011,   // bank activate
    SD_WR   = 4'b0100,   // write (A10=1: auto precharge)
    SD_RD   = 4'b0101,   // read  (A10=1: auto precharge)
    SD_NOP  = 4'b0111,   // no operation
    SD_DESL = 4'b1111    // deselect
  } sd_cmd_e;

  // One command on the pins: command, bank and address bus.
  typedef struct packed {
    sd_cmd_e              cmd;
    logic [BA_W-1:0]      ba;
    logic [ADDR_W-1:0]    addr;
  } pin_cmd_t;

  localparam pin_cmd_t PIN_NOP = '{cmd: SD_NOP, ba: '0, addr: '0};

  // A processor command as queued in the command FIFO (data kept apart
  // because its width depends on the port's burst length).
  typedef struct packed {
    logic                 write;
    logic [BA_W-1:0]      bank;
    logic [ROW_W-1:0]     row;
    logic [COL_W-1:0]     col;
  } proc_cmd_t;

  // What an access executed by the command FSM is for.
  typedef enum logic [2:0] {
    OP_PROC     = 3'd0,  // processor read/write
    OP_SEM_READ = 3'd1,  // read semaphore (check or wait-poll)
    OP_SEM_REL  = 3'd2,  // write semaphore: give the bank to the other port
    OP_MBOX_REQ = 3'd3,  // write authority request into the outgoing mailbox
    OP_MBOX_RD  = 3'd4   // read the incoming mailbox (clears its interrupt)
  } op_kind_e;

  // One access handed to the command FSM.
  typedef struct packed {
    op_kind_e             kind;
    logic                 write;
    logic [BA_W-1:0]      bank;
    logic [ROW_W-1:0]     row;
    logic [COL_W-1:0]     col;
  } access_t;

  // One-cycle event pulses, for bandwidth/latency monitors and tests.
  typedef struct packed {
    logic proc_issue;      // a processor command started
    logic shared_direct;   // a shared-bank command started on sem_reg alone
    logic sem_read;        // a semaphore read started
    logic sem_wait;        // a semaphore read made while waiting after a request
    logic auth_request;    // an authority request (mailbox write) started
    logic prefetch_req;    // ... made while the head command was not shared
    logic release_on_req;  // authority released because the other port asked
    logic auto_release;    // authority released without a request
    logic mbox_irq;        // mailbox interrupt seen
    logic refresh;         // auto refresh issued
    logic role_change;     // master/slave role switched
  } sam_events_t;

endpackage
