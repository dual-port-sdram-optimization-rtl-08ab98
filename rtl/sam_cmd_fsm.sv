// sam_cmd_fsm: command FSM of the SAM controller.
//
// Executes one access to the DPSDRAM at a time, whatever it is for (a
// processor read or write, or a semaphore or mailbox access for the semaphore
// control): BANK ACTIVE, T_RCD cycles later READ or WRITE with auto-precharge
// (A10 high), then it waits until the bank is precharged again and, for a
// read, until the data has been captured, and pulses done. Every access thus
// leaves all banks closed (closed-page policy), so an AUTO REFRESH can follow
// any access directly: when the refresh FSM asks, the FSM acknowledges between
// accesses and stays off the pins until the refresh is over.
//
// Interface: acc_valid/acc_ready handshake for an access (acc_ready is high
// only in IDLE, after initialization and with no refresh waiting); cmd is the
// command wanted on the pins next cycle; wr_en/rd_launch tell the data path
// when WRITE/READ leaves; done/done_kind pulse in the access's last cycle.
// Occupancy: from the cycle an access is accepted to the next cycle one can be
// accepted, a read takes T_RCD + CL + T_RP + 2 cycles (8 at the defaults) and
// a write T_RCD + T_WR + T_RP + 1 (7). The document names this FSM (its table
// swaps the descriptions of the command and the initialization FSMs; this one
// handles the read/write commands); the sequence and the timing values
// (66 MHz, x32 SDRAM) are this design's.
//
// Lint note: rst_n is both the asynchronous reset of the flip-flops and the
// disable condition of the assertion below, which samples it on the clock;
// the linter reports that double use (SYNCASYNCNET). It is intended and
// touches simulation checks only.
//
// Lint note: the row address of the current access is needed only with
// ACTIVE, which leaves in the cycle the access is accepted, straight from the
// input; the stored copy's row bits are therefore unread (UNUSEDSIGNAL). The
// whole access record is kept for clarity.
module sam_cmd_fsm
  import sam_pkg::*;
#(
  parameter int unsigned DW    = 32,
  parameter int unsigned T_RCD = 2,
  parameter int unsigned CL    = 2,
  parameter int unsigned T_WR  = 2,
  parameter int unsigned T_RP  = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init_done,
  input  logic          acc_valid,
  output logic          acc_ready,
  input  access_t       acc,
  input  logic [DW-1:0] acc_wdata,
  input  logic          ref_req,
  output logic          ref_ack,
  input  logic          ref_busy,
  output pin_cmd_t      cmd,
  output logic          wr_en,
  output logic [DW-1:0] wdata,
  output logic          rd_launch,
  output op_kind_e      rd_kind,
  output logic          done,
  output op_kind_e      done_kind,
  output logic          busy
);
  typedef enum logic [2:0] {S_IDLE, S_RCD, S_RW, S_POST, S_REF} state_e;

  localparam int unsigned RD_POST = CL + 1 + ((T_RP > 0) ? T_RP : 1);
  localparam int unsigned WR_POST = ((T_WR + T_RP) > 0) ? (T_WR + T_RP) : 1;
  localparam int unsigned CW      = $clog2(RD_POST + WR_POST + T_RCD + 2);

  state_e         state;
  logic [CW-1:0]  cnt;
  access_t        cur;
  logic [DW-1:0]  cur_wdata;

  assign acc_ready = (state == S_IDLE) && init_done && !ref_req;
  assign ref_ack   = (state == S_IDLE) && init_done && ref_req;
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      cur       <= '0;
      cur_wdata <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (ref_ack) begin
            state <= S_REF;
          end else if (acc_valid && acc_ready) begin
            cur       <= acc;
            cur_wdata <= acc_wdata;
            cnt       <= CW'(T_RCD > 1 ? T_RCD - 1 : 0);
            state     <= (T_RCD > 1) ? S_RCD : S_RW;
          end
        end
        S_RCD: begin
          if (cnt == CW'(1)) state <= S_RW;
          cnt <= cnt - CW'(1);
        end
        S_RW: begin
          cnt   <= cur.write ? CW'(WR_POST) : CW'(RD_POST);
          state <= S_POST;
        end
        S_POST: begin
          if (cnt == CW'(1)) state <= S_IDLE;
          cnt <= cnt - CW'(1);
        end
        S_REF: begin
          // the refresh FSM is busy from the cycle after the acknowledge
          if (!ref_busy) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    cmd       = PIN_NOP;
    wr_en     = 1'b0;
    rd_launch = 1'b0;
    if (state == S_IDLE && acc_valid && acc_ready) begin
      cmd.cmd  = SD_ACT;
      cmd.ba   = acc.bank;
      cmd.addr = acc.row;
    end else if (state == S_RW) begin
      cmd.cmd      = cur.write ? SD_WR : SD_RD;
      cmd.ba       = cur.bank;
      cmd.addr     = ADDR_W'(cur.col);
      cmd.addr[10] = 1'b1;              // auto-precharge
      wr_en        = cur.write;
      rd_launch    = !cur.write;
    end
  end

  assign wdata     = cur_wdata;
  assign rd_kind   = cur.kind;
  assign done      = (state == S_POST) && (cnt == CW'(1));
  assign done_kind = cur.kind;

  // The refresh FSM must have let go of the pins before an access starts.
  assert property (@(posedge clk) disable iff (!rst_n) (acc_valid && acc_ready) |-> !ref_busy);
endmodule
