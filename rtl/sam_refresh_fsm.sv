// sam_refresh_fsm: refresh FSM of the SAM controller.
//
// Keeps the DPSDRAM port refreshed: a timer counts REF_INTERVAL cycles after
// initialization and then raises ref_req. The command FSM answers with a
// one-cycle ref_ack when no access is in progress (all banks are precharged,
// since every access uses auto-precharge); this FSM then drives one AUTO
// REFRESH on the pins and holds busy for T_RFC more cycles, after which the
// command FSM may continue. Requests that pile up while one waits are not
// counted twice; the timer restarts when the refresh is issued. The document
// only states the function; the interval (7.8 us at 66 MHz = 515 cycles) and
// the request/acknowledge handshake are this design's choices.
module sam_refresh_fsm
  import sam_pkg::*;
#(
  parameter int unsigned REF_INTERVAL = 515,
  parameter int unsigned T_RFC        = 5
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enable,     // init done
  output logic     ref_req,
  input  logic     ref_ack,
  output logic     busy,
  output pin_cmd_t cmd,
  output logic     ref_event
);
  localparam int unsigned TW = $clog2(REF_INTERVAL + T_RFC + 2);

  logic [TW-1:0] timer;
  logic [TW-1:0] wait_cnt;
  logic          req_q, issue_q, wait_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer    <= TW'(REF_INTERVAL);
      wait_cnt <= '0;
      req_q    <= 1'b0;
      issue_q  <= 1'b0;
      wait_q   <= 1'b0;
    end else if (enable) begin
      issue_q <= 1'b0;
      if (req_q && ref_ack) begin
        req_q   <= 1'b0;
        issue_q <= 1'b1;
        timer   <= TW'(REF_INTERVAL);
      end else if (timer == '0) begin
        req_q <= 1'b1;
      end else begin
        timer <= timer - TW'(1);
      end
      if (issue_q) begin
        wait_q   <= (T_RFC != 0);
        wait_cnt <= TW'(T_RFC);
      end else if (wait_q) begin
        if (wait_cnt == TW'(1)) wait_q <= 1'b0;
        wait_cnt <= wait_cnt - TW'(1);
      end
    end
  end

  assign ref_req   = req_q;
  assign busy      = issue_q || wait_q;
  assign ref_event = issue_q;

  always_comb begin
    cmd = PIN_NOP;
    if (issue_q) cmd.cmd = SD_REF;
  end
endmodule
