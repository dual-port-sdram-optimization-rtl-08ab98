// sam_signal_path: signal path of the SAM controller.
//
// Generates the DPSDRAM control pins (CKE, CS#, RAS#, CAS#, WE#, bank and
// address). It picks the command of the FSM that owns the pins this cycle,
// the initialization FSM until init_done, then the refresh FSM while it is
// busy, otherwise the command FSM, and registers it, so every pin changes on
// the clock edge and a command reaches the device one cycle after the FSM
// decided it. A source that has nothing to say offers NOP. The document names
// the block and its job; the priority order and the output register are this
// design's choices. CKE is held low during reset and high afterwards.
module sam_signal_path
  import sam_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init_done,
  input  pin_cmd_t          init_cmd,
  input  logic              ref_busy,
  input  pin_cmd_t          ref_cmd,
  input  pin_cmd_t          fsm_cmd,
  output logic              sd_cke,
  output logic              sd_cs_n,
  output logic              sd_ras_n,
  output logic              sd_cas_n,
  output logic              sd_we_n,
  output logic [BA_W-1:0]   sd_ba,
  output logic [ADDR_W-1:0] sd_addr
);
  pin_cmd_t sel, q;

  always_comb begin
    if (!init_done)    sel = init_cmd;
    else if (ref_busy) sel = ref_cmd;
    else               sel = fsm_cmd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q      <= PIN_NOP;
      sd_cke <= 1'b0;
    end else begin
      q      <= sel;
      sd_cke <= 1'b1;
    end
  end

  assign {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} = q.cmd;
  assign sd_ba   = q.ba;
  assign sd_addr = q.addr;
endmodule
