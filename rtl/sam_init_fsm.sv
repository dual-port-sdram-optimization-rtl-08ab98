// sam_init_fsm: initialization FSM of the SAM controller.
//
// Runs the JEDEC SDRAM power-up sequence on its port of the DPSDRAM once after
// reset: wait INIT_WAIT cycles with NOPs, PRECHARGE ALL, INIT_REFS auto
// refreshes (each followed by T_RFC cycles), LOAD MODE REGISTER, T_MRD cycles,
// then init_done rises and stays high. The document only says that the
// controller follows the JEDEC standard and that this FSM handles
// initialization; the step list is the standard one and the counts are this
// design's defaults (200 us at 66 MHz, two refreshes). The mode register gets
// sequential bursts of length BL (1 for the SDR port, 2 for the DDR port, as
// in the document's measurements) and CAS latency CL.
//
// Interface: cmd is the command this FSM wants on the pins in the next cycle;
// the signal path uses it while init_done is low.
module sam_init_fsm
  import sam_pkg::*;
#(
  parameter int unsigned INIT_WAIT = 13200,
  parameter int unsigned INIT_REFS = 2,
  parameter int unsigned T_RP      = 2,
  parameter int unsigned T_RFC     = 5,
  parameter int unsigned T_MRD     = 2,
  parameter int unsigned BL        = 1,
  parameter int unsigned CL        = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  output pin_cmd_t cmd,
  output logic     init_done
);
  typedef enum logic [2:0] {S_WAIT, S_PALL, S_REF, S_LMR, S_DONE} state_e;

  localparam int unsigned CW = $clog2(INIT_WAIT + T_RP + T_RFC + T_MRD + 2);

  state_e          state;
  logic [CW-1:0]   cnt;        // cycles left in the current step
  logic [3:0]      refs_left;

  // Mode register: A2..A0 burst length code, A3 sequential, A6..A4 CAS latency.
  function automatic logic [ADDR_W-1:0] mode_word();
    logic [2:0] blc;
    blc = (BL >= 8) ? 3'd3 : (BL >= 4) ? 3'd2 : (BL >= 2) ? 3'd1 : 3'd0;
    return ADDR_W'({3'(CL), 1'b0, blc});
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_WAIT;
      cnt       <= CW'(INIT_WAIT);
      refs_left <= 4'(INIT_REFS);
    end else if (cnt != '0) begin
      cnt <= cnt - CW'(1);
    end else begin
      unique case (state)
        S_WAIT: begin state <= S_PALL; end
        S_PALL: begin state <= (INIT_REFS == 0) ? S_LMR : S_REF; cnt <= CW'(T_RP); end
        S_REF: begin
          cnt       <= CW'(T_RFC);
          refs_left <= refs_left - 4'd1;
          if (refs_left == 4'd1) state <= S_LMR;
        end
        S_LMR:  begin state <= S_DONE; cnt <= CW'(T_MRD); end
        S_DONE: ;
        default: state <= S_WAIT;
      endcase
    end
  end

  always_comb begin
    cmd = PIN_NOP;
    if (cnt == '0) begin
      unique case (state)
        S_PALL: begin cmd.cmd = SD_PRE; cmd.addr[10] = 1'b1; end
        S_REF:  cmd.cmd = SD_REF;
        S_LMR:  begin cmd.cmd = SD_LMR; cmd.addr = mode_word(); end
        default: ;
      endcase
    end
  end

  assign init_done = (state == S_DONE) && (cnt == '0);
endmodule
