// sam_interrupt_ctrl: interrupt control of the SAM controller.
//
// The DPSDRAM raises the active-low int_n of a port when the other port writes
// the mailbox, and keeps it low until this port reads the mailbox (document).
// This block synchronises int_n with two flip-flops (the device and the
// controller need not share a clock), and raises mbox_pending to ask the
// semaphore control for one mailbox read. Once that read is accepted
// (rd_start) the request is masked until the synchronised interrupt has gone
// high again, so one interrupt never causes two reads. The synchroniser depth
// and the masking are this design's choices.
//
// Timing: a falling int_n shows on mbox_pending two clock edges later;
// irq_event pulses for one cycle at that point.
module sam_interrupt_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic int_n,
  input  logic rd_start,
  output logic mbox_pending,
  output logic irq_event
);
  logic [1:0] sync_q;     // sync_q[1] is the synchronised active-high interrupt
  logic       seen_q;     // previous value of sync_q[1]
  logic       mask_q;     // read issued, waiting for the interrupt to clear

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q <= '0;
      seen_q <= 1'b0;
      mask_q <= 1'b0;
    end else begin
      sync_q <= {sync_q[0], !int_n};
      seen_q <= sync_q[1];
      if (rd_start)       mask_q <= 1'b1;
      else if (!sync_q[1]) mask_q <= 1'b0;
    end
  end

  assign mbox_pending = sync_q[1] && !mask_q;
  assign irq_event    = sync_q[1] && !seen_q;
endmodule
