// tb_sam_interrupt_ctrl: self-checking test of the interrupt control. A
// falling int_n must show on mbox_pending exactly two clock edges later with a
// one-cycle irq_event; after the mailbox read starts, the request stays masked
// while int_n is still low and until it has been seen high; a second
// interrupt is then reported again.
module tb_sam_interrupt_ctrl;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic int_n = 1, rd_start = 0, mbox_pending, irq_event;
  sam_interrupt_ctrl u_dut (.*);
  int events = 0;
  always @(posedge clk) if (rst_n && irq_event) events++;

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; #1;
    tick(); check(!mbox_pending, "idle");
    int_n = 0;
    tick(); check(!mbox_pending, "not yet after one edge");
    tick(); check(mbox_pending && irq_event, "pending two edges after int_n fell");
    tick(); check(mbox_pending && !irq_event, "event is one cycle");
    rd_start = 1; tick(); rd_start = 0;
    check(!mbox_pending, "masked once the read started");
    repeat (3) tick();
    check(!mbox_pending, "still masked while int_n is low");
    int_n = 1; repeat (3) tick();
    check(!mbox_pending, "cleared");
    int_n = 0; repeat (2) tick();
    check(mbox_pending, "second interrupt reported");
    int_n = 1; repeat (3) tick();
    check(events == 2, $sformatf("two interrupt events, got %0d", events));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
