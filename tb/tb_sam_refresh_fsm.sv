// tb_sam_refresh_fsm: self-checking test of the refresh FSM. Nothing happens
// before enable. With an acknowledge that comes a random number of cycles
// after each request, it checks that every refresh is one AUTO REFRESH
// command in the cycle after the acknowledge, that busy then lasts T_RFC + 1
// cycles, that requests come REF_INTERVAL + 1 cycles after the previous
// refresh was issued, and that refresh events are counted once each.
module tb_sam_refresh_fsm;
  import sam_pkg::*;
  localparam int RI = 40, T_RFC = 5;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic enable = 0, ref_req, ref_ack = 0, busy, ref_event;
  pin_cmd_t cmd;
  sam_refresh_fsm #(.REF_INTERVAL(RI), .T_RFC(T_RFC)) u_dut (.*);

  int cyc = 0, last_issue = -1, busy_len = 0, refs = 0, req_rise = -1;
  logic req_d = 0, ack_d = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ref_req && !req_d) begin
      if (last_issue >= 0) check(cyc - last_issue == RI + 1, $sformatf("interval %0d", cyc - last_issue));
    end
    req_d <= ref_req;
    ack_d <= ref_ack && ref_req;
    if (ack_d) check(cmd.cmd == SD_REF && ref_event, "REF the cycle after ack");
    else check(cmd.cmd == SD_NOP, "NOP otherwise");
    if (ref_event) begin refs++; last_issue = cyc; end
    if (busy) busy_len++;
    else if (busy_len != 0) begin check(busy_len == T_RFC + 1, $sformatf("busy %0d", busy_len)); busy_len = 0; end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (100) @(posedge clk);
    check(!ref_req && refs == 0, "nothing before enable");
    @(negedge clk); enable = 1;
    for (int i = 0; i < 8; i++) begin
      while (!ref_req) @(negedge clk);
      repeat ($urandom_range(0, 6)) @(negedge clk);
      ref_ack = 1; @(negedge clk); ref_ack = 0;
      while (busy) @(negedge clk);
    end
    check(refs == 8, $sformatf("eight refreshes, got %0d", refs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
