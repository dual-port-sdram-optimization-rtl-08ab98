// tb_sam_config_ctrl: self-checking test of the configuration control. A role
// change asked while the controller is busy waits for ctrl_idle; it then takes
// effect at the next edge, with a one-cycle role_event. A later request
// overrides an earlier one not yet applied; asking for the current role does
// nothing. Both reset defaults are checked.
module tb_sam_config_ctrl;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic cfg_valid = 0, cfg_master = 0, ctrl_idle = 0;
  logic role_master, change_pending, role_event, role_m2, pend2, ev2;
  sam_config_ctrl #(.DEFAULT_MASTER(1'b0)) u_dut (.*);
  sam_config_ctrl #(.DEFAULT_MASTER(1'b1)) u_dut2 (.clk, .rst_n, .cfg_valid(1'b0), .cfg_master(1'b0),
    .ctrl_idle(1'b1), .role_master(role_m2), .change_pending(pend2), .role_event(ev2));

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_ev = 0;
  always @(posedge clk) if (rst_n && role_event) n_ev++;

  initial begin
    logic want, role;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(!role_master && role_m2 && !pend2 && !ev2, "reset defaults");
    // change while busy
    cfg_valid = 1; cfg_master = 1;
    @(negedge clk); cfg_valid = 0; #1;
    check(change_pending && !role_master && !role_event, "waits while busy");
    repeat (3) @(negedge clk);
    check(!role_master, "still waiting");
    ctrl_idle = 1; #1;
    check(role_event, "event when applied");
    @(negedge clk); #1;
    check(role_master && !change_pending && !role_event, "applied");
    // same role: nothing
    cfg_valid = 1; cfg_master = 1;
    @(negedge clk); cfg_valid = 0; #1;
    check(!change_pending && !role_event, "same role does nothing");
    // override before applying
    ctrl_idle = 0;
    cfg_valid = 1; cfg_master = 0; @(negedge clk);
    cfg_master = 1; @(negedge clk); cfg_valid = 0; #1;
    check(!change_pending && role_master, "later request overrides");
    // random
    role = role_master; want = role;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      cfg_valid = $urandom; cfg_master = $urandom; ctrl_idle = ($urandom_range(0, 3) == 0);
      #1;
      check(role_master == role && change_pending == (role != want) && role_event == (ctrl_idle && role != want),
            "random: state and flags");
      // the role follows the request registered at an earlier edge
      if (ctrl_idle && role != want) role = want;
      if (cfg_valid) want = cfg_master;
    end
    check(n_ev > 3, "role changes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
