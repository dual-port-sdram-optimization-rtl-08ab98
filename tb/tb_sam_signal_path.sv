// tb_sam_signal_path: self-checking test of the signal path. Random commands
// are offered by the three sources; the pins must show, one cycle later, the
// initialization command before init_done, the refresh command while the
// refresh FSM is busy, the command FSM's otherwise, with CKE high after reset.
module tb_sam_signal_path;
  import sam_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic init_done = 0, ref_busy = 0;
  pin_cmd_t init_cmd = PIN_NOP, ref_cmd = PIN_NOP, fsm_cmd = PIN_NOP;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n;
  logic [BA_W-1:0] sd_ba; logic [ADDR_W-1:0] sd_addr;
  sam_signal_path u_dut (.*);

  pin_cmd_t expect_q;
  int n_init = 0, n_ref = 0, n_fsm = 0;

  function automatic pin_cmd_t rnd();
    pin_cmd_t c;
    c.cmd = sd_cmd_e'($urandom_range(0, 7)); c.ba = BA_W'($urandom); c.addr = ADDR_W'($urandom);
    return c;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #2 check(!sd_cke && {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} == SD_NOP, "reset: CKE low, NOP");
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      init_done = (i > 100); ref_busy = ($urandom_range(0, 3) == 0);
      init_cmd = rnd(); ref_cmd = rnd(); fsm_cmd = rnd();
      if (!init_done) begin expect_q = init_cmd; n_init++; end
      else if (ref_busy) begin expect_q = ref_cmd; n_ref++; end
      else begin expect_q = fsm_cmd; n_fsm++; end
      @(posedge clk); #1;
      check(sd_cke, "CKE high");
      check({sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} == expect_q.cmd && sd_ba == expect_q.ba &&
            sd_addr == expect_q.addr, $sformatf("pins at step %0d", i));
    end
    check(n_init > 0 && n_ref > 0 && n_fsm > 0, "all three sources used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
