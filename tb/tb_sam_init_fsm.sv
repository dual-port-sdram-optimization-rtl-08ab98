// tb_sam_init_fsm: self-checking test of the initialization FSM. It records
// every non-NOP command with its cycle and checks the JEDEC order (PRECHARGE
// ALL, two AUTO REFRESH, LOAD MODE REGISTER), the power-up wait, the T_RP and
// T_RFC gaps, the mode word (burst length 2 code 001, CAS latency 2) and that
// init_done rises T_MRD cycles after the mode register is loaded and stays
// high with no further command.
module tb_sam_init_fsm;
  import sam_pkg::*;
  localparam int INIT_WAIT = 50, T_RP = 2, T_RFC = 5, T_MRD = 2;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  pin_cmd_t cmd;
  logic init_done;
  sam_init_fsm #(.INIT_WAIT(INIT_WAIT), .INIT_REFS(2), .T_RP(T_RP), .T_RFC(T_RFC), .T_MRD(T_MRD),
                 .BL(2), .CL(2)) u_dut (.clk, .rst_n, .cmd, .init_done);

  int cyc = 0, n = 0, done_cyc = -1;
  sd_cmd_e seen[$]; int at[$]; logic [ADDR_W-1:0] ad[$];
  always @(posedge clk) if (rst_n) begin
    if (cmd.cmd != SD_NOP) begin seen.push_back(cmd.cmd); at.push_back(cyc); ad.push_back(cmd.addr); end
    if (init_done && done_cyc < 0) done_cyc = cyc;
    cyc++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (200) @(posedge clk);
    check(seen.size() == 4, $sformatf("four commands, got %0d", seen.size()));
    if (seen.size() == 4) begin
      check(seen[0] == SD_PRE && ad[0][10], "PRECHARGE ALL first");
      check(seen[1] == SD_REF && seen[2] == SD_REF, "two AUTO REFRESH");
      check(seen[3] == SD_LMR, "LOAD MODE REGISTER last");
      check(at[0] >= INIT_WAIT, $sformatf("power-up wait (%0d)", at[0]));
      check(at[1] - at[0] > T_RP, "tRP after precharge");
      check(at[2] - at[1] > T_RFC && at[3] - at[2] > T_RFC, "tRFC after refresh");
      check(ad[3][2:0] == 3'b001 && ad[3][3] == 1'b0 && ad[3][6:4] == 3'd2, $sformatf("mode word %h", ad[3]));
      check(done_cyc - at[3] > T_MRD && done_cyc - at[3] <= T_MRD + 2, "init_done after tMRD");
    end
    check(init_done, "init_done stays high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
