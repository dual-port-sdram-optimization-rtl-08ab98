// tb_sam_data_path: self-checking test of the data path (64-bit word, CAS
// latency 2). Writes: data and output enable appear on the pins at the edge
// the WRITE command leaves, for that one cycle. Reads: a device stub drives a
// distinct word on dq_in only during the cycle CL edges after the READ left
// (CL-1 edges after the device sampled it) and garbage otherwise; the data
// path must return exactly that word CL+1 edges after the launch, to the
// processor for a processor read and to the semaphore control (low 32 bits,
// with the kind) otherwise. Back-to-back launches are also checked.
module tb_sam_data_path;
  import sam_pkg::*;
  localparam int DW = 64, CL = 2;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic wr_en = 0, rd_launch = 0;
  logic [DW-1:0] wdata = '0, dq_out, dq_in, proc_rdata;
  op_kind_e rd_kind = OP_PROC, sem_rkind;
  logic dq_oe, proc_rvalid, sem_rvalid;
  logic [WORD_W-1:0] sem_rdata;
  sam_data_path #(.DW(DW), .CL(CL)) u_dut (.*);

  // device stub: edge counter per launch
  int cyc = 0;
  int launch_at[$]; logic [DW-1:0] launch_val[$]; op_kind_e launch_kind[$];
  logic [DW-1:0] drive;
  always @(posedge clk) cyc++;
  always_comb begin
    drive = {$urandom, $urandom};
    foreach (launch_at[i]) if (cyc == launch_at[i] + CL) drive = launch_val[i];
  end
  assign dq_in = drive;

  int got = 0, got_sem = 0;
  always @(negedge clk) if (rst_n) begin
    // outputs seen in the cycle CL+1 edges after the launch edge
    foreach (launch_at[i]) if (cyc == launch_at[i] + CL + 1) begin
      if (launch_kind[i] == OP_PROC) begin
        check(proc_rvalid && !sem_rvalid && proc_rdata == launch_val[i], "processor read returned");
        got++;
      end else begin
        check(sem_rvalid && !proc_rvalid && sem_rdata == launch_val[i][31:0] && sem_rkind == launch_kind[i],
              "semaphore read returned");
        got_sem++;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic launch(input op_kind_e k);
    @(negedge clk);
    rd_launch = 1; rd_kind = k;
    launch_at.push_back(cyc + 1); launch_val.push_back({$urandom, $urandom}); launch_kind.push_back(k);
    @(negedge clk); rd_launch = 0;
  endtask

  initial begin
    logic [DW-1:0] w;
    repeat (2) @(posedge clk); rst_n = 1;
    // write
    @(negedge clk); w = {$urandom, $urandom}; wr_en = 1; wdata = w;
    @(posedge clk); #1;
    check(dq_oe && dq_out == w, "write data on the pins with the command");
    @(negedge clk); wr_en = 0;
    @(posedge clk); #1;
    check(!dq_oe, "output enable for one cycle");
    // single reads
    launch(OP_PROC);     repeat (5) @(negedge clk);
    launch(OP_SEM_READ); repeat (5) @(negedge clk);
    launch(OP_MBOX_RD);  repeat (5) @(negedge clk);
    // back-to-back
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      rd_launch = 1; rd_kind = (i % 2) ? OP_SEM_READ : OP_PROC;
      launch_at.push_back(cyc + 1); launch_val.push_back({$urandom, $urandom}); launch_kind.push_back(rd_kind);
      @(negedge clk);
    end
    rd_launch = 0;
    repeat (8) @(negedge clk);
    check(got == 3 && got_sem == 4, $sformatf("all reads returned (%0d/%0d)", got, got_sem));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
