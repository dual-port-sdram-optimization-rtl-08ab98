// tb_sam_shared_bank_ctrl: self-checking test of the shared bank control, for
// port A and port B instances with random inputs. The expected choice is
// worked out here: a semaphore operation goes first and becomes an access to
// the register row of the shared bank (semaphore at column 0, release writes
// the other port's number, the request goes to the outgoing mailbox and the
// mailbox read to the incoming one); otherwise the FIFO head goes if it is a
// dedicated-bank command or the port holds authority; a shared-bank head
// without authority never goes.
module tb_sam_shared_bank_ctrl;
  import sam_pkg::*;
  localparam int DW = 64, SB = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic own = 0, head_valid = 0, head_shared, sem_valid = 0, acc_ready = 0;
  proc_cmd_t head_cmd = '0; logic [DW-1:0] head_wdata = '0;
  op_kind_e sem_op = OP_SEM_READ;
  logic fifo_pop[2], sem_accept[2], acc_valid[2], shared_direct[2];
  access_t acc[2]; logic [DW-1:0] acc_wdata[2];
  assign head_shared = head_valid && head_cmd.bank == BA_W'(SB);

  for (genvar p = 0; p < 2; p++) begin : g
    sam_shared_bank_ctrl #(.PORT_ID(p[0]), .DW(DW), .SHARED_BANK(SB)) u_dut (
      .clk, .rst_n, .own, .head_valid, .head_cmd, .head_wdata, .head_shared,
      .fifo_pop(fifo_pop[p]), .sem_valid, .sem_op, .sem_accept(sem_accept[p]),
      .acc_valid(acc_valid[p]), .acc_ready, .acc(acc[p]), .acc_wdata(acc_wdata[p]),
      .shared_direct(shared_direct[p]));
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_sem = 0, n_head = 0, n_block = 0;
  initial begin
    logic [COL_W-1:0] c_out, c_in;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      own = $urandom; head_valid = $urandom; sem_valid = ($urandom_range(0, 3) == 0);
      sem_op = op_kind_e'($urandom_range(1, 4)); acc_ready = ($urandom_range(0, 3) != 0);
      head_cmd = proc_cmd_t'($urandom); head_wdata = {$urandom, $urandom};
      #1;
      for (int p = 0; p < 2; p++) begin
        c_out = (p == 0) ? COL_W'(1) : COL_W'(2);
        c_in  = (p == 0) ? COL_W'(2) : COL_W'(1);
        if (sem_valid) begin
          check(acc_valid[p] && sem_accept[p] == acc_ready && !fifo_pop[p], "semaphore op first");
          check(acc[p].kind == sem_op && acc[p].bank == 2'd3 && acc[p].row == '1, "register row of the shared bank");
          unique case (sem_op)
            OP_SEM_READ: check(!acc[p].write && acc[p].col == 0, "semaphore read");
            OP_SEM_REL:  check(acc[p].write && acc[p].col == 0 && acc_wdata[p][0] == (p == 0), "release gives the other port");
            OP_MBOX_REQ: check(acc[p].write && acc[p].col == c_out && acc_wdata[p][31:0] == 32'h5EA0_0001, "request into outgoing mailbox");
            OP_MBOX_RD:  check(!acc[p].write && acc[p].col == c_in, "read of incoming mailbox");
            default: ;
          endcase
          if (p == 0) n_sem++;
        end else if (head_valid && (head_cmd.bank != 2'd3 || own)) begin
          check(acc_valid[p] && fifo_pop[p] == acc_ready && !sem_accept[p], "head goes");
          check(acc[p].kind == OP_PROC && acc[p].bank == head_cmd.bank && acc[p].row == head_cmd.row &&
                acc[p].col == head_cmd.col && acc[p].write == head_cmd.write && acc_wdata[p] == head_wdata, "head access");
          check(shared_direct[p] == (fifo_pop[p] && head_cmd.bank == 2'd3), "shared_direct");
          if (p == 0) n_head++;
        end else begin
          check(!acc_valid[p] && !fifo_pop[p] && !sem_accept[p], "nothing goes");
          if (p == 0 && head_valid) n_block++;
        end
      end
    end
    check(n_sem > 0 && n_head > 0 && n_block > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
