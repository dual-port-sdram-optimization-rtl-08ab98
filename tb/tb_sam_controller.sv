// tb_sam_controller: self-checking test of one SAM controller (port B, DDR,
// burst of 2) against the dual-port SDRAM model, with the testbench itself
// playing the processor and controller of port A directly on the model's pins.
//
// It checks: power-up sequence (the model flags any access before the mode
// register is set), read-back of dedicated and shared data, that shared-bank
// commands run on the duplicated semaphore without any semaphore read while
// the port holds authority, release when port A asks through the mailbox,
// the master's check/request/wait sequence when it lacks authority, the
// master-to-slave role switch, the slave's auto-release and its adaptive
// prefetch request (sent while only dedicated commands are at the head),
// refreshes, and that the model never saw the shared bank used without
// authority or any other protocol error. Cycle counts: a dedicated read with
// authority takes 8 cycles of command-FSM time; a shared read made by the
// slave after a prefetch must complete without a wait poll.
module tb_sam_controller;
  import sam_pkg::*;

  localparam int BL = 2;
  localparam int DW = 32 * BL;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;     // falling edge: asynchronous reset at once
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- DUT (port B)
  logic cmd_valid = 1'b0, cmd_ready;
  proc_cmd_t cmd = '0;
  logic [DW-1:0] cmd_wdata = '0;
  logic rd_valid; logic [DW-1:0] rd_data;
  logic cfg_valid = 1'b0, cfg_master = 1'b1;
  logic role_master, own, auth_pending, cfg_pending, init_done;
  sam_events_t ev;
  logic b_cke, b_cs_n, b_ras_n, b_cas_n, b_we_n, b_dq_oe, b_int_n;
  logic [BA_W-1:0] b_ba; logic [ADDR_W-1:0] b_addr;
  logic [DW-1:0] b_dq_out, b_dq_in;

  sam_controller #(.PORT_ID(1'b1), .BL(BL), .SEM_DEFAULT(1'b1), .DEFAULT_MASTER(1'b1),
                   .INIT_WAIT(20), .REF_INTERVAL(100)) u_dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .cmd_wdata, .rd_valid, .rd_data,
    .cfg_valid, .cfg_master, .role_master, .own, .auth_pending, .cfg_pending, .init_done, .events(ev),
    .sd_cke(b_cke), .sd_cs_n(b_cs_n), .sd_ras_n(b_ras_n), .sd_cas_n(b_cas_n), .sd_we_n(b_we_n),
    .sd_ba(b_ba), .sd_addr(b_addr), .sd_dq_out(b_dq_out), .sd_dq_oe(b_dq_oe),
    .sd_dq_in(b_dq_in), .sd_int_n(b_int_n));

  // ---------------- port A, driven by the testbench
  logic a_cs_n = 1'b1, a_ras_n = 1'b1, a_cas_n = 1'b1, a_we_n = 1'b1, a_dq_oe = 1'b0, a_int_n;
  logic [BA_W-1:0] a_ba = '0; logic [ADDR_W-1:0] a_addr = '0;
  logic [31:0] a_dq_in = '0, a_dq_out;
  logic sem; int errors, contention, swa, swb;

  onedram_model #(.BL_A(1), .BL_B(BL), .SEM_DEFAULT(1'b1)) u_mem (
    .clk,
    .a_cke(1'b1), .a_cs_n, .a_ras_n, .a_cas_n, .a_we_n, .a_ba, .a_addr,
    .a_dq_in, .a_dq_oe, .a_dq_out, .a_int_n,
    .b_cke, .b_cs_n, .b_ras_n, .b_cas_n, .b_we_n, .b_ba, .b_addr,
    .b_dq_in(b_dq_out), .b_dq_oe, .b_dq_out(b_dq_in), .b_int_n,
    .sem, .errors, .contention, .shared_words_a(swa), .shared_words_b(swb));

  task automatic a_pins(input logic [3:0] c, input logic [BA_W-1:0] ba,
                        input logic [ADDR_W-1:0] addr, input logic oe, input logic [31:0] d);
    @(negedge clk);
    {a_cs_n, a_ras_n, a_cas_n, a_we_n} = c;
    a_ba = ba; a_addr = addr; a_dq_oe = oe; a_dq_in = d;
  endtask

  task automatic a_access(input bit wr, input logic [BA_W-1:0] ba, input logic [ROW_W-1:0] row,
                          input logic [COL_W-1:0] col, input logic [31:0] d, output logic [31:0] q);
    logic [ADDR_W-1:0] ca;
    ca = ADDR_W'(col); ca[10] = 1'b1;
    a_pins(4'b0011, ba, row, 1'b0, '0);
    a_pins(4'b0111, '0, '0, 1'b0, '0);
    a_pins(wr ? 4'b0100 : 4'b0101, ba, ca, wr, d);
    a_pins(4'b0111, '0, '0, 1'b0, '0);   // model drives data after this edge
    @(negedge clk); q = a_dq_out;
    a_pins(4'b0111, '0, '0, 1'b0, '0);
  endtask

  // ---------------- processor side of port B
  logic [DW-1:0] rq[$];
  always @(posedge clk) if (rst_n && rd_valid) rq.push_back(rd_data);

  int n_sem_read = 0, n_wait = 0, n_req = 0, n_pref = 0, n_rel_req = 0, n_auto = 0,
      n_irq = 0, n_ref = 0, n_role = 0, n_direct = 0;
  always @(posedge clk) if (rst_n) begin
    n_sem_read += ev.sem_read;  n_wait += ev.sem_wait;  n_req += ev.auth_request;
    n_pref += ev.prefetch_req;  n_rel_req += ev.release_on_req; n_auto += ev.auto_release;
    n_irq += ev.mbox_irq;       n_ref += ev.refresh;     n_role += ev.role_change;
    n_direct += ev.shared_direct;
  end

  task automatic push(input bit wr, input logic [BA_W-1:0] bank, input logic [ROW_W-1:0] row,
                      input logic [COL_W-1:0] col, input logic [DW-1:0] d);
    @(negedge clk);
    cmd_valid = 1'b1; cmd = '{write: wr, bank: bank, row: row, col: col}; cmd_wdata = d;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk); cmd_valid = 1'b0;
  endtask

  task automatic wait_reads(input int n);
    int t = 0;
    while (rq.size() < n && t < 2000) begin @(posedge clk); t++; end
    check(rq.size() >= n, "read data returned");
  endtask

  task automatic wait_idle();
    int t = 0;
    while (!(u_dut.ctrl_idle) && t < 3000) begin @(posedge clk); t++; end
    check(t < 3000, "controller became idle");
  endtask

  // watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    logic [DW-1:0] r;
    int t, t0, s0, w0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // port A power-up: mode register with CL 2, burst length 1
    a_pins(4'b0000, '0, ADDR_W'(7'b010_0_000), 1'b0, '0);
    a_pins(4'b0111, '0, '0, 1'b0, '0);
    t = 0; while (!init_done && t < 200) begin @(posedge clk); t++; end
    check(init_done, "init_done after power-up sequence");
    check(t >= 20, "power-up wait respected");

    // 1. master with default authority: dedicated and shared traffic
    push(1, 2'd0, 13'd5, 9'd4, 64'h1111_2222_3333_4444);
    push(1, 2'd3, 13'd9, 9'd8, 64'hAAAA_BBBB_CCCC_DDDD);
    push(0, 2'd0, 13'd5, 9'd4, '0);
    push(0, 2'd3, 13'd9, 9'd8, '0);
    wait_reads(2);
    r = rq.pop_front(); check(r == 64'h1111_2222_3333_4444, "dedicated read-back");
    r = rq.pop_front(); check(r == 64'hAAAA_BBBB_CCCC_DDDD, "shared read-back");
    check(n_sem_read == 0, "no semaphore read while holding authority (duplicated semaphore)");
    check(n_direct == 2, "shared commands ran on sem_reg alone");

    // access timing: one dedicated read on an idle controller
    wait_idle();
    @(negedge clk); t0 = 0;
    fork
      push(0, 2'd1, 13'd1, 9'd0, '0);
      begin while (!rd_valid) begin @(posedge clk); t0++; end end
    join
    @(negedge clk);
    void'(rq.pop_front());
    check(t0 >= 6 && t0 <= 9, $sformatf("dedicated read latency %0d cycles", t0));

    // 2. port A asks for the shared bank through the mailbox
    a_access(1, 2'd3, ROW_SPECIAL, COL_MBOX_AB, MBOX_REQ, q);
    t = 0; while (sem != 1'b0 && t < 300) begin @(posedge clk); t++; end
    check(sem == 1'b0, "master released on request");
    repeat (8) @(posedge clk);
    check(!own, "sem_reg follows the release");
    check(n_rel_req == 1 && n_irq == 1, "one interrupt, one release on request");
    a_access(1, 2'd3, 13'd20, 9'd6, 32'hCAFE_0006, q);
    a_access(1, 2'd3, 13'd20, 9'd7, 32'hCAFE_0007, q);

    // 3. master without authority: check, request, wait, then access
    s0 = n_sem_read;
    push(0, 2'd3, 13'd20, 9'd6, '0);
    t = 0; while (a_int_n && t < 300) begin @(posedge clk); t++; end
    check(!a_int_n, "request interrupt reached port A");
    check(n_sem_read - s0 >= 1, "master checked the semaphore before requesting");
    a_access(0, 2'd3, ROW_SPECIAL, COL_MBOX_BA, '0, q);
    check(q == MBOX_REQ, "request message in mailbox B->A");
    repeat (20) @(posedge clk);              // let the master wait a little
    check(rq.size() == 0, "shared read held back without authority");
    a_access(1, 2'd3, ROW_SPECIAL, COL_SEM, 32'd1, q);   // port A releases
    wait_reads(1);
    r = rq.pop_front(); check(r == {32'hCAFE_0007, 32'hCAFE_0006}, "shared data written by port A");
    check(n_wait >= 1, "master waited by polling the semaphore");
    check(n_req == 1, "exactly one authority request");

    // 4. switch to slave
    wait_idle();
    @(negedge clk); cfg_valid = 1'b1; cfg_master = 1'b0;
    @(negedge clk); cfg_valid = 1'b0;
    repeat (3) @(posedge clk);
    check(!role_master && n_role == 1, "role switched to slave");

    // a slave keeps no authority it does not need: released without a request
    t = 0; while (sem != 1'b0 && t < 300) begin @(posedge clk); t++; end
    check(sem == 1'b0 && n_auto == 1, "slave auto-released authority");
    check(n_irq == 1, "no request was needed for it");

    // 5. slave prefetch: request while dedicated commands are still ahead
    wait_idle();
    w0 = n_wait;
    push(1, 2'd1, 13'd30, 9'd2, 64'h5);
    push(0, 2'd0, 13'd5, 9'd4, '0);
    push(1, 2'd3, 13'd30, 9'd2, 64'h0000_00B2_0000_00B1);
    push(0, 2'd3, 13'd30, 9'd2, '0);
    t = 0; while (a_int_n && t < 300) begin @(posedge clk); t++; end
    check(n_pref == 1, "prefetch request sent before the shared command reached the head");
    a_access(0, 2'd3, ROW_SPECIAL, COL_MBOX_BA, '0, q);
    check(q == MBOX_REQ, "slave request message");
    a_access(1, 2'd3, ROW_SPECIAL, COL_SEM, 32'd1, q);
    wait_reads(2);
    r = rq.pop_front(); check(r == 64'h1111_2222_3333_4444, "dedicated read behind the request");
    r = rq.pop_front(); check(r == 64'h0000_00B2_0000_00B1, "shared read after prefetch");
    t = 0; while (sem != 1'b0 && t < 300) begin @(posedge clk); t++; end
    check(n_auto == 2, "auto-release after the last shared command");
    check(n_req == 2, "one request for two shared commands");

    check(n_ref >= 1, "refresh issued");
    repeat (50) @(posedge clk);
    check(errors == 0, $sformatf("memory model protocol errors: %0d", errors));
    check(contention == 0, "shared bank never used without authority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
