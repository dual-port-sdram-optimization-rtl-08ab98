// tb_sam_dual_port_system: end-to-end test of the two SAM controllers on one
// dual-port SDRAM model, with every parameter of the top at its default.
//
// Phase 1, configuration "slave at port A, master at port B": the baseband
// side (port A, SDR) writes blocks of words into the shared bank while also
// using its dedicated banks; after each block it reads the last word back
// (reads return in order, so the block is then in memory) and signals the
// application side (port B, DDR), which reads the block in bursts of two and
// checks every word, mixing in its own dedicated and shared traffic.
// Phase 2 switches both controllers' roles at run time and repeats the
// transfer. Phase 3 runs random transactions on both ports at once (one write
// and one read of the same address and bank, bank chosen at random), like the
// document's bandwidth test, and reports the words moved per port.
//
// Every read is compared with a reference kept here. The test also counts how
// often each mechanism happened (shared-bank command run on the duplicated
// semaphore, semaphore read, wait poll, authority request, prefetch request,
// release on request, auto-release, mailbox interrupt, refresh, role change)
// and fails if one never did, and it fails on any protocol error the memory
// model saw, in particular a shared-bank access without authority.
module tb_sam_dual_port_system;
  import sam_pkg::*;

  localparam int DWA = 32, DWB = 64;
  localparam int NBLK = 4;      // blocks per transfer phase
  localparam int KW   = 16;     // words per block
  localparam int NTR  = 100;    // random transactions per port

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = !clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- DUT
  logic a_cmd_valid = 0, a_cmd_ready, a_rd_valid, a_cfg_valid = 0, a_cfg_master = 0;
  logic a_role_master, a_own, a_auth_pending, a_cfg_pending, a_init_done;
  proc_cmd_t a_cmd = '0; logic [DWA-1:0] a_cmd_wdata = '0, a_rd_data;
  sam_events_t a_ev;
  logic a_cke, a_cs_n, a_ras_n, a_cas_n, a_we_n, a_dq_oe, a_int_n;
  logic [BA_W-1:0] a_ba; logic [ADDR_W-1:0] a_addr; logic [DWA-1:0] a_dq_o, a_dq_i;

  logic b_cmd_valid = 0, b_cmd_ready, b_rd_valid, b_cfg_valid = 0, b_cfg_master = 1;
  logic b_role_master, b_own, b_auth_pending, b_cfg_pending, b_init_done;
  proc_cmd_t b_cmd = '0; logic [DWB-1:0] b_cmd_wdata = '0, b_rd_data;
  sam_events_t b_ev;
  logic b_cke, b_cs_n, b_ras_n, b_cas_n, b_we_n, b_dq_oe, b_int_n;
  logic [BA_W-1:0] b_ba; logic [ADDR_W-1:0] b_addr; logic [DWB-1:0] b_dq_o, b_dq_i;

  sam_dual_port_system u_dut (
    .clk, .rst_n,
    .a_cmd_valid, .a_cmd_ready, .a_cmd, .a_cmd_wdata, .a_rd_valid, .a_rd_data,
    .a_cfg_valid, .a_cfg_master, .a_role_master, .a_own, .a_auth_pending, .a_cfg_pending,
    .a_init_done, .a_events(a_ev),
    .a_sd_cke(a_cke), .a_sd_cs_n(a_cs_n), .a_sd_ras_n(a_ras_n), .a_sd_cas_n(a_cas_n),
    .a_sd_we_n(a_we_n), .a_sd_ba(a_ba), .a_sd_addr(a_addr), .a_sd_dq_out(a_dq_o),
    .a_sd_dq_oe(a_dq_oe), .a_sd_dq_in(a_dq_i), .a_sd_int_n(a_int_n),
    .b_cmd_valid, .b_cmd_ready, .b_cmd, .b_cmd_wdata, .b_rd_valid, .b_rd_data,
    .b_cfg_valid, .b_cfg_master, .b_role_master, .b_own, .b_auth_pending, .b_cfg_pending,
    .b_init_done, .b_events(b_ev),
    .b_sd_cke(b_cke), .b_sd_cs_n(b_cs_n), .b_sd_ras_n(b_ras_n), .b_sd_cas_n(b_cas_n),
    .b_sd_we_n(b_we_n), .b_sd_ba(b_ba), .b_sd_addr(b_addr), .b_sd_dq_out(b_dq_o),
    .b_sd_dq_oe(b_dq_oe), .b_sd_dq_in(b_dq_i), .b_sd_int_n(b_int_n));

  logic sem; int errors, contention, swa, swb;
  onedram_model #(.BL_A(1), .BL_B(2), .SEM_DEFAULT(1'b1)) u_mem (
    .clk,
    .a_cke, .a_cs_n, .a_ras_n, .a_cas_n, .a_we_n, .a_ba, .a_addr,
    .a_dq_in(a_dq_o), .a_dq_oe, .a_dq_out(a_dq_i), .a_int_n,
    .b_cke, .b_cs_n, .b_ras_n, .b_cas_n, .b_we_n, .b_ba, .b_addr,
    .b_dq_in(b_dq_o), .b_dq_oe, .b_dq_out(b_dq_i), .b_int_n,
    .sem, .errors, .contention, .shared_words_a(swa), .shared_words_b(swb));

  // ---------------- read checking: expected values in issue order
  logic [DWA-1:0] exp_a[$];
  logic [DWB-1:0] exp_b[$];
  int got_a = 0, got_b = 0;
  always @(posedge clk) if (rst_n) begin
    if (a_rd_valid) begin
      got_a++;
      check(exp_a.size() > 0 && a_rd_data == exp_a[0],
            $sformatf("port A read %h expected %h", a_rd_data, exp_a.size() ? exp_a[0] : '0));
      if (exp_a.size()) void'(exp_a.pop_front());
    end
    if (b_rd_valid) begin
      got_b++;
      check(exp_b.size() > 0 && b_rd_data == exp_b[0],
            $sformatf("port B read %h expected %h", b_rd_data, exp_b.size() ? exp_b[0] : '0));
      if (exp_b.size()) void'(exp_b.pop_front());
    end
  end

  // reference contents: A keyed by {bank,row,col}; B per 64-bit burst {bank,row,col/2}
  logic [31:0] ref_a [int];
  logic [63:0] ref_b [int];
  logic [31:0] ref_sh [int];     // shared bank, per 32-bit column
  function automatic int k3(int b, int r, int c); return (b << 24) | (r << 10) | c; endfunction

  // ---------------- event counters
  typedef struct { int direct, sread, swait, req, pref, relq, autor, irq, refr, role, issue; } cnt_t;
  cnt_t ca = '{default: 0}, cb = '{default: 0};
  always @(posedge clk) if (rst_n) begin
    ca.direct += a_ev.shared_direct; ca.sread += a_ev.sem_read; ca.swait += a_ev.sem_wait;
    ca.req += a_ev.auth_request; ca.pref += a_ev.prefetch_req; ca.relq += a_ev.release_on_req;
    ca.autor += a_ev.auto_release; ca.irq += a_ev.mbox_irq; ca.refr += a_ev.refresh;
    ca.role += a_ev.role_change; ca.issue += a_ev.proc_issue;
    cb.direct += b_ev.shared_direct; cb.sread += b_ev.sem_read; cb.swait += b_ev.sem_wait;
    cb.req += b_ev.auth_request; cb.pref += b_ev.prefetch_req; cb.relq += b_ev.release_on_req;
    cb.autor += b_ev.auto_release; cb.irq += b_ev.mbox_irq; cb.refr += b_ev.refresh;
    cb.role += b_ev.role_change; cb.issue += b_ev.proc_issue;
  end

  // ---------------- processor tasks
  task automatic push_a(input bit wr, input int bank, input int row, input int col, input logic [31:0] d);
    @(negedge clk);
    a_cmd_valid = 1'b1;
    a_cmd = '{write: wr, bank: BA_W'(bank), row: ROW_W'(row), col: COL_W'(col)};
    a_cmd_wdata = d;
    if (wr) begin
      if (bank == 3) ref_sh[k3(0, row, col)] = d; else ref_a[k3(bank, row, col)] = d;
    end else begin
      exp_a.push_back((bank == 3) ? (ref_sh.exists(k3(0, row, col)) ? ref_sh[k3(0, row, col)] : '0)
                                  : (ref_a.exists(k3(bank, row, col)) ? ref_a[k3(bank, row, col)] : '0));
    end
    do @(posedge clk); while (!a_cmd_ready);
    @(negedge clk); a_cmd_valid = 1'b0;
  endtask

  task automatic push_b(input bit wr, input int bank, input int row, input int col, input logic [63:0] d);
    int c0;
    c0 = col & ~1;
    @(negedge clk);
    b_cmd_valid = 1'b1;
    b_cmd = '{write: wr, bank: BA_W'(bank), row: ROW_W'(row), col: COL_W'(c0)};
    b_cmd_wdata = d;
    if (wr) begin
      if (bank == 3) begin ref_sh[k3(0, row, c0)] = d[31:0]; ref_sh[k3(0, row, c0 + 1)] = d[63:32]; end
      else ref_b[k3(bank, row, c0)] = d;
    end else if (bank == 3) begin
      exp_b.push_back({ref_sh.exists(k3(0, row, c0 + 1)) ? ref_sh[k3(0, row, c0 + 1)] : 32'h0,
                       ref_sh.exists(k3(0, row, c0))     ? ref_sh[k3(0, row, c0)]     : 32'h0});
    end else begin
      exp_b.push_back(ref_b.exists(k3(bank, row, c0)) ? ref_b[k3(bank, row, c0)] : '0);
    end
    do @(posedge clk); while (!b_cmd_ready);
    @(negedge clk); b_cmd_valid = 1'b0;
  endtask

  task automatic drain_a();
    int t = 0;
    while (exp_a.size() != 0 && t < 5000) begin @(posedge clk); t++; end
    check(exp_a.size() == 0, "port A reads drained");
  endtask
  task automatic drain_b();
    int t = 0;
    while (exp_b.size() != 0 && t < 5000) begin @(posedge clk); t++; end
    check(exp_b.size() == 0, "port B reads drained");
  endtask

  // ---------------- one transfer from port A to port B
  int ready_blk;
  task automatic transfer(input int row0, output int cycles);
    int t0;
    t0 = cyc;
    ready_blk = row0 - 1;
    fork
      begin : baseband
        for (int blk = 0; blk < NBLK; blk++) begin
          push_a(1, blk % 2, 40 + blk, blk, 32'hD000_0000 | 32'(blk));   // local work
          for (int w = 0; w < KW; w++) push_a(1, 3, row0 + blk, w, {8'hA0 + 8'(row0), 8'(blk), 16'(w)});
          push_a(0, blk % 2, 40 + blk, blk, '0);
          push_a(0, 3, row0 + blk, KW - 1, '0);                           // flush
          drain_a();
          ready_blk = row0 + blk;
        end
      end
      begin : application
        for (int blk = 0; blk < NBLK; blk++) begin
          push_b(1, 2, 60 + blk, 2 * blk, {32'hE000_0000, 32'(blk)});     // local work
          push_b(1, 3, 300 + blk, 0, {32'h5A5A_0000, 32'(blk)});          // its own shared use
          while (ready_blk < row0 + blk) @(posedge clk);
          for (int w = 0; w < KW; w += 2) push_b(0, 3, row0 + blk, w, '0);
          push_b(0, 2, 60 + blk, 2 * blk, '0);
          drain_b();
        end
      end
    join
    cycles = cyc - t0;
  endtask

  task automatic set_roles(input bit a_m, input bit b_m);
    int t = 0;
    @(negedge clk);
    a_cfg_valid = 1; a_cfg_master = a_m; b_cfg_valid = 1; b_cfg_master = b_m;
    @(negedge clk);
    a_cfg_valid = 0; b_cfg_valid = 0;
    while ((a_role_master != a_m || b_role_master != b_m) && t < 5000) begin @(posedge clk); t++; end
    check(a_role_master == a_m && b_role_master == b_m, "roles applied");
  endtask

  // ---------------- random transactions (bandwidth test)
  task automatic random_a(input int n, output int cycles);
    int t0, bank, row, col;
    t0 = cyc;
    for (int i = 0; i < n; i++) begin
      bank = int'($urandom_range(0, 2)); if (bank == 2) bank = 3;
      row = (bank == 3) ? 100 + int'($urandom_range(0, 7)) : int'($urandom_range(0, 7));
      col = int'($urandom_range(0, 63));
      push_a(1, bank, row, col, $urandom);
      push_a(0, bank, row, col, '0);
    end
    drain_a();
    cycles = cyc - t0;
  endtask
  task automatic random_b(input int n, output int cycles);
    int t0, bank, row, col;
    t0 = cyc;
    for (int i = 0; i < n; i++) begin
      bank = int'($urandom_range(0, 3));
      row = (bank == 3) ? 200 + int'($urandom_range(0, 7)) : int'($urandom_range(0, 7));
      col = int'($urandom_range(0, 63));
      push_b(1, bank, row, col, {$urandom, $urandom});
      push_b(0, bank, row, col, '0);
    end
    drain_b();
    cycles = cyc - t0;
  endtask

  // watchdog
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, c1, c2, cra, crb;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t = 0;
    while (!(a_init_done && b_init_done) && t < 20000) begin @(posedge clk); t++; end
    check(a_init_done && b_init_done, "both ports initialised");
    check(t >= 13200, "power-up wait of 200 us at 66 MHz");
    check(!a_role_master && b_role_master, "default roles: slave at A, master at B");
    check(b_own && !a_own, "port B holds authority after boot");

    transfer(0, c1);
    $display("phase 1 (slave A, master B): %0d blocks of %0d words in %0d cycles", NBLK, KW, c1);
    set_roles(1'b1, 1'b0);
    transfer(10, c2);
    $display("phase 2 (master A, slave B): %0d blocks of %0d words in %0d cycles", NBLK, KW, c2);
    set_roles(1'b0, 1'b1);

    fork
      random_a(NTR, cra);
      random_b(NTR, crb);
    join
    $display("random: port A %0d transactions in %0d cycles (%0d Mbit/s at 66 MHz)",
             NTR, cra, (NTR * 2 * 32 * 66) / cra);
    $display("random: port B %0d transactions in %0d cycles (%0d Mbit/s at 66 MHz)",
             NTR, crb, (NTR * 2 * 64 * 66) / crb);
    repeat (100) @(posedge clk);

    $display("A: direct %0d sread %0d wait %0d req %0d pref %0d relreq %0d auto %0d irq %0d ref %0d role %0d",
             ca.direct, ca.sread, ca.swait, ca.req, ca.pref, ca.relq, ca.autor, ca.irq, ca.refr, ca.role);
    $display("B: direct %0d sread %0d wait %0d req %0d pref %0d relreq %0d auto %0d irq %0d ref %0d role %0d",
             cb.direct, cb.sread, cb.swait, cb.req, cb.pref, cb.relq, cb.autor, cb.irq, cb.refr, cb.role);
    check(ca.direct + cb.direct > 0, "shared commands ran on the duplicated semaphore");
    check(ca.sread + cb.sread > 0, "semaphore reads happened");
    check(ca.swait + cb.swait > 0, "a port waited for authority");
    check(ca.req + cb.req > 0, "authority requests happened");
    check(ca.pref + cb.pref > 0, "adaptive prefetch request happened");
    check(ca.relq + cb.relq > 0, "release on request happened");
    check(ca.autor + cb.autor > 0, "auto-release happened");
    check(ca.irq + cb.irq > 0, "mailbox interrupts happened");
    check(ca.refr > 0 && cb.refr > 0, "both ports refreshed");
    check(ca.role == 2 && cb.role == 2, "each port switched role twice");
    check(got_a > 0 && got_b > 0, "reads returned on both ports");
    check(errors == 0, $sformatf("memory model protocol errors: %0d", errors));
    check(contention == 0, "shared bank never used without authority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
