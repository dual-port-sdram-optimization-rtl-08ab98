// tb_sam_cmd_fifo: self-checking test of the command FIFO. Random pushes and
// pops are compared with a reference queue (order, data, write flag), and the
// shared-bank look-ahead flags (head_shared, shared_pending) and the fill
// count are recomputed here from the reference every cycle. It also checks
// that a full FIFO refuses a push.
module tb_sam_cmd_fifo;
  import sam_pkg::*;
  localparam int DEPTH = 4, DW = 32, SB = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic in_valid = 0, in_ready, out_valid, out_pop = 0, head_shared, shared_pending;
  proc_cmd_t in_cmd = '0, out_cmd;
  logic [DW-1:0] in_wdata = '0, out_wdata;
  logic [$clog2(DEPTH+1)-1:0] count;

  sam_cmd_fifo #(.DEPTH(DEPTH), .DW(DW), .SHARED_BANK(SB)) u_dut (.*);

  typedef struct { proc_cmd_t c; logic [DW-1:0] d; } ent_t;
  ent_t q[$];
  int pushes = 0, pops = 0, full_seen = 0, look_seen = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit sp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // compare outputs with the reference
      check(count == ($clog2(DEPTH+1))'(q.size()), "count");
      check(out_valid == (q.size() > 0), "out_valid");
      check(in_ready == (q.size() < DEPTH), "in_ready");
      sp = 0; foreach (q[k]) sp |= (q[k].c.bank == BA_W'(SB));
      check(shared_pending == sp, "shared_pending");
      if (q.size() > 0) begin
        check(out_cmd == q[0].c && out_wdata == q[0].d, "head contents");
        check(head_shared == (q[0].c.bank == BA_W'(SB)), "head_shared");
        if (sp && q[0].c.bank != BA_W'(SB)) look_seen++;
      end
      if (q.size() == DEPTH) full_seen++;
      // new stimulus
      in_valid = ($urandom_range(0, 99) < 60);
      in_cmd   = proc_cmd_t'($urandom);
      in_wdata = $urandom;
      out_pop  = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 35));
      @(posedge clk);
      #1;
    end
    check(full_seen > 0, "FIFO became full");
    check(look_seen > 0, "shared command seen behind a dedicated head");
    check(pushes > 100 && pops > 100, "traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference update at the clock edge, from the values the DUT sees
  always @(posedge clk) if (rst_n) begin
    bit pop_ok, push_ok;
    pop_ok  = out_pop && q.size() > 0;
    push_ok = in_valid && q.size() < DEPTH;
    if (pop_ok) begin void'(q.pop_front()); pops++; end
    if (push_ok) begin q.push_back('{in_cmd, in_wdata}); pushes++; end
  end
endmodule
