// tb_sam_sem_reg: self-checking test of the duplicated semaphore register,
// for port A and port B with the device default 1 (port B owns the shared
// bank after boot): reset value, flip to the other port after the own release,
// load of a value read from the device, and read taking precedence over
// release in the same cycle.
module tb_sam_sem_reg;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic rel_a = 0, rdv_a = 0, rdval_a = 0, own_a;
  logic rel_b = 0, rdv_b = 0, rdval_b = 0, own_b;
  sam_sem_reg #(.PORT_ID(1'b0), .SEM_DEFAULT(1'b1)) u_a (.clk, .rst_n, .rel_done(rel_a), .rd_valid(rdv_a), .rd_value(rdval_a), .own(own_a));
  sam_sem_reg #(.PORT_ID(1'b1), .SEM_DEFAULT(1'b1)) u_b (.clk, .rst_n, .rel_done(rel_b), .rd_valid(rdv_b), .rd_value(rdval_b), .own(own_b));

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #2;
    check(!own_a && own_b, "boot default: port B owns");
    repeat (2) @(posedge clk); rst_n = 1; #1;
    // B releases: its copy flips at once, A's copy stays until A reads
    rel_b = 1; tick(); rel_b = 0;
    check(!own_b, "B copy flipped after release");
    check(!own_a, "A copy unchanged without a read");
    tick(); check(!own_b, "B copy holds");
    rdv_a = 1; rdval_a = 0; tick(); rdv_a = 0;
    check(own_a, "A copy loaded from semaphore read");
    // A releases back
    rel_a = 1; tick(); rel_a = 0;
    check(!own_a, "A copy flipped after release");
    rdv_b = 1; rdval_b = 1; tick(); rdv_b = 0;
    check(own_b, "B copy loaded from read");
    // read wins over release in the same cycle
    rel_b = 1; rdv_b = 1; rdval_b = 1; tick(); rel_b = 0; rdv_b = 0;
    check(own_b, "read value wins over simultaneous release");
    // read of a value saying 'not ours'
    rdv_b = 1; rdval_b = 0; tick(); rdv_b = 0;
    check(!own_b, "B copy loaded with 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
