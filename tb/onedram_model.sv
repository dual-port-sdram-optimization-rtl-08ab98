// onedram_model: behavioural model (not synthesizable) of a dual-port SDRAM of
// the OneDRAM kind, for the testbenches of the SAM controllers.
//
// Two SDRAM ports share one clock. Port A sees dedicated banks 0 and 1, port B
// dedicated banks 0, 1 and 2; bank SHARED_BANK is the shared bank, seen by
// both. The top row of the shared bank holds the registers: column 0 the
// 1-bit semaphore (0: port A owns the shared bank, 1: port B), column 1 the
// mailbox A->B, column 2 the mailbox B->A. Writing a mailbox pulls the other
// port's int_n low until that port reads the mailbox. Only the owner can
// change the semaphore; a write by the other port is ignored.
//
// Commands are sampled on the rising clock edge. A READ returns its burst on
// dq_out CL cycles after the edge that sampled it, for one cycle; WRITE data is
// taken with the command. A burst of BL words on a port is carried as one
// BL x 32-bit word (beats side by side); beat k of a burst starting at column
// c is column (c & ~(BL-1)) | ((c + k) & (BL-1)).
//
// The model counts protocol errors: ACTIVE on an open bank, READ/WRITE on a
// closed bank or sooner than T_RCD after ACTIVE, a bank the port does not
// have, REFRESH with a bank open, any access before LOAD MODE REGISTER, a
// write to the wrong mailbox, and - the one the SAM exists to prevent - a data
// access to the shared bank by the port that does not own the semaphore.
module onedram_model
  import sam_pkg::*;
#(
  parameter int unsigned BL_A        = 1,
  parameter int unsigned BL_B        = 2,
  parameter int unsigned CL          = 2,
  parameter int unsigned T_RCD       = 2,
  parameter bit          SEM_DEFAULT = 1'b1,
  parameter int unsigned SHARED_BANK = 3,
  localparam int unsigned DWA        = WORD_W * BL_A,
  localparam int unsigned DWB        = WORD_W * BL_B
) (
  input  logic              clk,
  // port A
  input  logic              a_cke, a_cs_n, a_ras_n, a_cas_n, a_we_n,
  input  logic [BA_W-1:0]   a_ba,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [DWA-1:0]    a_dq_in,
  input  logic              a_dq_oe,
  output logic [DWA-1:0]    a_dq_out,
  output logic              a_int_n,
  // port B
  input  logic              b_cke, b_cs_n, b_ras_n, b_cas_n, b_we_n,
  input  logic [BA_W-1:0]   b_ba,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [DWB-1:0]    b_dq_in,
  input  logic              b_dq_oe,
  output logic [DWB-1:0]    b_dq_out,
  output logic              b_int_n,
  // observation
  output logic              sem,
  output int                errors,
  output int                contention,
  output int                shared_words_a,
  output int                shared_words_b
);
  localparam int MAXB = 2;   // widest burst
  typedef logic [WORD_W*MAXB-1:0] wide_t;

  logic [WORD_W-1:0] mem [longint];
  logic [WORD_W-1:0] mbox_ab, mbox_ba;
  logic              pend_ab, pend_ba;      // unread mailbox -> interrupt
  logic [ROW_W-1:0]  open_row [2][4];
  logic              open_q   [2][4];
  longint            act_t    [2][4];
  logic              mode_set [2];
  wide_t             rpipe    [2][CL];
  longint            cyc;

  initial begin
    sem = SEM_DEFAULT;
    errors = 0; contention = 0; shared_words_a = 0; shared_words_b = 0;
    pend_ab = 1'b0; pend_ba = 1'b0; mbox_ab = '0; mbox_ba = '0;
    cyc = 0;
    a_int_n = 1'b1; b_int_n = 1'b1; a_dq_out = '0; b_dq_out = '0;
    for (int p = 0; p < 2; p++) begin
      mode_set[p] = 1'b0;
      for (int b = 0; b < 4; b++) begin open_q[p][b] = 1'b0; open_row[p][b] = '0; act_t[p][b] = 0; end
      for (int k = 0; k < int'(CL); k++) rpipe[p][k] = '0;
    end
  end

  function automatic bit bank_ok(int p, int b);
    if (b == int'(SHARED_BANK)) return 1'b1;
    return (p == 0) ? (b < 2) : (b < 3);
  endfunction

  function automatic longint key(int p, int b, logic [ROW_W-1:0] r, int c);
    if (b == int'(SHARED_BANK)) return {1'b1, 8'd0, 3'd0, 2'd0, r, 16'(c)};
    return {1'b0, 8'(p), 3'(b), 2'd0, r, 16'(c)};
  endfunction

  function automatic void err(string what, int p);
    errors++;
    $display("[%0t] onedram_model: port %s: %s", $time, p == 0 ? "A" : "B", what);
  endfunction

  // One command of port p; returns the read burst (or zero).
  task automatic do_cmd(input int p, input logic [3:0] c, input logic [BA_W-1:0] ba,
                        input logic [ADDR_W-1:0] addr, input wide_t din, input int bl,
                        output wide_t dout, output bit is_read);
    int b;
    logic [ROW_W-1:0] row;
    int col;
    b = int'(ba);
    dout = '0;
    is_read = 1'b0;
    unique case (c)
      4'b0011: begin // ACTIVE
        if (!mode_set[p]) err("ACTIVE before mode register set", p);
        if (!bank_ok(p, b)) err("ACTIVE on a bank this port does not have", p);
        if (open_q[p][b]) err("ACTIVE on an open bank", p);
        open_q[p][b] = 1'b1; open_row[p][b] = addr; act_t[p][b] = cyc;
      end
      4'b0101, 4'b0100: begin // READ / WRITE
        row = open_row[p][b];
        col = int'(addr[COL_W-1:0]);
        if (!open_q[p][b]) err("READ/WRITE on a closed bank", p);
        if (cyc - act_t[p][b] < longint'(T_RCD)) err("READ/WRITE before tRCD", p);
        if (addr[10]) open_q[p][b] = 1'b0;        // auto-precharge
        is_read = (c == 4'b0101);
        if (b == int'(SHARED_BANK) && row == ROW_SPECIAL) begin
          if (col == int'(COL_SEM)) begin
            if (is_read) dout[0] = sem;
            else if (sem == p[0]) sem = din[0];
          end else if (col == int'(COL_MBOX_AB)) begin
            if (is_read) begin
              if (p != 1) err("port A read mailbox A->B", p);
              dout[WORD_W-1:0] = mbox_ab; pend_ab = 1'b0;
            end else begin
              if (p != 0) err("port B wrote mailbox A->B", p);
              mbox_ab = din[WORD_W-1:0]; pend_ab = 1'b1;
            end
          end else if (col == int'(COL_MBOX_BA)) begin
            if (is_read) begin
              if (p != 0) err("port B read mailbox B->A", p);
              dout[WORD_W-1:0] = mbox_ba; pend_ba = 1'b0;
            end else begin
              if (p != 1) err("port A wrote mailbox B->A", p);
              mbox_ba = din[WORD_W-1:0]; pend_ba = 1'b1;
            end
          end
        end else begin
          if (b == int'(SHARED_BANK)) begin
            if (sem != p[0]) begin
              contention++;
              err("shared bank used without authority", p);
            end
            if (p == 0) shared_words_a += bl; else shared_words_b += bl;
          end
          for (int k = 0; k < bl; k++) begin
            int cc;
            cc = (col & ~(bl - 1)) | ((col + k) & (bl - 1));
            if (is_read) dout[WORD_W*k +: WORD_W] = mem.exists(key(p, b, row, cc)) ? mem[key(p, b, row, cc)] : '0;
            else         mem[key(p, b, row, cc)] = din[WORD_W*k +: WORD_W];
          end
        end
      end
      4'b0010: begin // PRECHARGE
        if (addr[10]) for (int k = 0; k < 4; k++) open_q[p][k] = 1'b0;
        else open_q[p][b] = 1'b0;
      end
      4'b0001: begin // AUTO REFRESH
        for (int k = 0; k < 4; k++) if (open_q[p][k]) err("REFRESH with a bank open", p);
      end
      4'b0000: begin // LOAD MODE REGISTER
        if (int'(addr[6:4]) != int'(CL)) err("mode register CAS latency", p);
        if (int'(addr[2:0]) != ((bl == 2) ? 1 : 0)) err("mode register burst length", p);
        mode_set[p] = 1'b1;
      end
      default: ;
    endcase
  endtask

  always @(posedge clk) begin
    wide_t da, db;
    bit    ra, rb;
    cyc++;
    da = '0; db = '0; ra = 1'b0; rb = 1'b0;
    if (a_cke && !a_cs_n) do_cmd(0, {a_cs_n, a_ras_n, a_cas_n, a_we_n}, a_ba, a_addr, wide_t'(a_dq_in), int'(BL_A), da, ra);
    if (b_cke && !b_cs_n) do_cmd(1, {b_cs_n, b_ras_n, b_cas_n, b_we_n}, b_ba, b_addr, wide_t'(b_dq_in), int'(BL_B), db, rb);
    if ((!a_cs_n && !a_cas_n && a_ras_n && !a_we_n) && !a_dq_oe) err("WRITE without data", 0);
    if ((!b_cs_n && !b_cas_n && b_ras_n && !b_we_n) && !b_dq_oe) err("WRITE without data", 1);
    // read return pipeline: data driven CL-1 edges after the sampling edge (CL >= 2)
    a_dq_out <= rpipe[0][CL-2][DWA-1:0];
    b_dq_out <= rpipe[1][CL-2][DWB-1:0];
    for (int k = int'(CL) - 2; k > 0; k--) begin
      rpipe[0][k] <= rpipe[0][k-1];
      rpipe[1][k] <= rpipe[1][k-1];
    end
    rpipe[0][0] <= da;
    rpipe[1][0] <= db;
    a_int_n <= !pend_ba;
    b_int_n <= !pend_ab;
  end
endmodule
