// sam_cmd_fifo: command FIFO of the SAM controller.
//
// Queues the processor's commands and hands them out in the order they came.
// Besides the ordinary FIFO function, it tells the semaphore control in real
// time whether any queued command (head included) targets the shared bank
// (shared_pending) and whether the head does (head_shared). The adaptive
// command prefetch uses shared_pending to ask for authority before the shared
// command reaches the head; the auto-release uses it to see that no shared
// command is left. That look-ahead, and the depth of four commands used in
// the document's examples, follow the document; the valid/ready handshake and
// the per-entry shared flag are this design's choices.
//
// Interface: push with in_valid/in_ready, pop with out_valid/out_pop (the head
// is shown combinationally from the registered storage). in_ready is simply
// "not full": a pop does not make room for a push in the same cycle.
//
// Lint note: rst_n is both the asynchronous reset of the flip-flops and the
// disable condition of the assertion below, which samples it on the clock;
// the linter reports that double use (SYNCASYNCNET). It is intended and
// touches simulation checks only.
module sam_cmd_fifo
  import sam_pkg::*;
#(
  parameter int unsigned DEPTH       = 4,
  parameter int unsigned DW          = 32,
  parameter int unsigned SHARED_BANK = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  proc_cmd_t        in_cmd,
  input  logic [DW-1:0]    in_wdata,
  output logic             out_valid,
  input  logic             out_pop,
  output proc_cmd_t        out_cmd,
  output logic [DW-1:0]    out_wdata,
  output logic             head_shared,
  output logic             shared_pending,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  proc_cmd_t          cmd_mem   [DEPTH];
  logic [DW-1:0]      data_mem  [DEPTH];
  logic [DEPTH-1:0]   shared_q;      // entry targets the shared bank
  logic [DEPTH-1:0]   valid_q;       // entry holds a command
  logic [PW-1:0]      wr_ptr, rd_ptr;

  logic do_push, do_pop;
  assign in_ready  = !valid_q[wr_ptr];
  assign out_valid = valid_q[rd_ptr];
  assign do_push   = in_valid && in_ready;
  assign do_pop    = out_pop && out_valid;

  assign out_cmd        = cmd_mem[rd_ptr];
  assign out_wdata      = data_mem[rd_ptr];
  assign head_shared    = out_valid && shared_q[rd_ptr];
  assign shared_pending = |(shared_q & valid_q);

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      shared_q <= '0;
      wr_ptr   <= '0;
      rd_ptr   <= '0;
    end else begin
      if (do_pop) begin
        valid_q[rd_ptr]  <= 1'b0;
        shared_q[rd_ptr] <= 1'b0;
        rd_ptr           <= next_ptr(rd_ptr);
      end
      if (do_push) begin
        valid_q[wr_ptr]  <= 1'b1;
        shared_q[wr_ptr] <= (in_cmd.bank == BA_W'(SHARED_BANK));
        wr_ptr           <= next_ptr(wr_ptr);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) begin
      cmd_mem[wr_ptr]  <= in_cmd;
      data_mem[wr_ptr] <= in_wdata;
    end
  end

  always_comb begin
    count = '0;
    for (int i = 0; i < int'(DEPTH); i++) count += valid_q[i];
  end

  // Pointers never run past each other.
  assert property (@(posedge clk) disable iff (!rst_n) !(do_push && !in_ready));
endmodule
