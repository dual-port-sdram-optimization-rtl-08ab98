// sam_data_path: data path of the SAM controller.
//
// Moves data between the system side and the DPSDRAM data pins. A write
// drives its data, with the output enable, on the same clock edge that the
// signal path puts the WRITE command on the pins. A read launches a marker
// into a shift register of CL+1 stages at the edge the READ command leaves;
// when the marker reaches the end, the word on dq_in is captured (the device
// drives it CL cycles after it sampled READ) and handed on: to the processor
// for a processor read, to the semaphore control for a semaphore or mailbox
// read. The document names the block and its job; the alignment scheme is
// this design's.
//
// DW is 32 bits times the burst length. For the DDR port (burst of 2) both
// beats of a burst are carried side by side in one 64-bit word per clock,
// which stands for the two clock edges of a real DDR bus; a real DDR PHY
// (DQS strobes, both-edge registers) is outside this block.
module sam_data_path
  import sam_pkg::*;
#(
  parameter int unsigned DW = 32,
  parameter int unsigned CL = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the command FSM, in the cycle it decides READ/WRITE
  input  logic              wr_en,
  input  logic [DW-1:0]     wdata,
  input  logic              rd_launch,
  input  op_kind_e          rd_kind,
  // DPSDRAM data pins
  output logic [DW-1:0]     dq_out,
  output logic              dq_oe,
  input  logic [DW-1:0]     dq_in,
  // read returns
  output logic              proc_rvalid,
  output logic [DW-1:0]     proc_rdata,
  output logic              sem_rvalid,
  output op_kind_e          sem_rkind,
  output logic [WORD_W-1:0] sem_rdata
);
  logic     [CL:0] pipe_v;
  op_kind_e        pipe_k [CL+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dq_out      <= '0;
      dq_oe       <= 1'b0;
      pipe_v      <= '0;
      proc_rvalid <= 1'b0;
      sem_rvalid  <= 1'b0;
      proc_rdata  <= '0;
      sem_rdata   <= '0;
      sem_rkind   <= OP_PROC;
      for (int i = 0; i <= int'(CL); i++) pipe_k[i] <= OP_PROC;
    end else begin
      dq_oe  <= wr_en;
      if (wr_en) dq_out <= wdata;
      pipe_v    <= {pipe_v[CL-1:0], rd_launch};
      pipe_k[0] <= rd_kind;
      for (int i = 1; i <= int'(CL); i++) pipe_k[i] <= pipe_k[i-1];
      proc_rvalid <= pipe_v[CL] && (pipe_k[CL] == OP_PROC);
      sem_rvalid  <= pipe_v[CL] && (pipe_k[CL] != OP_PROC);
      if (pipe_v[CL]) begin
        sem_rkind <= pipe_k[CL];
        if (pipe_k[CL] == OP_PROC) proc_rdata <= dq_in;
        else                       sem_rdata  <= dq_in[WORD_W-1:0];
      end
    end
  end
endmodule
