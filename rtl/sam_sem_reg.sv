// sam_sem_reg: duplication of the semaphore register ("sem_reg").
//
// A local copy of the DPSDRAM's 1-bit semaphore, so that the controller can
// check authority over the shared bank without reading the device. As the
// document describes it: at reset it takes the device's boot default; the
// port holding authority flips its copy as soon as its own release write has
// completed; a port without authority learns of a change only by reading the
// semaphore register, and then loads the value it read. Semaphore value 0
// means port A owns the shared bank, 1 means port B.
//
// Interface: rel_done (one cycle, the release write finished), rd_valid with
// rd_value (a semaphore read returned). own is high while the copy says this
// port holds authority. Both updates take effect at the next clock edge.
module sam_sem_reg #(
  parameter bit PORT_ID     = 1'b0,  // 0: port A, 1: port B
  parameter bit SEM_DEFAULT = 1'b1   // device boot value of the semaphore
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rel_done,
  input  logic rd_valid,
  input  logic rd_value,
  output logic own
);
  logic value;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        value <= SEM_DEFAULT;
    else if (rd_valid) value <= rd_value;
    else if (rel_done) value <= !PORT_ID;   // handed to the other port
  end

  assign own = (value == PORT_ID);
endmodule
