// sam_config_ctrl: configuration control logic of the reconfigurable SAM.
//
// The document's reconfigurable controller holds both a master and a slave
// SAM and lets configuration logic choose which one serves the processor, so
// the faster pairing can be picked for the direction data flows in. Here the
// two roles share one datapath and differ only in the semaphore policy, so
// the choice is one register: role_master. The processor writes a new role
// with cfg_valid/cfg_master at any time; it is held pending and applied only
// in a cycle where the controller is idle (no command queued or running, no
// semaphore procedure under way), so a policy never changes in the middle of
// one. role_event pulses when the role changes.
//
// Master: default authority, no prefetch, no auto-release. Slave: no default
// authority, adaptive prefetch, auto-release (document's feature table). The
// default authority itself is the DPSDRAM's boot value of the semaphore, so
// DEFAULT_MASTER should be set to agree with it.
module sam_config_ctrl #(
  parameter bit DEFAULT_MASTER = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cfg_valid,
  input  logic cfg_master,
  input  logic ctrl_idle,
  output logic role_master,
  output logic change_pending,
  output logic role_event
);
  logic want_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      want_q      <= DEFAULT_MASTER;
      role_master <= DEFAULT_MASTER;
    end else begin
      if (cfg_valid) want_q <= cfg_master;
      if (ctrl_idle && role_master != want_q) role_master <= want_q;
    end
  end

  assign change_pending = (role_master != want_q);
  assign role_event     = ctrl_idle && change_pending;
endmodule
