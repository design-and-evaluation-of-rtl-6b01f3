// rse_interface: Reliability and Security Engine interface.
//
// The RSE is the only contact between the host pipeline and the checking
// modules. It takes the probe signals tapped from the host pipeline and
// gives every module a logic port of its own (port 0: IFS, port 1: CVR in
// this design), so a new module can be added on a new port without touching
// the host or the other ports. For each port it:
//   - forwards the probes, with the valid flags forced low while the port is
//     switched off, so a switched-off module sees an idle pipeline;
//   - takes the module's alarm and, if the port is on, raises the host trap
//     request in the same cycle, so the offending instruction does not
//     retire; the number of the lowest alarming port is reported and the
//     first one is kept in a sticky cause register.
// It also tells the host decode stage that the instruction there is a CHK
// (CPop1) word, which the host executes as a NOP.
//
// What follows the document: one logic port per module, pipeline probes
// taken without changing the pipeline, module alarms raising the integer
// unit trap, CHK words being NOPs for the host. This design's choices: the
// probe bundle, the per-port enable input, the cause register.
//
// Interface and timing: combinational from probe and mod_alarm to the port
// probes, trap and chk_nop; the cause register updates on the clock edge.
// Reset is active low and synchronous.
module rse_interface
  import rse_pkg::*;
#(
  parameter int unsigned NPORTS = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  rse_probe_t        probe,
  input  logic [NPORTS-1:0] port_en,
  output rse_probe_t        port_probe [NPORTS],
  input  logic [NPORTS-1:0] mod_alarm,
  output logic              trap,
  output logic [$clog2(NPORTS+1)-1:0] trap_port,   // lowest alarming port
  output logic              de_chk_nop,
  output logic              cause_valid,
  output logic [$clog2(NPORTS+1)-1:0] cause_port
);

  logic [NPORTS-1:0] active;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      port_probe[p] = probe;
      if (!port_en[p]) begin
        port_probe[p].de_valid = 1'b0;
        port_probe[p].wb_valid = 1'b0;
        port_probe[p].annul    = 1'b0;
      end
    end
  end

  assign active = mod_alarm & port_en;
  assign trap   = |active;

  always_comb begin
    trap_port = '0;
    for (int p = NPORTS - 1; p >= 0; p--)
      if (active[p]) trap_port = p[$bits(trap_port)-1:0];
  end

  assign de_chk_nop = probe.de_valid && is_chk(probe.de_inst);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cause_valid <= 1'b0;
      cause_port  <= '0;
    end else if (trap && !cause_valid) begin
      cause_valid <= 1'b1;
      cause_port  <= trap_port;
    end
  end

endmodule
