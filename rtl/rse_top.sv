// rse_top: unified security and reliability engine.
//
// The Reliability and Security Engine (rse_interface) with two checking
// modules on its logic ports: the Information Flow Signature checker
// (ifs_module, port 0), which stops untrusted code from tampering with
// critical data, and Critical Value Recomputation (cvr_module, port 1),
// which recomputes a critical variable along the executed path to catch
// computation errors. The host processor is outside this module: its
// pipeline probes come in on `probe`, and `trap` goes back to its integer
// unit; `de_chk_nop` tells its decoder to execute a CHK word as a NOP.
//
// The arrangement (host, RSE interface, IFS and CVR on their own ports)
// follows the document's prototype. Port numbering, the enables and the
// status outputs are this design's choices.
//
// Timing: trap is combinational from the probes of the instruction in host
// writeback, so the host can refuse to retire it; everything else is
// registered. Reset is active low and synchronous.
module rse_top
  import rse_pkg::*;
#(
  parameter int unsigned ISIG_ENTRIES = 32,
  parameter int unsigned DSIG_ENTRIES = 32,
  parameter int unsigned CVR_PATHS    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  rse_probe_t  probe,
  input  logic [1:0]  port_en,        // bit 0: IFS, bit 1: CVR
  output logic        trap,
  output logic [1:0]  trap_port,
  output logic        de_chk_nop,
  output logic        cause_valid,
  output logic [1:0]  cause_port,
  // IFS status
  output logic        ifs_alarm_seen,
  output logic [31:0] ifs_alarm_pc,
  output logic [31:0] ifs_alarm_addr,
  output logic        ifs_isig_overflow,
  output logic        ifs_dsig_overflow,
  output logic [$clog2(ISIG_ENTRIES+1)-1:0] ifs_isig_count,
  output logic [$clog2(DSIG_ENTRIES+1)-1:0] ifs_dsig_count,
  // CVR status
  output logic        cvr_alarm_seen,
  output logic [31:0] cvr_alarm_pc,
  output logic [31:0] cvr_alarm_expected,
  output logic [31:0] cvr_alarm_actual,
  output logic [15:0] cvr_checks_done,
  output logic [15:0] cvr_checks_skipped
);

  rse_probe_t port_probe [2];
  logic [1:0] mod_alarm;

  rse_interface #(.NPORTS(2)) u_rse (
    .clk, .rst_n,
    .probe,
    .port_en,
    .port_probe,
    .mod_alarm,
    .trap,
    .trap_port,
    .de_chk_nop,
    .cause_valid,
    .cause_port
  );

  ifs_module #(
    .ISIG_ENTRIES (ISIG_ENTRIES),
    .DSIG_ENTRIES (DSIG_ENTRIES)
  ) u_ifs (
    .clk, .rst_n,
    .probe         (port_probe[0]),
    .alarm         (mod_alarm[0]),
    .alarm_seen    (ifs_alarm_seen),
    .alarm_pc      (ifs_alarm_pc),
    .alarm_addr    (ifs_alarm_addr),
    .isig_overflow (ifs_isig_overflow),
    .dsig_overflow (ifs_dsig_overflow),
    .isig_count    (ifs_isig_count),
    .dsig_count    (ifs_dsig_count)
  );

  cvr_module #(.PATHS(CVR_PATHS)) u_cvr (
    .clk, .rst_n,
    .probe          (port_probe[1]),
    .alarm          (mod_alarm[1]),
    .alarm_seen     (cvr_alarm_seen),
    .alarm_pc       (cvr_alarm_pc),
    .alarm_expected (cvr_alarm_expected),
    .alarm_actual   (cvr_alarm_actual),
    .checks_done    (cvr_checks_done),
    .checks_skipped (cvr_checks_skipped)
  );

endmodule
