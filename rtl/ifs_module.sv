// ifs_module: Information Flow Signature checker.
//
// The IFS guards critical data: only the store instructions listed in the
// instruction signature may write it. It runs as a pipeline of its own that
// moves in lock step with the host pipeline, driven by the RSE probes:
//
//   Fetch       the PC of the instruction in the host decode stage is looked
//               up in the instruction signature (ifs_isig); a hit marks the
//               instruction critical. Captured into dec_q (host RA stage).
//   CHK handler ifs_chk_handler turns CHK words for the IFS into commands.
//               Captured into exe_q (host EX stage).
//   Execute     controller: an ISIG_ADD command writes the instruction
//               signature here; the other commands and the critical flag
//               travel on.
//   Memory      spans the host ME, XC and WB stages (mem_q[0..2]), because a
//               load's data may only arrive in XC or WB after a cache miss.
//               When the instruction retires in WB the data signature
//               (ifs_dsig) is used: a load whose address is in it has its
//               bytes compared with the trusted bytes, a mismatch raises the
//               alarm; a critical store merges its data into the signature;
//               data-signature CHK commands are applied.
//
// A store that is not critical changes memory but not the signature, so a
// tampered critical location is caught by the first load that reads it.
// A PC in the instruction signature that is not a store changes nothing.
//
// What follows the document: the four stages, their roles, the lock step
// with the host via stall/flush, the final comparison when the instruction
// reaches host writeback, a same-cycle (combinational) alarm that can raise
// the host trap. This design's choices: the probe alignment of rse_probe_t,
// applying data-signature CHK commands at writeback (one write port serves
// both configuration and critical stores), byte-lane masks, SET_HI/REMOVE
// commands, sizes.
//
// Timing: stage registers advance on clock edges where probe.hold is low;
// probe.annul squashes dec_q (and the instruction being captured from decode)
// at the next edge. alarm is combinational in the cycle the offending load is
// in host WB. An ISIG_ADD takes effect when the CHK is in host EX, so a
// critical store must be at least three instructions behind the CHK that
// lists it. Reset is active low and synchronous.
//
// Lint notes: the full outputs of the two signature tables are left open
// (this module reports fill counts and sticky overflow instead), and the
// probe fields it does not need (the writeback instruction word) stay
// unused.
module ifs_module
  import rse_pkg::*;
#(
  parameter int unsigned ISIG_ENTRIES = 32,
  parameter int unsigned DSIG_ENTRIES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  rse_probe_t  probe,
  // alarm to the RSE (host trap); combinational, held while the load waits
  output logic        alarm,
  // first alarm, sticky until reset
  output logic        alarm_seen,
  output logic [31:0] alarm_pc,
  output logic [31:0] alarm_addr,
  // status
  output logic        isig_overflow,
  output logic        dsig_overflow,
  output logic [$clog2(ISIG_ENTRIES+1)-1:0] isig_count,
  output logic [$clog2(DSIG_ENTRIES+1)-1:0] dsig_count
);

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic        crit;
    ifs_cmd_t    cmd;
  } ifs_stage_t;

  logic        adv;
  logic        f_crit;

  logic        dec_valid;
  logic [31:0] dec_pc, dec_inst;
  logic        dec_crit;
  logic        dec_is_chk;
  ifs_cmd_t    dec_cmd;

  ifs_stage_t  exe_q;
  ifs_stage_t  mem_q [3];

  assign adv = !probe.hold;

  // ------------------------------------------------------------- fetch
  ifs_isig #(.ENTRIES(ISIG_ENTRIES)) u_isig (
    .clk, .rst_n,
    .lookup_pc (probe.de_pc),
    .hit       (f_crit),
    .add_en    (adv && exe_q.valid && exe_q.cmd.op == IOP_ISIG_ADD),
    .add_pc    (exe_q.cmd.operand),
    .full      (),
    .overflow  (isig_overflow),
    .count     (isig_count)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dec_valid <= 1'b0;
      dec_pc    <= '0;
      dec_inst  <= '0;
      dec_crit  <= 1'b0;
    end else if (probe.annul) begin
      dec_valid <= 1'b0;
    end else if (adv) begin
      dec_valid <= probe.de_valid;
      dec_pc    <= probe.de_pc;
      dec_inst  <= probe.de_inst;
      dec_crit  <= probe.de_valid && f_crit;
    end
  end

  // ------------------------------------------------------------- CHK handler
  ifs_chk_handler u_chk (
    .clk, .rst_n,
    .adv        (adv && dec_valid && !probe.annul),
    .inst       (dec_inst),
    .is_ifs_chk (dec_is_chk),
    .cmd        (dec_cmd)
  );

  // ------------------------------------------------------------- execute / memory
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      exe_q <= '0;
      for (int i = 0; i < 3; i++) mem_q[i] <= '0;
    end else if (adv) begin
      exe_q.valid <= dec_valid && !probe.annul;
      exe_q.pc    <= dec_pc;
      exe_q.crit  <= dec_crit && !dec_is_chk;
      exe_q.cmd   <= dec_cmd;
      mem_q[0]    <= exe_q;
      mem_q[1]    <= mem_q[0];
      mem_q[2]    <= mem_q[1];
    end
  end

  // ------------------------------------------------------------- memory (WB)
  ifs_stage_t  wb;
  logic        wb_here;       // instruction in host WB is valid and tracked
  logic        commit;        // ... and retires at this edge
  logic [31:0] staged_addr_q;
  logic [31:0] ds_addr;
  ds_op_e      ds_op;
  logic        ds_hit;
  logic [31:0] ds_rdata;
  logic [3:0]  ds_rmask;
  logic [3:0]  cmp_lanes;
  logic        mismatch;

  assign wb      = mem_q[2];
  assign wb_here = wb.valid && probe.wb_valid;
  assign commit  = wb_here && adv;

  always_comb begin
    ds_addr = probe.wb_addr;
    ds_op   = DS_NONE;
    unique case (wb.cmd.op)
      IOP_DSIG_DATA: begin
        ds_addr = staged_addr_q;
        ds_op   = DS_WRITE;
      end
      IOP_DSIG_REMOVE: begin
        ds_addr = wb.cmd.operand;
        ds_op   = DS_REMOVE;
      end
      default: if (wb.crit && probe.wb_store) ds_op = DS_MERGE;
    endcase
    if (!commit) ds_op = DS_NONE;
  end

  ifs_dsig #(.ENTRIES(DSIG_ENTRIES)) u_dsig (
    .clk, .rst_n,
    .addr     (ds_addr),
    .hit      (ds_hit),
    .rdata    (ds_rdata),
    .rmask    (ds_rmask),
    .op       (ds_op),
    .be       (probe.wb_be),
    .wdata    ((wb.cmd.op == IOP_DSIG_DATA) ? wb.cmd.operand : probe.wb_wdata),
    .full     (),
    .overflow (dsig_overflow),
    .count    (dsig_count)
  );

  assign cmp_lanes = ds_rmask & probe.wb_be;
  always_comb begin
    mismatch = 1'b0;
    for (int b = 0; b < 4; b++)
      if (cmp_lanes[b] && ds_rdata[8*b +: 8] != probe.wb_rdata[8*b +: 8])
        mismatch = 1'b1;
  end

  assign alarm = wb_here && wb.cmd.op == IOP_NONE && probe.wb_load &&
                 ds_hit && mismatch;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      staged_addr_q <= '0;
      alarm_seen    <= 1'b0;
      alarm_pc      <= '0;
      alarm_addr    <= '0;
    end else begin
      if (commit && wb.cmd.op == IOP_DSIG_ADDR)
        staged_addr_q <= wb.cmd.operand;
      if (alarm && !alarm_seen) begin
        alarm_seen <= 1'b1;
        alarm_pc   <= wb.pc;
        alarm_addr <= probe.wb_addr;
      end
    end
  end

  // The IFS copy of the pipeline must stay aligned with the host.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    wb_here |-> wb.pc == probe.wb_pc);
  a_annul_moves: assert property (@(posedge clk) disable iff (!rst_n)
    probe.annul |-> !probe.hold);

endmodule
