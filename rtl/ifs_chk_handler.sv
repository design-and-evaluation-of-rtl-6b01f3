// ifs_chk_handler: the check-handler (decode) stage of the IFS pipeline.
//
// It looks at the instruction held in the IFS decode register, recognises the
// CHK (CPop1) words addressed to the IFS and turns them into one uniform
// command, ifs_cmd_t, for the execute stage: an operation code and a full
// 32-bit operand. The document names three kinds of checks (one that
// configures the instruction signature, two that configure the data
// signature: critical address and critical data) and says the handler
// reorganises the bits into a uniform pattern. A CHK word carries only 19
// payload bits, so a 32-bit address or data word is sent as a SET_HI command
// (bits 31:19, kept in a register here) followed by the command proper; this
// split and the removal command are this design's choices.
//
// Interface and timing: cmd is combinational from inst. The high-bits
// register is updated on the clock edge where adv is high, i.e. when a valid,
// non-annulled SET_HI leaves this stage, so it follows program order. Reset
// (active low, synchronous to clk) clears it.
module ifs_chk_handler
  import rse_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        adv,       // instruction in this stage moves on and is valid
  input  logic [31:0] inst,
  output logic        is_ifs_chk,
  output ifs_cmd_t    cmd
);

  logic [12:0] hi_q;
  logic [4:0]  top5;
  logic [18:0] low19;

  assign top5  = inst[29:25];
  assign low19 = inst[18:0];
  assign is_ifs_chk = is_chk(inst) && top5[4:3] == MOD_IFS;

  always_comb begin
    cmd.operand = {hi_q, low19};
    cmd.op      = IOP_NONE;
    if (is_ifs_chk) begin
      unique case (ifs_cmd_e'(top5[2:0]))
        IFS_ISIG_ADD:    cmd.op = IOP_ISIG_ADD;
        IFS_DSIG_ADDR:   cmd.op = IOP_DSIG_ADDR;
        IFS_DSIG_DATA:   cmd.op = IOP_DSIG_DATA;
        IFS_DSIG_REMOVE: cmd.op = IOP_DSIG_REMOVE;
        default:         cmd.op = IOP_NONE;   // SET_HI and unused codes
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      hi_q <= '0;
    else if (adv && is_ifs_chk && top5[2:0] == IFS_SET_HI)
      hi_q <= low19[12:0];
  end

endmodule
