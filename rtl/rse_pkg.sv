// rse_pkg: types and constants shared by the Reliability and Security Engine
// (RSE) and the checking modules hung off it.
//
// The RSE sees the host pipeline only through a bundle of probe signals,
// rse_probe_t. The bundle carries the three groups of signals the checking
// modules need: the instruction and its PC in the host decode stage, the
// pipeline hold and annul controls, and the data-cache access of the
// instruction in the host writeback stage. The exact signal set and its
// stage alignment are this design's choice; the document only lists the
// groups (instruction and pointer, stall and flush, cache control).
//
// CHK instructions are SPARC V8 CPop1 words (op = 2, op3 = 0x36). The 5-bit rd
// field (bits 29:25) names the module and the command, the low 19 bits carry
// the payload, exactly as the C macro of the software tool chain builds them:
//   word = 0x81B00000 + ((top5 & 0x1F) << 25) + (low19 & 0x7FFFF)
// The split of top5 into a 2-bit module id and a 3-bit command, and the
// command codes, are this design's choice.
package rse_pkg;

  // ---------------------------------------------------------------- probes
  typedef struct packed {
    // pipeline control
    logic        hold;      // whole host pipeline frozen this cycle
    logic        annul;     // instructions in FE, DE and RA are squashed at
                            // the next clock edge (taken branch, trap)
    // decode stage: instruction word now available
    logic        de_valid;
    logic [31:0] de_pc;
    logic [31:0] de_inst;
    // writeback stage: the instruction that retires when hold is low
    logic        wb_valid;  // low for a bubble or a trapped instruction
    logic [31:0] wb_pc;
    logic [31:0] wb_inst;
    logic        wb_load;   // data-cache read
    logic        wb_store;  // data-cache write
    logic [31:0] wb_addr;   // byte address of the access
    logic [3:0]  wb_be;     // byte lanes touched (lane 3 = bits 31:24)
    logic [31:0] wb_wdata;  // store data, lane aligned
    logic [31:0] wb_rdata;  // load data returned by cache/memory, lane aligned
  } rse_probe_t;

  // ---------------------------------------------------------------- CHK
  localparam logic [1:0] ChkOp  = 2'b10;
  localparam logic [5:0] ChkOp3 = 6'h36;       // CPop1
  localparam logic [31:0] ChkBase = 32'h81B0_0000;

  typedef enum logic [1:0] {
    MOD_RSE = 2'd0,
    MOD_IFS = 2'd1,
    MOD_CVR = 2'd2,
    MOD_USR = 2'd3
  } mod_id_e;

  // IFS commands (top5[2:0] when top5[4:3] == MOD_IFS)
  typedef enum logic [2:0] {
    IFS_SET_HI      = 3'd0,  // latch payload[12:0] as address bits 31:19
    IFS_DSIG_ADDR   = 3'd1,  // stage a critical data address
    IFS_ISIG_ADD    = 3'd2,  // add a critical PC to the instruction signature
    IFS_DSIG_DATA   = 3'd3,  // write {staged address, data} into the data signature
    IFS_DSIG_REMOVE = 3'd4   // drop an address from the data signature
  } ifs_cmd_e;

  // CVR commands (top5[2:0] when top5[4:3] == MOD_CVR)
  typedef enum logic [2:0] {
    CVR_SET_HI   = 3'd0,     // latch payload[12:0] as bits 31:19
    CVR_VAR_ADDR = 3'd1,     // address of the critical variable
    CVR_EXPR     = 3'd2,     // recomputation rule of one path
    CVR_PATH     = 3'd3,     // program has taken path <payload[3:0]>
    CVR_CHECK    = 3'd4      // compare program value with recomputed value
  } cvr_cmd_e;

  // Uniform command produced by the IFS CHK handler
  typedef enum logic [2:0] {
    IOP_NONE,
    IOP_ISIG_ADD,
    IOP_DSIG_ADDR,
    IOP_DSIG_DATA,
    IOP_DSIG_REMOVE
  } ifs_op_e;

  typedef struct packed {
    ifs_op_e     op;
    logic [31:0] operand;    // full 32-bit value: {high bits, payload}
  } ifs_cmd_t;

  // Data-signature operations
  typedef enum logic [1:0] {
    DS_NONE,
    DS_WRITE,     // configure: full word, all bytes trusted
    DS_MERGE,     // critical store: merge the written byte lanes
    DS_REMOVE
  } ds_op_e;

  function automatic logic is_chk(input logic [31:0] inst);
    return inst[31:30] == ChkOp && inst[24:19] == ChkOp3;
  endfunction

  function automatic logic [31:0] chk_word(input logic [4:0] top5,
                                           input logic [18:0] low19);
    return ChkBase + (32'(top5) << 25) + 32'(low19);
  endfunction

  function automatic logic [4:0] chk_top5(input logic [1:0] mod_id,
                                          input logic [2:0] cmd);
    return {mod_id, cmd};
  endfunction

endpackage
