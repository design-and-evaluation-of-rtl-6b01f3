// cvr_module: Critical Value Recomputation, the reliability module of the RSE.
//
// CVR re-executes, in hardware, the computation of a critical variable along
// the control-flow path the program actually took, and compares the result
// with the value the program produced. It has the two parts the document
// names: a path-tracking part, which records the path the instrumented
// program reports with a CHK PATH instruction, and a checking part, which at
// a CHK CHECK instruction evaluates the recomputation rule of that path and
// compares it with the program's value of the variable.
//
// The program's value is captured by snooping every retiring store to the
// critical variable's address (set with CHK VAR_ADDR). Each path has a rule
// in the module's own expression memory, loaded with CHK EXPR:
//     rec = use_prev ? prev + k : k       (k: 14-bit signed constant)
// and after the check prev takes the program's value. This is the
// recurrence of the document's example (path 1: j = 0, i_p = 0; path 2:
// j = i_p + 1, i_p = i_c, where j is the recomputed and i_c the program's
// index; on the paths that pass, i_c equals j); the document's
// checker is a microcontroller running checking expressions whose
// instruction set it does not give, so this fixed-form recomputation unit is
// this design's simplification. A CHECK with no path reported since the last
// CHECK is skipped and counted. CHK payload formats:
//   VAR_ADDR/SET_HI: as for the IFS (SET_HI gives bits 31:19)
//   EXPR : [18:15] path, [14] use_prev, [13:0] k
//   PATH : [3:0] path
//
// Interface and timing: everything acts when an instruction retires in host
// writeback (probe.wb_valid high and probe.hold low), so CHK commands and
// stores are seen in program order. alarm is combinational in the cycle the
// failing CHECK is in writeback; alarm_seen, alarm_pc, alarm_expected and
// alarm_actual hold the first failure. Reset is active low and synchronous.
// It uses only the writeback part of the probe bundle; the decode-stage
// fields, annul and the load data stay unused.
module cvr_module
  import rse_pkg::*;
#(
  parameter int unsigned PATHS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  rse_probe_t  probe,
  output logic        alarm,
  output logic        alarm_seen,
  output logic [31:0] alarm_pc,
  output logic [31:0] alarm_expected,
  output logic [31:0] alarm_actual,
  output logic [15:0] checks_done,
  output logic [15:0] checks_skipped
);

  localparam int unsigned PW = $clog2(PATHS);

  typedef struct packed {
    logic        use_prev;
    logic [13:0] k;
  } cvr_rule_t;

  cvr_rule_t   rule_q [PATHS];
  logic [12:0] hi_q;
  logic [29:0] var_addr_q;
  logic        var_valid_q;
  logic [31:0] prog_val_q;
  logic [31:0] prev_q;
  logic [PW-1:0] path_q;
  logic        path_valid_q;

  logic        commit;
  logic        chk;
  logic [2:0]  cmd;
  logic [18:0] low19;
  logic        is_check;
  cvr_rule_t   rule;
  logic [31:0] rec;

  assign commit = probe.wb_valid && !probe.hold;
  assign low19  = probe.wb_inst[18:0];
  assign cmd    = probe.wb_inst[27:25];
  assign chk    = is_chk(probe.wb_inst) && probe.wb_inst[29:28] == MOD_CVR;
  assign is_check = chk && cmd == CVR_CHECK && path_valid_q;

  // checking part: recompute along the tracked path
  assign rule = rule_q[path_q];
  assign rec  = (rule.use_prev ? prev_q : 32'd0) + {{18{rule.k[13]}}, rule.k};

  assign alarm = probe.wb_valid && is_check && rec != prog_val_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < PATHS; p++) rule_q[p] <= '0;
      hi_q           <= '0;
      var_addr_q     <= '0;
      var_valid_q    <= 1'b0;
      prog_val_q     <= '0;
      prev_q         <= '0;
      path_q         <= '0;
      path_valid_q   <= 1'b0;
      alarm_seen     <= 1'b0;
      alarm_pc       <= '0;
      alarm_expected <= '0;
      alarm_actual   <= '0;
      checks_done    <= '0;
      checks_skipped <= '0;
    end else if (commit) begin
      // program value of the critical variable
      if (probe.wb_store && var_valid_q && probe.wb_addr[31:2] == var_addr_q)
        for (int b = 0; b < 4; b++)
          if (probe.wb_be[b]) prog_val_q[8*b +: 8] <= probe.wb_wdata[8*b +: 8];
      if (chk) begin
        unique case (cvr_cmd_e'(cmd))
          CVR_SET_HI:   hi_q <= low19[12:0];
          CVR_VAR_ADDR: begin
            var_addr_q  <= {hi_q, low19[18:2]};
            var_valid_q <= 1'b1;
          end
          CVR_EXPR:     rule_q[low19[15 +: PW]] <= '{use_prev: low19[14], k: low19[13:0]};
          CVR_PATH:     begin
            path_q       <= low19[PW-1:0];
            path_valid_q <= 1'b1;
          end
          CVR_CHECK:    begin
            if (path_valid_q) begin
              prev_q       <= prog_val_q;
              path_valid_q <= 1'b0;
              checks_done  <= checks_done + 16'd1;
              if (alarm && !alarm_seen) begin
                alarm_seen     <= 1'b1;
                alarm_pc       <= probe.wb_pc;
                alarm_expected <= rec;
                alarm_actual   <= prog_val_q;
              end
            end else begin
              checks_skipped <= checks_skipped + 16'd1;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
