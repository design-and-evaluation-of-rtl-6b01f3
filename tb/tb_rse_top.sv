// tb_rse_top: end-to-end test of the unified engine (RSE interface, IFS on
// port 0, CVR on port 1) at its default sizes, driven by the behavioural
// host pipeline whose trap input is the engine's trap output.
//
// Phase 1, both modules on: a random authentication-style workload with
// signature loading by CHK instructions, trusted and untrusted stores to
// critical words (word and byte), loads of critical data, trapped stores,
// taken branches whose wrong-path instructions try to list the attacker's
// store as trusted, signature removal, and a CVR-guarded loop index with
// injected computation errors and unreported paths. Every trap is compared,
// in the cycle its instruction is in writeback, with the next one the
// reference model predicts (PC and port); status counters are compared at
// the end.
// Phase 2, after a reset, CVR switched off: the same kind of workload must
// give IFS traps only, and CVR must see nothing.
// Each mechanism (hold, annul, trapped instruction, IFS alarm, CVR alarm,
// critical store, untrusted store to critical data, byte store, removal,
// CHK executed as NOP, skipped CVR check, port switched off) is counted and
// must occur at least once.
module tb_rse_top;
  import rse_pkg::*;
  import host_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  rse_probe_t probe;
  logic [1:0] port_en;
  logic trap, de_chk_nop, cause_valid;
  logic [1:0] trap_port, cause_port;
  logic ifs_alarm_seen, ifs_isig_ovf, ifs_dsig_ovf, cvr_alarm_seen;
  logic [31:0] ifs_alarm_pc, ifs_alarm_addr, cvr_alarm_pc, cvr_alarm_exp, cvr_alarm_act;
  logic [5:0] ifs_isig_count, ifs_dsig_count;
  logic [15:0] cvr_done, cvr_skipped;
  logic idle;
  int n_hold, n_annul, n_retired, n_trapped, n_squashed, model_err;
  int checks = 0, failures = 0, cycles = 0;
  int n_trap_ifs = 0, n_trap_cvr = 0, n_chk_nop = 0;

  leon3_pipe_model #(.HOLD_PCT(20)) u_host (
    .clk, .rst_n, .trap_in(trap), .probe, .idle,
    .n_hold, .n_annul, .n_retired, .n_trapped, .n_squashed, .model_err);

  rse_top u_dut (
    .clk, .rst_n, .probe, .port_en, .trap, .trap_port, .de_chk_nop,
    .cause_valid, .cause_port,
    .ifs_alarm_seen, .ifs_alarm_pc, .ifs_alarm_addr,
    .ifs_isig_overflow(ifs_isig_ovf), .ifs_dsig_overflow(ifs_dsig_ovf),
    .ifs_isig_count, .ifs_dsig_count,
    .cvr_alarm_seen, .cvr_alarm_pc, .cvr_alarm_expected(cvr_alarm_exp),
    .cvr_alarm_actual(cvr_alarm_act), .cvr_checks_done(cvr_done),
    .cvr_checks_skipped(cvr_skipped));

  prog_gen g;
  logic [31:0] exp_pc[$];
  int          exp_port[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycles <= cycles + 1;
    if (probe.de_valid && de_chk_nop && !probe.hold) n_chk_nop++;
    if (trap && !probe.hold) begin
      if (trap_port == 0) n_trap_ifs++; else n_trap_cvr++;
      if (exp_pc.size() == 0)
        check(0, $sformatf("unexpected trap at pc %h", probe.wb_pc));
      else begin
        automatic logic [31:0] e = exp_pc.pop_front();
        automatic int ep = exp_port.pop_front();
        check(e == probe.wb_pc && ep == int'(trap_port),
              $sformatf("trap at pc %h port %0d, expected %h port %0d",
                        probe.wb_pc, trap_port, e, ep));
      end
    end
  end

  task automatic run_phase(input int iters, input logic [1:0] en);
    g = new();
    g.scenario(iters);
    exp_pc.delete(); exp_port.delete();
    foreach (g.exp_pc[i])
      if (en[g.exp_port[i]]) begin
        exp_pc.push_back(g.exp_pc[i]);
        exp_port.push_back(g.exp_port[i]);
      end
    rst_n = 0;
    port_en = en;
    foreach (g.recs[i]) u_host.load(g.recs[i]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (idle);
    repeat (4) @(posedge clk);
    check(exp_pc.size() == 0, $sformatf("%0d expected traps missing", exp_pc.size()));
    check(model_err == 0, "host stream rules broken");
    check(int'(ifs_isig_count) == g.crit_pc.num(), "isig count");
    check(int'(ifs_dsig_count) == g.dsig_entries, "dsig count");
    check(!ifs_isig_ovf && !ifs_dsig_ovf, "no overflow");
    check(ifs_alarm_seen == (g.n_ifs_alarm > 0), "ifs alarm_seen");
    if (en[1]) begin
      check(int'(cvr_done) == g.n_cvr_check, "cvr checks done");
      check(int'(cvr_skipped) == g.n_cvr_skip, "cvr checks skipped");
    end else begin
      check(cvr_done == 0 && cvr_skipped == 0 && !cvr_alarm_seen, "cvr switched off");
    end
    check(cause_valid == (exp_port.size() == 0 && (g.n_ifs_alarm > 0 || (en[1] && g.n_cvr_alarm > 0))),
          "cause register");
  endtask

  initial begin
    port_en = 2'b11;
    run_phase(1500, 2'b11);
    check(g.n_crit_st > 0 && g.n_attack_st > 0 && g.n_byte_st > 0, "store kinds");
    check(g.n_remove > 0 && g.n_trap > 0 && g.n_cvr_skip > 0, "removal, trapped store, skipped check");
    check(n_hold > 0 && n_annul > 0 && n_squashed > 0, "holds and annuls");
    check(n_trap_ifs > 0 && n_trap_cvr > 0, "both modules trapped");
    check(n_chk_nop > 0, "CHK executed as NOP");
    $display("phase 1: ifs traps=%0d cvr traps=%0d crit_st=%0d attack_st=%0d byte_st=%0d holds=%0d annuls=%0d trapped=%0d removes=%0d chk=%0d cycles=%0d",
             n_trap_ifs, n_trap_cvr, g.n_crit_st, g.n_attack_st, g.n_byte_st,
             n_hold, n_annul, g.n_trap, g.n_remove, n_chk_nop, cycles);
    n_trap_cvr = 0;
    run_phase(300, 2'b01);
    check(n_trap_cvr == 0 && g.n_cvr_alarm > 0, "CVR port switched off");
    $display("phase 2: cvr errors ignored=%0d", g.n_cvr_alarm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
