// tb_ifs_module: self-checking test of the IFS pipeline against the
// behavioural host pipeline.
//
// prog_gen builds a random authentication-style stream (trusted and
// untrusted stores to critical words, byte stores, loads, trapped stores,
// wrong-path instructions behind taken branches, signature removal) and
// predicts, in program order, which loads must raise the IFS alarm. The host
// model replays it with random pipeline holds and feeds the alarm back as
// its trap. Every alarm the IFS raises is compared with the next predicted
// one (PC), and the final signature occupancy is compared with the
// prediction. The alarm must appear in the same cycle the load is in
// writeback, which the comparison checks by sampling it only there.
module tb_ifs_module;
  import rse_pkg::*;
  import host_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  rse_probe_t probe;
  logic alarm, alarm_seen;
  logic [31:0] alarm_pc, alarm_addr;
  logic isig_ovf, dsig_ovf;
  logic [5:0] isig_cnt, dsig_cnt;
  logic idle;
  int n_hold, n_annul, n_retired, n_trapped, n_squashed, model_err;
  int checks = 0, failures = 0, cycles = 0, n_alarm = 0;

  leon3_pipe_model #(.HOLD_PCT(25)) u_host (
    .clk, .rst_n, .trap_in(alarm), .probe, .idle,
    .n_hold, .n_annul, .n_retired, .n_trapped, .n_squashed, .model_err);

  ifs_module u_dut (
    .clk, .rst_n, .probe, .alarm, .alarm_seen, .alarm_pc, .alarm_addr,
    .isig_overflow(isig_ovf), .dsig_overflow(dsig_ovf),
    .isig_count(isig_cnt), .dsig_count(dsig_cnt));

  prog_gen g;
  logic [31:0] exp_ifs[$];
  logic [31:0] first_alarm_pc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // alarm seen by the host as it retires (or refuses) the WB instruction
  always @(posedge clk) if (rst_n) begin
    cycles <= cycles + 1;
    if (alarm && !probe.hold) begin
      n_alarm++;
      if (exp_ifs.size() == 0)
        check(0, $sformatf("unexpected alarm at pc %h", probe.wb_pc));
      else begin
        automatic logic [31:0] e = exp_ifs.pop_front();
        check(e == probe.wb_pc,
              $sformatf("alarm at pc %h, expected %h", probe.wb_pc, e));
      end
    end
  end

  initial begin
    g = new();
    g.scenario(600);
    foreach (g.exp_pc[i]) if (g.exp_port[i] == 0) exp_ifs.push_back(g.exp_pc[i]);
    first_alarm_pc = (exp_ifs.size() != 0) ? exp_ifs[0] : '0;
    foreach (g.recs[i]) u_host.load(g.recs[i]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (idle);
    repeat (4) @(posedge clk);
    check(exp_ifs.size() == 0, $sformatf("%0d expected alarms missing", exp_ifs.size()));
    check(model_err == 0, "host stream rules broken");
    check(int'(isig_cnt) == g.crit_pc.num(), $sformatf("isig count %0d vs %0d", isig_cnt, g.crit_pc.num()));
    check(int'(dsig_cnt) == g.dsig_entries, $sformatf("dsig count %0d vs %0d", dsig_cnt, g.dsig_entries));
    check(!isig_ovf && !dsig_ovf, "unexpected overflow");
    check(alarm_seen == (g.n_ifs_alarm > 0), "alarm_seen");
    check(alarm_pc == first_alarm_pc, "alarm_pc holds the first alarm");
    // every mechanism exercised
    check(g.n_ifs_alarm > 0 && n_alarm == g.n_ifs_alarm, $sformatf("alarms %0d/%0d", n_alarm, g.n_ifs_alarm));
    check(g.n_crit_st > 0 && g.n_attack_st > 0 && g.n_byte_st > 0, "store kinds");
    check(n_hold > 0 && n_annul > 0 && n_squashed > 0 && g.n_trap > 0 && g.n_remove > 0, "pipeline events");
    $display("ifs: alarms=%0d crit_st=%0d attack_st=%0d byte_st=%0d holds=%0d annuls=%0d traps=%0d removes=%0d cycles=%0d",
             n_alarm, g.n_crit_st, g.n_attack_st, g.n_byte_st, n_hold, n_annul, g.n_trap, g.n_remove, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
