// tb_cvr_module: self-checking test of Critical Value Recomputation against
// the behavioural host pipeline.
//
// prog_gen's workload includes a loop index guarded by CVR: path 1 resets it
// to 0, path 2 increments it, and now and then the program stores a wrong
// value (a computation error) or forgets to report its path. The reference
// model predicts which CHECK instructions must raise the CVR alarm; each
// alarm is compared with the next predicted one (PC), in the cycle the
// CHECK is in writeback. The done/skipped check counters and the sticky
// first-alarm registers are compared with the prediction too.
module tb_cvr_module;
  import rse_pkg::*;
  import host_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  rse_probe_t probe;
  logic alarm, alarm_seen;
  logic [31:0] alarm_pc, alarm_expected, alarm_actual;
  logic [15:0] checks_done, checks_skipped;
  logic idle;
  int n_hold, n_annul, n_retired, n_trapped, n_squashed, model_err;
  int checks = 0, failures = 0, cycles = 0, n_alarm = 0;

  leon3_pipe_model #(.HOLD_PCT(25)) u_host (
    .clk, .rst_n, .trap_in(alarm), .probe, .idle,
    .n_hold, .n_annul, .n_retired, .n_trapped, .n_squashed, .model_err);

  cvr_module u_dut (
    .clk, .rst_n, .probe, .alarm, .alarm_seen, .alarm_pc, .alarm_expected,
    .alarm_actual, .checks_done, .checks_skipped);

  prog_gen g;
  logic [31:0] exp_cvr[$];
  logic [31:0] first_alarm_pc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycles <= cycles + 1;
    if (alarm && !probe.hold) begin
      n_alarm++;
      if (exp_cvr.size() == 0)
        check(0, $sformatf("unexpected alarm at pc %h", probe.wb_pc));
      else begin
        automatic logic [31:0] e = exp_cvr.pop_front();
        check(e == probe.wb_pc,
              $sformatf("alarm at pc %h, expected %h", probe.wb_pc, e));
      end
    end
  end

  initial begin
    g = new();
    g.scenario(600);
    foreach (g.exp_pc[i]) if (g.exp_port[i] == 1) exp_cvr.push_back(g.exp_pc[i]);
    first_alarm_pc = (exp_cvr.size() != 0) ? exp_cvr[0] : '0;
    foreach (g.recs[i]) u_host.load(g.recs[i]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (idle);
    repeat (4) @(posedge clk);
    check(exp_cvr.size() == 0, $sformatf("%0d expected alarms missing", exp_cvr.size()));
    check(model_err == 0, "host stream rules broken");
    check(int'(checks_done) == g.n_cvr_check, $sformatf("checks_done %0d vs %0d", checks_done, g.n_cvr_check));
    check(int'(checks_skipped) == g.n_cvr_skip, $sformatf("checks_skipped %0d vs %0d", checks_skipped, g.n_cvr_skip));
    check(alarm_seen == (g.n_cvr_alarm > 0), "alarm_seen");
    check(alarm_pc == first_alarm_pc, "alarm_pc holds the first alarm");
    check(alarm_expected != alarm_actual && alarm_actual == alarm_expected + 32'd7,
          "first alarm records recomputed and program values");
    check(g.n_cvr_alarm > 0 && n_alarm == g.n_cvr_alarm, $sformatf("alarms %0d/%0d", n_alarm, g.n_cvr_alarm));
    check(g.n_cvr_check > 0 && g.n_cvr_skip > 0 && n_hold > 0, "mechanisms exercised");
    $display("cvr: alarms=%0d checks=%0d skipped=%0d holds=%0d cycles=%0d",
             n_alarm, g.n_cvr_check, g.n_cvr_skip, n_hold, cycles);
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
