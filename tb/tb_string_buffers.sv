// tb_string_buffers: critical strings and buffers on the whole engine.
//
// The critical data of an FTP server (the user name and the return value of
// its password check) and of an HTTP server (the requested file name and the
// request body) are character buffers, written one byte at a time by a
// trusted copy loop. This program exercises exactly that on rse_top at its
// default sizes, behind the behavioural host pipeline:
//   FTP part  - a 32-byte user name is copied byte by byte by a trusted
//               store (8 data-signature words, built up lane by lane), the
//               password check stores its result; an untrusted formatting
//               routine overflows a neighbouring buffer into the first word
//               of the user name; the later byte-by-byte compare of the
//               name traps on the first tampered byte and not before. On
//               return the frame's entries are removed with CHK REMOVE.
//   HTTP part - a 64-byte file name and a 64-byte request body (16 + 16
//               words) fill the 32-entry data signature exactly; an
//               untrusted store rewrites two bytes of the file name ("..");
//               the sender's read of that word traps. One more critical
//               word then finds the table full: overflow is flagged and the
//               entry count stays at 32.
// Traps are compared with the reference model's predictions (PC and port).
// Buffer sizes and addresses are this testbench's choice; the kinds of
// critical variables are those the servers are evaluated with.
module tb_string_buffers;
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
  int checks = 0, failures = 0;
  logic [31:0] trap_pcs[$], trap_addrs[$];
  int          trap_ports[$];

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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && trap && !probe.hold) begin
    trap_pcs.push_back(probe.wb_pc);
    trap_addrs.push_back(probe.wb_addr);
    trap_ports.push_back(int'(trap_port));
  end

  localparam logic [31:0] CopyPc   = 32'h4000_3010;   // trusted byte store of the copy loop
  localparam logic [31:0] RetStPc  = 32'h4000_3100;   // trusted store of the check result
  localparam logic [31:0] FmtPc    = 32'h4008_4000;   // untrusted formatting routine
  localparam logic [31:0] UserName = 32'h41FF_E000;   // 32 bytes
  localparam logic [31:0] Neighbor = UserName - 16;   // 16-byte buffer below it
  localparam logic [31:0] AuthRet  = 32'h41FF_E040;
  localparam logic [31:0] FileName = 32'h4100_8000;   // 64 bytes
  localparam logic [31:0] PostData = 32'h4100_8100;   // 64 bytes
  localparam logic [31:0] Extra    = 32'h4100_8200;

  prog_gen g;
  logic [31:0] want_addr[$];

  // byte copy by the trusted loop
  function automatic void copy_bytes(logic [31:0] dst, int n, int seed);
    for (int k = 0; k < n; k++) begin
      logic [31:0] a = dst + 32'(k);
      logic [7:0]  c = 8'(8'h61 + ((k + seed) % 26));
      g.store(a, 4'(1 << a[1:0]), {4{c}}, CopyPc);
    end
  endfunction

  // byte-by-byte read (a compare loop); stops after the first trapped byte
  function automatic void read_bytes(logic [31:0] src, int n);
    for (int k = 0; k < n; k++) begin
      logic [31:0] a = src + 32'(k);
      int n_before = g.n_ifs_alarm;
      g.load(a, 4'(1 << a[1:0]));
      if (g.n_ifs_alarm != n_before) break;
    end
  endfunction

  initial begin
    g = new(32'h4000_2000);
    g.isig_add(CopyPc);
    g.isig_add(RetStPc);
    g.nop(4);

    // ---------------------------------------------------------- FTP
    copy_bytes(UserName, 32, 0);
    g.store(AuthRet, 4'hF, 32'd0, RetStPc);            // password wrong
    check(g.dsig_entries == 9, "user name and result take 9 words");
    // untrusted routine: writes 20 bytes into the 16-byte neighbour
    g.pc_next = FmtPc;
    for (int k = 0; k < 20; k += 4)
      g.store(Neighbor + 32'(k), 4'hF, 32'h2F2F_2F2F);
    want_addr.push_back(UserName);
    g.pc_next = 32'h4000_3200;
    read_bytes(UserName, 32);                          // strcmp(user_name, ...)
    g.load(AuthRet);
    // leaving the function: its critical words are dropped
    for (int w = 0; w < 8; w++) g.chk32(MOD_IFS, IFS_DSIG_REMOVE, UserName + 32'(4 * w));
    g.chk32(MOD_IFS, IFS_DSIG_REMOVE, AuthRet);
    g.nop(4);

    // ---------------------------------------------------------- HTTP
    copy_bytes(FileName, 64, 3);
    copy_bytes(PostData, 64, 7);
    check(g.dsig_entries == 32, "file name and request fill 32 words");
    g.pc_next = FmtPc + 32'h100;
    g.store(FileName + 8, 4'b0011, 32'h0000_2E2E);     // ".." into the name
    want_addr.push_back(FileName + 8);
    g.pc_next = 32'h4000_3400;
    for (int w = 0; w < 16; w++) g.load(FileName + 32'(4 * w)); // sendFile reads the name
    for (int w = 0; w < 16; w++) g.load(PostData + 32'(4 * w));
    g.nop(2);
    g.store(Extra, 4'hF, 32'h1234_5678, RetStPc);      // one critical word too many
    g.nop(8);

    port_en = 2'b11;
    foreach (g.recs[k]) u_host.load(g.recs[k]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (idle);
    repeat (4) @(posedge clk);

    check(trap_pcs.size() == g.exp_pc.size(),
          $sformatf("%0d traps, model predicts %0d", trap_pcs.size(), g.exp_pc.size()));
    foreach (trap_pcs[k])
      if (k < g.exp_pc.size())
        check(trap_pcs[k] == g.exp_pc[k] && trap_ports[k] == g.exp_port[k],
              $sformatf("trap %0d at %h, model %h", k, trap_pcs[k], g.exp_pc[k]));
    check(trap_addrs.size() == 2, $sformatf("%0d traps, want 2", trap_addrs.size()));
    foreach (want_addr[k])
      if (k < trap_addrs.size())
        check(trap_addrs[k] == want_addr[k],
              $sformatf("trap %0d on %h, want %h", k, trap_addrs[k], want_addr[k]));
    check(ifs_dsig_ovf, "overflow flagged for the 33rd word");
    check(int'(ifs_dsig_count) == 32, $sformatf("dsig count %0d, want 32", ifs_dsig_count));
    check(g.n_remove == 9, "nine removals");
    check(int'(ifs_isig_count) == 2 && !ifs_isig_ovf, "two trusted PCs");
    check(g.n_byte_st >= 160, "byte stores");
    check(model_err == 0, "host stream rules");
    $display("traps=%0d byte stores=%0d holds=%0d retired=%0d", trap_pcs.size(),
             g.n_byte_st, n_hold, n_retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
