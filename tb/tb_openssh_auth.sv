// tb_openssh_auth: the password-check example run on the whole engine.
//
// The program is a trace of the authentication routine of an SSH server
// (sys_auth_passwd) and of a list-walking loop guarded by CVR, run on
// rse_top at its default sizes behind the behavioural host pipeline.
//
// IFS part. The trusted store PCs are those of the example listing the
// design is explained with (0x400012d8 allowed_use = 1, 0x400012e4
// temp = sys_passwrd, 0x400012f0 user = packet_passwd, 0x400012f8
// temp = user), plus the store of the authenticated flag, the store of the
// encrypted-password pointer and the store that saves the return address.
// The data signature is configured for the global sys_passwrd pointer
// (0x4000e6c0) and for the two words of the CHK example (0x41f808e0,
// 0x41f8099c); the CHK word built for the first must be the example word
// chk("0x09", "0x41f808e0"). The routine is called six times:
//   1. clean run: no trap;
//   2. a system call overwrites the authenticated flag: trap when the
//      routine reads the flag;
//   3. the logging routine overwrites the saved return address: trap when
//      the return address is reloaded;
//   4. the logging routine redirects the encrypted-password pointer: trap
//      when the comparison loads it;
//   5. a register error corrupts a value before a trusted store: no trap
//      (the signature takes the corrupted value; this is a stated limit of
//      the technique);
//   6. a tampered CHK lists a load instead of a store: no effect, no trap.
// The frame pointer (0x41fff480) and the PCs outside the example listing are
// this testbench's choice.
//
// CVR part. i = (i > LEN) ? 0 : i + 1 is walked 20 times, the path is
// reported, and the hardware recomputes j = 0 (path 1) or j = i_prev + 1
// (path 2). At step 9 the increment is lost (i stays at its previous value):
// exactly that check must trap, and, because the previous value follows the
// program's value after a check, no later check may.
//
// Every trap is compared with the reference model's prediction (PC and
// port) in the cycle it happens, and the expected trap PCs are checked by
// name.
module tb_openssh_auth;
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
  logic [31:0] trap_pcs[$];
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
    trap_ports.push_back(int'(trap_port));
  end

  // ------------------------------------------------------------ program
  localparam logic [31:0] Fp        = 32'h41FF_F480;
  localparam logic [31:0] AllowedA  = Fp - 40;            // allowed_use
  localparam logic [31:0] TempA     = Fp - 52;            // temp
  localparam logic [31:0] UserA     = Fp - 56;            // user
  localparam logic [31:0] AuthA     = Fp - 20;            // authenticated
  localparam logic [31:0] EncA      = Fp - 24;            // encrypted_password
  localparam logic [31:0] RetA      = Fp + 60;            // saved return address
  localparam logic [31:0] SysPw     = 32'h4000_E6C0;      // global sys_passwrd
  localparam logic [31:0] PacketPw  = 32'h41FF_F600;
  localparam logic [31:0] PwHash    = 32'h41FF_F700;
  localparam logic [31:0] RetPc     = 32'h4000_0F10;
  localparam logic [31:0] SavePc    = 32'h4000_1180;      // save of the return address
  localparam logic [31:0] EncStPc   = 32'h4000_12A0;      // encrypted_password = xcrypt()
  localparam logic [31:0] AuthStPc  = 32'h4000_1320;      // authenticated = ...
  localparam logic [31:0] LogPc     = 32'h4008_3000;      // log_user_action (untrusted)
  localparam logic [31:0] SyscallPc = 32'h4009_1000;      // kernel path (untrusted)
  localparam int          ListLen   = 5;

  prog_gen g;
  logic [31:0] want_ifs[$];                // PCs that must trap on the IFS port
  logic [31:0] want_cvr;
  logic [31:0] tamper_pc;

  // one call of sys_auth_passwd; attack selects what goes wrong
  function automatic void auth_call(int attack, bit pw_ok);
    logic [31:0] enc = pw_ok ? PwHash : PwHash + 32'h40;
    logic [31:0] pc;
    g.pc_next = 32'h4000_1170;
    g.nop(4);
    g.store(RetA, 4'hF, RetPc, SavePc);                   // save return address
    g.pc_next = 32'h4000_12A0;
    // encrypted_password = xcrypt(password, pw_password)
    g.store(EncA, 4'hF, (attack == 5) ? enc ^ 32'h0000_0100 : enc, EncStPc);
    // the part of the listing the signature example is taken from
    g.pc_next = 32'h4000_12D4;
    g.nop();                                              // mov 1, %g1
    g.store(AllowedA, 4'hF, 32'd1);                       // 0x400012d8
    g.pc_next = 32'h4000_12DC;
    g.nop(2);                                             // sethi/or sys_passwrd
    g.store(TempA, 4'hF, SysPw);                          // 0x400012e4
    g.nop();                                              // 0x400012e8
    g.load(Fp - 36);                                      // 0x400012ec ld packet_passwd
    g.store(UserA, 4'hF, PacketPw);                       // 0x400012f0
    g.load(UserA);                                        // 0x400012f4
    g.store(TempA, 4'hF, PacketPw);                       // 0x400012f8
    // log_user_action(authctxt->user): untrusted library code
    g.pc_next = LogPc;
    g.nop(3);
    if (attack == 3) g.store(RetA, 4'hF, 32'h4008_3100);  // overwrite return address
    if (attack == 4) g.store(EncA, 4'hF, PacketPw);       // point at the user's text
    g.nop(2);
    // authenticated = (strcmp(encrypted_password, pw_password) == 0)
    g.pc_next = 32'h4000_1300;
    pc = g.pc_next;
    g.load(EncA);
    if (attack == 4) want_ifs.push_back(pc);
    g.load(SysPw);
    g.nop(3);
    g.store(AuthA, 4'hF, pw_ok ? 32'd1 : 32'd0, AuthStPc);
    if (attack == 2) begin                                // system call writes the flag
      g.pc_next = SyscallPc;
      g.nop(2);
      g.store(AuthA, 4'hF, 32'd1);
    end
    // return authenticated;
    g.pc_next = 32'h4000_1340;
    pc = g.pc_next;
    g.load(AuthA);
    if (attack == 2) want_ifs.push_back(pc);
    g.load(TempA);
    g.load(AllowedA);
    pc = g.pc_next;
    g.load(RetA);                                         // ret: reload return address
    if (attack == 3) want_ifs.push_back(pc);
    g.nop(3);
  endfunction

  // one step of the list walk of the CVR example
  function automatic void cvr_step(ref logic [31:0] i, input int step);
    int p;
    logic [31:0] prev = i;
    if (i > 32'(ListLen)) begin i = 0; p = 1; end
    else begin i = i + 1; p = 2; end
    if (step == 9) i = prev;                              // increment lost
    g.nop();
    g.store(32'h41FF_F400, 4'hF, i, 32'h4000_1400);
    g.chk(MOD_CVR, CVR_PATH, 19'(p));
    g.nop();
    if (step == 9) want_cvr = g.pc_next;
    g.chk(MOD_CVR, CVR_CHECK, '0);
  endfunction

  initial begin
    automatic logic [31:0] i_c = 0;
    g = new(32'h4000_1000);
    want_ifs.delete();
    // load time: the loader writes the initialised globals, then the
    // signatures from the dump file are sent
    g.store(SysPw, 4'hF, 32'h4000_E400);
    g.store(32'h41F8_08E0, 4'hF, 32'h0000_0001);
    g.store(32'h41F8_099C, 4'hF, 32'h0000_0002);
    g.isig_add(32'h4000_12D8);
    g.isig_add(32'h4000_12E4);
    g.isig_add(32'h4000_12F0);
    g.isig_add(32'h4000_12F8);
    g.isig_add(SavePc);
    g.isig_add(EncStPc);
    g.isig_add(AuthStPc);
    g.dsig_cfg(SysPw, 32'h4000_E400);
    g.dsig_cfg(32'h41F8_08E0, 32'h0000_0001);
    check(g.recs[g.recs.size() - 3].inst ==
          32'h81B00000 + (32'h09 << 25) + (32'h41f808e0 & 32'h7FFFF),
          "CHK example word chk(0x09, 0x41f808e0)");
    g.dsig_cfg(32'h41F8_099C, 32'h0000_0002);
    g.chk32(MOD_CVR, CVR_VAR_ADDR, 32'h41FF_F400);
    g.chk(MOD_CVR, CVR_EXPR, {4'd1, 1'b0, 14'd0});       // path 1: j = 0
    g.chk(MOD_CVR, CVR_EXPR, {4'd2, 1'b1, 14'd1});       // path 2: j = i_p + 1
    g.nop(4);
    for (int a = 1; a <= 5; a++) auth_call(a, a != 2);
    // 6: a tampered CHK lists the load that reads the flag instead of a store
    g.pc_next = 32'h4000_1600;
    tamper_pc = 32'h4000_1340;                            // the ld of authenticated
    g.isig_add(tamper_pc);
    g.nop(4);
    auth_call(6, 1);
    for (int s = 0; s < 20; s++) cvr_step(i_c, s);
    g.nop(8);

    port_en = 2'b11;
    foreach (g.recs[k]) u_host.load(g.recs[k]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (idle);
    repeat (4) @(posedge clk);

    // traps: as the reference model predicts, and as the attacks say
    check(trap_pcs.size() == g.exp_pc.size(),
          $sformatf("%0d traps, model predicts %0d", trap_pcs.size(), g.exp_pc.size()));
    foreach (trap_pcs[k])
      if (k < g.exp_pc.size())
        check(trap_pcs[k] == g.exp_pc[k] && trap_ports[k] == g.exp_port[k],
              $sformatf("trap %0d at %h port %0d, model %h port %0d", k,
                        trap_pcs[k], trap_ports[k], g.exp_pc[k], g.exp_port[k]));
    check(want_ifs.size() == 3, "three attacks that must be caught");
    check(g.n_ifs_alarm == 3 && g.n_cvr_alarm == 1, "model: 3 IFS and 1 CVR alarm");
    foreach (want_ifs[k]) begin
      automatic bit found = 0;
      foreach (trap_pcs[m]) if (trap_pcs[m] == want_ifs[k] && trap_ports[m] == 0) found = 1;
      check(found, $sformatf("attack %0d caught at %h", k + 2, want_ifs[k]));
    end
    begin
      automatic int n_cvr = 0;
      foreach (trap_pcs[m]) if (trap_ports[m] == 1) begin
        n_cvr++;
        check(trap_pcs[m] == want_cvr, $sformatf("CVR trap at %h, want %h", trap_pcs[m], want_cvr));
      end
      check(n_cvr == 1, $sformatf("%0d CVR traps, want 1", n_cvr));
    end
    check(cvr_alarm_seen && cvr_alarm_exp == cvr_alarm_act + 1,
          "CVR: recomputed value is one more than the program's");
    check(int'(cvr_done) == 20 && cvr_skipped == 0, "20 CVR checks");
    // 7 store PCs + the listed load
    check(int'(ifs_isig_count) == 8, $sformatf("isig count %0d", ifs_isig_count));
    check(int'(ifs_dsig_count) == g.dsig_entries, "dsig count");
    check(int'(ifs_dsig_count) == 3 + 6, "3 configured and 6 stack words trusted");
    check(ifs_alarm_seen && ifs_alarm_pc == want_ifs[0], "first IFS alarm");
    check(cause_valid && cause_port == 0, "first trap came from the IFS");
    check(model_err == 0, "host stream rules");
    check(n_hold > 0, "holds happened");
    foreach (trap_pcs[k]) $display("trap %0d: pc %h port %0d", k, trap_pcs[k], trap_ports[k]);
    $display("traps=%0d holds=%0d retired=%0d", trap_pcs.size(), n_hold, n_retired);
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
