// host_pkg: test support for the RSE checking modules.
//
// host_rec_t is one instruction as the behavioural host pipeline
// (leon3_pipe_model) carries it. prog_gen builds an instruction stream and,
// alongside, works out in program order what the checkers must report. Its
// reference model is written independently of the RTL: it keeps memory and
// the trusted data signature byte by byte in associative arrays, and the
// CVR recurrence as plain integers.
//   - instruction signature: a set of critical PCs;
//   - a store whose PC is in the set updates the trusted bytes it writes;
//   - every retired store updates memory;
//   - a load alarms if any byte it reads is trusted and differs in memory;
//   - a CVR check alarms if the variable's value differs from the path rule.
// Wrong-path instructions (after a redirect) and trapped instructions change
// nothing. An alarm makes the host refuse to retire that instruction.
package host_pkg;
  import rse_pkg::*;

  typedef struct packed {
    logic [31:0] pc;
    logic [31:0] inst;
    logic        is_load;
    logic        is_store;
    logic [31:0] addr;
    logic [3:0]  be;
    logic [31:0] wdata;
    logic        redirect;   // taken branch: squashes the three younger ones
    logic        wrong;      // wrong-path instruction, must be squashed
    logic        trap;       // instruction traps, does not retire
  } host_rec_t;

  localparam logic [31:0] NopInst  = 32'h0100_0000;   // sethi 0, %g0
  localparam logic [31:0] LdInst   = 32'hC200_0000;   // ld  [..], %g1
  localparam logic [31:0] StInst   = 32'hC220_0000;   // st  %g1, [..]
  localparam logic [31:0] BrInst   = 32'h1080_0000;   // ba

  class prog_gen;
    host_rec_t   recs[$];
    logic [31:0] exp_pc[$];        // expected alarms, program order
    int          exp_port[$];      // 0: IFS, 1: CVR
    logic [31:0] pc_next;

    // reference state
    bit          crit_pc[logic [31:0]];
    logic [7:0]  sig[logic [31:0]];
    logic [7:0]  gmem[logic [31:0]];
    logic [12:0] ifs_hi, cvr_hi;
    logic [31:0] staged_addr;
    bit          cvr_var_valid;
    logic [31:0] cvr_var;
    bit          cvr_use_prev[16];
    int          cvr_k[16];
    int          cvr_path;
    bit          cvr_path_valid;
    logic [31:0] cvr_prev;
    logic [31:0] cvr_val;

    // what was generated
    int n_crit_st, n_attack_st, n_byte_st, n_loads, n_ifs_alarm, n_cvr_alarm;
    int n_redirect, n_trap, n_remove, n_chk, n_cvr_check, n_cvr_skip;
    int dsig_entries;               // distinct trusted words

    function new(logic [31:0] pc0 = 32'h4000_2000);
      pc_next = pc0;
      ifs_hi = '0; cvr_hi = '0; staged_addr = '0;
      cvr_var_valid = 0; cvr_path_valid = 0; cvr_prev = '0; cvr_val = '0;
      cvr_path = 0; cvr_var = '0;
      for (int i = 0; i < 16; i++) begin cvr_use_prev[i] = 0; cvr_k[i] = 0; end
    endfunction

    function automatic host_rec_t blank();
      host_rec_t r;
      r = '0;
      r.pc = pc_next;
      r.inst = NopInst;
      pc_next += 4;
      return r;
    endfunction

    function automatic logic [7:0] mem_byte(logic [31:0] a);
      return gmem.exists(a) ? gmem[a] : 8'h00;
    endfunction

    function automatic int count_words();
      bit w[logic [31:0]];
      foreach (sig[a]) w[{a[31:2], 2'b00}] = 1;
      return w.num();
    endfunction

    // ----------------------------------------------------------- basic
    function automatic void nop(int n = 1);
      repeat (n) recs.push_back(blank());
    endfunction

    function automatic void chk(logic [1:0] mod_id, logic [2:0] cmd,
                                logic [18:0] low19);
      host_rec_t r = blank();
      r.inst = chk_word(chk_top5(mod_id, cmd), low19);
      recs.push_back(r);
      n_chk++;
      if (mod_id == MOD_IFS) begin
        logic [31:0] opnd = {ifs_hi, low19};
        case (cmd)
          IFS_SET_HI:      ifs_hi = low19[12:0];
          IFS_ISIG_ADD:    crit_pc[{opnd[31:2], 2'b00}] = 1;
          IFS_DSIG_ADDR:   staged_addr = opnd;
          IFS_DSIG_DATA:   for (int b = 0; b < 4; b++)
                             sig[{staged_addr[31:2], 2'(b)}] = opnd[8*b +: 8];
          IFS_DSIG_REMOVE: begin
            for (int b = 0; b < 4; b++) sig.delete({opnd[31:2], 2'(b)});
            n_remove++;
          end
          default: ;
        endcase
        dsig_entries = count_words();
      end else if (mod_id == MOD_CVR) begin
        case (cmd)
          CVR_SET_HI:   cvr_hi = low19[12:0];
          CVR_VAR_ADDR: begin cvr_var = {cvr_hi, low19[18:2], 2'b00}; cvr_var_valid = 1; end
          CVR_EXPR: begin
            cvr_use_prev[int'(low19[18:15])] = low19[14];
            cvr_k[int'(low19[18:15])] = int'($signed(low19[13:0]));
          end
          CVR_PATH: begin cvr_path = low19[3:0]; cvr_path_valid = 1; end
          CVR_CHECK: begin
            if (cvr_path_valid) begin
              logic [31:0] rec;
              rec = (cvr_use_prev[cvr_path] ? cvr_prev : 32'd0) + 32'(cvr_k[cvr_path]);
              n_cvr_check++;
              if (rec != cvr_val) begin
                exp_pc.push_back(r.pc); exp_port.push_back(1); n_cvr_alarm++;
              end
              cvr_prev = cvr_val;
              cvr_path_valid = 0;
            end else n_cvr_skip++;
          end
          default: ;
        endcase
      end
    endfunction

    // 32-bit operand command: SET_HI then the command itself
    function automatic void chk32(logic [1:0] mod_id, logic [2:0] cmd,
                                  logic [31:0] v);
      chk(mod_id, 3'd0, {6'd0, v[31:19]});
      chk(mod_id, cmd, v[18:0]);
    endfunction

    function automatic void isig_add(logic [31:0] pc);
      chk32(MOD_IFS, IFS_ISIG_ADD, pc);
    endfunction

    function automatic void dsig_cfg(logic [31:0] a, logic [31:0] d);
      chk32(MOD_IFS, IFS_DSIG_ADDR, a);
      chk32(MOD_IFS, IFS_DSIG_DATA, d);
    endfunction

    // ----------------------------------------------------------- memory ops
    // pc == 0: next sequential PC
    function automatic void store(logic [31:0] a, logic [3:0] be,
                                  logic [31:0] d, logic [31:0] pc = '0,
                                  bit trap = 0);
      host_rec_t r = blank();
      bit hits_sig = 0;
      if (pc != '0) r.pc = pc;
      r.inst = StInst; r.is_store = 1; r.addr = a; r.be = be; r.wdata = d;
      r.trap = trap;
      recs.push_back(r);
      if (trap) begin n_trap++; return; end
      for (int b = 0; b < 4; b++)
        if (be[b] && sig.exists({a[31:2], 2'(b)})) hits_sig = 1;
      if (be != 4'hF) n_byte_st++;
      if (crit_pc.exists({r.pc[31:2], 2'b00})) begin
        n_crit_st++;
        for (int b = 0; b < 4; b++)
          if (be[b]) sig[{a[31:2], 2'(b)}] = d[8*b +: 8];
        dsig_entries = count_words();
      end else if (hits_sig) n_attack_st++;
      for (int b = 0; b < 4; b++)
        if (be[b]) gmem[{a[31:2], 2'(b)}] = d[8*b +: 8];
      if (cvr_var_valid && a[31:2] == cvr_var[31:2])
        for (int b = 0; b < 4; b++)
          if (be[b]) cvr_val[8*b +: 8] = d[8*b +: 8];
    endfunction

    function automatic void load(logic [31:0] a, logic [3:0] be = 4'hF);
      host_rec_t r = blank();
      bit bad = 0;
      r.inst = LdInst; r.is_load = 1; r.addr = a; r.be = be;
      recs.push_back(r);
      n_loads++;
      for (int b = 0; b < 4; b++) begin
        logic [31:0] ba = {a[31:2], 2'(b)};
        if (be[b] && sig.exists(ba) && sig[ba] != mem_byte(ba)) bad = 1;
      end
      if (bad) begin
        exp_pc.push_back(r.pc); exp_port.push_back(0); n_ifs_alarm++;
      end
    endfunction

    // taken branch followed by three wrong-path instructions: a CHK pair that
    // would list the attacker's store PC as trusted, and a malicious store
    // from a trusted PC; none of them may have any effect
    function automatic void branch_wrong_path(logic [31:0] victim,
                                              logic [31:0] crit_store_pc);
      host_rec_t r = blank();
      r.inst = BrInst; r.redirect = 1;
      recs.push_back(r);
      n_redirect++;
      r = blank(); r.wrong = 1;
      r.inst = chk_word(chk_top5(MOD_IFS, IFS_SET_HI), {6'd0, AttackPc[31:19]});
      recs.push_back(r);
      r = blank(); r.wrong = 1;
      r.inst = chk_word(chk_top5(MOD_IFS, IFS_ISIG_ADD), AttackPc[18:0]);
      recs.push_back(r);
      r = blank(); r.wrong = 1; r.inst = StInst; r.is_store = 1;
      r.addr = victim; r.be = 4'hF; r.wdata = 32'hBAD0_BAD0; r.pc = crit_store_pc;
      recs.push_back(r);
    endfunction

    // ----------------------------------------------------------- scenario
    // Authentication-style workload: a few critical stack words written only
    // by listed store instructions, one configured global, an untrusted
    // routine that sometimes overwrites critical words, and a loop index
    // guarded by CVR (path 1: index = 0, path 2: index = previous + 1).
    localparam logic [31:0] CritPc0 = 32'h4000_1200;
    localparam logic [31:0] CritA0  = 32'h41FF_F440;
    localparam logic [31:0] PlainA0 = 32'h4100_0000;
    localparam logic [31:0] GlobA   = 32'h4000_E6C0;
    localparam logic [31:0] CvrVar  = 32'h41FF_F400;
    localparam logic [31:0] AttackPc = 32'h4008_3000;   // untrusted routine

    function automatic void scenario(int iters, int n_crit = 6, int list_len = 5);
      logic [31:0] sw_ic = 0;
      for (int i = 0; i < n_crit; i++) isig_add(CritPc0 + 32'(4 * i));
      dsig_cfg(GlobA, 32'h4000_E400);
      chk32(MOD_CVR, CVR_VAR_ADDR, CvrVar);
      chk(MOD_CVR, CVR_EXPR, {4'd1, 1'b0, 14'd0});
      chk(MOD_CVR, CVR_EXPR, {4'd2, 1'b1, 14'd1});
      nop(4);
      load(GlobA);
      for (int it = 0; it < iters; it++) begin
        int j = $urandom % n_crit;
        logic [31:0] ca = CritA0 + 32'(4 * j);
        logic [31:0] cpc = CritPc0 + 32'(4 * j);
        logic [31:0] d = $urandom;
        int unsigned sel = $urandom % 14;
        case (sel)
          0, 1:  store(ca, 4'hF, d, cpc);                       // trusted write
          2:     store(ca, 4'(1 << ($urandom % 4)), d, cpc);    // trusted byte write
          3, 4:  load(ca);
          5:     load(ca, 4'(1 << ($urandom % 4)));
          6:     begin store(ca, 4'hF, d, AttackPc); load(ca); end        // untrusted write, then use
          7:     store(ca, 4'(1 << ($urandom % 4)), d, AttackPc + 4);          // untrusted byte write
          8:     begin store(PlainA0 + 32'(4 * j), 4'hF, d); load(PlainA0 + 32'(4 * j)); end
          9:     store(ca, 4'hF, d, cpc, 1);                    // trapped trusted write
          10:    branch_wrong_path(ca, cpc);
          11:    if (($urandom % 3) == 0) chk32(MOD_IFS, IFS_DSIG_REMOVE, ca);
                 else load(GlobA);
          12, 13: begin                                          // CVR-guarded loop step
            int p;
            logic [31:0] v;
            if (sw_ic > 32'(list_len)) begin sw_ic = 0; p = 1; end
            else begin sw_ic = sw_ic + 1; p = 2; end
            v = sw_ic;
            if (($urandom % 6) == 0) v = sw_ic + 32'd7;          // computation error
            store(CvrVar, 4'hF, v, CritPc0 + 32'h100);
            if (($urandom % 8) != 0) chk(MOD_CVR, CVR_PATH, 19'(p));
            nop($urandom % 2);
            chk(MOD_CVR, CVR_CHECK, '0);
            if (cvr_path_valid == 0) sw_ic = cvr_prev;
          end
          default: nop();
        endcase
      end
      nop(8);
    endfunction

  endclass

endpackage
