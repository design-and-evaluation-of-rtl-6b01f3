// tb_rse_interface: self-checking test of the RSE logic ports.
//
// Random probe bundles, port enables and module alarms on a three-port
// instance. Checks that an enabled port sees the probes unchanged, that a
// disabled port sees no valid instruction and no annul (the rest
// unchanged), that the trap is the OR of the enabled alarms with the
// lowest alarming port reported, that a CHK word in decode is flagged as a
// NOP for the host, and that the cause register keeps the first trap until
// reset.
module tb_rse_interface;
  import rse_pkg::*;
  localparam int NP = 3;

  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;

  rse_probe_t probe;
  rse_probe_t port_probe [NP];
  logic [NP-1:0] port_en, mod_alarm;
  logic trap, de_chk_nop, cause_valid;
  logic [1:0] trap_port, cause_port;
  int checks = 0, failures = 0, n_trap = 0, n_nop = 0;
  bit first_seen = 0;
  int first_port = 0;

  rse_interface #(.NPORTS(NP)) u_dut (.clk, .rst_n, .probe, .port_en,
    .port_probe, .mod_alarm, .trap, .trap_port, .de_chk_nop, .cause_valid,
    .cause_port);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    probe = '0; port_en = '0; mod_alarm = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 500; k++) begin
      automatic int lowest = -1;
      automatic bit any = 0;
      automatic bit chkw;
      probe = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
               $urandom, $urandom};
      if ($urandom % 2) probe.de_inst = chk_word(5'($urandom), 19'($urandom));
      port_en = NP'($urandom);
      mod_alarm = ($urandom % 3 == 0) ? NP'($urandom) : '0;
      #1;
      for (int p = 0; p < NP; p++) begin
        automatic rse_probe_t e = probe;
        if (!port_en[p]) begin e.de_valid = 0; e.wb_valid = 0; e.annul = 0; end
        check(port_probe[p] == e, $sformatf("port %0d probe", p));
        if (port_en[p] && mod_alarm[p]) begin
          any = 1;
          if (lowest < 0) lowest = p;
        end
      end
      check(trap == any, "trap");
      if (any) begin
        n_trap++;
        check(int'(trap_port) == lowest, "trap_port");
      end
      chkw = probe.de_inst[31:30] == 2'b10 && probe.de_inst[24:19] == 6'h36;
      check(de_chk_nop == (probe.de_valid && chkw), "chk nop");
      if (de_chk_nop) n_nop++;
      @(negedge clk);
      if (any && !first_seen) begin first_seen = 1; first_port = lowest; end
      check(cause_valid == first_seen, "cause_valid");
      if (first_seen) check(int'(cause_port) == first_port, "cause_port");
    end
    rst_n = 0; @(negedge clk); rst_n = 1; mod_alarm = '0; @(negedge clk);
    check(!cause_valid, "reset clears cause");
    check(n_trap > 0 && n_nop > 0, "traps and NOPs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
