// tb_ifs_chk_handler: self-checking test of the IFS CHK decoder.
//
// Drives CHK words built with the documented macro layout
// (0x81B00000 + (top5 << 25) + low19) for every IFS command, CHK words for
// other modules, ordinary SPARC instructions and random words, and compares
// the decoded command with an independently written decode. Checks that
// SET_HI supplies bits 31:19 of later operands only when adv is high.
// Also checks the document's example word chk("0x09", ...).
module tb_ifs_chk_handler;
  import rse_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic adv;
  logic [31:0] inst;
  logic is_ifs_chk;
  ifs_cmd_t cmd;
  int checks = 0, failures = 0;
  logic [12:0] hi_ref = '0;

  ifs_chk_handler u_dut (.clk, .rst_n, .adv, .inst, .is_ifs_chk, .cmd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(input logic [31:0] w, input bit a);
    logic        mine;
    ifs_op_e     eop;
    mine = (w >> 30) == 2 && ((w >> 19) & 32'h3F) == 32'h36 && ((w >> 28) & 3) == 1;
    eop = IOP_NONE;
    if (mine)
      case ((w >> 25) & 7)
        1: eop = IOP_DSIG_ADDR;
        2: eop = IOP_ISIG_ADD;
        3: eop = IOP_DSIG_DATA;
        4: eop = IOP_DSIG_REMOVE;
        default: eop = IOP_NONE;
      endcase
    inst = w; adv = a;
    #1;
    check(is_ifs_chk == mine, $sformatf("is_ifs_chk %h", w));
    check(cmd.op == eop, $sformatf("op %h: %s vs %s", w, cmd.op.name(), eop.name()));
    if (eop != IOP_NONE)
      check(cmd.operand == {hi_ref, w[18:0]}, $sformatf("operand %h", w));
    @(negedge clk);
    if (mine && a && ((w >> 25) & 7) == 0) hi_ref = w[12:0];
  endtask

  initial begin
    adv = 0; inst = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // the document's example: chk("0x09", "0x41f808e0")
    one(32'h81B00000 + (32'h09 << 25) + (32'h41f808e0 & 32'h7FFFF), 1);
    check(chk_word(5'h09, 19'h008e0) == 32'h93B008E0, "macro layout");
    for (int k = 0; k < 400; k++) begin
      logic [31:0] w;
      case ($urandom % 4)
        0: w = 32'h81B00000 + (32'(8 + $urandom % 8) << 25) + ($urandom & 32'h7FFFF); // IFS
        1: w = 32'h81B00000 + (32'($urandom % 32) << 25) + ($urandom & 32'h7FFFF);    // any CHK
        2: w = 32'hC2200000 | ($urandom & 32'h3E07FFFF);                             // store
        default: w = $urandom;
      endcase
      one(w, ($urandom % 4) != 0);
    end
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
