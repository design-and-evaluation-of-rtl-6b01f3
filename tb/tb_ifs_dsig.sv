// tb_ifs_dsig: self-checking test of the data signature CAM.
//
// Random configuration writes, byte-lane merges and removals on a small
// table over a pool of addresses, checked after every operation against a
// reference kept byte by byte: hit, the trusted lane mask and the trusted
// bytes of every pool address, the entry count, and the overflow flag when
// an allocation finds the table full.
module tb_ifs_dsig;
  import rse_pkg::*;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;

  logic [31:0] addr, rdata, wdata;
  logic hit, full, overflow;
  logic [3:0] rmask, be;
  ds_op_e op;
  logic [$clog2(N+1)-1:0] count;
  int checks = 0, failures = 0, n_ovf = 0, n_merge = 0, n_remove = 0;
  logic [7:0] refb[logic [31:0]];
  logic [31:0] pool[8];

  ifs_dsig #(.ENTRIES(N)) u_dut (.clk, .rst_n, .addr, .hit, .rdata, .rmask,
    .op, .be, .wdata, .full, .overflow, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int words();
    bit w[logic [31:0]];
    foreach (refb[a]) w[{a[31:2], 2'b00}] = 1;
    return w.num();
  endfunction

  task automatic probe_all();
    op = DS_NONE;
    foreach (pool[i]) begin
      automatic logic [3:0] m = '0;
      addr = pool[i] | 32'($urandom % 4);
      for (int b = 0; b < 4; b++) m[b] = refb.exists({pool[i][31:2], 2'(b)});
      #1;
      check(hit == (m != 0), $sformatf("hit %h", pool[i]));
      check(rmask == m, $sformatf("mask %h: %b vs %b", pool[i], rmask, m));
      for (int b = 0; b < 4; b++)
        if (m[b]) check(rdata[8*b +: 8] == refb[{pool[i][31:2], 2'(b)}],
                        $sformatf("data %h lane %0d", pool[i], b));
    end
  endtask

  initial begin
    foreach (pool[i]) pool[i] = 32'h41FF_F000 + 32'(i * 4 * 9);
    op = DS_NONE; addr = 0; be = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 200; k++) begin
      automatic logic [31:0] a = pool[$urandom % 8];
      automatic int sel = $urandom % 5;
      automatic bit present = 0, do_it = 1;
      for (int b = 0; b < 4; b++) if (refb.exists({a[31:2], 2'(b)})) present = 1;
      addr = a; wdata = $urandom;
      be = 4'($urandom % 15 + 1);
      op = sel == 0 ? DS_WRITE : sel == 4 ? DS_REMOVE : DS_MERGE;
      if (op != DS_REMOVE && !present && words() == N) begin
        n_ovf++;
        do_it = 0;
      end
      @(negedge clk);
      if (do_it) case (op)
        DS_WRITE:  for (int b = 0; b < 4; b++) refb[{a[31:2], 2'(b)}] = wdata[8*b +: 8];
        DS_MERGE:  begin
          n_merge++;
          for (int b = 0; b < 4; b++) if (be[b]) refb[{a[31:2], 2'(b)}] = wdata[8*b +: 8];
        end
        DS_REMOVE: begin
          if (present) n_remove++;
          for (int b = 0; b < 4; b++) refb.delete({a[31:2], 2'(b)});
        end
        default: ;
      endcase
      check(int'(count) == words(), $sformatf("count %0d vs %0d", count, words()));
      check(overflow == (n_ovf > 0), "overflow flag");
      check(full == (words() == N), "full flag");
      probe_all();
    end
    check(n_ovf > 0 && n_merge > 0 && n_remove > 0, "all cases reached");
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
