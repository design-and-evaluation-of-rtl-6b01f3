// tb_ifs_isig: self-checking test of the instruction signature table.
//
// Adds random word-aligned PCs (with repeats) to a small table, checks
// after each add that every PC looks up exactly as a reference set says,
// that repeats take no room, that the count matches, that a table that is
// full drops further PCs and flags overflow, that a new PC is visible one
// cycle after its add, and that reset empties the table.
module tb_ifs_isig;
  localparam int N = 8;

  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;

  logic [31:0] lookup_pc, add_pc;
  logic hit, add_en, full, overflow;
  logic [$clog2(N+1)-1:0] count;
  int checks = 0, failures = 0;
  bit ref_set[logic [31:0]];
  logic [31:0] pool[16];

  ifs_isig #(.ENTRIES(N)) u_dut (.clk, .rst_n, .lookup_pc, .hit, .add_en,
    .add_pc, .full, .overflow, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic probe_all();
    foreach (pool[i]) begin
      lookup_pc = pool[i] | 32'($urandom % 4);   // low bits ignored
      #1;
      check(hit == ref_set.exists(pool[i]),
            $sformatf("lookup %h hit=%0b", pool[i], hit));
    end
  endtask

  initial begin
    foreach (pool[i]) pool[i] = {$urandom, 2'b00} + 32'(i << 8);
    add_en = 0; add_pc = 0; lookup_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    probe_all();
    for (int k = 0; k < 24; k++) begin
      automatic logic [31:0] p = pool[$urandom % 16];
      add_pc = p; add_en = 1;
      lookup_pc = p;
      #1 check(hit == ref_set.exists(p), "hit before the add takes effect");
      @(negedge clk);
      add_en = 0;
      if (!ref_set.exists(p)) begin
        if (ref_set.num() < N) ref_set[p] = 1;
      end
      check(int'(count) == ref_set.num(), $sformatf("count %0d vs %0d", count, ref_set.num()));
      check(full == (ref_set.num() == N), "full flag");
      probe_all();
    end
    // add new PCs until one is dropped
    for (int k = 0; k < 16; k++)
      if (!ref_set.exists(pool[k]) && ref_set.num() == N) begin
        add_pc = pool[k]; add_en = 1;
        @(negedge clk); add_en = 0;
        check(overflow, "overflow after add to a full table");
        lookup_pc = pool[k]; #1 check(!hit, "dropped PC must miss");
        break;
      end
    check(ref_set.num() == N, "test filled the table");
    rst_n = 0; @(negedge clk); rst_n = 1;
    check(count == 0 && !overflow && !full, "reset empties the table");
    ref_set.delete();
    probe_all();
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
