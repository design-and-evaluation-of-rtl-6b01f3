// ifs_isig: instruction signature of the IFS module.
//
// A fully associative look-up table of the PCs of critical instructions, the
// stores that are allowed to write critical data. The IFS fetch stage looks
// up the PC of every instruction the host decodes; a hit marks the
// instruction critical. Entries are added by CHK commands while the program
// initialises. The document gives the function (fully associative table
// keyed by PC, filled from CHK instructions at load time) but no size, so
// ENTRIES is this design's choice. PCs are word aligned, so bits 1:0 are not
// stored. Adding a PC that is already present changes nothing; adding to a
// full table drops the PC and sets the sticky overflow flag.
//
// Interface and timing: hit is combinational from lookup_pc. An add takes
// effect at the clock edge where add_en is high and is visible to lookups in
// the next cycle. Reset (active low, synchronous) empties the table.
module ifs_isig #(
  parameter int unsigned ENTRIES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] lookup_pc,
  output logic        hit,
  input  logic        add_en,
  input  logic [31:0] add_pc,
  output logic        full,
  output logic        overflow,
  output logic [$clog2(ENTRIES+1)-1:0] count
);

  logic [ENTRIES-1:0]       valid_q;
  logic [29:0]              pc_q [ENTRIES];
  logic [ENTRIES-1:0]       lk_match, add_match;
  logic                     free_found;
  logic [$clog2(ENTRIES)-1:0] free_idx;

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      lk_match[i]  = valid_q[i] && pc_q[i] == lookup_pc[31:2];
      add_match[i] = valid_q[i] && pc_q[i] == add_pc[31:2];
    end
  end

  assign hit  = |lk_match;
  assign full = &valid_q;

  // lowest free slot
  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!valid_q[i]) begin
        free_found = 1'b1;
        free_idx   = i[$clog2(ENTRIES)-1:0];
      end
    end
  end

  always_comb begin
    count = '0;
    for (int i = 0; i < ENTRIES; i++)
      count = count + {{($bits(count)-1){1'b0}}, valid_q[i]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q  <= '0;
      overflow <= 1'b0;
    end else if (add_en && !(|add_match)) begin
      if (free_found) begin
        valid_q[free_idx] <= 1'b1;
        pc_q[free_idx]    <= add_pc[31:2];
      end else begin
        overflow <= 1'b1;
      end
    end
  end

endmodule
