// ifs_dsig: data signature of the IFS module.
//
// A content addressable memory whose entries pair a critical data address
// with the trusted value of the data stored there. Entries come from two
// sources: CHK commands that configure global critical data (DS_WRITE, all
// four bytes trusted) and critical store instructions executed at run time
// (DS_MERGE, only the byte lanes the store wrote are merged in and become
// trusted). DS_REMOVE drops an entry, for data whose lifetime ends, such as a
// stack frame that is torn down. The IFS memory stage looks up the address
// of each load and compares the loaded bytes with the trusted ones.
//
// The document gives the function (CAM holding address and data, filled by
// CHK commands and by critical stores) and the table of Fig. 6.2; the size,
// the per-byte trust mask and the removal operation are this design's
// choices. An allocation that finds the table full is dropped and sets the
// sticky overflow flag.
//
// Interface and timing: one address port, addr, serves both the look-up
// (hit, rdata, rmask: combinational) and the update selected by op, which is
// written at the clock edge and seen by look-ups in the next cycle. Reset
// (active low, synchronous) empties the table.
module ifs_dsig
  import rse_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] addr,
  output logic        hit,
  output logic [31:0] rdata,
  output logic [3:0]  rmask,     // byte lanes of rdata that are trusted
  input  ds_op_e      op,
  input  logic [3:0]  be,        // lanes written by DS_MERGE
  input  logic [31:0] wdata,
  output logic        full,
  output logic        overflow,
  output logic [$clog2(ENTRIES+1)-1:0] count
);

  localparam int unsigned IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] valid_q;
  logic [29:0]        addr_q [ENTRIES];
  logic [31:0]        data_q [ENTRIES];
  logic [3:0]         mask_q [ENTRIES];

  logic [ENTRIES-1:0] match;
  logic [IW-1:0]      hit_idx, free_idx;
  logic               free_found;
  logic [31:0]        merged;
  logic [3:0]         merged_mask;

  always_comb begin
    for (int i = 0; i < ENTRIES; i++)
      match[i] = valid_q[i] && addr_q[i] == addr[31:2];
  end

  // Addresses are unique in the table, so at most one match bit is set.
  always_comb begin
    hit_idx = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (match[i]) hit_idx = i[IW-1:0];
  end

  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!valid_q[i]) begin
        free_found = 1'b1;
        free_idx   = i[IW-1:0];
      end
    end
  end

  assign hit   = |match;
  assign rdata = data_q[hit_idx];
  assign rmask = hit ? mask_q[hit_idx] : 4'b0000;
  assign full  = &valid_q;

  always_comb begin
    count = '0;
    for (int i = 0; i < ENTRIES; i++)
      count = count + {{($bits(count)-1){1'b0}}, valid_q[i]};
  end

  // byte-lane merge of a critical store into the current entry (or into an
  // empty one when the address is new)
  always_comb begin
    for (int b = 0; b < 4; b++)
      merged[8*b +: 8] = be[b] ? wdata[8*b +: 8]
                               : (hit ? data_q[hit_idx][8*b +: 8] : 8'h00);
    merged_mask = be | rmask;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q  <= '0;
      overflow <= 1'b0;
    end else begin
      unique case (op)
        DS_WRITE, DS_MERGE: begin
          if (hit) begin
            data_q[hit_idx] <= (op == DS_WRITE) ? wdata : merged;
            mask_q[hit_idx] <= (op == DS_WRITE) ? 4'hF  : merged_mask;
          end else if (free_found) begin
            valid_q[free_idx] <= 1'b1;
            addr_q[free_idx]  <= addr[31:2];
            data_q[free_idx]  <= (op == DS_WRITE) ? wdata : merged;
            mask_q[free_idx]  <= (op == DS_WRITE) ? 4'hF  : be;
          end else begin
            overflow <= 1'b1;
          end
        end
        DS_REMOVE: if (hit) valid_q[hit_idx] <= 1'b0;
        default: ;
      endcase
    end
  end

endmodule
