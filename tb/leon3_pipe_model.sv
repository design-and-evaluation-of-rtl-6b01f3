// leon3_pipe_model: behavioural model of the host processor pipeline, for
// simulation only.
//
// It replays an instruction stream (host_rec_t records, loaded with load())
// through seven in-order stages, FE DE RA EX ME XC WB, and drives the RSE
// probe bundle from them: the decode-stage instruction, the writeback-stage
// data access, and the hold and annul controls. Its own memory answers the
// loads and takes the stores that retire. The stream's behaviour is stated
// by the records, not decoded from the instruction words:
//   - hold: with probability HOLD_PCT % in each cycle the whole pipeline
//     freezes (cache miss, long-latency stall);
//   - redirect: a record marked so asserts annul while it is in EX, which
//     squashes FE, DE and RA (the three wrong-path records behind it);
//   - trap: a record marked so reaches WB with wb_valid low and does not
//     retire;
//   - a trap request from the RSE (trap_in) while an instruction is in WB
//     stops that instruction from retiring; the model counts it and goes on.
// model_err counts rule breaks of the stream itself (a wrong-path record
// reaching EX, a right-path record squashed).
module leon3_pipe_model
  import rse_pkg::*;
  import host_pkg::*;
#(
  parameter int unsigned HOLD_PCT = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        trap_in,
  output rse_probe_t  probe,
  output logic        idle,
  output int          n_hold,
  output int          n_annul,
  output int          n_retired,
  output int          n_trapped,
  output int          n_squashed,
  output int          model_err
);

  localparam int FE = 0, DE = 1, RA = 2, EX = 3, WB = 6;

  host_rec_t  q[$];
  host_rec_t  st [7];
  logic [6:0] v;
  logic       hold_q;
  logic       annul;
  logic [31:0] mem [logic [29:0]];

  task automatic load(input host_rec_t r);
    q.push_back(r);
  endtask

  function automatic logic [31:0] rd(input logic [31:0] a);
    return mem.exists(a[31:2]) ? mem[a[31:2]] : 32'h0;
  endfunction

  assign annul = !hold_q && v[EX] && st[EX].redirect;
  assign idle  = (q.size() == 0) && (v == '0);

  always_comb begin
    probe          = '0;
    probe.hold     = hold_q;
    probe.annul    = annul;
    probe.de_valid = v[DE];
    probe.de_pc    = st[DE].pc;
    probe.de_inst  = st[DE].inst;
    probe.wb_valid = v[WB] && !st[WB].trap;
    probe.wb_pc    = st[WB].pc;
    probe.wb_inst  = st[WB].inst;
    probe.wb_load  = v[WB] && st[WB].is_load;
    probe.wb_store = v[WB] && st[WB].is_store;
    probe.wb_addr  = st[WB].addr;
    probe.wb_be    = st[WB].be;
    probe.wb_wdata = st[WB].wdata;
    probe.wb_rdata = rd(st[WB].addr);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      v <= '0;
      hold_q <= 1'b0;
      n_hold <= 0; n_annul <= 0; n_retired <= 0; n_trapped <= 0;
      n_squashed <= 0; model_err <= 0;
      mem.delete();
    end else begin
      hold_q <= ($urandom % 100) < HOLD_PCT;
      if (hold_q) begin
        n_hold <= n_hold + 1;
      end else begin
        // retire
        if (v[WB]) begin
          if (st[WB].trap || trap_in) begin
            n_trapped <= n_trapped + 1;
          end else begin
            n_retired <= n_retired + 1;
            if (st[WB].is_store) begin
              logic [31:0] w;
              w = rd(st[WB].addr);
              for (int b = 0; b < 4; b++)
                if (st[WB].be[b]) w[8*b +: 8] = st[WB].wdata[8*b +: 8];
              mem[st[WB].addr[31:2]] = w;
            end
          end
        end
        // advance
        for (int s = 6; s > EX; s--) begin
          st[s] <= st[s-1];
          v[s]  <= v[s-1];
        end
        if (v[EX] && st[EX].wrong) model_err <= model_err + 1;
        if (annul) begin
          n_annul <= n_annul + 1;
          for (int s = FE; s <= RA; s++) begin
            if (v[s] && !st[s].wrong) model_err <= model_err + 1;
            if (v[s]) n_squashed <= n_squashed + 1;
          end
          v[EX:FE] <= '0;
        end else begin
          for (int s = EX; s > FE; s--) begin
            st[s] <= st[s-1];
            v[s]  <= v[s-1];
          end
        end
        if (q.size() != 0) begin
          st[FE] <= q.pop_front();
          v[FE]  <= 1'b1;
        end else begin
          v[FE]  <= 1'b0;
        end
      end
    end
  end

endmodule
