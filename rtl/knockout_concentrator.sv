// knockout_concentrator: IN:OUT knockout concentrator.
//
// Up to IN cells arrive in a time slot; at most OUT of them leave on outputs
// 0..k-1 (k = min(#cells, OUT)) and the rest are knocked out (lost). It is
// used twice in the switch: as the N:m group concentrator of a group bus
// interface and as the m:h concentrator of each sub-bus interface.
//
// How it works: the concentrator runs OUT knockout tournaments one after the
// other (the "rounds"). Each tournament is a binary tree of 2x2 contention
// elements; an element passes one cell on towards the root (the winner) and
// sends the other (the loser) to the next tournament. The root of round r is
// output r. A 2x2 element that holds two cells lets its left input win; when
// only one input holds a cell, that cell wins. So a cell is lost only when
// more than OUT cells arrive in the same slot.
//
// Only the presence bit and the input index of each cell go through the
// tournaments; the winning cells are then selected by index. Every tree has
// P = 2**ceil(log2(IN)) leaves and the loser list is padded with empty slots,
// so the wiring is fixed at elaboration; elements that only ever see empty
// slots are removed by synthesis.
//
// The knockout structure with OUT rounds follows the design; the fixed
// left-wins priority of the contention element is this implementation's
// choice. Timing: purely combinational. n_lost counts the knocked-out cells.
module knockout_concentrator
  import mkas_pkg::*;
#(
  parameter int unsigned IN  = N_PORTS_DEF,
  parameter int unsigned OUT = CONC_M_DEF
) (
  input  sw_cell_t                   in_cells  [IN],
  output sw_cell_t                   out_cells [OUT],
  output logic [$clog2(IN+1)-1:0]    n_lost
);

  localparam int unsigned LV = (IN > 1) ? $clog2(IN) : 1;  // tree levels
  localparam int unsigned P  = 1 << LV;                    // leaves per tree
  localparam int unsigned IW = LV;                         // index width

  typedef struct packed {
    logic          v;
    logic [IW-1:0] idx;
  } cand_t;

  // lv[l][k]: entry k at level l of the current tournament
  cand_t lv   [LV+1][P];
  cand_t pool [P];            // cells entering the current round
  cand_t nxt  [P];            // losers, entering the next round
  cand_t win  [OUT];          // root of each round

  always_comb begin
    for (int k = 0; k < P; k++) begin
      pool[k] = '0;
      if (k < IN) begin
        pool[k].v   = in_cells[k].valid;
        pool[k].idx = IW'(k);
      end
    end
    lv  = '{default: '0};
    nxt = '{default: '0};
    for (int r = 0; r < OUT; r++) begin
      lv[0] = pool;
      nxt   = '{default: '0};
      for (int l = 0; l < LV; l++) begin
        for (int p = 0; p < (P >> (l + 1)); p++) begin
          // 2x2 contention element: left input wins unless it is empty
          if (lv[l][2*p].v || !lv[l][2*p+1].v) begin
            lv[l+1][p]             = lv[l][2*p];
            nxt[P - (P >> l) + p]  = lv[l][2*p+1];
          end else begin
            lv[l+1][p]             = lv[l][2*p+1];
            nxt[P - (P >> l) + p]  = lv[l][2*p];
          end
        end
      end
      win[r] = lv[LV][0];
      pool   = nxt;
    end
  end

  // Select the winning cells and count the knocked-out ones.
  always_comb begin
    int unsigned n_in, n_out;
    n_in  = 0;
    n_out = 0;
    for (int i = 0; i < IN; i++)
      n_in += 32'(in_cells[i].valid);
    for (int r = 0; r < OUT; r++) begin
      out_cells[r] = EMPTY_CELL;
      if (win[r].v) begin
        out_cells[r] = in_cells[win[r].idx];
        n_out++;
      end
    end
    n_lost = ($clog2(IN+1))'(n_in - n_out);
  end

  initial assert (IN >= 2) else $error("knockout_concentrator needs IN >= 2");

endmodule
