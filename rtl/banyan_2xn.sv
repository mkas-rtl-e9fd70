// banyan_2xn: 2-input, NG-output self-routing banyan (NG = 8 in the design).
//
// Used in the banyan approach to the destination sorting network: it takes
// two cells from the group concentrator and steers each to the output link
// of its destination port, given by the low log2(NG) bits of its routing tag.
// Each input drives its own binary tree of log2(NG) stages of 1x2 switching
// elements; the element at stage s looks at destination bit log2(NG)-1-s
// (most significant first) and sends the cell up (0) or down (1). The two
// trees never share a link, so the network does not block internally and
// needs no sorter in front of it. The two trees meet at the NG output links,
// each of which carries one cell per slot: when both cells want the same
// port, the cell of input 0 takes the link and the other one is lost
// (n_lost = 1).
//
// Interface: in_cells[2], out_cells[NG] (output j = link to port j), n_lost.
// Timing: purely combinational.
// The design gives the network's size and its self-routing, non-blocking
// behaviour; the twin-tree structure and the rule at a shared output link are
// this implementation's reading of it.
module banyan_2xn
  import mkas_pkg::*;
#(
  parameter int unsigned NG = GROUP_N_DEF
) (
  input  sw_cell_t    in_cells  [2],
  output sw_cell_t    out_cells [NG],
  output logic        n_lost
);

  localparam int unsigned DW = (NG > 1) ? $clog2(NG) : 1;

  // tree[s][l][k]: cell on link k after stage l of input s's tree
  sw_cell_t tree [2][DW+1][1 << DW];

  always_comb begin
    tree = '{default: EMPTY_CELL};
    for (int s = 0; s < 2; s++) begin
      tree[s][0][0] = in_cells[s];
      for (int l = 0; l < DW; l++) begin
        for (int k = 0; k < (1 << l); k++) begin
          // 1x2 switching element routed by destination bit DW-1-l
          tree[s][l+1][2*k]         = tree[s][l][k];
          tree[s][l+1][2*k+1]       = tree[s][l][k];
          tree[s][l+1][2*k].valid   = tree[s][l][k].valid && !tree[s][l][k].tag[DW-1-l];
          tree[s][l+1][2*k+1].valid = tree[s][l][k].valid &&  tree[s][l][k].tag[DW-1-l];
        end
      end
    end
    n_lost = 1'b0;
    for (int j = 0; j < NG; j++) begin
      if (tree[0][DW][j].valid) begin
        out_cells[j] = tree[0][DW][j];
        if (tree[1][DW][j].valid) n_lost = 1'b1;
      end else begin
        out_cells[j] = tree[1][DW][j];
      end
    end
  end

  initial assert (NG == (1 << DW)) else $error("banyan_2xn needs NG a power of two");

endmodule
