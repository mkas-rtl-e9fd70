// dsn_banyan: destination sorting network, banyan approach.
//
// Replaces the sub-bus filters and concentrators of the filters approach.
// The M outputs of the group concentrator are taken in pairs, and each pair
// feeds one 2 x NG banyan (NB = ceil(M/2) banyans; with M odd the last
// banyan's second input is idle). Output j of every banyan is a link to port
// j, so inside the network there are M paths and each port has NB dedicated
// input links to its shared output buffer. A cell is lost here only when
// both cells of a banyan pair go to the same port in the same slot.
//
// Interface: in_cells (M cells), port_cells[j] (NB links into port j's
// buffer, not packed), n_lost (cells lost this slot). Timing: combinational.
// Pairing consecutive concentrator outputs is this implementation's choice.
module dsn_banyan
  import mkas_pkg::*;
#(
  parameter int unsigned M  = CONC_M_DEF,
  parameter int unsigned NG = GROUP_N_DEF,
  localparam int unsigned NB = (M + 1) / 2
) (
  input  sw_cell_t                      in_cells   [M],
  output sw_cell_t                      port_cells [NG][NB],
  output logic [$clog2(M+1)-1:0]        n_lost
);

  logic     lost [NB];
  sw_cell_t bout [NB][NG];

  for (genvar b = 0; b < NB; b++) begin : g_banyan
    sw_cell_t pair [2];
    assign pair[0] = in_cells[2*b];
    assign pair[1] = (2*b + 1 < M) ? in_cells[(2*b + 1 < M) ? 2*b + 1 : 0] : EMPTY_CELL;

    banyan_2xn #(.NG(NG)) u_banyan (
      .in_cells  (pair),
      .out_cells (bout[b]),
      .n_lost    (lost[b])
    );

    for (genvar j = 0; j < NG; j++) begin : g_link
      assign port_cells[j][b] = bout[b][j];
    end
  end

  always_comb begin
    n_lost = '0;
    for (int b = 0; b < NB; b++) n_lost += ($clog2(M+1))'(lost[b]);
  end

endmodule
