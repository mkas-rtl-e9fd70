// subbus_interface: sub-bus interface of one output port (filters approach).
//
// The m cells leaving the group concentrator are offered to every sub-bus
// interface of the group. A row of m cell filters keeps the cells whose
// destination port address (the low log2(n) tag bits) equals this port's
// number PORT, and an m:h knockout concentrator passes up to h of them on to
// the port's shared output buffer; cells beyond h in one slot are lost and
// counted in n_lost.
//
// Interface: in_cells (m cells), out_cells (h cells, packed on outputs
// 0..k-1), n_lost. Timing: purely combinational.
// The structure (filter row plus concentrator) follows the design.
module subbus_interface
  import mkas_pkg::*;
#(
  parameter int unsigned M    = CONC_M_DEF,
  parameter int unsigned H    = KO_H_DEF,
  parameter int unsigned NG   = GROUP_N_DEF,   // outputs per group
  parameter int unsigned PORT = 0              // this port's number in the group
) (
  input  sw_cell_t                 in_cells  [M],
  output sw_cell_t                 out_cells [H],
  output logic [$clog2(M+1)-1:0]   n_lost
);

  localparam int unsigned DW = (NG > 1) ? $clog2(NG) : 1;

  sw_cell_t filtered [M];

  for (genvar i = 0; i < M; i++) begin : g_filter
    cell_filter #(.LSB(0), .W(DW)) u_filter (
      .in_cell  (in_cells[i]),
      .addr     (DW'(PORT)),
      .out_cell (filtered[i])
    );
  end

  knockout_concentrator #(.IN(M), .OUT(H)) u_conc (
    .in_cells  (filtered),
    .out_cells (out_cells),
    .n_lost    (n_lost)
  );

endmodule
