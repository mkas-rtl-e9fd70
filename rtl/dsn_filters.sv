// dsn_filters: destination sorting network, filters approach.
//
// The second stage of a group bus interface: one sub-bus interface per
// output port of the group (NG of them), each fed with all M outputs of the
// group concentrator. Sub-bus interface j keeps the cells addressed to port
// j and concentrates them M:H for that port's shared output buffer.
//
// Interface: in_cells (M cells from the group concentrator), port_cells[j]
// (H cells for port j), n_lost (cells knocked out in all sub-bus
// concentrators this slot). Timing: purely combinational.
module dsn_filters
  import mkas_pkg::*;
#(
  parameter int unsigned M  = CONC_M_DEF,
  parameter int unsigned H  = KO_H_DEF,
  parameter int unsigned NG = GROUP_N_DEF
) (
  input  sw_cell_t                      in_cells   [M],
  output sw_cell_t                      port_cells [NG][H],
  output logic [$clog2(M+1)-1:0]        n_lost
);

  logic [$clog2(M+1)-1:0] lost [NG];

  for (genvar j = 0; j < NG; j++) begin : g_sbi
    subbus_interface #(.M(M), .H(H), .NG(NG), .PORT(j)) u_sbi (
      .in_cells  (in_cells),
      .out_cells (port_cells[j]),
      .n_lost    (lost[j])
    );
  end

  // A cell reaches one sub-bus interface only, so the sum fits in log2(M+1) bits.
  always_comb begin
    n_lost = '0;
    for (int j = 0; j < NG; j++) n_lost += lost[j];
  end

endmodule
