// gbi: group bus interface, serving one group of NG output ports.
//
// Every group bus interface sees all N broadcast buses. It works in two
// stages:
//  1. A row of N cell filters keeps the cells whose group address (the tag
//     bits above the low log2(NG) destination bits) equals GROUP_ID, and an
//     N:M knockout group concentrator passes up to M of them on. More than M
//     cells for the group in one slot lose the excess (conc_lost).
//  2. The destination sorting network (DSN) sorts the M concentrated cells to
//     the NG ports of the group, either with sub-bus interfaces (filters and
//     M:H concentrators, DSN_BANYAN = 0) or with ceil(M/2) 2 x NG banyans
//     (DSN_BANYAN = 1). Cells lost here are counted in dsn_lost.
// Each port then has a shared output buffer (H inputs with filters, ceil(M/2)
// with banyans) that sends one cell per slot; overflow is counted in buf_lost.
//
// Interface: bus_cells (the N buses), out_cells (one departing cell per port
// of the group), per-slot loss counts, and the fill level of each port buffer. Timing: the filters, concentrators and
// DSN are combinational; a cell on the buses in slot t is written into its
// port buffer at the end of slot t and can depart in slot t+1.
module gbi
  import mkas_pkg::*;
#(
  parameter int unsigned N          = N_PORTS_DEF,
  parameter int unsigned NG         = GROUP_N_DEF,
  parameter int unsigned M          = CONC_M_DEF,
  parameter int unsigned H          = KO_H_DEF,
  parameter int unsigned GROUP_ID   = 0,
  parameter bit          DSN_BANYAN = 1'b0,
  parameter int unsigned BUF_DEPTH  = 8,
  localparam int unsigned NB        = (M + 1) / 2,
  localparam int unsigned BUF_IN    = DSN_BANYAN ? NB : H
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  sw_cell_t                       bus_cells [N],
  output sw_cell_t                       out_cells [NG],
  output logic [$clog2(N+1)-1:0]         conc_lost,
  output logic [$clog2(M+1)-1:0]         dsn_lost,
  output logic [$clog2(NG*BUF_IN+1)-1:0] buf_lost,
  output logic [$clog2(BUF_IN*BUF_DEPTH+1)-1:0] buf_occ [NG]
);

  localparam int unsigned DW = $clog2(NG);        // destination address bits
  localparam int unsigned GW = $clog2(N / NG);    // group address bits

  // ---- first stage: group filters and group concentrator ----
  sw_cell_t filtered [N];
  sw_cell_t grouped  [M];

  for (genvar i = 0; i < N; i++) begin : g_filter
    cell_filter #(.LSB(DW), .W(GW)) u_filter (
      .in_cell  (bus_cells[i]),
      .addr     (GW'(GROUP_ID)),
      .out_cell (filtered[i])
    );
  end

  knockout_concentrator #(.IN(N), .OUT(M)) u_group_conc (
    .in_cells  (filtered),
    .out_cells (grouped),
    .n_lost    (conc_lost)
  );

  // ---- second stage: destination sorting network ----
  sw_cell_t port_in [NG][BUF_IN];

  if (DSN_BANYAN) begin : g_dsn_banyan
    dsn_banyan #(.M(M), .NG(NG)) u_dsn (
      .in_cells   (grouped),
      .port_cells (port_in),
      .n_lost     (dsn_lost)
    );
  end else begin : g_dsn_filters
    dsn_filters #(.M(M), .H(H), .NG(NG)) u_dsn (
      .in_cells   (grouped),
      .port_cells (port_in),
      .n_lost     (dsn_lost)
    );
  end

  // ---- shared output buffers ----
  logic [$clog2(BUF_IN+1)-1:0] blost [NG];

  for (genvar j = 0; j < NG; j++) begin : g_port
    shared_output_buffer #(.IN(BUF_IN), .BANKS(BUF_IN), .DEPTH(BUF_DEPTH)) u_buf (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_cells  (port_in[j]),
      .out_cell  (out_cells[j]),
      .n_lost    (blost[j]),
      .occupancy (buf_occ[j])
    );
  end

  always_comb begin
    buf_lost = '0;
    for (int j = 0; j < NG; j++) buf_lost += ($clog2(NG*BUF_IN+1))'(blost[j]);
  end

  initial assert (N % NG == 0 && N > NG && NG == (1 << DW))
    else $error("gbi needs NG a power of two dividing N, N > NG");

endmodule
