// mkas_top: Modular Knockout ATM Switch, N x N.
//
// An output-buffered, self-routing ATM switch split into two stages so that
// it can be built from identical modules. Each of the N inputs has an input
// interface that tags the cell with a log2(N)-bit local routing address
// (looked up from its VPI/VCI) and puts it on its own broadcast bus. All N
// buses reach each of the M = N/NG group bus interfaces. Group bus interface
// g serves output ports g*NG .. g*NG+NG-1: it filters the cells of its group,
// concentrates them N:M, sorts them to their ports (sub-bus filters and M:H
// concentrators, or 2 x NG banyans when DSN_BANYAN = 1) and queues them in
// shared per-port FIFOs that send one cell per slot. On the way out the
// routing tag is removed and the original 53-byte cell leaves on out_cells.
//
// Interface:
//  in_valid/in_cells  one cell per input port per slot (clock cycle)
//  lut_*              writes entry lut_addr of input port lut_port's table
//  out_valid/out_cells one cell per output port per slot
//  buf_occ            cells held in each output port's buffer
//  stat_*             running counts since reset: cells with no table entry,
//                     cells knocked out in group concentrators, in the DSN,
//                     and dropped at full output buffers
// Timing: a cell presented in slot t is tagged at the end of slot t, written
// into its port buffer at the end of slot t+1 and, with an empty buffer,
// appears on out_cells in slot t+2 (two cycles after it was presented).
// Reset is asynchronous and active low.
// The two-stage structure and the sizes N = 64, n = 8, m = 22, h = 8 follow
// the design; one cycle per slot, the table write port, buffer depth and the
// statistics counters are this implementation's choices.
module mkas_top
  import mkas_pkg::*;
#(
  parameter int unsigned N          = N_PORTS_DEF,
  parameter int unsigned NG         = GROUP_N_DEF,
  parameter int unsigned M          = CONC_M_DEF,
  parameter int unsigned H          = KO_H_DEF,
  parameter bit          DSN_BANYAN = 1'b0,
  parameter int unsigned BUF_DEPTH  = 8,
  parameter int unsigned LUT_AW     = 8,
  localparam int unsigned PW        = $clog2(N),
  localparam int unsigned OCW       = $clog2((DSN_BANYAN ? (M + 1) / 2 : H) * BUF_DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N-1:0]       in_valid,
  input  atm_cell_t          in_cells  [N],
  input  logic               lut_we,
  input  logic [PW-1:0]      lut_port,
  input  logic [LUT_AW-1:0]  lut_addr,
  input  lut_entry_t         lut_data,
  output logic [N-1:0]       out_valid,
  output atm_cell_t          out_cells [N],
  output logic [OCW-1:0]     buf_occ   [N],
  output logic [31:0]        stat_unknown,
  output logic [31:0]        stat_conc_lost,
  output logic [31:0]        stat_dsn_lost,
  output logic [31:0]        stat_buf_lost
);

  localparam int unsigned G      = N / NG;            // number of groups
  localparam int unsigned NB     = (M + 1) / 2;
  localparam int unsigned BUF_IN = DSN_BANYAN ? NB : H;

  // ---- input interfaces and broadcast buses ----
  sw_cell_t     bus     [N];
  logic [N-1:0] unknown;

  for (genvar i = 0; i < N; i++) begin : g_in
    input_interface #(.LUT_AW(LUT_AW)) u_iim (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (in_valid[i]),
      .in_cell    (in_cells[i]),
      .lut_we     (lut_we && lut_port == PW'(i)),
      .lut_addr   (lut_addr),
      .lut_data   (lut_data),
      .out_cell   (bus[i]),
      .unknown_vc (unknown[i])
    );
  end

  // ---- group bus interfaces ----
  logic [$clog2(N+1)-1:0]         conc_lost [G];
  logic [$clog2(M+1)-1:0]         dsn_lost  [G];
  logic [$clog2(NG*BUF_IN+1)-1:0] buf_lost  [G];
  sw_cell_t                       gout      [G][NG];

  for (genvar g = 0; g < G; g++) begin : g_gbi
    logic [OCW-1:0] occ [NG];
    gbi #(.N(N), .NG(NG), .M(M), .H(H), .GROUP_ID(g), .DSN_BANYAN(DSN_BANYAN),
          .BUF_DEPTH(BUF_DEPTH)) u_gbi (
      .clk       (clk),
      .rst_n     (rst_n),
      .bus_cells (bus),
      .out_cells (gout[g]),
      .conc_lost (conc_lost[g]),
      .dsn_lost  (dsn_lost[g]),
      .buf_lost  (buf_lost[g]),
      .buf_occ   (occ)
    );

    // output interfaces: strip the routing tag
    for (genvar j = 0; j < NG; j++) begin : g_out
      assign out_valid[g*NG + j] = gout[g][j].valid;
      assign out_cells[g*NG + j] = gout[g][j].atm;
      assign buf_occ[g*NG + j]   = occ[j];
    end
  end

  // ---- statistics ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_unknown   <= '0;
      stat_conc_lost <= '0;
      stat_dsn_lost  <= '0;
      stat_buf_lost  <= '0;
    end else begin
      logic [31:0] su, sc, sd, sb;
      su = stat_unknown;
      sc = stat_conc_lost;
      sd = stat_dsn_lost;
      sb = stat_buf_lost;
      for (int i = 0; i < N; i++) su += 32'(unknown[i]);
      for (int g = 0; g < G; g++) begin
        sc += 32'(conc_lost[g]);
        sd += 32'(dsn_lost[g]);
        sb += 32'(buf_lost[g]);
      end
      stat_unknown   <= su;
      stat_conc_lost <= sc;
      stat_dsn_lost  <= sd;
      stat_buf_lost  <= sb;
    end
  end

endmodule
