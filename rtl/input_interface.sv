// input_interface: input interface module of one switch input port.
//
// It retimes the arriving cell to the switch clock and attaches the local
// routing tag: the cell's VPI/VCI selects an entry of a translation table
// whose entry holds the tag (group address above destination port address).
// A cell whose table entry is not valid is discarded and flagged on
// unknown_vc. The table is written by the connection-set-up side through a
// simple write port (lut_we, lut_addr, lut_data).
//
// The table is indexed by the low LUT_AW/2 bits of the VPI above the low
// LUT_AW - LUT_AW/2 bits of the VCI, so it covers 2**LUT_AW connections per
// port; the size, this index and the write port are this implementation's
// choices. The original header is carried unchanged.
//
// Timing: one register stage; a cell presented in slot t leaves, tagged, in
// slot t+1. Reset is asynchronous, active low, and clears the table.
module input_interface
  import mkas_pkg::*;
#(
  parameter int unsigned LUT_AW = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  atm_cell_t          in_cell,
  input  logic               lut_we,
  input  logic [LUT_AW-1:0]  lut_addr,
  input  lut_entry_t         lut_data,
  output sw_cell_t           out_cell,
  output logic               unknown_vc
);

  localparam int unsigned PW = LUT_AW / 2;
  localparam int unsigned CW = LUT_AW - PW;

  lut_entry_t        lut [2**LUT_AW];
  logic [LUT_AW-1:0] idx;
  lut_entry_t        ent;

  always_comb begin
    idx = {in_cell.hdr.vpi[PW-1:0], in_cell.hdr.vci[CW-1:0]};
    ent = lut[idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 2**LUT_AW; k++) lut[k] <= '0;
      out_cell   <= EMPTY_CELL;
      unknown_vc <= 1'b0;
    end else begin
      if (lut_we) lut[lut_addr] <= lut_data;
      out_cell.valid <= in_valid && ent.valid;
      out_cell.tag   <= ent.tag;
      out_cell.atm   <= in_cell;
      unknown_vc     <= in_valid && !ent.valid;
    end
  end

endmodule
