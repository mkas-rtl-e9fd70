// cell_filter: address filter in front of a concentrator.
//
// A cell filter looks at one field of a cell's local routing tag and lets the
// cell through only when that field equals the filter's own address. In the
// first stage of a group bus interface the field is the group address (the
// high log2(N/n) tag bits); in a sub-bus interface of the second stage it is
// the destination port address (the low log2(n) bits). A cell that does not
// match leaves the filter as an empty slot (valid = 0).
//
// Interface: in_cell / out_cell carry one cell; addr is the filter's address.
// Timing: purely combinational.
// The filtering rule is the design's own description; the parameterised field
// position (LSB, W) is a choice of this implementation.
module cell_filter
  import mkas_pkg::*;
#(
  parameter int unsigned LSB = 3,   // lowest tag bit of the examined field
  parameter int unsigned W   = 3    // width of the examined field
) (
  input  sw_cell_t       in_cell,
  input  logic [W-1:0]   addr,
  output sw_cell_t       out_cell
);

  always_comb begin
    out_cell       = in_cell;
    out_cell.valid = in_cell.valid && (in_cell.tag[LSB +: W] == addr);
  end

endmodule
