// mkas_pkg: types and default sizes shared by the Modular Knockout ATM Switch.
//
// The switch moves whole 53-byte ATM cells, one cell per input per time slot.
// Inside the switch each cell carries a local routing tag of log2(N) bits,
// split into a group address (high bits, log2(N/n)) and a destination port
// address (low bits, log2(n)). The default sizes are the worked example of
// the design: N = 64 ports, groups of n = 8 outputs, m = 22 group-concentrator
// outputs and h = 8 sub-bus concentrator outputs per port.
//
// Design choices of this implementation: one clock cycle is one time slot and
// a cell travels as one parallel word; the tag field has a fixed width of
// TAG_W bits, of which only the low log2(N) are used, so N is at most 2**TAG_W.
package mkas_pkg;

  // Default switch dimensions (worked example N = 64, n = 8, m = 22, h = 8).
  localparam int unsigned N_PORTS_DEF  = 64;
  localparam int unsigned GROUP_N_DEF  = 8;
  localparam int unsigned CONC_M_DEF   = 22;
  localparam int unsigned KO_H_DEF     = 8;

  // Width of the internal routing tag field (supports N up to 1024).
  localparam int unsigned TAG_W = 10;

  // Standard ATM cell: 5-byte header and 48-byte payload.
  typedef struct packed {
    logic [3:0]  gfc;
    logic [7:0]  vpi;
    logic [15:0] vci;
    logic [2:0]  pt;
    logic        clp;
    logic [7:0]  hec;
  } atm_hdr_t;

  typedef struct packed {
    atm_hdr_t          hdr;
    logic [48*8-1:0]   payload;
  } atm_cell_t;

  // Cell as it travels inside the switch: presence bit, local routing tag
  // (group address above destination address) and the original cell.
  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
    atm_cell_t        atm;
  } sw_cell_t;

  localparam sw_cell_t EMPTY_CELL = '0;

  // Look-up table entry of an input interface.
  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
  } lut_entry_t;

endpackage
