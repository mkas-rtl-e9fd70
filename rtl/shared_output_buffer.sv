// shared_output_buffer: IN-input, one-output shared FIFO of an output port.
//
// In each time slot up to IN cells for this port arrive at once; the buffer
// stores them and sends one cell per slot to the output link, in the order in
// which they arrived. It is built like the output buffer of a knockout bus
// interface: a shifter spreads the arriving cells over BANKS separate FIFO
// banks in round-robin order, starting at the bank after the one written
// last, and the output side reads the banks in the same round-robin order.
// Cells of one slot are taken in input order (input 0 first), so cells that
// arrive in the same slot leave in input order, and a cell never leaves
// before one from an earlier slot. Inputs need not be packed: empty slots
// among the inputs are skipped by the shifter.
//
// Because banks are written and read in turn, the bank due for the next write
// is always the emptiest; when it is full the whole buffer is full, and that
// cell and the later cells of the slot are dropped and counted in n_lost.
//
// Interface: in_cells (one slot of cells), out_cell (the departing cell,
// valid = 0 in a slot with nothing to send), n_lost (cells dropped this slot),
// occupancy (cells held). Timing: a cell written at a clock edge can leave at
// the next edge at the earliest; out_cell is a register. Reset is
// asynchronous, active low, and empties the buffer.
// Shared FIFO and in-order departure follow the design; the bank depth and
// the overflow policy are this implementation's choices.
module shared_output_buffer
  import mkas_pkg::*;
#(
  parameter int unsigned IN    = KO_H_DEF,
  parameter int unsigned BANKS = IN,
  parameter int unsigned DEPTH = 8          // cells per bank
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  sw_cell_t                             in_cells [IN],
  output sw_cell_t                             out_cell,
  output logic [$clog2(IN+1)-1:0]              n_lost,
  output logic [$clog2(BANKS*DEPTH+1)-1:0]     occupancy
);

  localparam int unsigned BW = (BANKS > 1) ? $clog2(BANKS) : 1;
  localparam int unsigned DW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  sw_cell_t         mem    [BANKS][DEPTH];
  logic [DW-1:0]    wr_idx [BANKS];
  logic [DW-1:0]    rd_idx [BANKS];
  logic [CW-1:0]    cnt    [BANKS];
  logic [BW-1:0]    wr_ptr, rd_ptr;

  // shifter: which input goes to which bank this slot
  logic             we     [BANKS];
  sw_cell_t         wdata  [BANKS];
  logic [BW-1:0]    wr_ptr_nxt;
  logic             re;

  always_comb begin
    int unsigned rank, b, lost;
    logic stop;
    rank = 0;
    lost = 0;
    stop = 1'b0;
    for (int k = 0; k < BANKS; k++) begin
      we[k]    = 1'b0;
      wdata[k] = EMPTY_CELL;
    end
    for (int i = 0; i < IN; i++) begin
      if (in_cells[i].valid) begin
        b = 32'(wr_ptr) + rank;
        if (b >= BANKS) b -= BANKS;
        if (stop || cnt[b] == CW'(DEPTH)) begin
          stop = 1'b1;
          lost++;
        end else begin
          we[b]    = 1'b1;
          wdata[b] = in_cells[i];
          rank++;
        end
      end
    end
    b = 32'(wr_ptr) + rank;
    if (b >= BANKS) b -= BANKS;
    wr_ptr_nxt = BW'(b);
    n_lost     = ($clog2(IN+1))'(lost);
    re         = (cnt[rd_ptr] != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      out_cell <= EMPTY_CELL;
      for (int k = 0; k < BANKS; k++) begin
        wr_idx[k] <= '0;
        rd_idx[k] <= '0;
        cnt[k]    <= '0;
      end
    end else begin
      wr_ptr   <= wr_ptr_nxt;
      out_cell <= EMPTY_CELL;
      if (re) begin
        out_cell <= mem[rd_ptr][rd_idx[rd_ptr]];
        rd_idx[rd_ptr] <= (rd_idx[rd_ptr] == DW'(DEPTH - 1)) ? '0 : rd_idx[rd_ptr] + 1'b1;
        rd_ptr <= (rd_ptr == BW'(BANKS - 1)) ? '0 : rd_ptr + 1'b1;
      end
      for (int k = 0; k < BANKS; k++) begin
        if (we[k])
          wr_idx[k] <= (wr_idx[k] == DW'(DEPTH - 1)) ? '0 : wr_idx[k] + 1'b1;
        cnt[k] <= cnt[k] + CW'(we[k]) - CW'(re && rd_ptr == BW'(k));
      end
    end
  end

  // Storage has no reset: only written entries are ever read.
  always_ff @(posedge clk) begin
    for (int k = 0; k < BANKS; k++)
      if (we[k]) mem[k][wr_idx[k]] <= wdata[k];
  end

  always_comb begin
    int unsigned s;
    s = 0;
    for (int k = 0; k < BANKS; k++) s += 32'(cnt[k]);
    occupancy = ($clog2(BANKS*DEPTH+1))'(s);
  end

  initial assert (BANKS >= IN) else $error("shared_output_buffer needs BANKS >= IN");

endmodule
