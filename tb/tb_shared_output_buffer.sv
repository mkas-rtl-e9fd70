// tb_shared_output_buffer: self-checking test of the shared output buffer.
// A 4-input buffer with 4 banks of 4 cells (capacity 16) gets random slots of
// cells, with empty slots anywhere among the inputs, at loads that alternate
// between light and overloaded. A reference FIFO of capacity 16 predicts
// every slot: the departing cell (one per slot whenever a cell is held, in
// arrival order, input order within a slot, never in the slot it arrived),
// the cells dropped at a full buffer and the occupancy.
module tb_shared_output_buffer;
  import mkas_pkg::*;

  localparam int IN = 4, DEPTH = 4, CAP = IN * DEPTH;

  logic                  clk = 0, rst_n = 0;
  sw_cell_t              in_cells [IN];
  sw_cell_t              out_cell;
  logic [$clog2(IN+1)-1:0]    n_lost;
  logic [$clog2(CAP+1)-1:0]   occupancy;

  int checks = 0, failures = 0;
  int n_overflow = 0, n_out = 0, n_wait = 0;
  int seq = 0;
  sw_cell_t q [$];

  shared_output_buffer #(.IN(IN), .BANKS(IN), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .in_cells(in_cells), .out_cell(out_cell),
    .n_lost(n_lost), .occupancy(occupancy));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < IN; i++) in_cells[i] = EMPTY_CELL;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(out_cell.valid == 0 && occupancy == 0, "empty after reset");
    for (int t = 0; t < 3000; t++) begin
      int pct, sz0, acc, lost;
      bit have;
      sw_cell_t exp;
      pct = ((t / 100) % 2 == 0) ? 20 : 40;
      if (t >= 2900) pct = 0;                 // drain at the end
      for (int i = 0; i < IN; i++) begin
        in_cells[i] = EMPTY_CELL;
        if ($urandom_range(1, 100) <= pct) begin
          in_cells[i].valid = 1;
          in_cells[i].tag   = TAG_W'(i);
          in_cells[i].atm.payload[31:0] = 32'(seq);
          seq++;
        end
      end
      // reference model
      sz0  = q.size();
      check(int'(occupancy) == sz0, "occupancy");
      have = (sz0 > 0);
      if (have) exp = q.pop_front();
      acc = 0; lost = 0;
      for (int i = 0; i < IN; i++)
        if (in_cells[i].valid) begin
          if (sz0 + acc < CAP) begin q.push_back(in_cells[i]); acc++; end
          else lost++;
        end
      #1;
      check(int'(n_lost) == lost, "n_lost");
      if (lost > 0) n_overflow++;
      if (sz0 > 1) n_wait++;
      @(negedge clk);
      check(out_cell.valid == have, "departure whenever a cell is held");
      if (have) begin
        check(out_cell == exp, "departure order");
        n_out++;
      end
    end
    check(q.size() == 0 && occupancy == 0, "drained");
    check(n_overflow > 5, "overflow happened");
    check(n_wait > 100, "queueing happened");
    $display("departures=%0d overflow slots=%0d", n_out, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
