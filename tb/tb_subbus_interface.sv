// tb_subbus_interface: self-checking test of one sub-bus interface.
// The interface for port 5 of an 8-port group gets random slots of 22 cells
// with random destinations and loads up to full. Checked every slot: exactly
// min(#cells for port 5, 8) cells leave, packed on outputs 0..k-1, each one a
// distinct input cell addressed to port 5, and the excess is counted in
// n_lost.
module tb_subbus_interface;
  import mkas_pkg::*;

  localparam int M = 22, H = 8, PORT = 5;

  sw_cell_t in_cells [M];
  sw_cell_t out_cells [H];
  logic [$clog2(M+1)-1:0] n_lost;
  int checks = 0, failures = 0, n_knock = 0;

  subbus_interface #(.M(M), .H(H), .NG(8), .PORT(PORT)) dut (
    .in_cells(in_cells), .out_cells(out_cells), .n_lost(n_lost));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int pct, bias, n_for, k;
      bit seen [M];
      pct  = $urandom_range(0, 100);
      bias = $urandom_range(0, 100);     // share of cells aimed at PORT
      n_for = 0;
      for (int i = 0; i < M; i++) begin
        in_cells[i] = EMPTY_CELL;
        in_cells[i].valid = $urandom_range(1, 100) <= pct;
        in_cells[i].tag   = TAG_W'($urandom);
        if ($urandom_range(1, 100) <= bias) in_cells[i].tag[2:0] = 3'(PORT);
        in_cells[i].atm.payload[31:0] = 32'(i);
        if (in_cells[i].valid && in_cells[i].tag[2:0] == 3'(PORT)) n_for++;
      end
      k = (n_for < H) ? n_for : H;
      #1;
      seen = '{default: 0};
      for (int r = 0; r < H; r++) begin
        int src;
        check(out_cells[r].valid == (r < k), "count and packing");
        if (out_cells[r].valid) begin
          src = int'(out_cells[r].atm.payload[31:0]);
          check(src < M && out_cells[r] == in_cells[src], "output is an input cell");
          check(out_cells[r].tag[2:0] == 3'(PORT), "addressed to this port");
          check(!seen[src], "no cell twice");
          seen[src] = 1;
        end
      end
      check(int'(n_lost) == n_for - k, "n_lost");
      if (n_for > H) n_knock++;
    end
    check(n_knock > 10, "knock-out happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
