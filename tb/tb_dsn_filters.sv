// tb_dsn_filters: self-checking test of the filters-approach destination
// sorting network (22 inputs, 8 ports, 8 links per port). For random slots,
// port j must receive exactly min(#cells for j, 8) distinct input cells, all
// addressed to j and packed on its first links; the cells beyond 8 per port
// are counted in n_lost.
module tb_dsn_filters;
  import mkas_pkg::*;

  localparam int M = 22, H = 8, NG = 8;

  sw_cell_t in_cells [M];
  sw_cell_t port_cells [NG][H];
  logic [$clog2(M+1)-1:0] n_lost;
  int checks = 0, failures = 0, n_knock = 0;

  dsn_filters dut (.in_cells(in_cells), .port_cells(port_cells), .n_lost(n_lost));

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
    for (int t = 0; t < 1500; t++) begin
      int pct, hot, exp_lost;
      int n_for [NG];
      bit seen [M];
      pct = $urandom_range(0, 100);
      hot = $urandom_range(0, 1);       // hot-spot slots aim most cells at port 2
      n_for = '{default: 0};
      for (int i = 0; i < M; i++) begin
        in_cells[i] = EMPTY_CELL;
        in_cells[i].valid = $urandom_range(1, 100) <= pct;
        in_cells[i].tag   = TAG_W'($urandom);
        if (hot != 0 && $urandom_range(0, 3) != 0) in_cells[i].tag[2:0] = 3'd2;
        in_cells[i].atm.payload[31:0] = 32'(i);
        if (in_cells[i].valid) n_for[in_cells[i].tag[2:0]]++;
      end
      #1;
      seen = '{default: 0};
      exp_lost = 0;
      for (int j = 0; j < NG; j++) begin
        int k;
        k = (n_for[j] < H) ? n_for[j] : H;
        exp_lost += n_for[j] - k;
        for (int r = 0; r < H; r++) begin
          int src;
          check(port_cells[j][r].valid == (r < k), "count and packing");
          if (port_cells[j][r].valid) begin
            src = int'(port_cells[j][r].atm.payload[31:0]);
            check(src < M && port_cells[j][r] == in_cells[src], "output is an input cell");
            check(int'(port_cells[j][r].tag[2:0]) == j, "sorted to its port");
            check(!seen[src], "no cell twice");
            seen[src] = 1;
          end
        end
      end
      check(int'(n_lost) == exp_lost, "n_lost");
      if (exp_lost > 0) n_knock++;
    end
    check(n_knock > 10, "knock-out happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
