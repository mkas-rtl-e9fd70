// tb_dsn_banyan: self-checking test of the banyan-approach destination
// sorting network (22 inputs, 11 banyans of 2 x 8, 8 ports). For random
// slots, link b of port j must carry input 2b when that cell goes to j,
// otherwise input 2b+1 when it goes to j, otherwise nothing; n_lost counts the
// banyans whose two cells went to the same port.
module tb_dsn_banyan;
  import mkas_pkg::*;

  localparam int M = 22, NG = 8, NB = 11;

  sw_cell_t in_cells [M];
  sw_cell_t port_cells [NG][NB];
  logic [$clog2(M+1)-1:0] n_lost;
  int checks = 0, failures = 0, n_conflict = 0;

  dsn_banyan dut (.in_cells(in_cells), .port_cells(port_cells), .n_lost(n_lost));

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
      int pct, exp_lost;
      pct = $urandom_range(0, 100);
      for (int i = 0; i < M; i++) begin
        in_cells[i] = EMPTY_CELL;
        in_cells[i].valid = $urandom_range(1, 100) <= pct;
        in_cells[i].tag   = TAG_W'($urandom);
        in_cells[i].atm.payload[31:0] = 32'(i);
      end
      #1;
      exp_lost = 0;
      for (int b = 0; b < NB; b++) begin
        sw_cell_t a, c;
        a = in_cells[2*b];
        c = in_cells[2*b+1];
        if (a.valid && c.valid && a.tag[2:0] == c.tag[2:0]) exp_lost++;
        for (int j = 0; j < NG; j++) begin
          if (a.valid && int'(a.tag[2:0]) == j)      check(port_cells[j][b] == a, "even input routed");
          else if (c.valid && int'(c.tag[2:0]) == j) check(port_cells[j][b] == c, "odd input routed");
          else                                        check(!port_cells[j][b].valid, "idle link");
        end
      end
      check(int'(n_lost) == exp_lost, "n_lost");
      if (exp_lost > 0) n_conflict++;
    end
    check(n_conflict > 10, "conflict seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
