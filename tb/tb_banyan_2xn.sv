// tb_banyan_2xn: self-checking test of the 2 x 8 banyan.
// Every combination of presence and destination of the two input cells is
// tried (plus random payloads and group bits). Output link j must carry the
// input-0 cell when it goes to j, otherwise the input-1 cell when it goes to
// j, otherwise nothing; n_lost is set exactly when both go to the same port.
module tb_banyan_2xn;
  import mkas_pkg::*;

  sw_cell_t in_cells [2];
  sw_cell_t out_cells [8];
  logic     n_lost;
  int checks = 0, failures = 0, n_conflict = 0;

  banyan_2xn dut (.in_cells(in_cells), .out_cells(out_cells), .n_lost(n_lost));

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
    for (int rep = 0; rep < 4; rep++)
      for (int a = 0; a < 16; a++)
        for (int b = 0; b < 16; b++) begin
          int da, db;
          for (int s = 0; s < 2; s++) begin
            in_cells[s] = EMPTY_CELL;
            in_cells[s].tag = TAG_W'($urandom);
            in_cells[s].atm.payload = {12{$urandom}};
          end
          in_cells[0].valid = a[3]; in_cells[0].tag[2:0] = 3'(a);
          in_cells[1].valid = b[3]; in_cells[1].tag[2:0] = 3'(b);
          da = a & 7; db = b & 7;
          #1;
          for (int j = 0; j < 8; j++) begin
            if (a[3] && da == j)      check(out_cells[j] == in_cells[0], "input 0 routed");
            else if (b[3] && db == j) check(out_cells[j] == in_cells[1], "input 1 routed");
            else                      check(!out_cells[j].valid, "idle link");
          end
          check(n_lost == (a[3] && b[3] && da == db), "conflict loss");
          if (n_lost) n_conflict++;
        end
    check(n_conflict > 0, "conflict seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
