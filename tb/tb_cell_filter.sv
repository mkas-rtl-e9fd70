// tb_cell_filter: self-checking test of the cell filter.
// Random cells are offered to a group-address filter (tag bits 5:3) and a
// destination-address filter (tag bits 2:0); a cell must pass exactly when it
// is present and the examined field equals the filter address, and must
// pass unchanged.
module tb_cell_filter;
  import mkas_pkg::*;

  sw_cell_t   in_cell, out_g, out_d;
  logic [2:0] addr_g, addr_d;
  int checks = 0, failures = 0;
  int n_pass = 0;

  cell_filter #(.LSB(3), .W(3)) dut_g (.in_cell(in_cell), .addr(addr_g), .out_cell(out_g));
  cell_filter #(.LSB(0), .W(3)) dut_d (.in_cell(in_cell), .addr(addr_d), .out_cell(out_d));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s tag=%0h addr_g=%0d addr_d=%0d", what, in_cell.tag, addr_g, addr_d);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      in_cell             = EMPTY_CELL;
      in_cell.valid       = ($urandom_range(0, 3) != 0);
      in_cell.tag         = TAG_W'($urandom);
      in_cell.atm.payload = {12{$urandom}};
      addr_g = (t % 3 == 0) ? in_cell.tag[5:3] : 3'($urandom);
      addr_d = (t % 3 == 1) ? in_cell.tag[2:0] : 3'($urandom);
      #1;
      check(out_g.valid == (in_cell.valid && ((int'(in_cell.tag) >> 3) & 7) == 32'(addr_g)), "group filter decision");
      check(out_d.valid == (in_cell.valid && (int'(in_cell.tag) & 7) == 32'(addr_d)), "dest filter decision");
      check(out_g.tag == in_cell.tag && out_g.atm == in_cell.atm, "group filter data");
      check(out_d.tag == in_cell.tag && out_d.atm == in_cell.atm, "dest filter data");
      if (out_g.valid) n_pass++;
    end
    check(n_pass > 100, "some cells passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
