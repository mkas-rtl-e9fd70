// tb_input_interface: self-checking test of the input interface module.
// The translation table is loaded with random routing tags for half of its
// entries; random cells are then presented every slot. One slot later each
// cell must leave with the tag of its entry and its header and payload
// unchanged, or, when its entry was never loaded, be discarded and flagged.
// A table reload while traffic runs is checked too.
module tb_input_interface;
  import mkas_pkg::*;

  localparam int AW = 8;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  atm_cell_t   in_cell;
  logic        lut_we = 0;
  logic [AW-1:0] lut_addr = '0;
  lut_entry_t  lut_data = '0;
  sw_cell_t    out_cell;
  logic        unknown_vc;

  lut_entry_t  model [2**AW];
  int checks = 0, failures = 0, n_unknown = 0, n_ok = 0;

  input_interface #(.LUT_AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_cell(in_cell),
    .lut_we(lut_we), .lut_addr(lut_addr), .lut_data(lut_data),
    .out_cell(out_cell), .unknown_vc(unknown_vc));

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
    in_cell = '0;
    for (int k = 0; k < 2**AW; k++) model[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // load half of the table
    for (int k = 0; k < 2**AW; k++) begin
      if ($urandom_range(0, 1) != 0) begin
        lut_we   = 1;
        lut_addr = AW'(k);
        lut_data = '{valid: 1'b1, tag: TAG_W'($urandom)};
        model[k] = lut_data;
        @(negedge clk);
      end
    end
    lut_we = 0;
    for (int t = 0; t < 3000; t++) begin
      atm_cell_t  c;
      logic [AW-1:0] idx;
      lut_entry_t e;
      bit v;
      c = '0;
      c.hdr.vpi = 8'($urandom);
      c.hdr.vci = 16'($urandom);
      c.hdr.pt  = 3'($urandom);
      c.payload = {12{$urandom}};
      v = $urandom_range(0, 3) != 0;
      idx = {c.hdr.vpi[3:0], c.hdr.vci[3:0]};
      e = model[idx];
      in_cell  = c;
      in_valid = v;
      // occasional table rewrite in the same slot (takes effect next slot)
      if (t % 97 == 5) begin
        lut_we   = 1;
        lut_addr = AW'($urandom);
        lut_data = '{valid: 1'b1, tag: TAG_W'($urandom)};
      end else lut_we = 0;
      @(negedge clk);
      if (lut_we) model[lut_addr] = lut_data;
      check(out_cell.valid == (v && e.valid), "cell kept iff entry valid");
      check(unknown_vc == (v && !e.valid), "unknown VC flagged");
      if (out_cell.valid) begin
        check(out_cell.tag == e.tag, "routing tag from table");
        check(out_cell.atm == c, "cell carried unchanged");
        n_ok++;
      end
      if (unknown_vc) n_unknown++;
    end
    check(n_ok > 500 && n_unknown > 500, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
