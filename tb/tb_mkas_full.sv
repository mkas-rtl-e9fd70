// tb_mkas_full: the switch at its full default size (64 x 64, groups of 8,
// m = 22, h = 8, filters DSN) through one complete operation: connection
// set-up of all 64 translation tables, a run of traffic that passes through
// light uniform load, a hot group and a hot port (plus a few cells on an
// unknown connection), and the drain. The same scoreboard as the reduced
// end-to-end test checks every departing cell (unchanged, right port, once,
// in source order, at least two slots, exactly two into an idle switch) and
// the final accounting of lost cells against the statistics counters.
module tb_mkas_full;
  import mkas_pkg::*;

  localparam int N = 64, NG = 8, M = 22, H = 8, BD = 8, SLOTS = 600, HOT = 13;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] in_valid = '0;
  atm_cell_t    in_cells [N];
  logic         lut_we = 0;
  logic [5:0]   lut_port = '0;
  logic [7:0]   lut_addr = '0;
  lut_entry_t   lut_data = '0;
  int           route [N][16];      // output port of each connection, -1 = none
  int checks = 0, failures = 0;
  int n_unknown_sent = 0;

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  for (genvar v = 0; v < 1; v++) begin : g_var
    logic [N-1:0] out_valid;
    atm_cell_t    out_cells [N];
    localparam int OCW = $clog2(H * BD + 1);
    logic [OCW-1:0] buf_occ [N];
    logic [31:0]  s_unk, s_conc, s_dsn, s_buf;

    mkas_top dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_cells(in_cells),
      .lut_we(lut_we), .lut_port(lut_port), .lut_addr(lut_addr), .lut_data(lut_data),
      .out_valid(out_valid), .out_cells(out_cells), .buf_occ(buf_occ),
      .stat_unknown(s_unk), .stat_conc_lost(s_conc), .stat_dsn_lost(s_dsn), .stat_buf_lost(s_buf));

    atm_cell_t pend_cell [int];
    int        pend_port [int];
    int        pend_edge [int];
    int        last_seq  [N][N];
    int        delivered = 0, n_direct = 0, n_queued = 0;

    initial for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) last_seq[i][j] = -1;

    always @(posedge clk) if (rst_n) begin
      for (int i = 0; i < N; i++)
        if (in_valid[i] && route[i][in_cells[i].hdr.vci[3:0]] >= 0) begin
          int id;
          id = int'(in_cells[i].payload[31:0]);
          pend_cell[id] = in_cells[i];
          pend_port[id] = route[i][in_cells[i].hdr.vci[3:0]];
          pend_edge[id] = int'($time / 10);
        end
    end

    always @(negedge clk) if (rst_n) begin
      for (int p = 0; p < N; p++)
        if (out_valid[p]) begin
          int id, src, sq, lat;
          id  = int'(out_cells[p].payload[31:0]);
          src = int'(out_cells[p].payload[47:32]);
          sq  = int'(out_cells[p].payload[79:48]);
          check(pend_cell.exists(id), "departing cell was sent and not yet departed");
          if (pend_cell.exists(id)) begin
            check(out_cells[p] == pend_cell[id], "cell unchanged");
            check(pend_port[id] == p, "right output port");
            lat = int'(($time - 5) / 10) - pend_edge[id];
            check(lat >= 2, "latency at least two slots");
            if (lat == 2) n_direct++; else n_queued++;
            pend_cell.delete(id);
          end
          check(sq > last_seq[src][p], "order of a source kept");
          last_seq[src][p] = sq;
          delivered++;
        end
    end
  end

  initial begin
    repeat (SLOTS * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a single cell into an idle switch must leave two slots later
  task automatic lone_cell(input int i, input int k, input int id);
    in_cells[i] = '0;
    in_cells[i].hdr.vci = 16'(k);
    in_cells[i].payload[31:0]  = 32'(id);
    in_cells[i].payload[47:32] = 16'(i);
    in_cells[i].payload[79:48] = 32'd0;
    in_valid[i] = 1;
    @(negedge clk);
    in_valid = '0;
    @(negedge clk);
    check(g_var[0].out_valid == '0, "not out after one slot");
    @(negedge clk);
    check(g_var[0].out_valid[route[i][k]], "out after two slots");
  endtask

  initial begin
    int id, seq [N];
    id = 0;
    seq = '{default: 1};
    for (int i = 0; i < N; i++) in_cells[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // connection set-up
    for (int i = 0; i < N; i++)
      for (int k = 0; k < 16; k++) begin
        case (k)
          12:      route[i][k] = HOT;
          13:      route[i][k] = NG + $urandom_range(0, NG - 1);
          15:      route[i][k] = -1;
          default: route[i][k] = $urandom_range(0, N - 1);
        endcase
        if (route[i][k] >= 0) begin
          lut_we   = 1;
          lut_port = 6'(i);
          lut_addr = 8'(k);
          lut_data = '{valid: 1'b1, tag: TAG_W'(route[i][k])};
          @(negedge clk);
        end
      end
    lut_we = 0;
    @(negedge clk);
    lone_cell(3, 0, 1000000);
    lone_cell(9, 12, 1000001);
    // traffic
    for (int t = 0; t < SLOTS; t++) begin
      int phase, pct;
      phase = (t / 100) % 3;
      pct   = (t >= SLOTS - 100) ? 0 : (phase == 0 ? 30 : 50);
      for (int i = 0; i < N; i++) begin
        int k;
        in_valid[i] = 0;
        in_cells[i] = '0;
        if ($urandom_range(1, 100) <= pct) begin
          k = $urandom_range(0, 14);
          if (phase == 1) k = 13;
          if (phase == 2 && $urandom_range(0, 1) != 0) k = 12;
          if ($urandom_range(0, 99) == 0) k = 15;
          if (k == 15) n_unknown_sent++;
          in_valid[i] = 1;
          in_cells[i].hdr.vpi = {4'($urandom), 4'd0};
          in_cells[i].hdr.vci = {12'($urandom), 4'(k)};
          in_cells[i].hdr.pt  = 3'($urandom);
          in_cells[i].payload = {12{$urandom}};
          in_cells[i].payload[31:0]  = 32'(id);
          in_cells[i].payload[47:32] = 16'(i);
          in_cells[i].payload[79:48] = 32'(seq[i]);
          id++;
          seq[i]++;
        end
      end
      @(negedge clk);
    end
    in_valid = '0;
    repeat (4) @(negedge clk);
    begin
      int conc, dsn, bufl, unk, left, dir, que, occ;
      conc = g_var[0].s_conc; dsn = g_var[0].s_dsn; bufl = g_var[0].s_buf; unk = g_var[0].s_unk;
      left = g_var[0].pend_cell.size(); dir = g_var[0].n_direct; que = g_var[0].n_queued;
      occ = 0; for (int p = 0; p < N; p++) occ += int'(g_var[0].buf_occ[p]);
      $display("unknown=%0d conc_lost=%0d dsn_lost=%0d buf_lost=%0d direct=%0d queued=%0d",
               unk, conc, dsn, bufl, dir, que);
      check(occ == 0, "buffers drained");
      check(unk == n_unknown_sent && unk > 0, "unknown connections counted");
      check(left == conc + dsn + bufl, "every cell departed or counted lost");
      check(conc > 0, "group concentrator knock-out happened");
      check(dsn > 0, "DSN loss happened");
      check(bufl > 0, "buffer overflow happened");
      check(dir > 0, "two-slot cut-through happened");
      check(que > 0, "queueing happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
