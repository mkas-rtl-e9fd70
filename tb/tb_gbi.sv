// tb_gbi: self-checking test of a group bus interface, both DSN variants.
// Two group bus interfaces for group 1 of a 16-port switch (groups of 4,
// m = 6, h = 3, 4-cell banks), one with the filters DSN and one with the
// banyan DSN, watch the same 16 buses. Traffic alternates between light
// uniform load, a hot group (all cells for group 1) and a hot port. A
// scoreboard checks that every departing cell was sent to that port of group
// 1, leaves no earlier than the slot after it arrived (exactly then when the
// port was idle), departs only once, keeps the order of its source input,
// and that at the end every cell for the group has either departed or been
// counted as lost in the group concentrator, the DSN or a full buffer. Each
// of those three losses must have happened.
module tb_gbi;
  import mkas_pkg::*;

  localparam int N = 16, NG = 4, M = 6, H = 3, GID = 1, SLOTS = 4000;

  logic     clk = 0, rst_n = 0;
  sw_cell_t bus [N];
  int       slot = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at slot %0d", what, slot);
    end
  endtask

  for (genvar v = 0; v < 2; v++) begin : g_var
    sw_cell_t out_cells [NG];
    logic [$clog2(N+1)-1:0] conc_lost;
    logic [$clog2(M+1)-1:0] dsn_lost;
    localparam int BIN = v ? (M + 1) / 2 : H;
    logic [$clog2(NG*BIN+1)-1:0] buf_lost;
    logic [$clog2(BIN*4+1)-1:0]  occ [NG];

    gbi #(.N(N), .NG(NG), .M(M), .H(H), .GROUP_ID(GID), .DSN_BANYAN(v), .BUF_DEPTH(4)) dut (
      .clk(clk), .rst_n(rst_n), .bus_cells(bus), .out_cells(out_cells),
      .conc_lost(conc_lost), .dsn_lost(dsn_lost), .buf_lost(buf_lost), .buf_occ(occ));

    int pend_slot [int];     // id -> clock edge of arrival, cells expected to depart
    int last_seq  [N][NG];
    int sent = 0, delivered = 0, l_conc = 0, l_dsn = 0, l_buf = 0, n_direct = 0;

    initial for (int i = 0; i < N; i++) for (int j = 0; j < NG; j++) last_seq[i][j] = -1;

    // record arrivals and losses of this slot, just before the clock edge
    always @(posedge clk) if (rst_n) begin
      for (int i = 0; i < N; i++)
        if (bus[i].valid && bus[i].tag[3:2] == 2'(GID)) begin
          pend_slot[int'(bus[i].atm.payload[31:0])] = int'($time / 10);
          sent++;
        end
      l_conc += int'(conc_lost);
      l_dsn  += int'(dsn_lost);
      l_buf  += int'(buf_lost);
    end

    // check departures, just after the clock edge
    always @(negedge clk) if (rst_n) begin
      for (int j = 0; j < NG; j++)
        if (out_cells[j].valid) begin
          int id, src, sq;
          id  = int'(out_cells[j].atm.payload[31:0]);
          src = int'(out_cells[j].atm.payload[47:32]);
          sq  = int'(out_cells[j].atm.payload[79:48]);
          check(pend_slot.exists(id), "departing cell was sent and not yet departed");
          check(out_cells[j].tag[3:2] == 2'(GID) && int'(out_cells[j].tag[1:0]) == j, "right port");
          if (pend_slot.exists(id)) begin
            // departure clock edge is the one 5 time units ago
            check(int'(($time - 5) / 10) > pend_slot[id], "departs after arrival slot");
            if (int'(($time - 5) / 10) == pend_slot[id] + 1) n_direct++;
            pend_slot.delete(id);
          end
          check(sq > last_seq[src][j], "order of a source kept");
          last_seq[src][j] = sq;
          delivered++;
        end
    end

  end

  initial begin
    repeat (SLOTS * 3) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int id, seq [N];
    id = 0;
    seq = '{default: 0};
    for (int i = 0; i < N; i++) bus[i] = EMPTY_CELL;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < SLOTS; t++) begin
      int phase, pct;
      @(negedge clk);
      slot++;
      phase = (t / 200) % 3;
      pct   = (t >= SLOTS - 100) ? 0 : (phase == 0 ? 25 : 40);
      for (int i = 0; i < N; i++) begin
        bus[i] = EMPTY_CELL;
        if ($urandom_range(1, 100) <= pct) begin
          bus[i].valid = 1;
          bus[i].tag   = TAG_W'($urandom_range(0, N - 1));
          if (phase == 1) bus[i].tag[3:2] = 2'(GID);                       // hot group
          if (phase == 2 && $urandom_range(0, 1) != 0) bus[i].tag[3:0] = 4'(GID * 4 + 2);  // hot port
          bus[i].atm.payload[31:0]  = 32'(id);
          bus[i].atm.payload[47:32] = 16'(i);
          bus[i].atm.payload[79:48] = 32'(seq[i]);
          id++;
          seq[i]++;
        end
      end
    end
    @(negedge clk);
    slot++;
    for (int i = 0; i < N; i++) bus[i] = EMPTY_CELL;
    repeat (3) @(negedge clk);
    // end-of-run accounting
    check(g_var[0].pend_slot.size() == g_var[0].l_conc + g_var[0].l_dsn + g_var[0].l_buf, "filters: every cell departed or counted lost");
    check(g_var[1].pend_slot.size() == g_var[1].l_conc + g_var[1].l_dsn + g_var[1].l_buf, "banyan: every cell departed or counted lost");
    check(g_var[0].l_conc > 0 && g_var[1].l_conc > 0, "group concentrator knock-out happened");
    check(g_var[0].l_dsn > 0 && g_var[1].l_dsn > 0, "DSN loss happened");
    check(g_var[0].l_buf > 0 && g_var[1].l_buf > 0, "buffer overflow happened");
    check(g_var[0].n_direct > 100 && g_var[1].n_direct > 100, "cut-through in one slot happened");
    check(g_var[0].l_conc == g_var[1].l_conc, "same first stage in both variants");
    $display("filters: sent=%0d delivered=%0d conc=%0d dsn=%0d buf=%0d",
             g_var[0].sent, g_var[0].delivered, g_var[0].l_conc, g_var[0].l_dsn, g_var[0].l_buf);
    $display("banyan : sent=%0d delivered=%0d conc=%0d dsn=%0d buf=%0d",
             g_var[1].sent, g_var[1].delivered, g_var[1].l_conc, g_var[1].l_dsn, g_var[1].l_buf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
