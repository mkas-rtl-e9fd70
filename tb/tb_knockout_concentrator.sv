// tb_knockout_concentrator: self-checking test of the knockout concentrator.
// A small 16:5 and a full-size 64:22 concentrator get random slots of cells at
// loads from empty to full. Each cell carries its input number in the
// payload. Checked for every slot: k = min(#cells, OUT) cells leave on outputs
// 0..k-1 and none on the rest, every output cell is an input cell, none
// twice, the first output holds the lowest-numbered cell (left input wins a
// 2x2 element), and n_lost = #cells - k.
module tb_knockout_concentrator;
  import mkas_pkg::*;

  int checks = 0, failures = 0;
  int n_knock = 0;

  sw_cell_t               s_in  [16];
  sw_cell_t               s_out [5];
  logic [$clog2(17)-1:0]  s_lost;
  sw_cell_t               l_in  [64];
  sw_cell_t               l_out [22];
  logic [$clog2(65)-1:0]  l_lost;

  knockout_concentrator #(.IN(16), .OUT(5)) dut_s (.in_cells(s_in), .out_cells(s_out), .n_lost(s_lost));
  knockout_concentrator                     dut_l (.in_cells(l_in), .out_cells(l_out), .n_lost(l_lost));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic sw_cell_t mk(int i, bit v);
    sw_cell_t c = EMPTY_CELL;
    c.valid = v;
    c.tag   = TAG_W'($urandom);
    c.atm.payload[31:0]  = 32'(i);
    c.atm.payload[63:32] = $urandom;
    return c;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 600; t++) begin
      int pct;
      int n_s, n_l, first_s, first_l;
      bit seen_s [16];
      bit seen_l [64];
      pct = $urandom_range(0, 100);
      n_s = 0; n_l = 0; first_s = -1; first_l = -1;
      for (int i = 0; i < 16; i++) begin
        s_in[i] = mk(i, $urandom_range(1, 100) <= pct);
        if (s_in[i].valid) begin n_s++; if (first_s < 0) first_s = i; end
      end
      for (int i = 0; i < 64; i++) begin
        l_in[i] = mk(i, $urandom_range(1, 100) <= pct);
        if (l_in[i].valid) begin n_l++; if (first_l < 0) first_l = i; end
      end
      #1;
      // small instance
      seen_s = '{default: 0};
      for (int r = 0; r < 5; r++) begin
        int src;
        check(s_out[r].valid == (r < n_s), "small: outputs packed, count = min(n, OUT)");
        if (s_out[r].valid) begin
          src = int'(s_out[r].atm.payload[31:0]);
          check(src < 16 && s_in[src].valid && s_out[r] == s_in[src], "small: output is an input cell");
          check(!seen_s[src], "small: no cell twice");
          seen_s[src] = 1;
        end
      end
      if (n_s > 0) check(int'(s_out[0].atm.payload[31:0]) == first_s, "small: lowest input wins round 1");
      check(int'(s_lost) == n_s - ((n_s < 5) ? n_s : 5), "small: n_lost");
      // full-size instance
      seen_l = '{default: 0};
      for (int r = 0; r < 22; r++) begin
        int src;
        check(l_out[r].valid == (r < n_l), "large: outputs packed, count = min(n, OUT)");
        if (l_out[r].valid) begin
          src = int'(l_out[r].atm.payload[31:0]);
          check(src < 64 && l_in[src].valid && l_out[r] == l_in[src], "large: output is an input cell");
          check(!seen_l[src], "large: no cell twice");
          seen_l[src] = 1;
        end
      end
      if (n_l > 0) check(int'(l_out[0].atm.payload[31:0]) == first_l, "large: lowest input wins round 1");
      check(int'(l_lost) == n_l - ((n_l < 22) ? n_l : 22), "large: n_lost");
      if (n_l > 22) n_knock++;
    end
    check(n_knock > 10, "knock-out happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
