// tb_mdlut: fills a model MGCB with grant counts, lets the MDLUT write a bank, then reads all
// columns and compares every grant with the position predicted from the address table: entry k
// of the grant list (CBR grants of ONU 0..N-1, VBR grants, then unassigned) at lower address
// k mod MPR and at the upper address listed in the table (the MPR = 1 and MPR = 8 row orders
// are written out here as printed). Also checks that an unwritten bank reads as unassigned,
// that the banks swap after the last column, and that an ONU never gets two grants in one half
// frame when it has no more grants than there are half frames.
module tb_mdlut;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] mpr = 4'd1;
  logic mg_pending = 1'b0;
  logic [5:0] mg_rd_onu;
  logic mg_rd_vbr, mg_consume;
  logic [7:0] mg_rd_cnt;
  logic rd_go = 1'b0, rd_valid, rd_busy, swap, rd_bank_valid, wr_busy;
  grant_t rd_grant;
  logic [2:0] rd_col;
  int checks = 0, failures = 0, swaps = 0;
  int cnt_c [64], cnt_v [64];

  // upper-address orders as printed in the address table
  int useq1 [25] = '{21, 18, 15, 12, 9, 6, 3, 0, 23, 20, 17, 14, 11, 8, 5, 2, 24,
                     22, 19, 16, 13, 10, 7, 4, 1};
  int useq8 [25] = '{0, 1, 2, 15, 16, 17, 6, 7, 8, 21, 22, 23, 12, 13, 14, 3, 4, 5,
                     18, 19, 20, 9, 10, 11, 24};

  assign mg_rd_cnt = 8'(mg_rd_vbr ? cnt_v[mg_rd_onu] : cnt_c[mg_rd_onu]);

  mdlut dut (.clk, .rst_n, .mpr, .mg_pending, .mg_rd_onu, .mg_rd_vbr, .mg_rd_cnt, .mg_consume,
             .rd_go, .rd_valid, .rd_grant, .rd_busy, .rd_col, .swap, .rd_bank_valid, .wr_busy);

  always #5 clk = ~clk;
  always @(posedge clk) if (swap) swaps++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic read_col(output grant_t g [25]);
    @(negedge clk); rd_go = 1'b1;
    @(negedge clk); rd_go = 1'b0;
    for (int u = 0; u < 25; u++) begin
      if (!rd_valid) begin check(0, "rd_valid low inside a column"); end
      g[u] = rd_grant;
      @(negedge clk);
    end
  endtask

  task automatic run(input int m);
    grant_t list [200];
    grant_t exp_t [25][8];
    grant_t g [25];
    int n, y, k, cyc, sw0;
    n = 8 * m; y = 25 * m;
    mpr = 4'(m);
    k = 0;
    for (int i = 0; i < n; i++) for (int j = 0; j < cnt_c[i]; j++) if (k < y) list[k++] = gr_cbr(6'(i));
    for (int i = 0; i < n; i++) for (int j = 0; j < cnt_v[i]; j++) if (k < y) list[k++] = gr_vbr(6'(i));
    while (k < y) list[k++] = GR_UA;
    for (int e = 0; e < y; e++) exp_t[(m == 1) ? useq1[e / m] : useq8[e / m]][e % m] = list[e];
    // write a bank
    @(negedge clk); mg_pending = 1'b1;
    cyc = 0;
    while (!mg_consume) begin @(negedge clk); cyc++; end
    mg_pending = 1'b0;
    check(cyc <= y + 4 * n + 3, $sformatf("write took %0d clocks", cyc));
    // drain the bank being read (old contents) and swap
    sw0 = swaps;
    for (int c = 0; c < m; c++) read_col(g);
    check(swaps == sw0 + 1, "banks swapped after the last column");
    check(rd_bank_valid, "new bank valid after swap");
    // read the new bank
    for (int c = 0; c < m; c++) begin
      int per_onu [128];
      read_col(g);
      for (int i = 0; i < 128; i++) per_onu[i] = 0;
      for (int u = 0; u < 25; u++) begin
        check(g[u] == exp_t[u][c], $sformatf("mpr %0d col %0d row %0d: %02h expected %02h",
                                             m, c, u, g[u], exp_t[u][c]));
        if (g[u] != GR_UA) per_onu[g[u][6:0]]++;
      end
      for (int i = 0; i < n; i++) begin
        if (cnt_c[i] <= m) check(per_onu[64 + i] <= 1, "CBR grants of one ONU spread over half frames");
        if (cnt_v[i] <= m) check(per_onu[i] <= 1, "VBR grants of one ONU spread over half frames");
      end
    end
  endtask

  initial begin
    grant_t g [25];
    for (int i = 0; i < 64; i++) begin cnt_c[i] = 0; cnt_v[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // nothing written yet: unassigned grants
    read_col(g);
    for (int u = 0; u < 25; u++) check(g[u] == GR_UA, "empty bank reads unassigned");
    // the document's example: ONU 1 has 5 and ONU 2 has 3 cells queued (MPR = 1)
    cnt_c[1] = 5; cnt_c[2] = 3;
    run(1);
    for (int i = 0; i < 8; i++) begin cnt_c[i] = 2; cnt_v[i] = i; end
    run(1);
    for (int r = 0; r < 6; r++) begin
      int m, left;
      m = (r % 3 == 0) ? 8 : ((r % 3 == 1) ? 3 : 2);
      left = 25 * m;
      for (int i = 0; i < 64; i++) begin
        cnt_c[i] = (i < 8 * m) ? $urandom_range(0, 4) : 0;
        cnt_v[i] = (i < 8 * m) ? $urandom_range(0, 3) : 0;
        if (cnt_c[i] > left) cnt_c[i] = left;
        left -= cnt_c[i];
        if (cnt_v[i] > left) cnt_v[i] = left;
        left -= cnt_v[i];
      end
      run(m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
