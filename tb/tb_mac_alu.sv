// tb_mac_alu: loads queue lengths for the 8*MPR ONUs of a mini-slot period, starts the ALU and
// compares every CBR and VBR grant count with equations (1)-(5) worked out here. Cases cover no
// scaling, CBR scaling, VBR scaling and MPR 1, 2, 5 and 8, plus an ONU that did not report.
// The computation must end within 1378 byte clocks per half frame of the period.
module tb_mac_alu;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] mpr = 4'd1;
  logic ms_valid = 1'b0, go = 1'b0;
  logic [5:0] ms_onu = '0;
  qlen_t ms_q = '0;
  logic busy, done, gr_we, gr_is_vbr, cbr_scaled, vbr_scaled;
  logic [5:0] gr_onu;
  logic [7:0] gr_cnt, sub_y;
  logic [15:0] cbr_t, vbr_t;
  int checks = 0, failures = 0;
  int got_c [64], got_v [64];
  int qc [64], qv [64];
  int n_scaled_c = 0, n_scaled_v = 0;

  mac_alu dut (.clk, .rst_n, .mpr, .ms_valid, .ms_onu, .ms_q, .go, .busy, .done, .gr_we,
               .gr_onu, .gr_is_vbr, .gr_cnt, .cbr_t, .vbr_t, .sub_y, .cbr_scaled, .vbr_scaled);

  always #5 clk = ~clk;

  always @(posedge clk) if (gr_we) begin
    if (gr_is_vbr) got_v[gr_onu] = int'(gr_cnt);
    else           got_c[gr_onu] = int'(gr_cnt);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one period: qc/qv hold the reports (-1 = no report)
  task automatic period(input int m);
    int n, y, ct, vt, sc, suby, ec, ev, cyc;
    n = 8 * m; y = 25 * m;
    mpr = 4'(m);
    for (int i = 0; i < 64; i++) begin got_c[i] = -1; got_v[i] = -1; end
    for (int i = 0; i < n; i++) begin
      if (qc[i] < 0) continue;
      @(negedge clk);
      ms_valid = 1'b1; ms_onu = 6'(i); ms_q.cbr = 8'(qc[i]); ms_q.vbr = 8'(qv[i]);
    end
    @(negedge clk); ms_valid = 1'b0;
    go = 1'b1;
    @(negedge clk); go = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);  // the last count is written on the clock edge that follows done
    check(cyc <= 1378 * m, $sformatf("mpr %0d took %0d clocks", m, cyc));
    ct = 0; vt = 0;
    for (int i = 0; i < n; i++) if (qc[i] >= 0) begin ct += qc[i]; vt += qv[i]; end
    sc = 0;
    if (ct > y) n_scaled_c++;
    for (int i = 0; i < n; i++) begin
      int c;
      c = (qc[i] < 0) ? 0 : qc[i];
      ec = (ct <= y) ? c : (c * y) / ct;
      sc += ec;
      check(got_c[i] == ec, $sformatf("mpr %0d onu %0d cbr grant %0d expected %0d", m, i, got_c[i], ec));
    end
    suby = y - sc;
    check(int'(sub_y) == suby, $sformatf("SUB_Y %0d expected %0d", sub_y, suby));
    if (vt > suby) n_scaled_v++;
    for (int i = 0; i < n; i++) begin
      int v;
      v = (qv[i] < 0 || qc[i] < 0) ? 0 : qv[i];
      ev = (vt <= suby) ? v : (v * suby) / vt;
      check(got_v[i] == ev, $sformatf("mpr %0d onu %0d vbr grant %0d expected %0d", m, i, got_v[i], ev));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // the document's example: two ONUs with queues 5 and 3, no scaling
    for (int i = 0; i < 64; i++) begin qc[i] = 0; qv[i] = 0; end
    qc[0] = 5; qc[1] = 3; qv[2] = 4;
    period(1);
    // CBR over budget at MPR 1
    for (int i = 0; i < 8; i++) begin qc[i] = 5 + i; qv[i] = 2; end
    period(1);
    // CBR fits, VBR scaled, one ONU silent, MPR 2
    for (int i = 0; i < 16; i++) begin qc[i] = 2; qv[i] = 3 * i; end
    qc[5] = -1;
    period(2);
    // random periods
    for (int r = 0; r < 12; r++) begin
      int m;
      m = (r % 3 == 0) ? 8 : ((r % 3 == 1) ? 5 : 1);
      for (int i = 0; i < 64; i++) begin
        qc[i] = $urandom_range(0, (r % 2) ? 4 : 40);
        qv[i] = $urandom_range(0, 60);
      end
      period(m);
    end
    // full load: every queue at its maximum
    for (int i = 0; i < 64; i++) begin qc[i] = 255; qv[i] = 255; end
    period(8);
    check(n_scaled_c > 0 && n_scaled_v > 0, "both scaling cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
