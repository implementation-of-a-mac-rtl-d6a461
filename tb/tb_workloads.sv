// tb_workloads: the configurations and the worked example the MAC processor is evaluated with,
// run on the top at its default parameters.
//   example  two active ONUs with queue lengths 5 and 3 (taken as CBR queues), MPR 2: every
//            request is granted in full within one period and spread over both half frames;
//            then the same with MPR 1, where every PLOAM cell carries all 8 grants
//   sub32    32 subscribers (4 groups, MPR 4, Y = 100) under overload: at most 100 data grants per
//            period, shared according to equations (1)-(5)
//   sub64    64 subscribers (8 groups, MPR 8, Y = 200) under overload: at most 200 per period
//   win      ranging windows of the smallest (3) and largest (127) size
// The ONU model, grant monitor and reference model are those of tb_mac_processor; in addition,
// each ONU's grants of one class must differ by at most one between the half frames of a period.
module tb_workloads;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cpu_we = 1'b0;
  logic [3:0] cpu_addr = '0;
  logic [7:0] cpu_wdata = '0, cpu_rdata;
  logic ds_valid = 1'b0, ds_sof = 1'b0;
  logic [7:0] ds_byte = '0;
  logic [2:0] ds_group = '0;
  logic pclk, gr_valid;
  logic [4:0] cell_cnt, gr_idx;
  logic [2:0] hf_idx, per_idx;
  grant_t gr_out, gr_raw;
  logic [1:0] gr_src;
  logic ev_move, ev_move_skip, ev_swap, ev_crc_err, ev_alu_done;
  logic st_cbr_scaled, st_vbr_scaled, st_rd_bank_valid;
  logic [15:0] st_windows;
  logic [7:0] st_ds_overflow, st_dg_overflow;

  mac_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- ONU model ----------------
  int qc [64], qv [64];
  bit alive_m [64];
  int bad_onu = -1;
  int mpr_m = 1;
  int pend_group = -1;

  function automatic logic [7:0] crc_bits(input logic [7:0] b0, b1, b2);
    logic [7:0] r;
    logic [23:0] s;
    r = 8'd0;
    s = {b0, b1, b2};
    for (int i = 23; i >= 0; i--) begin
      logic fb;
      fb = r[7] ^ s[i];
      r = {r[6:0], 1'b0};
      if (fb) r = r ^ 8'h07;
    end
    return r;
  endfunction

  task automatic send_slot(input int g);
    logic [7:0] b [56];
    for (int k = 0; k < 8; k++) begin
      int o;
      o = 8 * g + k;
      b[7*k+0] = 8'h55; b[7*k+1] = 8'hAA; b[7*k+2] = 8'h80 | 8'(k);
      b[7*k+3] = alive_m[o] ? 8'(qv[o]) : 8'd0;
      b[7*k+4] = alive_m[o] ? 8'(qc[o]) : 8'd0;
      b[7*k+5] = 8'h00;
      b[7*k+6] = crc_bits(b[7*k+3], b[7*k+4], b[7*k+5]) ^ ((o == bad_onu) ? 8'h01 : 8'h00);
    end
    for (int i = 0; i < 56; i++) begin
      @(negedge clk);
      ds_valid = 1'b1; ds_sof = (i == 0); ds_byte = b[i]; ds_group = 3'(g);
    end
    @(negedge clk); ds_valid = 1'b0; ds_sof = 1'b0;
  endtask

  // the divided slot answers the DS_GR of the previous PLOAM cell
  initial begin
    forever begin
      @(posedge clk);
      if (pclk && pend_group >= 0) begin
        int g;
        g = pend_group;
        pend_group = -1;
        repeat (8 * 53) @(negedge clk);
        send_slot(g);
      end
    end
  end

  // ---------------- grant monitor ----------------
  int cell_cbr [$][64], cell_vbr [$][64];   // per PLOAM cell data grants per ONU
  bit cell_clean [$];                        // no window grant, no skipped move
  int cur_cbr [64], cur_vbr [64];
  int n_fields = 0, n_rg = 0, n_ranging = 0, n_wmark = 0, n_ds = 0;
  int n_po = 0, n_omcc = 0, n_idle = 0, n_f27_ua = 0, n_skip = 0, n_swap = 0, n_crc = 0;
  int n_cbr_scaled = 0, n_vbr_scaled = 0, n_no_scale = 0, n_mode = 0, n_alu_late = 0;
  bit skip_seen = 0, swap_seen = 0;
  int bank_end = -1;   // index of the PLOAM cell that carried the last column of a bank
  longint t = 0, t_per = 0;

  always @(posedge clk) if (rst_n) begin
    t++;
    if (pclk && per_idx == 3'd0) t_per = t;
    if (ev_move_skip) begin n_skip++; skip_seen = 1; end
    if (ev_swap) begin n_swap++; swap_seen = 1; end
    if (ev_crc_err) n_crc++;
    if (ev_alu_done) begin
      if (st_cbr_scaled) n_cbr_scaled++;
      if (st_vbr_scaled) n_vbr_scaled++;
      if (!st_cbr_scaled && !st_vbr_scaled) n_no_scale++;
      // arithmetic of a period must end within 1378 byte clocks per half frame of the period
      if (t - t_per > 1378 * mpr_m + 4 * 53) n_alu_late++;
    end
    if (gr_valid) begin
      check(cell_cnt == 5'(HF_CELLS - 1), "grants delivered in the cell before the PLOAM clock");
      check(int'(gr_idx) == n_fields, "grant field index");
      if (gr_idx == 5'd0) begin
        for (int i = 0; i < 64; i++) begin cur_cbr[i] = 0; cur_vbr[i] = 0; end
      end
      if (gr_src == 2'd0) n_rg++;
      if (gr_raw == GR_W_PRO || gr_raw == GR_W_END) begin
        n_wmark++;
        check(gr_out == GR_UA, "window marker sent as unassigned grant");
      end else check(gr_out == gr_raw, "grant passed unchanged");
      if (gr_idx != 5'd26) begin
        if (gr_out == GR_RANGING) n_ranging++;
        if (gr_out[7:6] == 2'b01) cur_cbr[gr_out[5:0]]++;
        if (gr_out[7:6] == 2'b00) cur_vbr[gr_out[5:0]]++;
        if (gr_out[7:3] == 5'b10000) begin n_ds++; pend_group = int'(gr_out[2:0]); end
      end else begin
        int h;
        h = (int'(hf_idx) + 1) % 8;
        if (h == 0) begin
          check(gr_out == GR_UA || (gr_out >= GR_PO_BASE && gr_out < GR_PO_BASE + 64),
                "27th field of the first PLOAM cell of a cycle: PLOAM grant");
          if (gr_out == GR_UA) n_f27_ua++; else begin
            n_po++;
            check(alive_m[gr_out - GR_PO_BASE], "PLOAM grant only to an alive ONU");
          end
        end else if (h % 2 == 0) begin
          check(gr_out == GR_UA || gr_out[7:6] == 2'b01, "27th field of frames 2-4: OMCC grant");
          if (gr_out == GR_UA) n_f27_ua++; else begin
            n_omcc++;
            check(alive_m[gr_out[5:0]], "OMCC grant only to an alive ONU");
          end
        end else begin
          check(gr_out == GR_IDLE, "27th field of a second PLOAM cell: idle");
          n_idle++;
        end
      end
      n_fields++;
      if (gr_idx == 5'd26) begin
        check(n_fields == 27, "27 grant fields per PLOAM cell");
        n_fields = 0;
        cell_cbr.push_back(cur_cbr);
        cell_vbr.push_back(cur_vbr);
        cell_clean.push_back(!skip_seen && n_rg == 0);
        skip_seen = 0;
        if (swap_seen) bank_end = cell_cbr.size() - 1;
        swap_seen = 0;
        n_rg_total += n_rg;
        n_rg = 0;
      end
    end
  end
  int n_rg_total = 0;
  int n_data = 0;   // data grants in the last compared period

  // ---------------- reference model ----------------
  task automatic compare_period(input string tag);
    int m, n, y, ct, vt, sc, suby, rep_c [64], rep_v [64], ec, ev;
    int got_c [64], got_v [64];
    bit clean;
    m = mpr_m; n = 8 * m; y = 25 * m;
    for (int i = 0; i < 64; i++) begin
      bit ok;
      ok = alive_m[i] && i != bad_onu && i < n;
      rep_c[i] = ok ? qc[i] : 0;
      rep_v[i] = ok ? qv[i] : 0;
      got_c[i] = 0; got_v[i] = 0;
    end
    clean = (bank_end >= m - 1);
    for (int c = bank_end - m + 1; c <= bank_end; c++) begin
      clean &= cell_clean[c];
      for (int i = 0; i < 64; i++) begin
        got_c[i] += cell_cbr[c][i];
        got_v[i] += cell_vbr[c][i];
      end
    end
    check(clean, {tag, ": compared cells free of window grants and skipped moves"});
    ct = 0; vt = 0;
    for (int i = 0; i < n; i++) begin ct += rep_c[i]; vt += rep_v[i]; end
    sc = 0;
    for (int i = 0; i < 64; i++) begin
      ec = (i >= n) ? 0 : ((ct <= y) ? rep_c[i] : (rep_c[i] * y) / ct);
      sc += ec;
      check(got_c[i] == ec, $sformatf("%s: ONU %0d CBR grants %0d expected %0d", tag, i, got_c[i], ec));
    end
    // even spreading: an ONU's grants of one class differ by at most one between half frames
    for (int i = 0; i < n; i++) begin
      int mn_c, mx_c, mn_v, mx_v;
      mn_c = 1000; mx_c = 0; mn_v = 1000; mx_v = 0;
      for (int c = bank_end - m + 1; c <= bank_end; c++) begin
        mn_c = (cell_cbr[c][i] < mn_c) ? cell_cbr[c][i] : mn_c;
        mx_c = (cell_cbr[c][i] > mx_c) ? cell_cbr[c][i] : mx_c;
        mn_v = (cell_vbr[c][i] < mn_v) ? cell_vbr[c][i] : mn_v;
        mx_v = (cell_vbr[c][i] > mx_v) ? cell_vbr[c][i] : mx_v;
      end
      check(mx_c - mn_c <= 1 && mx_v - mn_v <= 1,
            $sformatf("%s: ONU %0d grants spread evenly over the half frames", tag, i));
    end
    n_data = 0;
    for (int i = 0; i < 64; i++) n_data += got_c[i] + got_v[i];
    suby = y - sc;
    for (int i = 0; i < 64; i++) begin
      ev = (i >= n) ? 0 : ((vt <= suby) ? rep_v[i] : (rep_v[i] * suby) / vt);
      check(got_v[i] == ev, $sformatf("%s: ONU %0d VBR grants %0d expected %0d", tag, i, got_v[i], ev));
    end
  endtask

  task automatic wr(input int a, input int d);
    @(negedge clk); cpu_we = 1'b1; cpu_addr = 4'(a); cpu_wdata = 8'(d);
    @(negedge clk); cpu_we = 1'b0;
  endtask

  task automatic half_frames(input int n);
    repeat (n) begin
      @(posedge clk);
      while (!pclk) @(posedge clk);
    end
  endtask

  task automatic set_alive(input int n);
    for (int i = 0; i < 64; i++) alive_m[i] = (i < n);
    for (int k = 0; k < 8; k++) begin
      logic [7:0] v;
      for (int b = 0; b < 8; b++) v[b] = alive_m[8 * k + b];
      wr(8 + k, v);
    end
  endtask

  task automatic window(input int size);
    int rg0, mk0, ra0;
    rg0 = n_rg_total; mk0 = n_wmark; ra0 = n_ranging;
    wr(2, 8'h80 | size);
    half_frames(8);
    check(n_rg_total - rg0 == size, $sformatf("window %0d: %0d window grants", size, n_rg_total - rg0));
    check(n_wmark - mk0 == size - 1, $sformatf("window %0d: %0d markers", size, n_wmark - mk0));
    check(n_ranging - ra0 == 1, $sformatf("window %0d: one ranging grant", size));
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin alive_m[i] = 1'b0; qc[i] = 0; qv[i] = 0; end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    // ---- example: ONU1 Q = 5, ONU2 Q = 3, MPR 2 ----
    mpr_m = 2;
    wr(0, 2);
    set_alive(0);
    alive_m[1] = 1'b1; alive_m[2] = 1'b1;
    wr(8, 8'b0000_0110);
    qc[1] = 5; qc[2] = 3;
    half_frames(2 * 6);
    compare_period("example");
    check(n_data == 8, $sformatf("example: %0d data grants per period", n_data));
    // the same request with a period of one half frame: all 8 grants in every PLOAM cell
    mpr_m = 1;
    wr(0, 1);
    half_frames(6);
    compare_period("example, MPR 1");
    check(n_data == 8, $sformatf("example, MPR 1: %0d data grants per period", n_data));
    // ---- sub32: 32 subscribers, MPR 4, overload ----
    mpr_m = 4;
    wr(0, 4);
    set_alive(32);
    for (int i = 0; i < 64; i++) begin qc[i] = 1 + (i % 4); qv[i] = 5 + (i % 9); end
    half_frames(4 * 6);
    compare_period("sub32");
    // the floors of equations (2) and (5) leave up to one grant per ONU and class unassigned
    check(n_data <= 100 && n_data > 100 - 2 * 32, $sformatf("sub32: %0d data grants per period", n_data));
    $display("sub32: %0d of 100 grants assigned", n_data);
    // ---- sub64: 64 subscribers, MPR 8, overload ----
    mpr_m = 8;
    wr(0, 8);
    set_alive(64);
    for (int i = 0; i < 64; i++) begin qc[i] = 2 + (i % 3); qv[i] = 20 + (i % 13); end
    half_frames(8 * 5);
    compare_period("sub64");
    // the floors of equations (2) and (5) leave up to one grant per ONU and class unassigned
    check(n_data <= 200 && n_data > 200 - 2 * 64, $sformatf("sub64: %0d data grants per period", n_data));
    $display("sub64: %0d of 200 grants assigned", n_data);
    // ---- win: smallest and largest ranging window ----
    wr(1, GR_RANGING);
    window(3);
    window(127);
    check(st_dg_overflow == 0, "no DGCB overflow");
    check(st_ds_overflow == 0, "no divided-slot FIFO overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    repeat (200 * 1484) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
