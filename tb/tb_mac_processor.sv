// tb_mac_processor: end-to-end test of the MAC processor with its default configuration
// (64 ONUs, up to 8 groups, MPR up to 8, 200 grants per period).
//
// A model of the ONUs answers every divided-slot grant that appears in a PLOAM cell with the
// divided slot of that group in the next half frame, reporting fixed CBR and VBR queue lengths
// per ONU. A reference model here works out equations (1)-(5) for those lengths, and after the
// pipeline has settled the data grants of the MPR PLOAM cells that carried one MDLUT bank (one
// whole period, the last bank read completely) are counted per ONU and compared with it. Phases:
//   A  MPR 8, light load: no scaling; two ONUs not alive
//   B  MPR 8, heavy load: CBR and VBR scaled; one ONU's mini-slot always fails its CRC
//   C  a 100-cell ranging window: window grants ahead of data grants, one ranging grant,
//      W_Pro/W_End sent as unassigned, DGCB stall without overflow
//   D  switch to MPR 1 with one group: the same comparison over single PLOAM cells
// Every PLOAM cell is checked for 27 fields delivered in the cell before the PLOAM clock and
// for its 27th field (PLOAM / OMCC / idle grant). Each mechanism must have happened at least once.
module tb_mac_processor;
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

  initial begin
    for (int i = 0; i < 64; i++) begin alive_m[i] = (i != 13 && i != 50); qc[i] = 0; qv[i] = 0; end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    // ---- phase A: MPR 8, light load ----
    mpr_m = 8;
    wr(0, 8);
    for (int k = 0; k < 8; k++) begin
      logic [7:0] v;
      for (int b = 0; b < 8; b++) v[b] = alive_m[8 * k + b];
      wr(8 + k, v);
    end
    for (int i = 0; i < 64; i++) begin qc[i] = i % 3; qv[i] = (i % 5 == 0) ? 1 : 0; end
    half_frames(8 * 5);
    compare_period("A");
    half_frames(8);
    compare_period("A, next period");
    // ---- phase B: MPR 8, heavy load, one bad CRC ----
    for (int i = 0; i < 64; i++) begin qc[i] = 2 + (i % 7); qv[i] = 10 + (i % 11); end
    bad_onu = 21;
    half_frames(8 * 5);
    compare_period("B");
    // ---- phase C: a ranging window of 100 cells ----
    wr(1, GR_RANGING);
    wr(2, 8'h80 | 8'd100);
    half_frames(8);
    check(n_ranging == 1, $sformatf("one ranging grant sent, saw %0d", n_ranging));
    check(n_rg_total == 100, $sformatf("100 window grants, saw %0d", n_rg_total));
    check(n_wmark == 99, $sformatf("99 window markers, saw %0d", n_wmark));
    check(st_dg_overflow == 0, "no DGCB overflow during the window");
    check(st_windows == 16'd1, "one window scheduled");
    cpu_addr = 4'h2; #1 check(cpu_rdata[7] == 1'b0, "window flag cleared");
    half_frames(8 * 5);
    compare_period("after window");
    // ---- phase D: switch to MPR 1, one group ----
    n_mode++;
    mpr_m = 1;
    bad_onu = -1;
    wr(0, 1);
    for (int i = 0; i < 64; i++) begin qc[i] = (i < 8) ? 4 + i : 0; qv[i] = (i < 8) ? 3 : 0; end
    half_frames(8 * 3);
    compare_period("D");
    half_frames(1);
    compare_period("D, next period");
    // ---- every mechanism happened ----
    check(n_no_scale > 0, "unscaled period");
    check(n_cbr_scaled > 0, "CBR scaled");
    check(n_vbr_scaled > 0, "VBR scaled");
    check(n_crc > 0, "mini-slot CRC error");
    check(n_skip > 0, "DGCB full: MDLUT move skipped");
    check(n_swap > 0, "MDLUT bank swap");
    check(n_ds > 0, "divided-slot grants");
    check(n_po > 0 && n_omcc > 0 && n_idle > 0, "PLOAM, OMCC and idle grants in the 27th field");
    check(n_mode > 0, "MPR switch");
    check(n_alu_late == 0, "arithmetic within its time budget");
    check(st_ds_overflow == 0, "no divided-slot FIFO overflow");
    $display("mechanisms: unscaled=%0d cbr_scaled=%0d vbr_scaled=%0d crc_err=%0d skip=%0d swap=%0d ds=%0d po=%0d omcc=%0d idle=%0d f27_ua=%0d window_grants=%0d",
             n_no_scale, n_cbr_scaled, n_vbr_scaled, n_crc, n_skip, n_swap, n_ds, n_po, n_omcc,
             n_idle, n_f27_ua, n_rg_total);
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
