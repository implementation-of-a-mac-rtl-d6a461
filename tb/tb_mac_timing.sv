// tb_mac_timing: runs the time base for 600 half frames with MPR 3, then 8, and checks the
// spacing of every strobe in byte clocks (cell 53, half frame 28*53 = 1484), the cells at which
// mini-slot scheduling (3), window scheduling (20) and grant output (27) fire, the half-frame
// index 0..7, the PLOAM-grant ONU advancing once per four frames and the mini-slot period index.
module tb_mac_timing;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] mpr = 4'd3;
  logic [5:0] byte_cnt, po_onu;
  logic [4:0] cell_cnt;
  logic pclk, cclk, ms_start, win_start, out_start, per_first;
  logic [2:0] hf_idx, per_idx;
  int checks = 0, failures = 0;
  longint t = 0, last_p = -1, last_c = -1;
  int n_hf = 0, exp_hf = 0, exp_po = 0, exp_per = 0;

  mac_timing dut (.clk, .rst_n, .mpr, .byte_cnt, .cell_cnt, .pclk, .cclk, .ms_start, .win_start,
                  .out_start, .hf_idx, .po_onu, .per_idx, .per_first);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (cclk) begin
      if (last_c >= 0) check(t - last_c == 53, "cell spacing 53");
      last_c = t;
    end
    if (pclk) begin
      if (last_p >= 0) begin
        check(t - last_p == 1484, $sformatf("half frame spacing %0d", t - last_p));
        exp_hf = (exp_hf + 1) % 8;
        if (exp_hf == 0) exp_po = (exp_po + 1) % 64;
        exp_per = (exp_per + 1 >= int'(mpr)) ? 0 : exp_per + 1;
      end
      last_p = t;
      n_hf++;
      check(int'(hf_idx) == exp_hf, "half frame index");
      check(int'(po_onu) == exp_po, "PLOAM grant ONU");
      check(int'(per_idx) == exp_per && per_first == (exp_per == 0), $sformatf("period index %0d exp %0d hf %0d", per_idx, exp_per, n_hf));
    end
    if (ms_start)  check(t - last_p == 3 * 53, "mini-slot scheduling at cell 3");
    if (win_start) check(t - last_p == 20 * 53, "window scheduling at cell 20");
    if (out_start) check(t - last_p == 27 * 53, "grant output at cell 27");
    t++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (n_hf == 300);
    repeat (100) @(negedge clk);
    mpr = 4'd8;
    wait (n_hf == 600);
    check(n_hf == 600 && exp_po == (599 / 8) % 64, "PLOAM ONU pointer advanced 74 times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
