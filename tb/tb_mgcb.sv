// tb_mgcb: writes random CBR and VBR grant counts for all 64 ONUs, checks every entry through
// the read port, checks that pending is set by wr_done and cleared by consume, and that a
// newer set overwrites an unconsumed one.
module tb_mgcb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, wr_vbr = 1'b0, wr_done = 1'b0, rd_vbr = 1'b0, consume = 1'b0, pending;
  logic [5:0] wr_onu = '0, rd_onu = '0;
  logic [7:0] wr_cnt = '0, rd_cnt;
  int checks = 0, failures = 0;
  int ec [64], ev [64];

  mgcb dut (.clk, .rst_n, .wr_en, .wr_onu, .wr_vbr, .wr_cnt, .wr_done, .rd_onu, .rd_vbr, .rd_cnt,
            .consume, .pending);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic load();
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_onu = 6'(i); wr_vbr = c[0]; wr_cnt = 8'($urandom_range(0, 200));
        if (c == 0) ec[i] = int'(wr_cnt); else ev[i] = int'(wr_cnt);
      end
    @(negedge clk); wr_en = 1'b0; wr_done = 1'b1;
    @(negedge clk); wr_done = 1'b0;
  endtask

  task automatic verify();
    for (int i = 0; i < 64; i++) begin
      rd_onu = 6'(i); rd_vbr = 1'b0;
      #1 check(int'(rd_cnt) == ec[i], $sformatf("CBR count of ONU %0d", i));
      rd_vbr = 1'b1;
      #1 check(int'(rd_cnt) == ev[i], $sformatf("VBR count of ONU %0d", i));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    rd_onu = 6'd7; #1 check(rd_cnt == 0 && !pending, "reset: empty");
    load();
    check(pending, "pending after wr_done");
    verify();
    load();
    check(pending, "still pending after a second set");
    verify();
    @(negedge clk); consume = 1'b1;
    @(negedge clk); consume = 1'b0;
    check(!pending, "pending cleared by consume");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
