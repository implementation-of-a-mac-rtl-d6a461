// tb_rgcb: sets the window flag with several window sizes (3, 4, 40, 127 and a size below the
// minimum) and checks the window written into the buffer: W_Pro grants, the PGR grant at
// position n/2, W_End last, the flag cleared, nothing written without the flag or while the
// buffer still holds a window, and the window count.
module tb_rgcb;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic win_start = 1'b0, pop = 1'b0;
  logic [7:0] wsr = '0;
  grant_t pgr = GR_RANGING, head;
  logic wsr_clr, empty, writing;
  logic [7:0] count;
  logic [15:0] windows;
  int checks = 0, failures = 0;

  rgcb dut (.clk, .rst_n, .win_start, .wsr, .pgr, .wsr_clr, .pop, .head, .empty, .writing,
            .count, .windows);

  always #5 clk = ~clk;
  always @(posedge clk) if (wsr_clr) wsr[7] <= 1'b0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic strobe();
    @(negedge clk); win_start = 1'b1;
    @(negedge clk); win_start = 1'b0;
  endtask

  task automatic window(input int size, input grant_t p);
    int n;
    n = (size < 3) ? 3 : size;
    pgr = p;
    wsr = {1'b1, 7'(size)};
    strobe();
    @(negedge clk);
    check(wsr[7] == 1'b0, "window flag cleared");
    while (writing) @(negedge clk);
    check(int'(count) == n, $sformatf("window of %0d holds %0d", n, count));
    // a second strobe must not add a window while this one is held
    wsr = {1'b1, 7'(size)};
    strobe();
    check(int'(count) == n, "no new window while buffer not empty");
    for (int k = 0; k < n; k++) begin
      grant_t e;
      e = (k == n - 1) ? GR_W_END : ((k == n / 2) ? p : GR_W_PRO);
      check(head == e, $sformatf("window %0d pos %0d: %02h expected %02h", n, k, head, e));
      @(negedge clk); pop = 1'b1;
      @(negedge clk); pop = 1'b0;
    end
    check(empty, "window consumed");
  endtask

  initial begin
    int w0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    strobe();
    check(empty && windows == 0, "no window without the flag");
    window(3, GR_RANGING);
    window(4, gr_ploam(6'd9));
    window(40, GR_RANGING);
    window(127, gr_ploam(6'd63));
    window(1, GR_RANGING);
    // the pending second request of the last window is served now that the buffer is empty
    w0 = int'(windows);
    strobe();
    while (writing) @(negedge clk);
    check(int'(windows) == w0 + 1 && int'(count) == 3, "pending request served");
    check(windows == 16'd6, $sformatf("windows %0d expected 6", windows));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
