// tb_serial_muldiv: checks floor(a*b/d) against integer arithmetic for corner and random
// operands (a <= d) and checks the latency of 2*WA+WB+1 = 25 clocks from start to done.
module tb_serial_muldiv;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [7:0] a = '0, b = '0;
  logic [15:0] d = 16'd1;
  logic busy, done;
  logic [7:0] q;
  int checks = 0, failures = 0;

  serial_muldiv dut (.clk, .rst_n, .start, .a, .b, .d, .busy, .done, .q);

  always #5 clk = ~clk;

  task automatic run(input logic [7:0] ta, input logic [7:0] tb_, input logic [15:0] td);
    int lat, exp_q;
    @(negedge clk);
    a = ta; b = tb_; d = td; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    exp_q = (int'(ta) * int'(tb_)) / int'(td);
    checks++;
    if (int'(q) != exp_q) begin
      failures++;
      $display("FAIL %0d*%0d/%0d = %0d, expected %0d", ta, tb_, td, q, exp_q);
    end
    checks++;
    if (lat != 25) begin
      failures++;
      $display("FAIL latency %0d, expected 25", lat);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(8'd5, 8'd25, 16'd8);
    run(8'd3, 8'd25, 16'd8);
    run(8'd255, 8'd200, 16'd255);
    run(8'd255, 8'd200, 16'd16320);
    run(8'd0, 8'd200, 16'd100);
    run(8'd1, 8'd1, 16'd1);
    run(8'd100, 8'd199, 16'd101);
    for (int i = 0; i < 300; i++) begin
      logic [15:0] dd;
      logic [7:0] aa;
      dd = 16'($urandom_range(1, 16320));
      aa = (dd > 16'd255) ? 8'($urandom_range(0, 255)) : 8'($urandom_range(0, int'(dd)));
      run(aa, 8'($urandom_range(0, 255)), dd);
    end
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
