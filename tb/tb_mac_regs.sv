// tb_mac_regs: writes and reads back every register, checks the MPR clamp to 1..8, the mapping
// of the eight Alive group registers onto the 64 ONU bits, the reset values and the automatic
// clearing of the window flag.
module tb_mac_regs;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cpu_we = 1'b0, wsr_clr = 1'b0;
  logic [3:0] cpu_addr = '0;
  logic [7:0] cpu_wdata = '0, cpu_rdata, wsr;
  logic [3:0] mpr;
  grant_t pgr;
  logic [63:0] alive;
  int checks = 0, failures = 0;

  mac_regs dut (.clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata, .wsr_clr, .mpr, .pgr,
                .wsr, .alive);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wr(input int a, input int d);
    @(negedge clk); cpu_we = 1'b1; cpu_addr = 4'(a); cpu_wdata = 8'(d);
    @(negedge clk); cpu_we = 1'b0;
  endtask

  initial begin
    logic [63:0] exp_alive;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(mpr == 4'd1 && pgr == GR_RANGING && wsr == 8'd0 && alive == 64'd0, "reset values");
    for (int m = 0; m < 12; m++) begin
      wr(0, m);
      check(int'(mpr) == ((m == 0) ? 1 : ((m > 8) ? 8 : m)), $sformatf("MPR clamp %0d -> %0d", m, mpr));
    end
    wr(1, 8'h93);
    check(pgr == 8'h93, "PGR");
    exp_alive = '0;
    for (int k = 0; k < 8; k++) begin
      int v;
      v = $urandom_range(0, 255);
      wr(8 + k, v);
      exp_alive[8*k +: 8] = 8'(v);
    end
    check(alive == exp_alive, "alive bits");
    for (int k = 0; k < 8; k++) begin
      cpu_addr = 4'(8 + k);
      #1 check(cpu_rdata == exp_alive[8*k +: 8], "alive read back");
    end
    cpu_addr = 4'h1; #1 check(cpu_rdata == 8'h93, "PGR read back");
    wr(2, 8'h85);
    check(wsr == 8'h85, "WSR");
    @(negedge clk); wsr_clr = 1'b1;
    @(negedge clk); wsr_clr = 1'b0;
    check(wsr == 8'h05, "window flag cleared, size kept");
    cpu_addr = 4'h2; #1 check(cpu_rdata == 8'h05, "WSR read back");
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
