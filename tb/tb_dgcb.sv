// tb_dgcb: pushes and pops grants in the pattern of the scheduler (26 in, 26 out per half
// frame, and 26 in with nothing out while a window is served) and checks order against a queue
// model, the fill count, the stall level (count above 32 - 26 = 6) and the drop on overflow.
module tb_dgcb;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0;
  grant_t push_data = '0, head;
  logic empty, stall;
  logic [5:0] count;
  logic [7:0] overflow;
  int checks = 0, failures = 0;
  grant_t model [$];

  dgcb dut (.clk, .rst_n, .push, .push_data, .pop, .head, .empty, .stall, .count, .overflow);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic put(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      push = 1'b1; push_data = 8'($urandom_range(0, 127));
      if (model.size() < 32) model.push_back(push_data);
      @(negedge clk); push = 1'b0;
    end
  endtask

  task automatic take(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) begin
        check(head == model[0], $sformatf("head %02h expected %02h", head, model[0]));
        void'(model.pop_front());
      end
      pop = 1'b1;
      @(negedge clk); pop = 1'b0;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int hf = 0; hf < 6; hf++) begin
      @(negedge clk);
      check(stall == (model.size() > 6), "stall before move");
      if (!stall) put(26);
      check(int'(count) == model.size(), $sformatf("count %0d expected %0d", count, model.size()));
      if (hf == 2 || hf == 3) begin
        // window being served: nothing drained
      end else take(26);
      check(int'(count) == model.size(), "count after drain");
    end
    // force an overflow: 26 + 26 > 32
    put(26);
    check(stall, "stall high with 26 held");
    put(10);
    check(int'(count) == 32, "count saturates at 32");
    check(int'(overflow) == 4, $sformatf("overflow %0d expected 4", overflow));
    take(34);
    check(empty, "empty at end");
    // stall at every fill level: one more move of 26 fits only up to 6 entries
    for (int lvl = 0; lvl <= 32; lvl++) begin
      @(negedge clk);
      check(stall == (lvl > 6), $sformatf("stall at fill %0d", lvl));
      put(1);
    end
    take(33);
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
