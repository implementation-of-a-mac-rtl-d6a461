// tb_minislot_rx: sends divided slots (8 mini-slots of 3 overhead bytes, VBR, CBR, reserved and
// CRC-8) for random groups, back to back and with gaps, some with a corrupted CRC byte, and
// checks each reported ONU number, CBR and VBR length and CRC error flag against the values
// sent. The CRC is computed here bit by bit with the x^8+x^2+x+1 shift register.
module tb_minislot_rx;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ds_valid = 1'b0, ds_sof = 1'b0;
  logic [7:0] ds_byte = '0;
  logic [2:0] ds_group = '0;
  logic ms_valid, ms_crc_err, busy;
  logic [5:0] ms_onu;
  qlen_t ms_q;
  logic [7:0] overflow;
  int checks = 0, failures = 0, n_err = 0;
  typedef struct { int onu; int cbr; int vbr; bit bad; } rep_t;
  rep_t exp_q [$];

  minislot_rx dut (.clk, .rst_n, .ds_valid, .ds_sof, .ds_byte, .ds_group, .ms_valid, .ms_onu,
                   .ms_q, .ms_crc_err, .busy, .overflow);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [7:0] crc_bits(input logic [7:0] b0, b1, b2);
    logic [7:0] r;
    logic [23:0] s;
    r = 8'd0;
    s = {b0, b1, b2};
    for (int i = 23; i >= 0; i--) begin
      logic fb;
      fb = r[7] ^ s[i];
      r = {r[6:0], 1'b0};
      if (fb) r = r ^ 8'b0000_0111;
    end
    return r;
  endfunction

  always @(posedge clk) if (ms_valid) begin
    rep_t e;
    if (exp_q.size() == 0) begin
      failures++; checks++; $display("FAIL unexpected report");
    end else begin
      e = exp_q.pop_front();
      checks++;
      if (int'(ms_onu) != e.onu || ms_crc_err != e.bad ||
          int'(ms_q.cbr) != (e.bad ? 0 : e.cbr) || int'(ms_q.vbr) != (e.bad ? 0 : e.vbr)) begin
        failures++;
        $display("FAIL onu %0d cbr %0d vbr %0d err %0d, expected onu %0d cbr %0d vbr %0d err %0d",
                 ms_onu, ms_q.cbr, ms_q.vbr, ms_crc_err, e.onu, e.cbr, e.vbr, e.bad);
      end
      if (ms_crc_err) n_err++;
    end
  end

  task automatic send_slot(input int g, input int gap);
    logic [7:0] b [56];
    for (int k = 0; k < 8; k++) begin
      rep_t e;
      e.onu = 8 * g + k;
      e.cbr = $urandom_range(0, 255);
      e.vbr = $urandom_range(0, 255);
      e.bad = ($urandom_range(0, 9) == 0);
      b[7*k+0] = 8'h55; b[7*k+1] = 8'hAA; b[7*k+2] = 8'h80 | 8'(k);
      b[7*k+3] = 8'(e.vbr); b[7*k+4] = 8'(e.cbr); b[7*k+5] = 8'h00;
      b[7*k+6] = crc_bits(b[7*k+3], b[7*k+4], b[7*k+5]) ^ (e.bad ? 8'h10 : 8'h00);
      exp_q.push_back(e);
    end
    for (int i = 0; i < 56; i++) begin
      @(negedge clk);
      ds_valid = 1'b1; ds_sof = (i == 0); ds_byte = b[i]; ds_group = 3'(g);
    end
    @(negedge clk); ds_valid = 1'b0; ds_sof = 1'b0;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 40; s++) send_slot($urandom_range(0, 7), (s % 4 == 0) ? 0 : 30);
    repeat (200) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d reports missing", exp_q.size()));
    check(n_err > 0, "CRC error case exercised");
    check(overflow == 0, "no overflow at line rate");
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
