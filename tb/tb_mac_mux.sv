// tb_mac_mux: feeds the multiplexer from model ranging and data grant buffers and checks the
// 27 fields of each PLOAM cell over a whole four-frame cycle: ranging grants ahead of data
// grants, unassigned grants when both are empty, W_Pro/W_End kept on gr_raw and turned into
// UA_GR on gr_out, and the 27th field: PLOAM grant in half frame 0, OMCC grants (rotating ONU)
// in half frames 2, 4 and 6, idle grants in odd half frames, UA_GR for ONUs not alive.
module tb_mac_mux;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic out_start = 1'b0;
  logic [2:0] f27_hf = '0;
  logic [5:0] f27_po_onu = '0;
  logic [63:0] alive = 64'h00FF_0000_F0F0_FFFF;
  logic rg_empty, dg_empty, rg_pop, dg_pop, gr_valid;
  grant_t rg_head, dg_head, gr_raw, gr_out;
  logic [4:0] gr_idx;
  logic [1:0] gr_src;
  logic [5:0] omcc_onu;
  int checks = 0, failures = 0;
  grant_t rq [$], dq [$];

  mac_mux dut (.clk, .rst_n, .out_start, .f27_hf, .f27_po_onu, .alive, .rg_empty, .rg_head,
               .rg_pop, .dg_empty, .dg_head, .dg_pop, .gr_valid, .gr_idx, .gr_raw, .gr_out,
               .gr_src, .omcc_onu);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rg_pop) void'(rq.pop_front());
    if (dg_pop) void'(dq.pop_front());
  end
  always @(negedge clk) begin
    rg_empty <= (rq.size() == 0);
    rg_head  <= (rq.size() == 0) ? GR_UA : rq[0];
    dg_empty <= (dq.size() == 0);
    dg_head  <= (dq.size() == 0) ? GR_UA : dq[0];
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic ploam_cell(input int hf, input int po, input int n_r, input int n_d);
    grant_t er [27];
    int omcc;
    omcc = int'(omcc_onu);
    rq.delete(); dq.delete();
    for (int i = 0; i < n_r; i++) rq.push_back((i == n_r - 1) ? GR_W_END : ((i == n_r / 2) ? GR_RANGING : GR_W_PRO));
    for (int i = 0; i < n_d; i++) dq.push_back(8'($urandom_range(0, 127)));
    for (int i = 0; i < 26; i++) er[i] = (i < n_r) ? rq[i] : ((i - n_r < n_d) ? dq[i - n_r] : GR_UA);
    if (hf == 0)           er[26] = alive[po] ? gr_ploam(6'(po)) : GR_UA;
    else if (hf % 2 == 0)  er[26] = alive[omcc] ? gr_cbr(6'(omcc)) : GR_UA;
    else                   er[26] = GR_IDLE;
    f27_hf = 3'(hf); f27_po_onu = 6'(po);
    @(negedge clk); @(negedge clk);
    out_start = 1'b1;
    @(negedge clk); out_start = 1'b0;
    for (int i = 0; i < 27; i++) begin
      @(negedge clk);
      check(gr_valid && int'(gr_idx) == i, $sformatf("field %0d valid/index", i));
      check(gr_raw == er[i], $sformatf("hf %0d field %0d raw %02h expected %02h", hf, i, gr_raw, er[i]));
      check(gr_out == ((er[i] == GR_W_PRO || er[i] == GR_W_END) ? GR_UA : er[i]),
            $sformatf("hf %0d field %0d out %02h", hf, i, gr_out));
    end
    @(negedge clk);
    check(!gr_valid, "exactly 27 fields");
    check(int'(omcc_onu) == ((hf != 0 && hf % 2 == 0) ? (omcc + 1) % 64 : omcc), "OMCC pointer");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3; cyc++)
      for (int hf = 0; hf < 8; hf++)
        ploam_cell(hf, (cyc * 13 + 5) % 64 + (hf == 0 ? 0 : 1), (hf == 1) ? 30 : ((hf == 3) ? 7 : 0),
             (hf == 5) ? 10 : 26);
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
