// mgcb: the mini-slot grant circular buffers (CBR-MGCB and VBR-MGCB).
//
// Two tables of N_ONU 8-bit entries hold the number of CBR and of VBR grants assigned to each
// ONU for the coming mini-slot period. The MAC-ALU writes them (wr_en, wr_onu, wr_vbr, wr_cnt)
// and pulses wr_done after its last write, which sets pending. The MDLUT writer reads them
// through the combinational port rd_onu/rd_vbr/rd_cnt and pulses consume when it has copied the
// whole set, which clears pending. A wr_done while pending simply replaces the older set. All
// entries reset to zero. The document names these buffers; their organisation as per-ONU counts
// is this design's.
module mgcb
  import mac_pkg::*;
#(
  parameter int N_ONU = MAX_ONU
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [5:0] wr_onu,
  input  logic       wr_vbr,
  input  logic [7:0] wr_cnt,
  input  logic       wr_done,
  input  logic [5:0] rd_onu,
  input  logic       rd_vbr,
  output logic [7:0] rd_cnt,
  input  logic       consume,
  output logic       pending
);

  logic [7:0] cbr_g [N_ONU];
  logic [7:0] vbr_g [N_ONU];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ONU; i++) begin
        cbr_g[i] <= '0;
        vbr_g[i] <= '0;
      end
      pending <= 1'b0;
    end else begin
      if (wr_en && int'(wr_onu) < N_ONU) begin
        if (wr_vbr) vbr_g[wr_onu] <= wr_cnt;
        else        cbr_g[wr_onu] <= wr_cnt;
      end
      if (wr_done)      pending <= 1'b1;
      else if (consume) pending <= 1'b0;
    end
  end

  always_comb begin
    if (int'(rd_onu) >= N_ONU) rd_cnt = 8'd0;
    else rd_cnt = rd_vbr ? vbr_g[rd_onu] : cbr_g[rd_onu];
  end

endmodule
