// mac_mux: the MAC-MUX scheduler, which fills the 27 grant fields of one PLOAM cell.
//
// At out_start (one cell before the PLOAM clock) it delivers 27 grants, one per clock, on
// gr_valid/gr_idx/gr_raw/gr_out. Fields 0..25 come, by priority, from the ranging buffer while it
// holds a window, else from the data grant buffer, else an unassigned grant. Field 26 (the 27th)
// is chosen by the position f27_hf of the receiving PLOAM cell in the four-frame cycle of eight
// half frames: 0 carries the PLOAM grant of ONU f27_po_onu, 2, 4 and 6 carry an OMCC grant for
// the next ONU of a rotating pointer, odd half frames (second PLOAM cell of a frame) an idle
// grant. A PLOAM or OMCC grant is given only if the ONU's bit in alive is set, else UA_GR.
// gr_raw keeps the W_Pro/W_End window markers for the predictor; gr_out, for the PLOAM cell,
// replaces them by UA_GR. gr_src tells where each grant came from. The priorities and the
// 27th-field plan are the document's; using the ONU's CBR data grant as its OMCC grant and the
// idle grant in odd half frames are this design's choices.
module mac_mux
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        out_start,
  input  logic [2:0]  f27_hf,
  input  logic [5:0]  f27_po_onu,
  input  logic [63:0] alive,
  input  logic        rg_empty,
  input  grant_t      rg_head,
  output logic        rg_pop,
  input  logic        dg_empty,
  input  grant_t      dg_head,
  output logic        dg_pop,
  output logic        gr_valid,
  output logic [4:0]  gr_idx,
  output grant_t      gr_raw,
  output grant_t      gr_out,
  output logic [1:0]  gr_src,
  output logic [5:0]  omcc_onu
);

  localparam logic [1:0] SRC_RGCB = 2'd0, SRC_DGCB = 2'd1, SRC_NONE = 2'd2, SRC_F27 = 2'd3;

  logic   act;
  logic [4:0] idx;
  grant_t sel, f27;
  logic [1:0] src;

  always_comb begin
    f27 = GR_IDLE;
    if (f27_hf == 3'd0)     f27 = alive[f27_po_onu] ? gr_ploam(f27_po_onu) : GR_UA;
    else if (!f27_hf[0])    f27 = alive[omcc_onu] ? gr_cbr(omcc_onu) : GR_UA;
    rg_pop = 1'b0;
    dg_pop = 1'b0;
    if (idx == 5'(GRANT_FIELDS - 1)) begin
      sel = f27;
      src = SRC_F27;
    end else if (!rg_empty) begin
      sel    = rg_head;
      src    = SRC_RGCB;
      rg_pop = act;
    end else if (!dg_empty) begin
      sel    = dg_head;
      src    = SRC_DGCB;
      dg_pop = act;
    end else begin
      sel = GR_UA;
      src = SRC_NONE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act      <= 1'b0;
      idx      <= '0;
      gr_valid <= 1'b0;
      gr_idx   <= '0;
      gr_raw   <= GR_IDLE;
      gr_out   <= GR_IDLE;
      gr_src   <= SRC_NONE;
      omcc_onu <= '0;
    end else begin
      gr_valid <= act;
      if (act) begin
        gr_idx <= idx;
        gr_raw <= sel;
        gr_out <= (sel == GR_W_PRO || sel == GR_W_END) ? GR_UA : sel;
        gr_src <= src;
        if (idx == 5'(GRANT_FIELDS - 1)) begin
          act <= 1'b0;
          idx <= '0;
          if (f27_hf != 3'd0 && !f27_hf[0]) omcc_onu <= omcc_onu + 6'd1;
        end else begin
          idx <= idx + 5'd1;
        end
      end else if (out_start) begin
        act <= 1'b1;
        idx <= '0;
      end
    end
  end

endmodule
