// mac_processor: medium access control scheduler of an APON OLT (ITU-T G.983.1 style).
//
// Up to 64 ONUs share one upstream channel; the OLT tells each of them when to send by grants,
// 27 per downstream PLOAM cell (one PLOAM cell per half frame of 28 cells). This block decides
// those grants. ONUs report their CBR and VBR queue lengths in 7-byte mini-slots, eight ONUs
// (one group) per 56-byte divided slot; one group reports per half frame, so a mini-slot period
// of MPR half frames (1..8) polls 8*MPR ONUs. At the start of each period the MAC-ALU shares the
// budget Y = 25*MPR grants between the ONUs polled in the previous period, CBR first and VBR from
// the rest, scaled down in proportion when the requests exceed it. The counts go to the MGCB and
// from there into the MDLUT, which spreads each ONU's grants evenly over the half frames and over
// the 25 data positions of a half frame. Every half frame (cell 3) one MDLUT column of 25 data
// grants plus the divided-slot grant of the group due next is moved into the DGCB, unless the
// DGCB is too full; a skipped column is moved at the next half frame instead. At cell 20 a
// window requested by the CPU is written into the RGCB. At cell 27 the MAC-MUX delivers 27
// grants: ranging-window grants first, then data grants, and in the 27th field a PLOAM, OMCC or
// idle grant depending on the half frame.
//
// Interface: one clock per downstream byte; CPU register port (see mac_regs); the upstream
// divided slots as a byte stream with the group each was granted to; the grants as a stream of
// 27 (gr_valid, gr_idx, gr_out) per half frame for the PLOAM cell generator, with gr_raw for
// the predictor. The ev_*/st_* outputs expose events and state for observation only.
// The structure (buffers, tables, registers, schedule points) follows the document; the pipeline
// timing between them (a period's reports are scheduled at the next period start and reach the
// grant stream one period later) is this design's.
// The assertion block below uses rst_n in its disable condition; lint reports this as a
// synchronous use of the asynchronous reset, which it is only for checking, not for logic.
module mac_processor
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // CPU register port
  input  logic        cpu_we,
  input  logic [3:0]  cpu_addr,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  // upstream divided slots
  input  logic        ds_valid,
  input  logic        ds_sof,
  input  logic [7:0]  ds_byte,
  input  logic [2:0]  ds_group,
  // time base
  output logic        pclk,
  output logic [4:0]  cell_cnt,
  output logic [2:0]  hf_idx,
  output logic [2:0]  per_idx,
  // grants to the PLOAM cell generator and the predictor
  output logic        gr_valid,
  output logic [4:0]  gr_idx,
  output grant_t      gr_out,
  output grant_t      gr_raw,
  output logic [1:0]  gr_src,
  // observation
  output logic        ev_move,
  output logic        ev_move_skip,
  output logic        ev_swap,
  output logic        ev_crc_err,
  output logic        ev_alu_done,
  output logic        st_cbr_scaled,
  output logic        st_vbr_scaled,
  output logic        st_rd_bank_valid,
  output logic [15:0] st_windows,
  output logic [7:0]  st_ds_overflow,
  output logic [7:0]  st_dg_overflow
);

  // ---------------- registers and time base ----------------
  logic [3:0]  mpr;
  grant_t      pgr;
  logic [7:0]  wsr;
  logic [63:0] alive;
  logic        wsr_clr;

  mac_regs u_regs (
    .clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata,
    .wsr_clr, .mpr, .pgr, .wsr, .alive
  );

  logic [5:0] byte_cnt, po_onu;
  logic       cclk, ms_start, win_start, out_start, per_first;

  mac_timing u_timing (
    .clk, .rst_n, .mpr, .byte_cnt, .cell_cnt, .pclk, .cclk, .ms_start, .win_start,
    .out_start, .hf_idx, .po_onu, .per_idx, .per_first
  );

  // ---------------- mini-slot path ----------------
  logic       ms_valid;
  logic [5:0] ms_onu;
  qlen_t      ms_q;
  logic       rx_busy;

  minislot_rx u_rx (
    .clk, .rst_n, .ds_valid, .ds_sof, .ds_byte, .ds_group,
    .ms_valid, .ms_onu, .ms_q, .ms_crc_err(ev_crc_err), .busy(rx_busy),
    .overflow(st_ds_overflow)
  );

  logic        alu_go, alu_busy, alu_done, alu_we, alu_is_vbr, alu_go_pend;
  logic [5:0]  alu_onu;
  logic [7:0]  alu_cnt, sub_y;
  logic [15:0] cbr_t, vbr_t;

  mac_alu u_alu (
    .clk, .rst_n, .mpr, .ms_valid, .ms_onu, .ms_q, .go(alu_go), .busy(alu_busy),
    .done(alu_done), .gr_we(alu_we), .gr_onu(alu_onu), .gr_is_vbr(alu_is_vbr), .gr_cnt(alu_cnt),
    .cbr_t, .vbr_t, .sub_y, .cbr_scaled(st_cbr_scaled), .vbr_scaled(st_vbr_scaled)
  );
  assign ev_alu_done = alu_done;

  logic       mg_pending, mg_rd_vbr, mg_consume;
  logic [5:0] mg_rd_onu;
  logic [7:0] mg_rd_cnt;

  mgcb u_mgcb (
    .clk, .rst_n, .wr_en(alu_we), .wr_onu(alu_onu), .wr_vbr(alu_is_vbr), .wr_cnt(alu_cnt),
    .wr_done(alu_done), .rd_onu(mg_rd_onu), .rd_vbr(mg_rd_vbr), .rd_cnt(mg_rd_cnt),
    .consume(mg_consume), .pending(mg_pending)
  );

  logic       lut_go, lut_valid, lut_busy, lut_wr_busy;
  grant_t     lut_grant;
  logic [2:0] lut_col;

  mdlut u_mdlut (
    .clk, .rst_n, .mpr, .mg_pending, .mg_rd_onu, .mg_rd_vbr, .mg_rd_cnt, .mg_consume,
    .rd_go(lut_go), .rd_valid(lut_valid), .rd_grant(lut_grant), .rd_busy(lut_busy),
    .rd_col(lut_col), .swap(ev_swap), .rd_bank_valid(st_rd_bank_valid), .wr_busy(lut_wr_busy)
  );

  // ---------------- grant buffers ----------------
  logic       dg_push, dg_pop, dg_empty, dg_stall;
  grant_t     dg_data, dg_head;
  logic [5:0] dg_count;

  localparam int DG_DEPTH = 32;

  dgcb #(.DEPTH(DG_DEPTH)) u_dgcb (
    .clk, .rst_n, .push(dg_push), .push_data(dg_data), .pop(dg_pop), .head(dg_head),
    .empty(dg_empty), .stall(dg_stall), .count(dg_count), .overflow(st_dg_overflow)
  );

  logic       rg_pop, rg_empty, rg_writing;
  grant_t     rg_head;
  logic [7:0] rg_count;

  rgcb u_rgcb (
    .clk, .rst_n, .win_start, .wsr, .pgr, .wsr_clr, .pop(rg_pop), .head(rg_head),
    .empty(rg_empty), .writing(rg_writing), .count(rg_count), .windows(st_windows)
  );

  logic [5:0] omcc_onu;

  mac_mux u_mux (
    .clk, .rst_n, .out_start,
    .f27_hf(hf_idx + 3'd1), .f27_po_onu((hf_idx == 3'd7) ? po_onu + 6'd1 : po_onu),
    .alive, .rg_empty, .rg_head, .rg_pop, .dg_empty, .dg_head, .dg_pop,
    .gr_valid, .gr_idx, .gr_raw, .gr_out, .gr_src, .omcc_onu
  );

  // ---------------- MAC controller sequencing ----------------
  // Cell 3 of every half frame: move one MDLUT column and the divided-slot grant into the DGCB,
  // unless the DGCB would overflow; in the first half frame of a period also start the MAC-ALU
  // on the reports of the period just ended.
  logic       lut_valid_q;
  logic [2:0] ds_grp;

  assign lut_go       = ms_start && !dg_stall;
  assign ev_move      = lut_go;
  assign ev_move_skip = ms_start && dg_stall;
  assign dg_push      = lut_valid || (lut_valid_q && !lut_valid);
  assign dg_data      = lut_valid ? lut_grant : gr_ds(ds_grp);
  assign alu_go       = alu_go_pend && !alu_busy && !lut_wr_busy && !mg_consume;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lut_valid_q <= 1'b0;
      ds_grp      <= '0;
      alu_go_pend <= 1'b0;
    end else begin
      lut_valid_q <= lut_valid;
      if (ms_start) ds_grp <= per_idx;
      if (ms_start && per_first) alu_go_pend <= 1'b1;
      else if (alu_go)           alu_go_pend <= 1'b0;
    end
  end

  // Rules of the grant path, checked in simulation: a column move never meets a full DGCB,
  // a move starts only after the previous one has ended, the multiplexer takes a grant only
  // from a buffer that holds one, and grants leave only in the cell before the PLOAM clock.
  a_dg_room:   assert property (@(posedge clk) disable iff (!rst_n)
                                dg_push |-> int'(dg_count) < DG_DEPTH);
  a_move_idle: assert property (@(posedge clk) disable iff (!rst_n) lut_go |-> !lut_busy);
  a_rg_pop:    assert property (@(posedge clk) disable iff (!rst_n) rg_pop |-> !rg_empty);
  a_dg_pop:    assert property (@(posedge clk) disable iff (!rst_n) dg_pop |-> !dg_empty);
  a_out_cell:  assert property (@(posedge clk) disable iff (!rst_n)
                                gr_valid |-> int'(cell_cnt) == HF_CELLS - 1);
endmodule
