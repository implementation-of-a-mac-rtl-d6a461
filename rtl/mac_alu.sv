// mac_alu: the MAC arithmetic unit, which turns reported queue lengths into grant counts.
//
// Queue lengths arrive from the mini-slot receiver (ms_valid, ms_onu, ms_q) into an input table.
// A go pulse, once per mini-slot period, moves the table into a working copy (the input table is
// cleared, so an ONU that did not report counts as zero) and computes, for the N = 8*mpr ONUs of
// the period and the grant budget Y = 25*mpr:
//   CBR_t = sum C_i;   CBR_Gi = C_i                  if CBR_t <= Y
//                      CBR_Gi = floor(C_i*Y/CBR_t)   otherwise
//   SUB_Y = Y - sum CBR_Gi
//   VBR_t = sum V_i;   VBR_Gi = V_i                  if VBR_t <= SUB_Y
//                      VBR_Gi = floor(V_i*SUB_Y/VBR_t) otherwise
// CBR is served first, VBR only from what CBR leaves. Each count is written out through
// gr_we/gr_onu/gr_is_vbr/gr_cnt to the grant circular buffers (MGCB), CBR counts for ONUs 0..N-1
// first, then VBR counts; done pulses when the last is written. Scaled products use one shared
// serial multiplier/divider (25 clocks each), so a period takes at most about N*(2*27)+N+4
// clocks. The equations, their order, the budget table Y = 25*MPR and the register widths are
// the document's; the sequencing of the single serial operator is this design's.
// Lint reports rst_n as both a synchronous and an asynchronous net here; the synchronous use is
// only the disable condition of the assertion inside serial_muldiv.
module mac_alu
  import mac_pkg::*;
#(
  parameter int N_ONU = MAX_ONU
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  mpr,
  input  logic        ms_valid,
  input  logic [5:0]  ms_onu,
  input  qlen_t       ms_q,
  input  logic        go,
  output logic        busy,
  output logic        done,
  output logic        gr_we,
  output logic [5:0]  gr_onu,
  output logic        gr_is_vbr,
  output logic [7:0]  gr_cnt,
  output logic [15:0] cbr_t,
  output logic [15:0] vbr_t,
  output logic [7:0]  sub_y,
  output logic        cbr_scaled,
  output logic        vbr_scaled
);

  typedef enum logic [2:0] {S_IDLE, S_SUM, S_CBR, S_SUBY, S_VBR, S_WAIT} state_t;
  state_t state;

  qlen_t      cv_in   [N_ONU];
  qlen_t      cv_work [N_ONU];
  logic [6:0] idx, n_onu;
  logic [7:0] y, assigned;
  logic       phase_vbr;

  logic       md_start, md_busy, md_done;
  logic [7:0] md_q, md_a, md_b;
  logic [15:0] md_d;

  logic [7:0] cur;
  logic       scale;

  assign y     = 8'(25 * mpr);
  assign n_onu = {mpr, 3'b000};
  assign busy  = (state != S_IDLE);
  assign cur   = phase_vbr ? cv_work[idx[5:0]].vbr : cv_work[idx[5:0]].cbr;
  assign scale = phase_vbr ? vbr_scaled : cbr_scaled;

  serial_muldiv #(.WA(8), .WB(8), .WD(16)) u_md (
    .clk, .rst_n, .start(md_start), .a(md_a), .b(md_b), .d(md_d),
    .busy(md_busy), .done(md_done), .q(md_q)
  );

  always_comb begin
    md_a     = cur;
    md_b     = phase_vbr ? sub_y : y;
    md_d     = phase_vbr ? vbr_t : cbr_t;
    md_start = ((state == S_CBR) || (state == S_VBR)) && scale && (cur != 8'd0);
  end

  // input table: cleared on go, then written by the mini-slot receiver
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ONU; i++) cv_in[i] <= '0;
    end else begin
      if (go && !busy) begin
        for (int i = 0; i < N_ONU; i++) cv_in[i] <= '0;
      end
      if (ms_valid && (int'(ms_onu) < N_ONU)) cv_in[ms_onu] <= ms_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      idx        <= '0;
      cbr_t      <= '0;
      vbr_t      <= '0;
      sub_y      <= '0;
      assigned   <= '0;
      phase_vbr  <= 1'b0;
      cbr_scaled <= 1'b0;
      vbr_scaled <= 1'b0;
      done       <= 1'b0;
      gr_we      <= 1'b0;
      gr_onu     <= '0;
      gr_is_vbr     <= 1'b0;
      gr_cnt     <= '0;
      for (int i = 0; i < N_ONU; i++) cv_work[i] <= '0;
    end else begin
      done  <= 1'b0;
      gr_we <= 1'b0;
      case (state)
        S_IDLE: if (go) begin
          for (int i = 0; i < N_ONU; i++) cv_work[i] <= cv_in[i];
          idx       <= '0;
          cbr_t     <= '0;
          vbr_t     <= '0;
          assigned  <= '0;
          phase_vbr <= 1'b0;
          state     <= S_SUM;
        end
        S_SUM: begin
          cbr_t <= cbr_t + 16'(cv_work[idx[5:0]].cbr);
          vbr_t <= vbr_t + 16'(cv_work[idx[5:0]].vbr);
          if (idx == n_onu - 7'd1) begin
            idx   <= '0;
            state <= S_CBR;
            cbr_scaled <= (cbr_t + 16'(cv_work[idx[5:0]].cbr)) > 16'(y);
          end else begin
            idx <= idx + 7'd1;
          end
        end
        S_CBR, S_VBR: begin
          if (scale && cur != 8'd0) begin
            state <= S_WAIT;       // md_start is high this clock
          end else begin
            gr_we    <= 1'b1;
            gr_onu   <= idx[5:0];
            gr_is_vbr   <= phase_vbr;
            gr_cnt   <= scale ? 8'd0 : cur;
            if (!phase_vbr) assigned <= assigned + (scale ? 8'd0 : cur);
            if (idx == n_onu - 7'd1) begin
              idx   <= '0;
              state <= phase_vbr ? S_IDLE : S_SUBY;
              done  <= phase_vbr;
            end else begin
              idx <= idx + 7'd1;
            end
          end
        end
        S_WAIT: if (md_done) begin
          gr_we  <= 1'b1;
          gr_onu <= idx[5:0];
          gr_is_vbr <= phase_vbr;
          gr_cnt <= md_q;
          if (!phase_vbr) assigned <= assigned + md_q;
          if (idx == n_onu - 7'd1) begin
            idx   <= '0;
            state <= phase_vbr ? S_IDLE : S_SUBY;
            done  <= phase_vbr;
          end else begin
            idx   <= idx + 7'd1;
            state <= phase_vbr ? S_VBR : S_CBR;
          end
        end
        S_SUBY: begin
          sub_y      <= y - assigned;
          vbr_scaled <= vbr_t > 16'(y - assigned);
          phase_vbr  <= 1'b1;
          state      <= S_VBR;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
