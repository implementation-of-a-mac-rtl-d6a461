// mdlut: the MAC distribution look-up table, which spreads each ONU's grants at equal intervals.
//
// The table has 25 "upper" rows (the 25 data-grant positions of one half frame) by up to 8
// "lower" columns (the half frames of a mini-slot period of mpr half frames), so it holds the
// Y = 25*mpr grants of one period. It is double banked: one bank is written from the MGCB while
// the other is read.
// Writing: when the MGCB holds a new set (mg_pending) and the write bank is free, the writer
// emits the CBR grants of ONU 0..N-1 (N = 8*mpr), then their VBR grants, then unassigned grants
// up to Y entries. The k-th entry goes to lower = k mod mpr, upper = useq(k div mpr): the lower
// address runs fastest, so consecutive grants of one ONU fall in consecutive half frames, and
// useq is a fixed permutation of 0..24 that spreads the rows. The bank then becomes valid and
// mg_consume pulses. Up to Y + 4*N + 2 clocks (two per ONU and class plus one per entry).
// Reading: each rd_go moves one column (the current half frame) out, upper 0..24 in order, one
// grant per clock on rd_valid/rd_grant. After the last column the banks swap if the write bank
// is valid; if not, the old bank is dropped and unassigned grants are read until a new bank is
// ready.
// The row/column organisation, the write order (lower fastest) and the read order (upper fastest)
// are the document's address table. The row permutation for mpr = 1 and for mpr = 8 is the one
// that table prints; this design uses the mpr = 8 permutation for every mpr above 1. The double
// banking is this design's choice.
module mdlut
  import mac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] mpr,
  input  logic       mg_pending,
  output logic [5:0] mg_rd_onu,
  output logic       mg_rd_vbr,
  input  logic [7:0] mg_rd_cnt,
  output logic       mg_consume,
  input  logic       rd_go,
  output logic       rd_valid,
  output grant_t     rd_grant,
  output logic       rd_busy,
  output logic [2:0] rd_col,
  output logic       swap,
  output logic       rd_bank_valid,
  output logic       wr_busy
);

  localparam int ROWS = DATA_GRANTS;   // 25
  localparam int SIZE = ROWS * MAX_MPR; // 200

  grant_t bank [2][SIZE];
  logic   rd_bank, wr_bank_valid;

  // row permutation of the write address
  function automatic logic [4:0] useq(input logic [3:0] m, input logic [4:0] k);
    int kk;
    kk = int'(k);
    if (m == 4'd1) begin
      if (kk < 8)       return 5'(21 - 3 * kk);
      else if (kk < 16) return 5'(23 - 3 * (kk - 8));
      else if (kk == 16) return 5'd24;
      else              return 5'(22 - 3 * (kk - 17));
    end
    if (kk >= 24) return 5'd24;
    return 5'(3 * ((5 * (kk / 3)) % 8) + (kk % 3));
  endfunction

  // ---------------- writer ----------------
  typedef enum logic [1:0] {W_IDLE, W_LOAD, W_RUN} wstate_t;
  wstate_t    wstate;
  logic [7:0] wk, y;
  logic [2:0] lo;
  logic [4:0] up_i;
  logic [6:0] o;
  logic       ph_vbr, fill;
  logic [7:0] left;
  logic [6:0] n_onu;
  grant_t     wgrant;

  assign y          = 8'(25 * mpr);
  assign n_onu      = {mpr, 3'b000};
  assign mg_rd_onu  = o[5:0];
  assign mg_rd_vbr  = ph_vbr;
  assign wr_busy    = (wstate != W_IDLE);
  assign wgrant     = fill ? GR_UA : (ph_vbr ? gr_vbr(o[5:0]) : gr_cbr(o[5:0]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate        <= W_IDLE;
      wk            <= '0;
      lo            <= '0;
      up_i          <= '0;
      o             <= '0;
      ph_vbr        <= 1'b0;
      fill          <= 1'b0;
      left          <= '0;
      wr_bank_valid <= 1'b0;
      mg_consume    <= 1'b0;
    end else begin
      mg_consume <= 1'b0;
      case (wstate)
        W_IDLE: if (mg_pending && !wr_bank_valid && !mg_consume) begin
          wk     <= '0;
          lo     <= '0;
          up_i   <= '0;
          o      <= '0;
          ph_vbr <= 1'b0;
          fill   <= 1'b0;
          wstate <= W_LOAD;
        end
        W_LOAD: begin
          left   <= mg_rd_cnt;
          wstate <= W_RUN;
        end
        W_RUN: begin
          if (fill || left != 8'd0) begin
            bank[~rd_bank][{useq(mpr, up_i), 3'b000} + 8'(lo)] <= wgrant;
            if (!fill) left <= left - 8'd1;
            wk <= wk + 8'd1;
            if ({1'b0, lo} == mpr - 4'd1) begin
              lo   <= '0;
              up_i <= up_i + 5'd1;
            end else begin
              lo <= lo + 3'd1;
            end
            if (wk == y - 8'd1) begin
              wstate        <= W_IDLE;
              wr_bank_valid <= 1'b1;
              mg_consume    <= 1'b1;
            end
          end else begin
            // this ONU is done: next ONU, next class, or fill the rest
            if (o == n_onu - 7'd1) begin
              o <= '0;
              if (ph_vbr) fill <= 1'b1;
              else begin
                ph_vbr <= 1'b1;
                wstate <= W_LOAD;
              end
            end else begin
              o      <= o + 7'd1;
              wstate <= W_LOAD;
            end
          end
        end
        default: wstate <= W_IDLE;
      endcase
      if (swap) wr_bank_valid <= 1'b0;
    end
  end

  // ---------------- reader ----------------
  logic [4:0] rup;
  logic       last_col;

  assign rd_busy  = rd_valid;
  assign last_col = ({1'b0, rd_col} >= mpr - 4'd1);
  assign swap     = rd_valid && (rup == 5'(ROWS - 1)) && last_col && wr_bank_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid      <= 1'b0;
      rup           <= '0;
      rd_col        <= '0;
      rd_bank       <= 1'b0;
      rd_bank_valid <= 1'b0;
    end else begin
      if (!rd_valid) begin
        if (rd_go) begin
          rd_valid <= 1'b1;
          rup      <= '0;
        end
      end else if (rup == 5'(ROWS - 1)) begin
        rd_valid <= 1'b0;
        if (last_col) begin
          rd_col <= '0;
          if (wr_bank_valid) begin
            rd_bank       <= ~rd_bank;
            rd_bank_valid <= 1'b1;
          end else begin
            rd_bank_valid <= 1'b0;
          end
        end else begin
          rd_col <= rd_col + 3'd1;
        end
      end else begin
        rup <= rup + 5'd1;
      end
    end
  end

  assign rd_grant = rd_bank_valid ? bank[rd_bank][{rup, 3'b000} + 8'(rd_col)] : GR_UA;

endmodule
