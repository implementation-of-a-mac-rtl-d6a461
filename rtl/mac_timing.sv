// mac_timing: the time base of the MAC controller.
//
// One clock is one downstream byte clock. A byte counter (0..CELL_BYTES-1) and a cell counter
// (0..HF_CELLS-1) divide time into half frames; each half frame starts with its PLOAM cell.
// Strobes, each one clock long at byte 0 of a cell:
//   pclk      cell 0, the PLOAM clock (start of a half frame)
//   cclk      every cell
//   ms_start  cell MS_CELL (3): mini-slot scheduling and the MDLUT-to-DGCB move
//   win_start cell WIN_CELL (20): window (ranging) scheduling
//   out_start cell HF_CELLS-1: grant delivery, one cell before the next PLOAM clock
// hf_idx counts half frames 0..7 in the four-frame grant cycle; po_onu advances once per
// four frames and names the ONU whose PLOAM grant is due (each ONU every 256 frames).
// per_idx counts half frames inside the mini-slot period of mpr half frames and per_first
// marks its first half frame. The cell numbers 3 and 20 and the PLOAM cycle are the document's;
// the byte-clock counting itself is this design's.
module mac_timing
  import mac_pkg::*;
#(
  parameter int CELL_LEN = CELL_BYTES,
  parameter int HF_LEN   = HF_CELLS,
  parameter int MS_CELL  = 3,
  parameter int WIN_CELL = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] mpr,        // mini-slot period in half frames, 1..8
  output logic [5:0] byte_cnt,
  output logic [4:0] cell_cnt,
  output logic       pclk,
  output logic       cclk,
  output logic       ms_start,
  output logic       win_start,
  output logic       out_start,
  output logic [2:0] hf_idx,
  output logic [5:0] po_onu,
  output logic [2:0] per_idx,
  output logic       per_first
);

  logic cell_end, hf_end;
  assign cell_end = (byte_cnt == 6'(CELL_LEN - 1));
  assign hf_end   = cell_end && (cell_cnt == 5'(HF_LEN - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byte_cnt <= '0;
      cell_cnt <= '0;
      hf_idx   <= '0;
      po_onu   <= '0;
      per_idx  <= '0;
    end else begin
      byte_cnt <= cell_end ? '0 : byte_cnt + 6'd1;
      if (cell_end) cell_cnt <= (cell_cnt == 5'(HF_LEN - 1)) ? '0 : cell_cnt + 5'd1;
      if (hf_end) begin
        hf_idx <= hf_idx + 3'd1;
        if (hf_idx == 3'd7) po_onu <= po_onu + 6'd1;
        per_idx <= ({1'b0, per_idx} + 4'd1 >= mpr) ? '0 : per_idx + 3'd1;
      end
    end
  end

  always_comb begin
    cclk      = (byte_cnt == '0);
    pclk      = cclk && (cell_cnt == '0);
    ms_start  = cclk && (cell_cnt == 5'(MS_CELL));
    win_start = cclk && (cell_cnt == 5'(WIN_CELL));
    out_start = cclk && (cell_cnt == 5'(HF_LEN - 1));
    per_first = (per_idx == '0);
  end

endmodule
