// rgcb: ranging grant circular buffer with its window scheduler (the ranging grant table).
//
// When the CPU sets the window flag (bit 7 of WSR) the scheduler, at the next win_start strobe
// and with the buffer empty, writes a window of n = WSR[6:0] grants (at least 3) into the buffer,
// one per clock: W_Pro grants, the PGR grant in the middle (position n/2) and a W_End grant at
// the end (position n-1). It then clears the flag (wsr_clr) and counts the window. The PGR grant
// is the ranging grant when serial numbers are being acquired, or the PLOAM grant of one ONU when
// its equalisation delay is measured. The multiplexer pops (pop, head) these grants ahead of all
// data grants; the PLOAM cell carries W_Pro and W_End as unassigned grants, so the upstream
// stays silent around the one ranging response. DEPTH 128 holds the longest window of 127 cells.
// The window content, its 3..127-cell range and its priority are the document's; the exact
// middle position and the minimum clamp are this design's.
module rgcb
  import mac_pkg::*;
#(
  parameter int DEPTH = 128
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       win_start,
  input  logic [7:0] wsr,
  input  grant_t     pgr,
  output logic       wsr_clr,
  input  logic       pop,
  output grant_t     head,
  output logic       empty,
  output logic       writing,
  output logic [$clog2(DEPTH):0] count,
  output logic [15:0] windows
);

  localparam int AW = $clog2(DEPTH);

  grant_t mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [6:0] n, k;
  logic do_push, do_pop;
  grant_t wgrant;

  assign empty  = (count == '0);
  assign head   = mem[rp];
  assign do_pop = pop && !empty;
  assign do_push = writing;

  always_comb begin
    if (k == n - 7'd1)           wgrant = GR_W_END;
    else if (k == {1'b0, n[6:1]}) wgrant = pgr;
    else                          wgrant = GR_W_PRO;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp      <= '0;
      rp      <= '0;
      count   <= '0;
      writing <= 1'b0;
      n       <= '0;
      k       <= '0;
      wsr_clr <= 1'b0;
      windows <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= GR_UA;
    end else begin
      wsr_clr <= 1'b0;
      if (!writing) begin
        if (win_start && wsr[7] && empty) begin
          writing <= 1'b1;
          n       <= (wsr[6:0] < 7'd3) ? 7'd3 : wsr[6:0];
          k       <= '0;
          wsr_clr <= 1'b1;
          windows <= windows + 16'd1;
        end
      end else begin
        mem[wp] <= wgrant;
        wp      <= wp + 1'b1;
        k       <= k + 7'd1;
        if (k == n - 7'd1) writing <= 1'b0;
      end
      if (do_pop) rp <= rp + 1'b1;
      count <= count + ($bits(count))'(do_push) - ($bits(count))'(do_pop);
    end
  end

endmodule
