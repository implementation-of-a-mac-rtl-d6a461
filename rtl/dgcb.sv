// dgcb: data grant circular buffer between the MDLUT and the grant multiplexer.
//
// A DEPTH-entry circular buffer of grants with a write pointer, a read pointer and a fill count.
// Every half frame the MDLUT moves 25 data grants and one divided-slot grant in (push/push_data)
// and the multiplexer takes up to 26 out (pop, with the oldest grant shown on head). While a
// ranging window is being served the multiplexer takes its grants from the ranging buffer
// instead, so this buffer stops draining; stall then tells the controller to skip the next move.
// stall is high while count > STALL_LEVEL, i.e. while one more half frame of 26 grants would not
// fit. A push into a full buffer is dropped and counted in overflow; a pop of an empty buffer
// does nothing. The 32-entry size and the stall mechanism follow the document; the stall level
// DEPTH-26 is this design's reading of the threshold.
module dgcb
  import mac_pkg::*;
#(
  parameter int DEPTH       = 32,
  parameter int STALL_LEVEL = DEPTH - BUF_GRANTS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push,
  input  grant_t     push_data,
  input  logic       pop,
  output grant_t     head,
  output logic       empty,
  output logic       stall,
  output logic [$clog2(DEPTH):0] count,
  output logic [7:0] overflow
);

  localparam int AW = $clog2(DEPTH);

  grant_t mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_push, do_pop;

  assign empty   = (count == '0);
  assign stall   = (count > ($bits(count))'(STALL_LEVEL));
  assign do_pop  = pop && !empty;
  assign do_push = push && ((count != ($bits(count))'(DEPTH)) || do_pop);
  assign head    = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= GR_UA;
    end else begin
      if (do_push) begin
        mem[wp] <= push_data;
        wp      <= wp + 1'b1;
      end
      if (do_pop) rp <= rp + 1'b1;
      count <= count + ($bits(count))'(do_push) - ($bits(count))'(do_pop);
      if (push && !do_push) overflow <= overflow + 8'd1;
    end
  end

endmodule
