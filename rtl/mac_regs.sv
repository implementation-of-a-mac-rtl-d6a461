// mac_regs: CPU-visible configuration registers of the MAC processor.
//
// A simple synchronous write port (cpu_we, cpu_addr, cpu_wdata) and a combinational read port.
// Register map (this design's choice; the registers themselves are the document's):
//   0x0 MPR  mini-slot period register, half frames per mini-slot cycle, 1..8 (0 reads as 1,
//            values above 8 as 8). The grant budget per cycle is Y = 25 * MPR.
//   0x1 PGR  PLOAM grant register: grant placed in the middle of a ranging window (the ranging
//            grant to acquire serial numbers, or an ONU's PLOAM grant to measure its delay).
//   0x2 WSR  window size register: bit 7 is the window flag (open a window), bits 6:0 the window
//            length in cells. The flag clears itself when the window scheduler accepts it
//            (wsr_clr).
//   0x8..0xF Alive-1GR .. Alive-8GR: one bit per ONU, ONU 8*k+b alive in bit b of Alive-(k+1)GR.
// Reset values: MPR = 1, PGR = ranging grant, WSR = 0, no ONU alive.
module mac_regs
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cpu_we,
  input  logic [3:0]  cpu_addr,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  input  logic        wsr_clr,
  output logic [3:0]  mpr,
  output grant_t      pgr,
  output logic [7:0]  wsr,
  output logic [63:0] alive
);

  logic [7:0] mpr_q;
  logic [7:0] agr [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mpr_q <= 8'd1;
      pgr   <= GR_RANGING;
      wsr   <= '0;
      for (int i = 0; i < 8; i++) agr[i] <= '0;
    end else begin
      if (wsr_clr) wsr[7] <= 1'b0;
      if (cpu_we) begin
        case (cpu_addr)
          4'h0: mpr_q <= cpu_wdata;
          4'h1: pgr   <= cpu_wdata;
          4'h2: wsr   <= cpu_wdata;
          default: if (cpu_addr[3]) agr[cpu_addr[2:0]] <= cpu_wdata;
        endcase
      end
    end
  end

  always_comb begin
    if (mpr_q == 8'd0)      mpr = 4'd1;
    else if (mpr_q > 8'd8)  mpr = 4'd8;
    else                    mpr = mpr_q[3:0];
    for (int k = 0; k < 8; k++) alive[8*k +: 8] = agr[k];
    case (cpu_addr)
      4'h0: cpu_rdata = {4'd0, mpr};
      4'h1: cpu_rdata = pgr;
      4'h2: cpu_rdata = wsr;
      default: cpu_rdata = cpu_addr[3] ? agr[cpu_addr[2:0]] : 8'd0;
    endcase
  end

endmodule
