// minislot_rx: divided-slot receive buffer (the "2 cell FIFO" with its Group ID register).
//
// A divided slot is one 56-byte upstream slot holding eight 7-byte mini-slots, one per ONU of a
// group of eight: 3 overhead bytes, the VBR queue length, the CBR queue length, a reserved byte
// and a CRC byte. Write side: bytes arrive on ds_valid/ds_byte, ds_sof marks the first byte and
// carries ds_group, the group the divided-slot grant was issued to (kept with the slot as its
// GIDR). A slot is committed after its 56th byte; a slot that starts while both entries are full
// is dropped and counted in overflow. Read side: whenever an entry is held, it is scanned at one
// byte per clock; at the last byte of each mini-slot, ms_valid outputs ONU 8*group+k with its
// CBR and VBR queue lengths. The CRC byte must equal the CRC-8 (x^8+x^2+x+1, zero initial value)
// of the VBR, CBR and reserved bytes; on a mismatch both lengths are reported as zero and
// ms_crc_err pulses. Latency: 56 clocks per slot read. The two-slot depth, the field layout and
// the CRC protection are the document's; the CRC polynomial and the zeroing on error are this
// design's choice.
module minislot_rx
  import mac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ds_valid,
  input  logic       ds_sof,
  input  logic [7:0] ds_byte,
  input  logic [2:0] ds_group,
  output logic       ms_valid,
  output logic [5:0] ms_onu,
  output qlen_t      ms_q,
  output logic       ms_crc_err,
  output logic       busy,
  output logic [7:0] overflow
);

  logic [7:0] mem [2][DS_BYTES];
  logic [2:0] gidr [2];
  logic [1:0] count;
  logic       wr_slot, rd_slot;
  logic       wr_act;
  logic [5:0] wr_addr, rd_addr;
  logic       rd_act;
  logic [7:0] crc, vbr_b, cbr_b;
  logic [2:0] ms_k, ms_b;
  logic       commit, release_e;

  assign ms_k = 3'(rd_addr / 6'(MINISLOT_BYTES));
  assign ms_b = 3'(rd_addr % 6'(MINISLOT_BYTES));
  assign commit    = wr_act && ds_valid && !ds_sof && (wr_addr == 6'(DS_BYTES - 1));
  assign release_e = rd_act && (rd_addr == 6'(DS_BYTES - 1));
  assign busy      = rd_act;

  // write side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_act   <= 1'b0;
      wr_addr  <= '0;
      wr_slot  <= 1'b0;
      overflow <= '0;
    end else if (ds_valid) begin
      if (ds_sof) begin
        if (count == 2'd2 && !release_e) begin
          wr_act   <= 1'b0;
          overflow <= overflow + 8'd1;
        end else begin
          wr_act                <= 1'b1;
          mem[wr_slot][0]       <= ds_byte;
          gidr[wr_slot]         <= ds_group;
          wr_addr               <= 6'd1;
        end
      end else if (wr_act) begin
        mem[wr_slot][wr_addr] <= ds_byte;
        wr_addr               <= wr_addr + 6'd1;
        if (commit) begin
          wr_act  <= 1'b0;
          wr_slot <= ~wr_slot;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else count <= count + {1'b0, commit} - {1'b0, release_e};
  end

  // read side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_act  <= 1'b0;
      rd_addr <= '0;
      rd_slot <= 1'b0;
      crc     <= '0;
      vbr_b   <= '0;
      cbr_b   <= '0;
    end else if (!rd_act) begin
      if (count != 2'd0) begin
        rd_act  <= 1'b1;
        rd_addr <= '0;
        crc     <= '0;
      end
    end else begin
      case (ms_b)
        3'd3: begin vbr_b <= mem[rd_slot][rd_addr]; crc <= crc8_byte(8'd0, mem[rd_slot][rd_addr]); end
        3'd4: begin cbr_b <= mem[rd_slot][rd_addr]; crc <= crc8_byte(crc, mem[rd_slot][rd_addr]); end
        3'd5: crc <= crc8_byte(crc, mem[rd_slot][rd_addr]);
        default: ;
      endcase
      if (release_e) begin
        rd_act  <= 1'b0;
        rd_slot <= ~rd_slot;
      end else begin
        rd_addr <= rd_addr + 6'd1;
      end
    end
  end

  logic crc_ok;
  assign crc_ok = (crc == mem[rd_slot][rd_addr]);

  always_comb begin
    ms_valid   = rd_act && (ms_b == 3'd6);
    ms_onu     = {gidr[rd_slot], ms_k};
    ms_q.cbr   = crc_ok ? cbr_b : 8'd0;
    ms_q.vbr   = crc_ok ? vbr_b : 8'd0;
    ms_crc_err = ms_valid && !crc_ok;
  end

endmodule
