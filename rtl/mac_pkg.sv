// mac_pkg: types, constants and grant codes shared by the APON OLT MAC processor.
//
// Grant field coding (one byte per grant in the downstream PLOAM cell):
//   11_111111 idle, 11_111110 unassigned (UA_GR), 11_111101 ranging (RA_GR) - fixed by G.983.1
//   11_111100 W_End, 11_111011 W_Pro     - window markers, only seen inside the MAC and by
//                                          the predictor; replaced by UA_GR in the PLOAM cell
//   10_000ggg divided-slot grant for ONU group g (DS_GR)
//   01_nnnnnn CBR data grant for ONU n,  00_nnnnnn VBR data grant for ONU n
//   8'h88 + n PLOAM grant for ONU n (this design's choice: the 64 codes 0x88..0xC7 left free
//             between the divided-slot codes and the reserved range 0xC8..0xFC)
// Timing constants follow the 155.52 Mbit/s downstream frame: a half frame is 28 cells of
// 53 bytes, one PLOAM cell per half frame carries 27 grant fields, 26 of which come from the
// grant buffers (25 data grants and one DS_GR).
package mac_pkg;

  typedef logic [7:0] grant_t;

  localparam grant_t GR_IDLE    = 8'hFF;
  localparam grant_t GR_UA      = 8'hFE;
  localparam grant_t GR_RANGING = 8'hFD;
  localparam grant_t GR_W_END   = 8'hFC;
  localparam grant_t GR_W_PRO   = 8'hFB;
  localparam grant_t GR_PO_BASE = 8'h88;

  localparam int CELL_BYTES      = 53;  // byte clocks per cell
  localparam int HF_CELLS        = 28;  // cells per downstream half frame
  localparam int GRANT_FIELDS    = 27;  // grant fields per PLOAM cell
  localparam int BUF_GRANTS      = 26;  // grants per half frame taken from RGCB/DGCB
  localparam int DATA_GRANTS     = 25;  // data grants per half frame from the MDLUT
  localparam int MINISLOTS       = 8;   // mini-slots (ONUs) per divided slot
  localparam int MINISLOT_BYTES  = 7;
  localparam int DS_BYTES        = MINISLOTS * MINISLOT_BYTES;  // 56
  localparam int MAX_ONU         = 64;
  localparam int MAX_MPR         = 8;

  // Queue lengths reported by one ONU in its mini-slot.
  typedef struct packed {
    logic [7:0] cbr;
    logic [7:0] vbr;
  } qlen_t;

  function automatic grant_t gr_cbr(input logic [5:0] onu);
    return {2'b01, onu};
  endfunction

  function automatic grant_t gr_vbr(input logic [5:0] onu);
    return {2'b00, onu};
  endfunction

  function automatic grant_t gr_ds(input logic [2:0] grp);
    return {5'b10000, grp};
  endfunction

  function automatic grant_t gr_ploam(input logic [5:0] onu);
    return GR_PO_BASE + {2'b00, onu};
  endfunction

  // CRC-8 step, polynomial x^8 + x^2 + x + 1, one byte at a time, MSB first.
  function automatic logic [7:0] crc8_byte(input logic [7:0] crc, input logic [7:0] data);
    logic [7:0] c;
    c = crc ^ data;
    for (int i = 0; i < 8; i++) c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    return c;
  endfunction

endpackage
