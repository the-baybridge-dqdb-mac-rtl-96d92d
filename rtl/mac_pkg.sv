// mac_pkg: constants, types and the CRC-10 step shared by the DQDB MAC.
//
// A DQDB cell (slot) is 53 bytes, carried one byte per clock:
//   byte 0       ACF: bit 7 BUSY, bit 6 SL_TYPE, bit 5 PSR, bits 4:3 reserved,
//                bits 2:0 REQ_2..REQ_0. This MAC uses REQ_0 (bit 0) as its
//                request bit and only uses queue-arbitrated slots (SL_TYPE = 0);
//                both positions are the IEEE 802.6 layout, chosen here.
//   bytes 1..4   NCI (segment header). Connectionless QA cells carry the
//                constant FF FF F0 22: VCI all ones, payload type and segment
//                priority zero, 22 being the CRC-8 header check of FF FF F0.
//   bytes 5..52  the 48-byte segment: byte 5 = {ST[1:0], SN[3:0], MID[9:8]},
//                byte 6 = MID[7:0], bytes 7..50 payload (bytes 7..14 hold the
//                destination address in BOM and SSM cells), byte 51 =
//                {payload length[5:0], CRC[9:8]}, byte 52 = CRC[7:0].
// The CRC-10 generator is x^10+x^9+x^5+x^4+x+1. crc10_step divides the
// segment bit by bit (most significant bit first) without augmentation, so
// running it over all 48 bytes with the CRC field at zero gives the CRC, and
// over a received segment gives zero when the segment is intact.
package mac_pkg;

  localparam int unsigned CELL_BYTES = 53;   // bytes per cell
  localparam int unsigned HDR_BYTES  = 5;    // ACF + NCI
  localparam int unsigned SEG_BYTES  = 48;   // bytes exchanged with the SAR
  localparam int unsigned SEG_WORDS  = 12;   // 32-bit words per segment
  localparam int unsigned DA_FIRST   = 7;    // first destination address byte
  localparam int unsigned DA_LAST    = 14;   // last destination address byte
  localparam int unsigned CTR_W      = 10;   // DQDB counter width (1024 nodes)
  localparam int unsigned MID_W      = 10;   // message identifier width
  localparam int unsigned TS_W       = 2;    // MID table time stamp width

  localparam logic [31:0] NCI_QA_CL = 32'hFFFF_F022;

  localparam int unsigned ACF_BUSY = 7;
  localparam int unsigned ACF_SL   = 6;
  localparam int unsigned ACF_REQ  = 0;

  localparam logic [9:0] CRC10_POLY = 10'h233;

  // Position of a byte inside a cell, 0 = ACF.
  typedef logic [5:0] pos_t;

  // Segment type field, bits 7:6 of byte 5.
  typedef enum logic [1:0] {
    ST_COM = 2'b00,
    ST_EOM = 2'b01,
    ST_BOM = 2'b10,
    ST_SSM = 2'b11
  } seg_type_e;

  // Cell status to the SAR, one strobe and three flags.
  typedef struct packed {
    logic accept;  // last word: match, NCI and CRC all good, reassemble it
    logic match;   // all words: address (BOM/SSM) or MID (COM/EOM) matched
    logic sof;     // first word of a cell
    logic strobe;  // first clock of each new word on the bus
  } cell_status_t;

  // One CRC-10 step over a byte, most significant bit first.
  function automatic logic [9:0] crc10_step(input logic [9:0] crc, input logic [7:0] din);
    logic [9:0] r;
    r = crc;
    for (int i = 7; i >= 0; i--) begin
      if (r[9]) r = {r[8:0], din[i]} ^ CRC10_POLY;
      else      r = {r[8:0], din[i]};
    end
    return r;
  endfunction

endpackage
