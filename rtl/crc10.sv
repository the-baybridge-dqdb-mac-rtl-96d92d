// crc10: byte-serial CRC-10 unit for the 48-byte DQDB segment.
//
// Each clock with `en` high divides one more byte (`din`, most significant
// bit first) into the remainder register using mac_pkg::crc10_step, the
// generator x^10+x^9+x^5+x^4+x+1. `clr` restarts it at zero and has priority
// over `en`. After the 48 bytes of a segment whose CRC field is zero, `crc`
// holds the CRC to insert; after the 48 bytes of a received segment, `ok` is
// high when the segment is intact. One byte per clock, result one clock after
// the last byte. The document gives the function and the 8-bit data path of
// the unit; the algorithm is the one of the IEEE 802.6 segment trailer.
// In scan mode the remainder register shifts instead, from `scan_in` into bit 0
// towards bit 9 (`scan_out`).
module crc10
  import mac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       en,
  input  logic [7:0] din,
  output logic [9:0] crc,
  output logic       ok,
  // scan path
  input  logic       scan_mode = 1'b0,
  input  logic       scan_in   = 1'b0,
  output logic       scan_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         crc <= '0;
    else if (scan_mode) crc <= {crc[8:0], scan_in};
    else if (clr)       crc <= '0;
    else if (en)        crc <= crc10_step(crc, din);
  end

  assign ok       = (crc == '0);
  assign scan_out = crc[9];

endmodule
