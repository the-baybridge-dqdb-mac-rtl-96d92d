// from_sar_fifo: the From-SAR FIFO shifter.
//
// A byte FIFO of DEPTH entries (a power of two, at least 8) held as a ring.
// `wr` stores a 32-bit SAR word as four bytes, most significant byte first.
// Two read ports walk the same bytes: the output port (`rd` advances it)
// feeds the PLCP output mux, and the CRC port (`crc_rd` advances it) feeds
// the CRC unit. `ld_crc` writes a 10-bit CRC into the low ten bits of the last
// two bytes written, the CRC field of the segment, keeping the six payload
// length bits. There is no full or empty flag and no flush: every cell
// writes and reads exactly 48 bytes on each port, so the pointers stay in
// step from cell to cell, and the send FSM paces writes and reads so that
// neither port passes the write pointer and no write overwrites an unread
// byte, even when the output of one cell overlaps the loading of the next. The document names the unit and its
// ports; the ring and the depth of 16 are this design's.
// In scan mode the three pointers shift as one register from `scan_in` to
// `scan_out` and the byte array holds still; the array, as a data path, is not
// on the scan chain.
module from_sar_fifo #(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic [31:0] wdata,
  input  logic        ld_crc,
  input  logic [9:0]  crc,
  input  logic        rd,
  output logic [7:0]  rdata,
  input  logic        crc_rd,
  output logic [7:0]  crc_data,
  // scan path (pointers only; the byte array is a data path)
  input  logic        scan_mode = 1'b0,
  input  logic        scan_in   = 1'b0,
  output logic        scan_out
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] wptr, rptr, cptr;
  logic [AW-1:0] last, prev;
  logic [3*AW-1:0] scan_q;

  assign scan_q   = {wptr, rptr, cptr};
  assign scan_out = scan_q[3*AW-1];

  assign last     = wptr - 1'b1;
  assign prev     = wptr - AW'(2);
  assign rdata    = mem[rptr];
  assign crc_data = mem[cptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      cptr <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (scan_mode) begin
      {wptr, rptr, cptr} <= {scan_q[3*AW-2:0], scan_in};
    end else begin
      if (wr) begin
        mem[wptr]                  <= wdata[31:24];
        mem[AW'(wptr + AW'(1))]    <= wdata[23:16];
        mem[AW'(wptr + AW'(2))]    <= wdata[15:8];
        mem[AW'(wptr + AW'(3))]    <= wdata[7:0];
        wptr                       <= wptr + AW'(4);
      end else if (ld_crc) begin
        mem[prev] <= {mem[prev][7:2], crc[9:8]};
        mem[last] <= crc[7:0];
      end
      if (rd)     rptr <= rptr + 1'b1;
      if (crc_rd) cptr <= cptr + 1'b1;
    end
  end

endmodule
