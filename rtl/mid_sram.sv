// mid_sram: the MID table SRAM, WORDS x 2 bits (1024 x 2 in the chip).
//
// One port. A clock with `we` high writes `wdata` to `addr`. A clock with
// `re` high reads `addr`; `rdata` holds the word from the clock after the
// read until the next read. The document gives the size and that update and
// timeout share the one port; the synchronous read is this design's model
// of the SRAM macro. The contents are not reset: the MID table block fills
// the array with zeros after reset, as the chip does at initialization.
module mid_sram #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned DW    = 2
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic                     we,
  input  logic [DW-1:0]            wdata,
  input  logic                     re,
  output logic [DW-1:0]            rdata
);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

endmodule
