// receive_fifo: the Receive FIFO shifter.
//
// A DEPTH-stage byte shift register that moves every clock. Each stage also
// carries a cell-start flag, so a tap knows where a cell begins. Stage 0
// takes the byte on `din` (and `sin`); stage k shows it k clocks later.
//  * `tap_byte`/`tap_soc`: stage TX_TAP, the byte stream handed to the send
//    block (the cell returned to the physical layer).
//  * `word`: the last four stages packed big-endian, stage DEPTH-4 in the low
//    byte, stage DEPTH-1 in the high byte; the send-to-SAR buffer loads it
//    every fourth clock.
// The document sets the depth by the latency of the destination address
// match; DEPTH = 12 is this design's number for a CAM answering two clocks
// after the last address byte (see receive_block).
module receive_fifo #(
  parameter int unsigned DEPTH  = 12,
  parameter int unsigned TX_TAP = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  din,
  input  logic        sin,
  output logic [7:0]  tap_byte,
  output logic        tap_soc,
  output logic [31:0] word
);

  logic [7:0] data_q [DEPTH];
  logic       soc_q  [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        data_q[i] <= '0;
        soc_q[i]  <= 1'b0;
      end
    end else begin
      data_q[0] <= din;
      soc_q[0]  <= sin;
      for (int i = 1; i < DEPTH; i++) begin
        data_q[i] <= data_q[i-1];
        soc_q[i]  <= soc_q[i-1];
      end
    end
  end

  assign tap_byte = data_q[TX_TAP];
  assign tap_soc  = soc_q[TX_TAP];
  assign word     = {data_q[DEPTH-1], data_q[DEPTH-2], data_q[DEPTH-3], data_q[DEPTH-4]};

endmodule
