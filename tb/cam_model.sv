// cam_model: behavioural model of the external address CAM of one MAC.
// It watches the byte stream the MAC receives, gathers the destination
// address (bytes 7-14 of the cell) and, from byte 16 until the next cell,
// drives `match` high when the address equals one of its two entries.
module cam_model #(
  parameter logic [63:0] ADDR0 = 64'h0,
  parameter logic [63:0] ADDR1 = 64'h0
) (
  input  logic       clk,
  input  logic [7:0] rx_data,
  input  logic       rx_soc,
  output logic       match
);
  int          pos = 99;
  logic [63:0] da;
  initial match = 1'b0;
  always @(posedge clk) begin
    if (rx_soc) begin pos = 1; match <= 1'b0; end
    else begin
      if (pos >= 7 && pos <= 14) da = {da[55:0], rx_data};
      if (pos == 15) match <= (da == ADDR0) || (da == ADDR1);
      if (pos < 99) pos++;
    end
  end
  always @(posedge clk) if (rx_soc) da = '0;
endmodule
