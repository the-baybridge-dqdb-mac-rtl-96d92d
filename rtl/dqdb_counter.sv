// dqdb_counter: the DQDB counter cell (request, count down and bandwidth
// balancing counters, and the MID timeout period counter).
//
// A synchronous up/down counter with clear and parallel load. Priority per
// clock: clear, then load, then count. An increment and a decrement in the
// same clock cancel. Counting saturates at zero and at all ones, so a
// decrement of zero or an increment of the full value leaves the counter as it
// is (the document decrements only a counter that is greater than zero, and
// bounds the request count at 1023 by the 10-bit MID space). `zero` is the
// "= zero?" comparator of the block diagram, combinational from the state.
// Reset clears the counter.
// In scan mode (`scan_mode` high) the counter is a shift register instead:
// `scan_in` enters bit 0 and bit W-1 is `scan_out`.
module dqdb_counter #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         ld,
  input  logic [W-1:0] ld_val,
  input  logic         inc,
  input  logic         dec,
  output logic [W-1:0] cnt,
  output logic         zero,
  // scan path
  input  logic         scan_mode = 1'b0,
  input  logic         scan_in   = 1'b0,
  output logic         scan_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               cnt <= '0;
    else if (scan_mode)       cnt <= {cnt[W-2:0], scan_in};
    else if (clr)             cnt <= '0;
    else if (ld)              cnt <= ld_val;
    else if (inc && !dec) begin
      if (cnt != '1)          cnt <= cnt + 1'b1;
    end else if (dec && !inc) begin
      if (cnt != '0)          cnt <= cnt - 1'b1;
    end
  end

  assign zero     = (cnt == '0);
  assign scan_out = cnt[W-1];

endmodule
