// mid_timeout: MID Table entry timeout subblock (MID Timeout FSM, timeout
// period constant and counter, MID table address counter, current timestamp
// counter, timeout logic).
//
// Once per cell `wake` starts the FSM (in the last half of the cell). If the
// timeout period counter is not zero it is decremented and nothing else
// happens. Otherwise the counter is reloaded from the timeout period
// constant, the entry at the address counter is read and, when the
// difference between the current time stamp and the entry is two (modulo the
// 1-2-3 cycle of the time stamp), the entry is written with zeros. The
// address counter then advances; when it wraps, after every entry has been
// visited, the time stamp counter advances 1 -> 2 -> 3 -> 1. A MID therefore
// stays valid for between one and two full sweeps after its BOM. This
// behaviour is the document's. The 8-bit constant is the width the block
// diagram prints; its reset value TMO_DEFAULT = 0 (one entry per cell, a
// sweep every 1024 cells) is this design's. `ts` goes to the update
// subblock. `en` is low during the zero fill after reset.
// In scan mode the period counter, then the FSM, constant, address counter and
// time stamp, shift as one 30-bit chain, and the SRAM strobes are held off.
module mid_timeout
  import mac_pkg::*;
#(
  parameter int unsigned     WORDS       = 1024,
  parameter logic [7:0]      TMO_DEFAULT = 8'd0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     wake,
  input  logic                     tmo_we,
  input  logic [7:0]               tmo_wdata,
  output logic [TS_W-1:0]          ts,
  // SRAM port request
  output logic [$clog2(WORDS)-1:0] addr,
  output logic                     re,
  output logic                     we,
  output logic [TS_W-1:0]          wdata,
  input  logic [TS_W-1:0]          rdata,
  // scan path
  input  logic                     scan_mode = 1'b0,
  input  logic                     scan_in   = 1'b0,
  output logic                     scan_out
);

  localparam int unsigned AW = $clog2(WORDS);

  typedef enum logic [1:0] {T_IDLE, T_CHECK, T_READ, T_DECIDE} state_e;
  state_e          state;
  logic [7:0]      tmo_const;
  logic [7:0]      period_cnt;
  logic            period_zero;
  logic [AW-1:0]   addr_cnt;
  logic            timeout;
  logic [TS_W-1:0] ts_next;
  logic            sc_period;
  logic [AW+11:0]  scan_q;     // state, constant, address counter, time stamp

  assign scan_q   = {state, tmo_const, addr_cnt, ts};
  assign scan_out = scan_q[AW+11];

  always_comb begin
    unique case (ts)
      2'd1:    ts_next = 2'd2;
      2'd2:    ts_next = 2'd3;
      default: ts_next = 2'd1;
    endcase
  end

  // Entry e times out when ts - e = 2 in the cycle 1,2,3, i.e. e = ts + 1.
  assign timeout = (rdata != '0) && (rdata == ts_next);

  assign addr  = addr_cnt;
  assign re    = en && !scan_mode && (state == T_READ);
  assign we    = en && !scan_mode && (state == T_DECIDE) && timeout;
  assign wdata = '0;

  dqdb_counter #(.W(8)) u_period (
    .clk, .rst_n, .clr(1'b0),
    .ld(en && state == T_CHECK && period_zero), .ld_val(tmo_const),
    .inc(1'b0), .dec(en && state == T_CHECK && !period_zero),
    .cnt(period_cnt), .zero(period_zero),
    .scan_mode, .scan_in, .scan_out(sc_period)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      tmo_const <= TMO_DEFAULT;
      addr_cnt  <= '0;
      ts        <= 2'd1;
    end else if (scan_mode) begin
      {state, tmo_const, addr_cnt, ts} <= {scan_q[AW+10:0], sc_period};
    end else begin
      if (tmo_we) tmo_const <= tmo_wdata;
      if (!en) begin
        state <= T_IDLE;
      end else begin
        unique case (state)
          T_IDLE:   if (wake) state <= T_CHECK;
          T_CHECK:  state <= period_zero ? T_READ : T_IDLE;
          T_READ:   state <= T_DECIDE;
          T_DECIDE: begin
                      addr_cnt <= addr_cnt + 1'b1;
                      if (addr_cnt == AW'(WORDS - 1)) ts <= ts_next;
                      state <= T_IDLE;
                    end
        endcase
      end
    end
  end

endmodule
