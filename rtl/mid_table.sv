// mid_table: the MID Table block.
//
// Keeps track of the messages this node is reassembling: one 2-bit time
// stamp per 10-bit MID in a single-port SRAM (mid_sram). The update
// subblock (mid_update) reads the entry of every cell's MID and writes the
// time stamp for an address-matched BOM, in the first half of each cell. The
// timeout subblock (mid_timeout) is woken at byte TMO_POS, in the last half,
// and decays one entry per timeout period. The only signal to the rest of the
// MAC is `mid_valid`. After reset the block writes zeros to all WORDS
// entries, one per clock, and is idle until `init_done`. The port sharing by
// cell halves and the zero fill follow the document; the byte positions and
// the fill order are this design's.
// In scan mode the zero fill state, then the update and timeout subblocks,
// shift as one 57-bit chain; the SRAM is not written and is not on the chain.
module mid_table
  import mac_pkg::*;
#(
  parameter int unsigned WORDS       = 1024,
  parameter int unsigned MATCH_POS   = 16,
  parameter int unsigned TMO_POS     = 30,
  parameter logic [7:0]  TMO_DEFAULT = 8'd0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rx_data,
  input  pos_t       pos,
  input  logic       in_cell,
  input  logic       ext_addr_match,
  input  logic       tmo_we,
  input  logic [7:0] tmo_wdata,
  output logic       mid_valid,
  output logic       init_done,
  // scan path
  input  logic       scan_mode = 1'b0,
  input  logic       scan_in   = 1'b0,
  output logic       scan_out
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [AW-1:0]   init_addr;
  logic [AW-1:0]   s_addr, u_addr, t_addr;
  logic            s_we, s_re, u_we, u_re, t_we, t_re;
  logic [TS_W-1:0] s_wdata, u_wdata, t_wdata, s_rdata;
  logic [TS_W-1:0] ts;
  logic [MID_W-1:0] u_mid_addr;
  logic [AW:0]     scan_q;     // zero fill address and done flag
  logic            sc_update;

  // Scan chain: scan_in -> zero fill -> update -> timeout -> scan_out.
  assign scan_q = {init_addr, init_done};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_addr <= '0;
      init_done <= 1'b0;
    end else if (scan_mode) begin
      {init_addr, init_done} <= {scan_q[AW-1:0], scan_in};
    end else if (!init_done) begin
      init_addr <= init_addr + 1'b1;
      if (init_addr == AW'(WORDS - 1)) init_done <= 1'b1;
    end
  end

  mid_update #(.MATCH_POS(MATCH_POS)) u_update (
    .clk, .rst_n, .en(init_done), .rx_data, .pos, .in_cell, .ext_addr_match, .ts,
    .addr(u_mid_addr), .re(u_re), .we(u_we), .wdata(u_wdata), .rdata(s_rdata), .mid_valid,
    .scan_mode, .scan_in(scan_q[AW]), .scan_out(sc_update)
  );
  assign u_addr = AW'(u_mid_addr);

  mid_timeout #(.WORDS(WORDS), .TMO_DEFAULT(TMO_DEFAULT)) u_timeout (
    .clk, .rst_n, .en(init_done), .wake(in_cell && pos == pos_t'(TMO_POS)),
    .tmo_we, .tmo_wdata, .ts,
    .addr(t_addr), .re(t_re), .we(t_we), .wdata(t_wdata), .rdata(s_rdata),
    .scan_mode, .scan_in(sc_update), .scan_out
  );

  always_comb begin
    if (!init_done) begin
      s_addr = init_addr; s_we = !scan_mode; s_re = 1'b0; s_wdata = '0;
    end else if (u_we || u_re) begin
      s_addr = u_addr;    s_we = u_we; s_re = u_re; s_wdata = u_wdata;
    end else begin
      s_addr = t_addr;    s_we = t_we; s_re = t_re; s_wdata = t_wdata;
    end
  end

  mid_sram #(.WORDS(WORDS), .DW(TS_W)) u_sram (
    .clk, .addr(s_addr), .we(s_we), .wdata(s_wdata), .re(s_re), .rdata(s_rdata)
  );

  // Update and timeout use different halves of the cell.
  a_share: assert property (@(posedge clk) disable iff (!rst_n || scan_mode)
                            !((u_we || u_re) && (t_we || t_re)));

endmodule
