// mid_update: MID Table entry update subblock (MID Update FSM, current MID
// register, current segment type register).
//
// Driven by the position of the byte now on `rx_data` within the cell
// (`pos`, valid while `in_cell`). For every cell it stores the segment type
// (byte 5) and the MID (bytes 5 and 6), reads the table entry of that MID at
// byte 7 and, one clock later, registers `mid_valid` = entry non-zero. The
// flag then holds until the same point of the next cell; the receive logic
// only uses it for COM and EOM cells. At byte MATCH_POS it samples the CAM's
// `ext_addr_match`; if the cell is busy and a BOM and matched, it writes the
// current time stamp `ts` to the entry, making the MID valid. SSM cells need
// no entry. All table accesses fall in the first half of the cell, as in
// the document; the exact byte numbers are this design's. `en` is low while
// the table is being zero-filled after reset.
// In scan mode the FSM and its registers shift as one 16-bit register from
// `scan_in` to `scan_out`, and the SRAM strobes are held off.
module mid_update
  import mac_pkg::*;
#(
  parameter int unsigned MATCH_POS = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [7:0]       rx_data,
  input  pos_t             pos,
  input  logic             in_cell,
  input  logic             ext_addr_match,
  input  logic [TS_W-1:0]  ts,
  // SRAM port request
  output logic [MID_W-1:0] addr,
  output logic             re,
  output logic             we,
  output logic [TS_W-1:0]  wdata,
  input  logic [TS_W-1:0]  rdata,
  output logic             mid_valid,
  // scan path
  input  logic             scan_mode = 1'b0,
  input  logic             scan_in   = 1'b0,
  output logic             scan_out
);

  typedef enum logic [1:0] {U_IDLE, U_READ, U_CHECK, U_WAIT} state_e;
  state_e      state;
  logic        busy_q;
  seg_type_e   st_q;
  logic [MID_W-1:0] mid_q;
  logic [MID_W+5:0] scan_q;

  assign scan_q   = {state, busy_q, st_q, mid_q, mid_valid};
  assign scan_out = scan_q[MID_W+5];

  assign addr  = mid_q;
  assign re    = en && !scan_mode && (state == U_READ);
  assign we    = en && !scan_mode && (state == U_WAIT) && in_cell && (pos == pos_t'(MATCH_POS))
                 && busy_q && (st_q == ST_BOM) && ext_addr_match;
  assign wdata = ts;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= U_IDLE;
      busy_q    <= 1'b0;
      st_q      <= ST_COM;
      mid_q     <= '0;
      mid_valid <= 1'b0;
    end else if (scan_mode) begin
      {state, busy_q, st_q, mid_q, mid_valid} <= {scan_q[MID_W+4:0], scan_in};
    end else if (!en) begin
      state     <= U_IDLE;
      mid_valid <= 1'b0;
    end else begin
      if (in_cell && pos == pos_t'(0)) busy_q <= rx_data[ACF_BUSY];
      if (in_cell && pos == pos_t'(5)) begin
        st_q       <= seg_type_e'(rx_data[7:6]);
        mid_q[9:8] <= rx_data[1:0];
      end
      if (in_cell && pos == pos_t'(6)) begin
        mid_q[7:0] <= rx_data;
        state      <= U_READ;
      end
      unique case (state)
        U_IDLE:  ;
        U_READ:  state <= U_CHECK;
        U_CHECK: begin
                   mid_valid <= (rdata != '0);
                   state     <= U_WAIT;
                 end
        U_WAIT:  if (!in_cell || pos >= pos_t'(MATCH_POS)) state <= U_IDLE;
      endcase
    end
  end

endmodule
