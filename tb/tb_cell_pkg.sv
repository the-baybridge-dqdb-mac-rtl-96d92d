// tb_cell_pkg: reference model helpers shared by the testbenches.
//
// Builds DQDB cells and segments and computes the segment CRC-10 with a
// textbook shift-register (LFSR) formulation over the 374 bits before the
// CRC field, written independently of the RTL's byte-step division.
package tb_cell_pkg;

  typedef logic [7:0] seg_t  [48];
  typedef logic [7:0] cell_t [53];

  function automatic logic [9:0] ref_crc10(input seg_t s);
    logic [9:0] r;
    logic       fb;
    r = '0;
    for (int n = 0; n < 374; n++) begin
      fb = r[9] ^ s[n / 8][7 - (n % 8)];
      r  = {r[8:0], 1'b0};
      if (fb) r = r ^ 10'h233;
    end
    return r;
  endfunction

  // Segment with the CRC field zero, as the SAR hands it over.
  function automatic seg_t make_seg(input logic [1:0] st, input logic [9:0] mid,
                                    input logic [63:0] da, input int unsigned seed);
    seg_t s;
    int unsigned x;
    x = seed;
    s[0] = {st, 4'(seed), mid[9:8]};
    s[1] = mid[7:0];
    for (int i = 2; i < 46; i++) begin
      x = x * 1103515245 + 12345;
      s[i] = x[23:16];
    end
    if (st == 2'b10 || st == 2'b11)
      for (int i = 0; i < 8; i++) s[2 + i] = da[63 - 8*i -: 8];
    s[46] = {6'd44, 2'b00};
    s[47] = 8'h00;
    return s;
  endfunction

  function automatic seg_t add_crc(input seg_t s);
    logic [9:0] c;
    seg_t o;
    o = s;
    c = ref_crc10(s);
    o[46][1:0] = c[9:8];
    o[47]      = c[7:0];
    return o;
  endfunction

  function automatic cell_t make_cell(input logic [7:0] acf, input seg_t s);
    cell_t c;
    c[0] = acf;
    c[1] = 8'hFF; c[2] = 8'hFF; c[3] = 8'hF0; c[4] = 8'h22;
    for (int i = 0; i < 48; i++) c[5 + i] = s[i];
    return c;
  endfunction

  function automatic logic [31:0] seg_word(input seg_t s, input int k);
    return {s[4*k], s[4*k+1], s[4*k+2], s[4*k+3]};
  endfunction

endpackage
