// tb_util_pkg: reference models shared by the testbenches.
//
// ref_encode builds the (22,16) extended Hamming code word from an explicit
// list of the data positions and parity equations, written independently of
// the RTL encoder; ref_extract reads the data bits back out. make_hdr and
// make_data build flits in the header layout of noc_pkg.
package tb_util_pkg;
  import noc_pkg::*;

  // Code word positions (1..21) holding data bits 0..15.
  localparam int DPOS [16] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17, 18, 19, 20, 21};

  function automatic cw_t ref_encode(input flit_t d);
    cw_t c;
    c = '0;
    for (int i = 0; i < 16; i++) c[DPOS[i]] = d[i];
    // p1 covers 1,3,5,..; p2 covers 2,3,6,7,..; p4, p8, p16 likewise.
    for (int k = 0; k < 5; k++) begin
      logic x;
      x = 0;
      for (int i = 0; i < 16; i++) if (DPOS[i][k]) x ^= d[i];
      c[1 << k] = x;
    end
    c[0] = ^c[21:1];
    return c;
  endfunction

  // Data bits of a code word, taken as received (no correction).
  function automatic flit_t ref_extract(input cw_t c);
    flit_t d;
    for (int i = 0; i < 16; i++) d[i] = c[DPOS[i]];
    return d;
  endfunction

  function automatic flit_t make_hdr(input addr_t src, input addr_t dst,
                                     input logic uniq, input logic [5:0] pl);
    return {1'b1, src, dst, uniq, pl};
  endfunction

  function automatic flit_t make_data(input logic [14:0] pl);
    return {1'b0, pl};
  endfunction
endpackage
