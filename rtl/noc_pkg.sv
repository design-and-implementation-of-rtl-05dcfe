// noc_pkg: types and constants shared by the reliable mesh router.
//
// A flit is FLIT_W bits. Bit 15 is the flit type (1 = header, 0 = data).
// A header carries the 4-bit source and destination addresses of a 4x4 mesh
// (2-bit X in the upper half, 2-bit Y in the lower half), the unique-path bit
// and a small payload. A data flit carries 15 payload bits. On the links each
// flit travels as an extended Hamming code word of CW_W bits.
//
// The flit fields (type, source, destination, unique-path bit, 4-bit
// addresses) follow the described information field; the flit width, the
// field order, the packet length and the direction numbering are this
// design's own choices.
package noc_pkg;

  localparam int FLIT_W   = 16;                  // flit width (assumed)
  localparam int ADDR_W   = 4;                   // 4-bit address for a 4x4 mesh
  localparam int COORD_W  = 2;                   // X and Y each 2 bits
  localparam int NPORTS   = 4;                   // N, E, S, W
  localparam int PKT_LEN  = 4;                   // flits per packet, header included (assumed)

  // Number of Hamming parity bits for k data bits: smallest p with 2^p >= k+p+1.
  function automatic int hamming_p(input int k);
    int p;
    p = 1;
    while ((1 << p) < k + p + 1) p++;
    return p;
  endfunction

  localparam int PAR_W = hamming_p(FLIT_W);       // 5 for 16 data bits
  localparam int CW_W  = FLIT_W + PAR_W + 1;      // plus the overall parity bit

  // Port directions; also the index of the four router ports.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // Indices of the eight neighbours in the diagonal availability vector.
  localparam int NB_N  = 0;
  localparam int NB_NE = 1;
  localparam int NB_E  = 2;
  localparam int NB_SE = 3;
  localparam int NB_S  = 4;
  localparam int NB_SW = 5;
  localparam int NB_W  = 6;
  localparam int NB_NW = 7;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [CW_W-1:0]   cw_t;

  // Header field layout.
  typedef struct packed {
    logic       hdr;       // flit type: 1 = header
    addr_t      src;
    addr_t      dst;
    logic       uniq;      // unique-path identification bit
    logic [5:0] payload;
  } hdr_t;

  function automatic logic [COORD_W-1:0] addr_x(input addr_t a);
    return a[ADDR_W-1 -: COORD_W];
  endfunction

  function automatic logic [COORD_W-1:0] addr_y(input addr_t a);
    return a[COORD_W-1:0];
  endfunction

  function automatic addr_t make_addr(input int x, input int y);
    return addr_t'((x << COORD_W) | y);
  endfunction

  // Neighbour index (0..7) of the router reached by going in direction d.
  function automatic int dir_nb(input dir_e d);
    case (d)
      DIR_N:   return NB_N;
      DIR_E:   return NB_E;
      DIR_S:   return NB_S;
      default: return NB_W;
    endcase
  endfunction

  // Step in X and Y for each direction; Y grows towards north.
  function automatic int dir_dx(input dir_e d);
    return (d == DIR_E) ? 1 : (d == DIR_W) ? -1 : 0;
  endfunction

  function automatic int dir_dy(input dir_e d);
    return (d == DIR_N) ? 1 : (d == DIR_S) ? -1 : 0;
  endfunction

  // Neighbour index for an offset (ox, oy) in -1..1, or -1 if not a neighbour.
  function automatic int offset_nb(input int ox, input int oy);
    if (ox ==  0 && oy ==  1) return NB_N;
    if (ox ==  1 && oy ==  1) return NB_NE;
    if (ox ==  1 && oy ==  0) return NB_E;
    if (ox ==  1 && oy == -1) return NB_SE;
    if (ox ==  0 && oy == -1) return NB_S;
    if (ox == -1 && oy == -1) return NB_SW;
    if (ox == -1 && oy ==  0) return NB_W;
    if (ox == -1 && oy ==  1) return NB_NW;
    return -1;
  endfunction

endpackage
