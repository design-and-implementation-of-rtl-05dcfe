// route_error_detect: routing error check and journal for one input port.
//
// For each header that arrives from the neighbouring router on port in_dir_i,
// the block works out what that neighbour's XY routing would have chosen for
// the packet's destination. Arriving here is correct when that choice is this
// router, when the chosen router is one of this router's eight neighbours and
// its diagonal availability bit says it is unavailable (a legal bypass), or
// when the header's unique-path bit is set. A header whose destination was
// the neighbour itself is always an error.
//
// The result of every checked header (chk_i high for one cycle) is shifted
// into a 3-bit journal. All ones means a permanent routing fault of the
// neighbour, all zeros no error, and any other pattern a transient error.
//
// err_o is combinational on the header; the journal updates on the clock
// edge after chk_i. Synchronous active-low reset clears the journal. The
// three-entry journal and its meaning follow the described design; checking
// the neighbour's XY choice is this design's reading of how diagonal
// availability separates a bypass from an error.
module route_error_detect
  import noc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  addr_t      cur_i,
  input  addr_t      dst_i,
  input  logic       uniq_i,
  input  dir_e       in_dir_i,
  input  logic [7:0] avail_i,
  input  logic       chk_i,
  output logic       err_o,
  output logic [2:0] journal_o,
  output logic       permanent_o,
  output logic       transient_o
);
  always_comb begin
    int px, py, dx, dy, qx, qy, cx, cy, nb;
    cx = int'(addr_x(cur_i));
    cy = int'(addr_y(cur_i));
    dx = int'(addr_x(dst_i));
    dy = int'(addr_y(dst_i));
    // The sending neighbour.
    px = cx + dir_dx(in_dir_i);
    py = cy + dir_dy(in_dir_i);
    // Its XY choice.
    qx = px;
    qy = py;
    if (dx != px)      qx = (dx > px) ? px + 1 : px - 1;
    else if (dy != py) qy = (dy > py) ? py + 1 : py - 1;
    nb = offset_nb(qx - cx, qy - cy);
    if (dx == px && dy == py)
      err_o = 1'b1;
    else if (qx == cx && qy == cy)
      err_o = 1'b0;
    else if (nb >= 0 && !avail_i[nb])
      err_o = 1'b0;
    else
      err_o = !uniq_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     journal_o <= '0;
    else if (chk_i) journal_o <= {journal_o[1:0], err_o};
  end

  assign permanent_o = &journal_o;
  assign transient_o = |journal_o && !(&journal_o);
endmodule
