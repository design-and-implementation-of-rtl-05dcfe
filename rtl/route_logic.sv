// route_logic: adaptive XY routing decision for one header flit.
//
// The router's address is (cx, cy) and the packet's destination (dx, dy); Y
// grows towards north. The preferred direction is plain XY: along X first,
// then along Y once the destination column is reached. A direction may be
// used when the neighbour there is available (avail_i, one bit per
// neighbour N, NE, E, SE, S, SW, W, NW), it is not the port the packet came
// in by, and it is not the local port. If the preferred one cannot be used
// the router tries, in order:
//   * still moving in X: the Y direction towards the destination; in the
//     destination row, the Y direction whose diagonal neighbour towards the
//     destination is available;
//   * moving in Y: the X direction whose diagonal neighbour towards the
//     destination is available;
//   then the remaining perpendicular direction, then the way back.
// A packet whose destination is this router leaves by LOCAL_PORT; a router
// with no processing element (LOCAL_EN = 0) uses all four sides for through
// traffic and expects no packets addressed to itself. If no
// direction can be used the preferred one is returned; the packet then waits
// in the output buffer or is looped back there.
//
// uniq_o is the unique-path bit written into the outgoing header: it is set
// when the packet leaves by a direction that the next router cannot explain
// from the diagonal availability of this router's preferred neighbour, so
// that it does not report a routing error for it.
//
// The bypass may turn a packet from Y back to X, which plain XY forbids, so
// under heavy load the detours round an unavailable router can form a
// cycle of routers waiting on each other; nothing here prevents that.
//
// Purely combinational. XY order, the adaptive bypass and the use of
// diagonal availability follow the described design; the order of the
// fall-back directions and the rule for setting uniq_o are this design's own.
module route_logic
  import noc_pkg::*;
#(
  parameter dir_e LOCAL_PORT = DIR_W,
  parameter bit   LOCAL_EN   = 1'b1     // 0: no processing element attached
) (
  input  addr_t      cur_i,
  input  addr_t      dst_i,
  input  dir_e       in_dir_i,     // port the header arrived on
  input  logic [7:0] avail_i,      // availability of the eight neighbours
  output dir_e       out_dir_o,
  output logic       local_o,      // destination reached
  output logic       uniq_o,
  output logic       blocked_o     // no usable direction found
);
  function automatic dir_e opp(input dir_e d);
    return dir_e'(d ^ 2'd2);
  endfunction

  always_comb begin
    int   cx, cy, dx, dy;
    logic hasx, hasy;
    dir_e xdir, ydir, pref;
    dir_e cand [4];
    logic found;

    cx = int'(addr_x(cur_i));
    cy = int'(addr_y(cur_i));
    dx = int'(addr_x(dst_i));
    dy = int'(addr_y(dst_i));
    hasx = (dx != cx);
    hasy = (dy != cy);
    xdir = (dx > cx) ? DIR_E : DIR_W;
    ydir = (dy > cy) ? DIR_N : DIR_S;

    if (hasx) begin
      pref    = xdir;
      if (hasy)
        cand[1] = ydir;
      else
        cand[1] = avail_i[offset_nb(dir_dx(xdir), 1)] ? DIR_N : DIR_S;
      cand[2] = opp(cand[1]);
      cand[3] = opp(xdir);
    end else begin
      pref    = ydir;
      cand[1] = avail_i[offset_nb(1, dir_dy(ydir))] ? DIR_E : DIR_W;
      cand[2] = opp(cand[1]);
      cand[3] = opp(ydir);
    end
    cand[0] = pref;

    local_o   = !hasx && !hasy;
    out_dir_o = pref;
    uniq_o    = 1'b0;
    blocked_o = 1'b0;
    found     = 1'b0;
    if (local_o) begin
      out_dir_o = LOCAL_PORT;
    end else begin
      for (int i = 0; i < 4; i++) begin
        if (!found && avail_i[dir_nb(cand[i])] && cand[i] != in_dir_i &&
            !(LOCAL_EN && cand[i] == LOCAL_PORT)) begin
          found     = 1'b1;
          out_dir_o = cand[i];
          // Only a step to cand[1] around an unavailable preferred
          // neighbour can be checked by the next router.
          uniq_o    = !(i == 0 || (i == 1 && !avail_i[dir_nb(pref)]));
        end
      end
      blocked_o = !found;
    end
  end
endmodule
