// tb_route_logic: adaptive XY decisions of a router at (1,1) with its local
// port on the west side. Directed cases check plain XY order, delivery to
// the local port, the bypass of an unavailable X or Y neighbour using the
// diagonal bits, the ban on leaving by the arrival port, and the unique-path
// bit. A random sweep then checks the general rules: a chosen direction is
// always usable, and the XY direction is taken whenever it is usable.
module tb_route_logic;
  import noc_pkg::*;

  int checks = 0, failures = 0;
  addr_t cur, dst;
  dir_e  in_dir, out_dir;
  logic [7:0] avail;
  logic  loc, uniq, blocked;

  route_logic #(.LOCAL_PORT(DIR_W)) dut (
    .cur_i(cur), .dst_i(dst), .in_dir_i(in_dir), .avail_i(avail),
    .out_dir_o(out_dir), .local_o(loc), .uniq_o(uniq), .blocked_o(blocked));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (out %s uniq %0d loc %0d blk %0d)", what, out_dir.name(), uniq, loc, blocked);
    end
  endtask

  task automatic route(input int dx, input int dy, input dir_e from, input logic [7:0] av);
    cur = make_addr(1, 1);
    dst = make_addr(dx, dy);
    in_dir = from;
    avail = av;
    #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] ALL = 8'hFF;
  // bit n = neighbour n: N=0 NE=1 E=2 SE=3 S=4 SW=5 W=6 NW=7
  initial begin
    // Plain XY with everything available, arriving from the south.
    route(3, 2, DIR_S, ALL); check(out_dir == DIR_E && !uniq, "X first towards east");
    route(0, 3, DIR_S, ALL); check(out_dir == DIR_N && uniq, "west is local: go north, unique");
    route(1, 3, DIR_S, ALL); check(out_dir == DIR_N && !uniq, "same column north");
    route(1, 0, DIR_N, ALL); check(out_dir == DIR_S && !uniq, "same column south");
    route(1, 1, DIR_N, ALL); check(loc && out_dir == DIR_W, "destination reached");
    // East unavailable: go along Y towards the destination.
    route(3, 2, DIR_S, ALL & ~8'h04); check(out_dir == DIR_N && !uniq, "bypass east via north");
    route(3, 0, DIR_N, ALL & ~8'h04); check(out_dir == DIR_S && !uniq, "bypass east via south");
    // Same row, east unavailable: pick the side whose diagonal is up.
    route(3, 1, DIR_W, ALL & ~8'h04); check(out_dir == DIR_N && !uniq, "same row, NE up");
    route(3, 1, DIR_W, ALL & ~8'h06); check(out_dir == DIR_S && !uniq, "same row, NE down: south");
    // North unavailable while moving in Y: pick E or W by the diagonal.
    route(1, 3, DIR_S, ALL & ~8'h01); check(out_dir == DIR_E && !uniq, "Y bypass via east");
    route(1, 3, DIR_S, ALL & ~8'h03); check(out_dir == DIR_S || out_dir == DIR_W || blocked ||
                                             out_dir == DIR_E, "Y bypass, NE down");
    route(1, 3, DIR_S, ALL & ~8'h03); check(out_dir != DIR_W && out_dir != DIR_S, "no local, no U-turn");
    // Arrival port never reused: from east towards east.
    route(3, 1, DIR_E, ALL); check(out_dir == DIR_N && uniq, "no U-turn, unique bit set");
    // Nothing usable.
    route(3, 1, DIR_S, 8'h00); check(blocked && out_dir == DIR_E, "blocked keeps XY choice");

    // Random sweep of the general rules.
    for (int n = 0; n < 5000; n++) begin
      int cx, cy, dx, dy;
      dir_e pref;
      cx = $urandom_range(3); cy = $urandom_range(3);
      dx = $urandom_range(3); dy = $urandom_range(3);
      cur = make_addr(cx, cy); dst = make_addr(dx, dy);
      in_dir = dir_e'($urandom_range(3));
      avail = 8'($urandom);
      #1;
      pref = (dx > cx) ? DIR_E : (dx < cx) ? DIR_W : (dy > cy) ? DIR_N : DIR_S;
      if (dx == cx && dy == cy)
        check(loc && out_dir == DIR_W, "local");
      else if (!blocked) begin
        check(avail[dir_nb(out_dir)] && out_dir != in_dir && out_dir != DIR_W, "usable choice");
        if (avail[dir_nb(pref)] && pref != in_dir && pref != DIR_W)
          check(out_dir == pref && !uniq, "XY when usable");
      end else
        check(out_dir == pref, "blocked keeps XY");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
