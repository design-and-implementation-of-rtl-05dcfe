// tb_route_error_detect: a router at (1,1) checks headers arriving from its
// four neighbours. Directed cases: correct XY arrivals, a legal bypass of an
// unavailable diagonal router, the same arrival with that router available
// (error), the unique-path bit hiding it, a packet that should have stopped
// at the neighbour, and a step away from the destination. The journal is
// then filled with errors (permanent), mixed (transient) and clean results.
//
// Consistency sweep: on random availability maps of a 4x4 mesh, a sending
// router's route_logic (with and without a local port) picks a direction for
// a random header; whenever that leads to an available neighbour, the
// neighbour's check of the header, with the unique-path bit as the sender
// wrote it, must find no error. Misrouted copies (sent one side clockwise
// of the chosen direction, bit cleared) are also presented, and a misroute
// the check accepts must be explained by an unavailable diagonal neighbour.
module tb_route_error_detect;
  import noc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  addr_t cur, dst;
  logic  uniq, chk, err, perm, trans;
  dir_e  in_dir;
  logic [7:0] avail;
  logic [2:0] journal;

  always #5 clk = ~clk;

  // Sending router for the consistency sweep.
  addr_t      s_cur, s_dst;
  dir_e       s_in, s_out0, s_out1;
  logic [7:0] s_av;
  logic       s_loc0, s_loc1, s_uq0, s_uq1, s_blk0, s_blk1;
  route_logic #(.LOCAL_EN(1'b0)) u_rl0 (.cur_i(s_cur), .dst_i(s_dst), .in_dir_i(s_in),
    .avail_i(s_av), .out_dir_o(s_out0), .local_o(s_loc0), .uniq_o(s_uq0), .blocked_o(s_blk0));
  route_logic #(.LOCAL_PORT(DIR_W), .LOCAL_EN(1'b1)) u_rl1 (.cur_i(s_cur), .dst_i(s_dst),
    .in_dir_i(s_in), .avail_i(s_av), .out_dir_o(s_out1), .local_o(s_loc1), .uniq_o(s_uq1),
    .blocked_o(s_blk1));

  bit map [4][4];
  function automatic bit up(input int x, input int y);
    return x >= 0 && x < 4 && y >= 0 && y < 4 && map[x][y];
  endfunction
  function automatic logic [7:0] nb_av(input int x, input int y);
    logic [7:0] v;
    for (int ox = -1; ox <= 1; ox++)
      for (int oy = -1; oy <= 1; oy++)
        if (ox != 0 || oy != 0) v[offset_nb(ox, oy)] = up(x + ox, y + oy);
    return v;
  endfunction

  route_error_detect dut (.clk, .rst_n, .cur_i(cur), .dst_i(dst), .uniq_i(uniq),
    .in_dir_i(in_dir), .avail_i(avail), .chk_i(chk), .err_o(err),
    .journal_o(journal), .permanent_o(perm), .transient_o(trans));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic hdr(input int dx, input int dy, input dir_e from, input logic u,
                     input logic [7:0] av);
    cur = make_addr(1, 1); dst = make_addr(dx, dy);
    in_dir = from; uniq = u; avail = av;
    #1;
  endtask

  // Present one header and record it in the journal.
  task automatic logged(input int dx, input int dy, input dir_e from);
    @(negedge clk);
    hdr(dx, dy, from, 1'b0, 8'hFF);
    chk = 1;
    @(negedge clk);
    chk = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk = 0; uniq = 0; cur = '0; dst = '0; in_dir = DIR_N; avail = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    hdr(3, 1, DIR_W, 0, 8'hFF); check(!err, "from west, destination east");
    hdr(1, 3, DIR_S, 0, 8'hFF); check(!err, "from south, destination north");
    hdr(1, 2, DIR_S, 0, 8'hFF); check(!err, "from south, destination next north");
    // (1,0) would go east to (2,0), the SE diagonal of (1,1).
    hdr(3, 0, DIR_S, 0, 8'hFF);        check(err,  "SE available: misrouted");
    hdr(3, 0, DIR_S, 0, 8'hFF & ~8'h08); check(!err, "SE unavailable: bypass");
    hdr(3, 0, DIR_S, 1, 8'hFF);        check(!err, "unique path bit set");
    hdr(1, 2, DIR_N, 0, 8'hFF);        check(err,  "should have stopped at the neighbour");
    hdr(0, 3, DIR_E, 0, 8'hFF);        check(!err, "from east, destination north-west");
    hdr(1, 0, DIR_N, 0, 8'hFF);        check(!err, "from north, destination south");
    hdr(0, 3, DIR_W, 0, 8'hFF);        check(err,  "from west, should have gone north");
    hdr(0, 3, DIR_W, 0, 8'hFF & ~8'h80); check(!err, "from west, NW unavailable: bypass");
    hdr(3, 1, DIR_E, 0, 8'hFF);        check(err,  "from east, moving away from the destination");
    check(journal == 3'b000 && !perm && !trans, "journal empty");
    // Three errors in a row: permanent.
    logged(3, 0, DIR_S); logged(3, 0, DIR_S); logged(3, 0, DIR_S);
    check(journal == 3'b111 && perm && !trans, "permanent");
    logged(3, 1, DIR_W);
    check(journal == 3'b110 && !perm && trans, "transient after a clean header");
    logged(3, 1, DIR_W); logged(3, 1, DIR_W);
    check(journal == 3'b000 && !perm && !trans, "clean again");
    sweep();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep();
    int legal = 0, caught = 0, excused = 0;
    for (int m = 0; m < 300; m++) begin
      foreach (map[x, y]) map[x][y] = ($urandom_range(3) != 0);
      for (int k = 0; k < 40; k++) begin
        int sx, sy, tx, ty, rx, ry, variant;
        dir_e o, mis;
        logic u;
        sx = $urandom_range(3); sy = $urandom_range(3);
        do begin tx = $urandom_range(3); ty = $urandom_range(3); end
        while (tx == sx && ty == sy);
        variant = $urandom_range(1);
        s_cur = make_addr(sx, sy); s_dst = make_addr(tx, ty);
        s_in  = dir_e'($urandom_range(3));
        s_av  = nb_av(sx, sy);
        if (variant == 1) s_av[NB_W] = 1'b1;     // a processing element on the west side
        #1;
        o = variant ? s_out1 : s_out0;
        u = variant ? s_uq1 : s_uq0;
        if (variant ? s_blk1 : s_blk0) continue;
        // A legal route: the receiver must accept it.
        rx = sx + dir_dx(o); ry = sy + dir_dy(o);
        if (up(rx, ry)) begin
          cur = make_addr(rx, ry); dst = s_dst; uniq = u;
          in_dir = dir_e'(o ^ 2'd2); avail = nb_av(rx, ry);
          #1;
          check(!err, $sformatf("legal route (%0d,%0d)->(%0d,%0d) to (%0d,%0d) uniq %0b flagged",
                                sx, sy, rx, ry, tx, ty, u));
          legal++;
        end
        // A misroute: one side clockwise, unique-path bit cleared.
        mis = dir_e'(o + 2'd1);
        rx = sx + dir_dx(mis); ry = sy + dir_dy(mis);
        if (up(rx, ry) && !(rx == tx && ry == ty) && mis != s_in) begin
          int qx, qy;
          cur = make_addr(rx, ry); dst = s_dst; uniq = 1'b0;
          in_dir = dir_e'(mis ^ 2'd2); avail = nb_av(rx, ry);
          #1;
          // The sender's plain XY step.
          qx = sx; qy = sy;
          if (tx != sx) qx = sx + ((tx > sx) ? 1 : -1);
          else          qy = sy + ((ty > sy) ? 1 : -1);
          if (qx == rx && qy == ry) continue;   // the misroute happens to be the XY step
          if (err) caught++;
          else begin
            check(offset_nb(qx - rx, qy - ry) >= 0 && !up(qx, qy),
                  $sformatf("misroute (%0d,%0d)->(%0d,%0d) to (%0d,%0d) accepted without cause",
                            sx, sy, rx, ry, tx, ty));
            excused++;
          end
        end
      end
    end
    $display("sweep: %0d legal routes accepted, %0d misroutes caught, %0d excused by a bypass",
             legal, caught, excused);
    check(legal > 1000 && caught > 500 && excused > 0, "sweep covered all outcomes");
  endtask
endmodule
