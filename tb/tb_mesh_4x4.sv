// tb_mesh_4x4: packet throughput and latency of a 4x4 mesh of routers.
//
// Sixteen routers at default parameters are wired as a 4x4 mesh: each
// router's N/E/S/W link pair goes to the matching port of its neighbour,
// and each router's availability output feeds the diagonal availability
// inputs of its eight neighbours (positions outside the mesh read as
// unavailable). The twelve routers on the edge carry a processing element
// (PE) on an outer side (west on column 0, east on column 3, otherwise
// south on row 0 and north on row 3); the four inner routers have none.
// The testbench plays the twelve PEs.
//
// Phase 1: every PE sends packets to random other PEs, sinks always ready.
// Phase 2: the inner router (2,1) is made unavailable (all its input ports
// faulty), PE sinks stall at random and some injected words carry a
// single-bit error. Packets whose XY path crossed (2,1) must go round it.
// Phase 3: (2,1) is repaired; while traffic flows, its input ports then all
// fail at a moment when a neighbour offers it a header and no packet is
// half-way across a link into it. That header, and the packets queued
// behind it for (2,1), must be looped back and routed round. This phase is
// kept light: with twice the load the detours round (2,1) can close a ring
// of eight routers that all wait on each other (see the routing notes).
// In all phases every packet must reach the right PE intact, no routing
// error may be reported, and the testbench prints the measured packet
// latency (head injection to tail reception, in cycles) and throughput
//   TP = packets completed * packet length / (number of PEs * total time)
// in bits per cycle per PE.
module tb_mesh_4x4;
  import noc_pkg::*;
  import tb_util_pkg::*;

  localparam int D  = 4;
  localparam int NR = D * D;
  localparam int NPK_1 = 20;      // packets per PE, phase 1
  localparam int NPK_2 = 12;      // packets per PE, phase 2
  localparam int NPK_3 = 6;       // packets per PE, phase 3

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- topology
  function automatic bit has_pe(input int x, input int y);
    return x == 0 || x == D - 1 || y == 0 || y == D - 1;
  endfunction

  function automatic dir_e pe_side(input int x, input int y);
    if (x == 0)     return DIR_W;
    if (x == D - 1) return DIR_E;
    if (y == 0)     return DIR_S;
    return DIR_N;
  endfunction

  function automatic bit in_mesh(input int x, input int y);
    return x >= 0 && x < D && y >= 0 && y < D;
  endfunction

  cw_t        din  [NR][4];
  cw_t        dout [NR][4];
  logic [3:0] rqin [NR], ocout [NR], rqout [NR], ocin [NR], nack [NR], loop [NR], rerr [NR];
  logic [3:0] pfault [NR];
  logic [7:0] dai [NR];
  logic       avail [NR];
  logic [2:0] rj [NR][4];
  logic [7:0] cc [NR][4], uc [NR][4];
  logic [9:0] ut [NR];

  for (genvar x = 0; x < D; x++) begin : g_x
    for (genvar y = 0; y < D; y++) begin : g_y
      localparam int I = x * D + y;
      reliable_router #(.LOCAL_PORT(pe_side(x, y)), .LOCAL_EN(has_pe(x, y))) u_r (
        .clk, .rst_n, .id_i(make_addr(x, y)), .port_fault_i(pfault[I]), .dai_i(dai[I]),
        .avail_o(avail[I]), .data_in_i(din[I]), .data_request_in_i(rqin[I]),
        .occ_out_o(ocout[I]), .data_out_o(dout[I]), .data_request_out_o(rqout[I]),
        .occ_in_i(ocin[I]), .nack_o(nack[I]), .looping_o(loop[I]), .rerr_o(rerr[I]),
        .route_journal_o(rj[I]), .journal_clear_i(1'b0), .corr_cnt_o(cc[I]),
        .uncorr_cnt_o(uc[I]), .uncorr_total_o(ut[I]));
    end
  end

  // PE side: queues of words to inject, random sink stalls.
  cw_t  pe_q [NR][$];
  logic pe_occ [NR];

  always_comb begin
    for (int x = 0; x < D; x++)
      for (int y = 0; y < D; y++) begin
        int i;
        i = x * D + y;
        for (int p = 0; p < 4; p++) begin
          int nx, ny, j;
          nx = x + dir_dx(dir_e'(p));
          ny = y + dir_dy(dir_e'(p));
          j  = nx * D + ny;
          if (in_mesh(nx, ny)) begin
            din[i][p]  = dout[j][p ^ 2];
            rqin[i][p] = rqout[j][p ^ 2];
            ocin[i][p] = ocout[j][p ^ 2];
          end else if (has_pe(x, y) && p == int'(pe_side(x, y))) begin
            rqin[i][p] = pe_q[i].size() > 0;
            din[i][p]  = rqin[i][p] ? pe_q[i][0] : '0;
            ocin[i][p] = pe_occ[i];
          end else begin
            din[i][p]  = '0;
            rqin[i][p] = 1'b0;
            ocin[i][p] = 1'b1;
          end
        end
      end
  end

  // Availability: each router's avail_o feeds its eight neighbours.
  always_comb begin
    for (int x = 0; x < D; x++)
      for (int y = 0; y < D; y++) begin
        int i;
        i = x * D + y;
        for (int ox = -1; ox <= 1; ox++)
          for (int oy = -1; oy <= 1; oy++)
            if (ox != 0 || oy != 0) begin
              int nb;
              nb = offset_nb(ox, oy);
              if (in_mesh(x + ox, y + oy))
                dai[i][nb] = avail[(x + ox) * D + y + oy];
              else
                dai[i][nb] = has_pe(x, y) && nb == dir_nb(pe_side(x, y));
            end
      end
  end

  // ------------------------------------------------------------ scoreboard
  typedef struct {
    int    dst;
    flit_t f [4];
    int    t_inj;
  } pkt_t;
  pkt_t  exp_pkts [int];
  flit_t rx [NR][$];
  int    next_id = 1, delivered = 0, lat_sum = 0, lat_max = 0, n_rerr = 0, n_loop = 0;
  int    cycle = 0, hdr_pending [NR][$];

  always @(posedge clk) cycle++;

  always @(posedge clk) if (rst_n) begin
    automatic bit pop [NR];
    for (int x = 0; x < D; x++)
      for (int y = 0; y < D; y++) begin
        int i, p;
        i = x * D + y;
        pop[i] = 1'b0;
        n_rerr += $countones(rerr[i]);
        n_loop += $countones(loop[i]);
        if (!has_pe(x, y)) continue;
        p = int'(pe_side(x, y));
        if (rqin[i][p] && !ocout[i][p]) pop[i] = 1'b1;
        // Injection time of a header: first word of each 4-word group.
        if (pop[i] && hdr_pending[i].size() > 0 && hdr_pending[i][0] >= 0) begin
          int id_n;
          id_n = hdr_pending[i][0];
          if (exp_pkts.exists(id_n)) exp_pkts[id_n].t_inj = cycle;
        end
        if (pop[i] && hdr_pending[i].size() > 0) void'(hdr_pending[i].pop_front());
        if (rqout[i][p] && !ocin[i][p]) begin
          flit_t f;
          f = ref_extract(dout[i][p]);
          check(dout[i][p] == ref_encode(f), "clean code word at PE");
          rx[i].push_back(f);
          if (rx[i].size() == PKT_LEN) begin
            int key;
            key = int'(rx[i][1][14:5]);
            if (!exp_pkts.exists(key)) check(0, $sformatf("unknown packet %0d at PE %0d", key, i));
            else begin
              pkt_t e;
              e = exp_pkts[key];
              check(e.dst == i, $sformatf("packet %0d at router %0d, expected %0d", key, i, e.dst));
              check(rx[i][0][14:7] == e.f[0][14:7] && rx[i][0][5:0] == e.f[0][5:0], "header");
              for (int k = 1; k < PKT_LEN; k++) check(rx[i][k] == e.f[k], "data flit");
              lat_sum += cycle - e.t_inj;
              if (cycle - e.t_inj > lat_max) lat_max = cycle - e.t_inj;
              exp_pkts.delete(key);
              delivered++;
            end
            rx[i].delete();
          end
        end
      end
    #1;
    for (int i = 0; i < NR; i++) if (pop[i]) void'(pe_q[i].pop_front());
  end

  // Queue one packet at PE `s` for PE `t`; one word may carry a bit error.
  function automatic void send_pkt(input int s, input int t, input cw_t err = '0);
    pkt_t e;
    int   id_n, sx, sy, tx, ty;
    id_n = next_id++;
    sx = s / D; sy = s % D; tx = t / D; ty = t % D;
    e.dst = t;
    e.t_inj = 0;
    e.f[0] = make_hdr(make_addr(sx, sy), make_addr(tx, ty), 1'b0, 6'(id_n));
    for (int k = 1; k < PKT_LEN; k++) e.f[k] = make_data({10'(id_n), 5'(k)});
    for (int k = 0; k < PKT_LEN; k++) begin
      pe_q[s].push_back(ref_encode(e.f[k]) ^ ((k == 1) ? err : '0));
      hdr_pending[s].push_back(k == 0 ? id_n : -1);
    end
    exp_pkts[id_n] = e;
  endfunction

  // Flits accepted on each link into (2,1), modulo the packet length.
  int cnt21 [4] = '{default: 0};

  function automatic int nb21(input int p);
    return (2 + dir_dx(dir_e'(p))) * D + 1 + dir_dy(dir_e'(p));
  endfunction

  always @(posedge clk) if (rst_n)
    for (int p = 0; p < 4; p++)
      if (rqout[nb21(p)][p ^ 2] && !ocin[nb21(p)][p ^ 2]) cnt21[p] = (cnt21[p] + 1) % PKT_LEN;

  // A neighbour offers (2,1) a header and no packet is half-way into it.
  function automatic bit hdr_offered_21();
    bit offered;
    offered = 1'b0;
    for (int p = 0; p < 4; p++) begin
      if (cnt21[p] != 0) return 1'b0;
      if (rqout[nb21(p)][p ^ 2] && ref_extract(dout[nb21(p)][p ^ 2])[FLIT_W-1]) offered = 1'b1;
    end
    return offered;
  endfunction

  int pes [$];

  function automatic int rand_other_pe(input int s);
    int t;
    do t = pes[$urandom_range(pes.size() - 1)]; while (t == s);
    return t;
  endfunction

  task automatic run_phase(input string name, input int npk, input bit stall, input bit errs,
                           output int crossed);
    int t0, t1, n0, l0;
    crossed = 0;
    n0 = delivered;
    l0 = lat_sum;
    lat_max = 0;
    foreach (pes[k])
      for (int n = 0; n < npk; n++) begin
        int s, t;
        s = pes[k];
        t = rand_other_pe(s);
        // XY path crosses (2,1)?  X leg on row sy, then Y leg on column tx.
        begin
          int sx, sy, tx, ty;
          sx = s / D; sy = s % D; tx = t / D; ty = t % D;
          if ((sy == 1 && ((sx < 2 && tx >= 2) || (sx > 2 && tx <= 2))) ||
              (tx == 2 && ((sy < 1 && ty >= 1) || (sy > 1 && ty <= 1))))
            crossed++;
        end
        send_pkt(s, t, (errs && n % 4 == 1) ? (cw_t'(1) << $urandom_range(CW_W - 1)) : '0);
      end
    t0 = cycle;
    while (exp_pkts.size() != 0 && cycle - t0 < 60000) begin
      @(negedge clk);
      if (stall) foreach (pe_occ[i]) pe_occ[i] = ($urandom_range(3) == 0);
    end
    t1 = cycle;
    foreach (pe_occ[i]) pe_occ[i] = 1'b0;
    check(exp_pkts.size() == 0, $sformatf("%s: %0d packets not delivered", name, exp_pkts.size()));
    $display("%s: %0d packets of %0d flits x %0d bits from %0d PEs in %0d cycles",
             name, delivered - n0, PKT_LEN, FLIT_W, pes.size(), t1 - t0);
    $display("%s: throughput %0.3f bits/cycle per PE, latency mean %0.1f max %0d cycles, %0d packets crossed (2,1)",
             name, real'((delivered - n0) * PKT_LEN * FLIT_W) / real'(pes.size() * (t1 - t0)),
             real'(lat_sum - l0) / real'(delivered - n0), lat_max, crossed);
  endtask

  initial begin
    int crossed1, crossed2, crossed3, corr_total, loop2;
    for (int i = 0; i < NR; i++) begin
      pfault[i] = '0;
      pe_occ[i] = 1'b0;
      if (has_pe(i / D, i % D)) pes.push_back(i);
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    run_phase("fault-free", NPK_1, 1'b0, 1'b0, crossed1);
    check(n_rerr == 0, $sformatf("fault-free: %0d routing errors", n_rerr));

    // Router (2,1) becomes unavailable.
    pfault[2 * D + 1] = 4'hF;
    repeat (2) @(negedge clk);
    check(!avail[2 * D + 1], "router (2,1) unavailable");
    run_phase("router (2,1) unavailable", NPK_2, 1'b1, 1'b1, crossed2);
    check(crossed2 > 0, "some packets had to bypass (2,1)");
    check(n_rerr == 0, $sformatf("bypass reported as routing error %0d times", n_rerr));
    corr_total = 0;
    for (int i = 0; i < NR; i++) for (int p = 0; p < 4; p++) corr_total += int'(cc[i][p]);
    check(corr_total == pes.size() * NPK_2 / 4, $sformatf("corrected words %0d", corr_total));
    loop2 = n_loop;

    // (2,1) is repaired, then announced unavailable while traffic flows.
    pfault[2 * D + 1] = 4'h0;
    repeat (2) @(negedge clk);
    check(avail[2 * D + 1], "router (2,1) available again");
    fork
      begin
        repeat (20) @(negedge clk);
        do @(negedge clk); while (!hdr_offered_21() && cycle < 100000);
        pfault[2 * D + 1] = 4'hF;
      end
    join_none
    run_phase("(2,1) fails in flight", NPK_3, 1'b1, 1'b0, crossed3);
    check(!avail[2 * D + 1], "(2,1) failed during the phase");
    check(n_loop > loop2, "some packets were looped back");
    check(n_rerr == 0, $sformatf("loopback reported as routing error %0d times", n_rerr));
    $display("loopback cycles %0d", n_loop - loop2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
