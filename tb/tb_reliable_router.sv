// tb_reliable_router: end-to-end test of one router at (1,1) of a 4x4 mesh,
// with its processing element on the west side and default parameters.
//
// The testbench plays the four link partners: each has a queue of code
// words to send (ready/valid as data_request/occ) and a sink that records
// and checks what the router sends. Packets carry a unique number in their
// data flits; a scoreboard knows the output port and content each packet
// must arrive with. Phases:
//   1. clean traffic from all sides, plain XY routes, no stalls; the latency
//      of a lone header (2 cycles link to link) and one flit per cycle;
//   2. the same with random back-pressure (stalls);
//   3. single-bit errors (corrected, counted in the journal) and a
//      double-bit error in a data flit (Nack);
//   4. an unavailable east neighbour: packets bypass it via north;
//   5. misrouted headers from the south neighbour: routing error pulses,
//      journal fills to permanent, south then treated as unavailable;
//   6. loopback: a packet waiting for a stalled east link is looped back
//      when east becomes unavailable, and leaves by north;
//   7. a faulty input port refuses traffic; four faulty ports make the
//      router unavailable.
// Each mechanism is counted; one that never happened is a failure.
module tb_reliable_router;
  import noc_pkg::*;
  import tb_util_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  addr_t             id;
  logic [3:0]        port_fault;
  logic [7:0]        dai;
  logic              avail;
  cw_t               data_in  [4];
  logic [3:0]        req_in, occ_out, req_out, occ_in, nack, looping, rerr;
  cw_t               data_out [4];
  logic [2:0]        rjournal [4];
  logic              jclear;
  logic [7:0]        ccnt [4], ucnt [4];
  logic [9:0]        utotal;

  always #5 clk = ~clk;

  reliable_router dut (
    .clk, .rst_n, .id_i(id), .port_fault_i(port_fault), .dai_i(dai), .avail_o(avail),
    .data_in_i(data_in), .data_request_in_i(req_in), .occ_out_o(occ_out),
    .data_out_o(data_out), .data_request_out_o(req_out), .occ_in_i(occ_in),
    .nack_o(nack), .looping_o(looping), .rerr_o(rerr), .route_journal_o(rjournal),
    .journal_clear_i(jclear), .corr_cnt_o(ccnt), .uncorr_cnt_o(ucnt),
    .uncorr_total_o(utotal));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- sources
  cw_t src_q [4][$];
  always_comb
    for (int p = 0; p < 4; p++) begin
      req_in[p]  = src_q[p].size() > 0;
      data_in[p] = req_in[p] ? src_q[p][0] : '0;
    end

  // ------------------------------------------------------------ scoreboard
  typedef struct {
    dir_e  port;
    flit_t f [4];
    logic  dontcare [4];
  } pkt_t;
  pkt_t exp_pkts [int];          // by packet number
  int   next_id = 1;
  flit_t rx [4][$];              // flits being assembled per output port
  int   delivered = 0;
  int   n_stall = 0, n_corr = 0, n_nack = 0, n_bypass = 0, n_rerr = 0, n_loop = 0,
        n_perm = 0, n_refused = 0, n_unavail = 0;
  int   first_out_cycle [4];
  int   pkt_span [4];
  int   cycle = 0;

  always @(posedge clk) cycle++;

  always @(posedge clk) if (rst_n) begin
    automatic logic [3:0] pop = req_in & ~occ_out;
    for (int p = 0; p < 4; p++) begin
      if (req_out[p] && occ_in[p]) n_stall++;
      if (req_out[p] && !occ_in[p]) begin
        flit_t f;
        f = ref_extract(data_out[p]);
        check(data_out[p] == ref_encode(f), "output word is a clean code word");
        if (rx[p].size() == 0) first_out_cycle[p] = cycle;
        rx[p].push_back(f);
        if (rx[p].size() == PKT_LEN) begin
          int key;
          pkt_span[p] = cycle - first_out_cycle[p];
          key = int'(rx[p][1][14:5]);
          if (!exp_pkts.exists(key)) check(0, $sformatf("unknown packet %0d on port %0d", key, p));
          else begin
            pkt_t e;
            e = exp_pkts[key];
            check(e.port == dir_e'(p), $sformatf("packet %0d on port %0d, expected %s", key,
                                                 p, e.port.name()));
            // Header compared without its unique-path bit.
            check(rx[p][0][15] && rx[p][0][14:7] == e.f[0][14:7] && rx[p][0][5:0] == e.f[0][5:0],
                  $sformatf("packet %0d header %h exp %h", key, rx[p][0], e.f[0]));
            for (int k = 1; k < PKT_LEN; k++)
              if (!e.dontcare[k]) check(rx[p][k] == e.f[k], $sformatf("packet %0d flit %0d", key, k));
            exp_pkts.delete(key);
            delivered++;
          end
          rx[p].delete();
        end
      end
    end
    n_nack += $countones(nack);
    n_rerr += $countones(rerr);
    n_loop += (looping != 0);
    #1;
    for (int p = 0; p < 4; p++) if (pop[p]) void'(src_q[p].pop_front());
  end

  // Queue a packet on input port `from` to (dx,dy), expected out of port `to`.
  // err_flit/err_mask put a bit error into one of its words.
  function automatic int send_pkt(input dir_e from, input int dx, input int dy, input dir_e to,
                                  input logic uq = 0, input int err_flit = -1,
                                  input cw_t err_mask = '0);
    pkt_t e;
    int   id_n;
    id_n = next_id++;
    e.port = to;
    e.f[0] = make_hdr(make_addr(dx, dy), make_addr(dx, dy), uq, 6'(id_n));
    e.f[0][14:11] = 4'(id_n);                   // source field: any value
    for (int k = 1; k < PKT_LEN; k++) e.f[k] = make_data({10'(id_n), 5'(k)});
    for (int k = 0; k < PKT_LEN; k++) begin
      cw_t c;
      c = ref_encode(e.f[k]);
      e.dontcare[k] = 1'b0;
      if (k == err_flit) begin
        c ^= err_mask;
        if ($countones(err_mask) > 1) e.dontcare[k] = 1'b1;
      end
      src_q[from].push_back(c);
    end
    exp_pkts[id_n] = e;
    return id_n;
  endfunction

  task automatic wait_idle(input int max_cycles);
    int c;
    c = 0;
    while ((exp_pkts.size() != 0 || src_q[0].size() + src_q[1].size() + src_q[2].size() +
            src_q[3].size() != 0) && c < max_cycles) begin
      @(negedge clk);
      c++;
    end
    repeat (4) @(negedge clk);
  endtask

  // Expected XY output at (1,1) with everything available, local port west,
  // for a destination with dx >= 1 (so that west is never a through-route).
  function automatic dir_e xy_out(input int dx, input int dy);
    if (dx > 1) return DIR_E;
    if (dy > 1) return DIR_N;
    if (dy < 1) return DIR_S;
    return DIR_W;
  endfunction

  initial begin
    int k0, t_in;
    id = make_addr(1, 1);
    port_fault = '0;
    dai = 8'hFF;
    occ_in = '0;
    jclear = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- 1. latency and streaming of a lone packet, local to (1,3)
    t_in = cycle;
    void'(send_pkt(DIR_W, 1, 3, DIR_N, 1));
    wait_idle(100);
    check(first_out_cycle[DIR_N] - t_in == 2,
          $sformatf("header latency %0d cycles", first_out_cycle[DIR_N] - t_in));
    check(delivered == 1, "lone packet delivered");
    check(pkt_span[DIR_N] == PKT_LEN - 1, $sformatf("packet took %0d cycles", pkt_span[DIR_N] + 1));

    // ---- 1b. clean traffic, XY routes, from neighbours whose XY choice
    // is this router (so that no routing error is raised).
    for (int n = 0; n < 60; n++) begin
      int dx, dy;
      dir_e from, to;
      dx = 1 + $urandom_range(2);
      dy = $urandom_range(3);
      to = xy_out(dx, dy);
      // A west-side neighbour does not exist here (PE), so sources are the
      // PE, or N/S neighbours for packets already in column 1, or the east
      // neighbour for packets to (1,y).
      if (dx == 1 && to != DIR_W) from = (to == DIR_N) ? DIR_S : DIR_N;
      else if (dx == 1) from = dir_e'($urandom_range(2));
      else from = DIR_W;
      if (from == to) from = DIR_W;
      void'(send_pkt(from, dx, dy, to, (from == DIR_E && dx == 1 && dy != 1)));
    end
    wait_idle(3000);
    check(exp_pkts.size() == 0, $sformatf("phase 1: %0d packets missing", exp_pkts.size()));
    check(n_rerr == 0, $sformatf("phase 1: %0d routing errors", n_rerr));

    // ---- 2. the same with random back-pressure
    fork
      begin
        for (int n = 0; n < 60; n++) begin
          int dx, dy;
          dx = 1 + $urandom_range(2);
          dy = $urandom_range(3);
          void'(send_pkt(DIR_W, dx, dy, (xy_out(dx, dy) == DIR_W) ? DIR_W : xy_out(dx, dy)));
        end
      end
      begin
        for (int c = 0; c < 1500; c++) begin
          @(negedge clk);
          occ_in = 4'($urandom) & 4'($urandom);
        end
        occ_in = '0;
      end
    join
    wait_idle(3000);
    check(exp_pkts.size() == 0, $sformatf("phase 2: %0d packets missing", exp_pkts.size()));

    // ---- 3. bit errors: single in header and data, double in data
    void'(send_pkt(DIR_W, 2, 1, DIR_E, 0, 0, 22'h000200));
    void'(send_pkt(DIR_W, 3, 2, DIR_E, 0, 2, 22'h000001));
    void'(send_pkt(DIR_W, 1, 0, DIR_S, 0, 3, 22'h011000));
    wait_idle(200);
    n_corr = int'(ccnt[DIR_W]);
    check(n_corr == 2, $sformatf("corrected %0d", n_corr));
    check(n_nack == 1 && ucnt[DIR_W] == 1 && utotal == 1, $sformatf("nacks %0d", n_nack));
    check(exp_pkts.size() == 0, "phase 3 delivered");

    // ---- 4. east unavailable: (3,1) goes north (NE available)
    dai[NB_E] = 1'b0;
    @(negedge clk);
    k0 = delivered;
    void'(send_pkt(DIR_W, 3, 1, DIR_N));
    void'(send_pkt(DIR_W, 2, 3, DIR_N));
    // and with NE unavailable too, south
    wait_idle(200);
    dai[NB_NE] = 1'b0;
    @(negedge clk);
    void'(send_pkt(DIR_W, 3, 1, DIR_S));
    wait_idle(200);
    n_bypass = delivered - k0;
    check(exp_pkts.size() == 0, "phase 4 delivered");
    dai = 8'hFF;

    // ---- 5. misrouted headers from the south neighbour (1,0): towards
    // (3,0) its XY choice was (2,0), which is available.
    k0 = n_rerr;
    for (int n = 0; n < 3; n++) void'(send_pkt(DIR_S, 3, 0, DIR_E));
    wait_idle(300);
    check(n_rerr - k0 == 3, $sformatf("routing errors %0d", n_rerr - k0));
    check(rjournal[DIR_S] == 3'b111, $sformatf("south journal %b", rjournal[DIR_S]));
    n_perm += (rjournal[DIR_S] == 3'b111);
    // South now counts as unavailable: (1,0) from north leaves east
    // (SE available), with the unique bit clear.
    void'(send_pkt(DIR_N, 1, 0, DIR_E));
    wait_idle(200);
    check(exp_pkts.size() == 0, "phase 5 delivered");
    rst_n = 0;                              // clear the journals
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- 6. loopback: east link stalled, packet waits, east goes away
    occ_in[DIR_E] = 1'b1;
    void'(send_pkt(DIR_W, 3, 1, DIR_N));    // will leave north after looping
    repeat (10) @(negedge clk);
    check(exp_pkts.size() == 1 && req_out[DIR_E], "packet waiting for east");
    dai[NB_E] = 1'b0;
    wait_idle(200);
    check(exp_pkts.size() == 0, "looped packet delivered north");
    check(n_loop > 0, "loop observed");
    occ_in = '0;
    dai = 8'hFF;

    // ---- 7. port faults
    port_fault[DIR_S] = 1'b1;
    @(negedge clk);
    k0 = src_q[DIR_S].size();
    void'(send_pkt(DIR_S, 1, 3, DIR_N));
    repeat (20) @(negedge clk);
    check(occ_out[DIR_S] && src_q[DIR_S].size() == k0 + PKT_LEN && avail, "faulty port refuses");
    n_refused += (src_q[DIR_S].size() == k0 + PKT_LEN);
    port_fault = 4'hF;
    #1;
    check(!avail, "all ports faulty: unavailable");
    n_unavail += !avail;
    port_fault = '0;
    wait_idle(200);
    check(exp_pkts.size() == 0, "phase 7 delivered after repair");

    // ---- mechanism coverage
    $display("stalls=%0d corrected=%0d nacks=%0d bypass=%0d rerr=%0d loop=%0d perm=%0d refused=%0d unavail=%0d delivered=%0d",
             n_stall, n_corr, n_nack, n_bypass, n_rerr, n_loop, n_perm, n_refused, n_unavail, delivered);
    check(n_stall > 0,   "stall happened");
    check(n_corr > 0,    "correction happened");
    check(n_nack > 0,    "nack happened");
    check(n_bypass == 3, "bypass happened");
    check(n_rerr > 0,    "routing error detected");
    check(n_loop > 0,    "loopback happened");
    check(n_perm > 0,    "permanent journal reached");
    check(n_refused > 0, "faulty port refused");
    check(n_unavail > 0, "router unavailable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
