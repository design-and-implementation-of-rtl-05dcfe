// tb_input_port: the north input port of a router at (1,1), local port west.
// The testbench sends whole packets as code words and plays the output
// allocator, taking offered flits at random. It checks that:
//   * a header is offered towards its XY direction, with its unique-path bit
//     rewritten, and the rest of the packet follows on the same direction;
//   * a single-bit error is corrected (corr_o) and delivered intact;
//   * a double-bit error in a data flit raises nack_o and the flit still
//     goes on, keeping the packet whole;
//   * a double-bit error in a header raises nack_o and the whole packet is
//     dropped;
//   * a misrouted header from the neighbour raises rerr_o and enters the
//     journal; a looped-back header is not checked.
module tb_input_port;
  import noc_pkg::*;
  import tb_util_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  cw_t   cw;
  logic  valid, lb, ready;
  logic  req_valid, req_hdr, take;
  dir_e  req_dir;
  flit_t req_flit;
  logic  nack, corr, rerr, perm;
  logic [2:0] journal;
  int    n_nack = 0, n_corr = 0, n_rerr = 0;

  typedef struct { flit_t f; dir_e d; } exp_t;
  exp_t  expq [$];

  always #5 clk = ~clk;

  input_port #(.PORT(DIR_N), .LOCAL_PORT(DIR_W), .PKT_FLITS(4)) dut (
    .clk, .rst_n, .cur_i(make_addr(1, 1)), .avail_i(8'hFF),
    .cw_i(cw), .valid_i(valid), .lb_i(lb), .ready_o(ready),
    .req_valid_o(req_valid), .req_dir_o(req_dir), .req_hdr_o(req_hdr),
    .req_flit_o(req_flit), .take_i(take),
    .nack_o(nack), .corr_o(corr), .rerr_o(rerr), .journal_o(journal), .permanent_o(perm));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output allocator model: take at random; compare with the expected list.
  always @(negedge clk) take = ($urandom_range(2) != 0);
  always @(posedge clk) if (rst_n) begin
    n_nack += nack; n_corr += corr; n_rerr += rerr;
    if (req_valid && take) begin
      if (expq.size() == 0) check(0, "unexpected flit");
      else begin
        exp_t e;
        e = expq.pop_front();
        check(req_flit == e.f && req_dir == e.d && req_hdr == e.f[15],
              $sformatf("got %h to %s, exp %h to %s", req_flit, req_dir.name(), e.f, e.d.name()));
      end
    end
  end

  // Send one code word (with optional error mask); wait for ready.
  task automatic send(input flit_t f, input cw_t errmask, input logic from_lb);
    @(negedge clk);
    cw = ref_encode(f) ^ errmask;
    valid = 1;
    lb = from_lb;
    @(posedge clk);
    while (!ready) @(posedge clk);
    @(negedge clk);
    valid = 0;
  endtask

  // A packet to (dx,dy): header plus three data flits. Expected output given.
  task automatic packet(input int dx, input int dy, input logic uq, input dir_e d,
                        input logic exp_uniq, input cw_t hdr_err, input cw_t dat_err,
                        input logic dropped, input logic from_lb);
    flit_t h;
    flit_t dat [3];
    h = make_hdr(make_addr(1, 2), make_addr(dx, dy), uq, 6'($urandom));
    for (int i = 0; i < 3; i++) dat[i] = make_data(15'($urandom));
    if (!dropped) begin
      expq.push_back('{make_hdr(h[14:11], h[10:7], exp_uniq, h[5:0]), d});
      for (int i = 0; i < 3; i++) expq.push_back('{dat[i], d});
    end
    send(h, hdr_err, from_lb);
    for (int i = 0; i < 3; i++) send(dat[i], (i == 1) ? dat_err : '0, from_lb);
  endtask

  initial begin
    cw = '0; valid = 0; lb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // From the north neighbour (1,2): destinations south, east, local. The
    // eastbound ones carry the unique-path bit, as the neighbour's XY choice
    // would have been east.
    packet(1, 0, 0, DIR_S, 0, '0, '0, 0, 0);
    packet(3, 0, 1, DIR_E, 0, '0, '0, 0, 0);
    packet(1, 1, 0, DIR_W, 0, '0, '0, 0, 0);
    // West is the local port: a packet heading west from here leaves south
    // (the arrival port north is banned) with the unique bit set.
    packet(0, 1, 1, DIR_S, 1, '0, '0, 0, 0);
    repeat (20) @(posedge clk);
    check(n_rerr == 0 && journal == 0, "no routing errors so far");
    // Corrected single errors, in header and data.
    packet(2, 1, 1, DIR_E, 0, 22'h000100, 22'h000004, 0, 0);
    repeat (20) @(posedge clk);
    check(n_corr == 2 && n_nack == 0, $sformatf("corrected %0d nack %0d", n_corr, n_nack));
    // Double error in a data flit: Nack, flit goes on (its content is wrong,
    // so it is not compared: expect the flit the decoder produces).
    begin
      flit_t h, bad;
      cw_t m;
      m = 22'h000006;
      h = make_hdr(make_addr(1, 2), make_addr(1, 0), 0, 6'h2A);
      expq.push_back('{h, DIR_S});
      expq.push_back('{make_data(15'h1111), DIR_S});
      // The decoder keeps the data bits as received.
      bad = make_data(15'h2222);
      for (int i = 0; i < 16; i++) if (m[tb_util_pkg::DPOS[i]]) bad[i] = ~bad[i];
      expq.push_back('{bad, DIR_S});
      expq.push_back('{make_data(15'h3333), DIR_S});
      send(h, '0, 0);
      send(make_data(15'h1111), '0, 0);
      send(make_data(15'h2222), m, 0);
      send(make_data(15'h3333), '0, 0);
    end
    repeat (20) @(posedge clk);
    check(n_nack == 1, $sformatf("nack for data %0d", n_nack));
    // Double error in a header: whole packet dropped, one Nack.
    packet(3, 3, 0, DIR_E, 0, 22'h000030, '0, 1, 0);
    repeat (20) @(posedge clk);
    check(n_nack == 2, $sformatf("nack for header %0d", n_nack));
    // Misrouted: from north (1,2) towards (3,2) the neighbour should have
    // gone east. Two of them give journal 011.
    packet(3, 2, 0, DIR_E, 0, '0, '0, 0, 0);
    packet(3, 2, 0, DIR_E, 0, '0, '0, 0, 0);
    repeat (20) @(posedge clk);
    check(n_rerr == 2 && journal == 3'b011 && !perm, $sformatf("rerr %0d journal %b", n_rerr, journal));
    // The same packet looped back is not checked; a third neighbour error
    // makes the journal permanent.
    packet(3, 2, 0, DIR_E, 0, '0, '0, 0, 1);
    repeat (20) @(posedge clk);
    check(n_rerr == 2, "looped-back header not checked");
    packet(3, 2, 0, DIR_E, 0, '0, '0, 0, 0);
    repeat (20) @(posedge clk);
    check(journal == 3'b111 && perm, "permanent after three");
    check(expq.size() == 0, $sformatf("%0d flits not delivered", expq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
