// tb_output_fsm: the east output allocator with four input ports that offer
// 4-flit packets, most of them for east and some for other outputs. The
// downstream ready is random. Checks: every packet for east comes out once,
// its four flits back to back and unchanged, nothing for other outputs is
// taken, at most one input is taken per cycle, competing inputs are served
// in round-robin order, and an uncontended header is taken in the cycle it
// is offered and appears at the output one cycle later.
module tb_output_fsm;
  import noc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] req_valid, req_hdr, take;
  dir_e  req_dir  [4];
  flit_t req_flit [4];
  flit_t out_flit;
  logic  out_valid, out_ready;

  // Per input: list of packets (flits) and their outputs.
  flit_t src_q [4][$];
  dir_e  dir_q [4][$];
  int    pos   [4];
  flit_t exp_q [$];
  int    expected = 0, got = 0;
  int    last_winner = -1, rr_checked = 0;
  int    owner = -1, left = 0;

  always #5 clk = ~clk;

  output_fsm #(.PORT(DIR_E), .PKT_FLITS(4)) dut (
    .clk, .rst_n, .req_valid_i(req_valid), .req_dir_i(req_dir), .req_hdr_i(req_hdr),
    .req_flit_i(req_flit), .take_o(take), .out_flit_o(out_flit),
    .out_valid_o(out_valid), .out_ready_i(out_ready));

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

  // Inputs present the head of their list.
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      req_valid[i] = src_q[i].size() > 0;
      req_flit[i]  = req_valid[i] ? src_q[i][0] : '0;
      req_hdr[i]   = req_flit[i][15];
      req_dir[i]   = req_valid[i] ? dir_q[i][0] : DIR_N;
    end
  end

  logic [3:0] hdr_offer;
  always @(posedge clk) if (rst_n) begin
    check($countones(take) <= 1, "one take per cycle");
    // Round robin: among headers for east, the winner follows the last one.
    hdr_offer = '0;
    for (int i = 0; i < 4; i++) hdr_offer[i] = req_valid[i] && req_hdr[i] && req_dir[i] == DIR_E;
    for (int i = 0; i < 4; i++) if (take[i]) begin
      check(req_dir[i] == DIR_E, "took a flit for another output");
      if (req_hdr[i]) begin
        if ($countones(hdr_offer) > 1 && last_winner >= 0) begin
          int w;
          w = -1;
          for (int k = 1; k <= 4 && w < 0; k++)
            if (hdr_offer[(last_winner + k) % 4]) w = (last_winner + k) % 4;
          rr_checked++;
          check(w == i, $sformatf("round robin: took %0d expected %0d", i, w));
        end
        last_winner = i;
        check(left == 0, "header before the previous packet ended");
        owner = i;
        left  = 3;
      end else begin
        check(i == owner && left > 0, $sformatf("data flit from %0d inside packet of %0d", i, owner));
        left--;
      end
      exp_q.push_back(src_q[i][0]);
    end
    if (out_valid && out_ready) begin
      got++;
      if (exp_q.size() == 0) check(0, "unexpected output");
      else check(out_flit == exp_q.pop_front(), "flit order/content");
    end
    // Pop after the edge so the design samples this cycle's offers.
    begin
      automatic logic [3:0] tk = take;
      #1;
      for (int i = 0; i < 4; i++) if (tk[i]) begin
        void'(src_q[i].pop_front());
        void'(dir_q[i].pop_front());
      end
    end
  end

  // The other-direction packets are removed by a pretend other output.
  always @(negedge clk) if (rst_n)
    for (int i = 0; i < 4; i++)
      if (src_q[i].size() > 0 && dir_q[i][0] != DIR_E && $urandom_range(1))
        begin void'(src_q[i].pop_front()); void'(dir_q[i].pop_front()); end

  initial begin
    out_ready = 1;
    repeat (3) @(posedge clk);
    // Latency of a lone header: taken at once, visible next cycle.
    @(negedge clk);
    rst_n = 1;
    src_q[2].push_back({1'b1, 15'h0ABC}); dir_q[2].push_back(DIR_E);
    for (int k = 0; k < 3; k++) begin src_q[2].push_back({1'b0, 15'(k)}); dir_q[2].push_back(DIR_E); end
    expected += 4;
    #1;
    check(take[2], "lone header taken at once");
    @(negedge clk);
    check(out_valid && out_flit == {1'b1, 15'h0ABC}, "header at output next cycle");
    repeat (10) @(negedge clk);
    // Random load.
    for (int p = 0; p < 200; p++) begin
      int i;
      dir_e d;
      i = $urandom_range(3);
      d = ($urandom_range(3) == 0) ? DIR_N : DIR_E;
      src_q[i].push_back({1'b1, 15'(p)}); dir_q[i].push_back(d);
      for (int k = 0; k < 3; k++) begin
        src_q[i].push_back({1'b0, 3'(i), 12'(p * 4 + k)}); dir_q[i].push_back(d);
      end
      if (d == DIR_E) expected += 4;
    end
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      out_ready = ($urandom_range(3) != 0);
    end
    out_ready = 1;
    repeat (20) @(negedge clk);
    check(got == expected, $sformatf("delivered %0d of %0d flits", got, expected));
    check(rr_checked > 10, $sformatf("round robin exercised %0d times", rr_checked));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
