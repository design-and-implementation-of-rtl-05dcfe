// tb_loopback_module: one port's link interface with 4-flit packets.
//   1. Neighbour available: router output packets go out on data_out with
//      data_request_out; occ_in stalls them without loss.
//   2. Neighbour traffic enters the router input unchanged, not marked as
//      looped back.
//   3. Neighbour unavailable at a header: the whole packet comes back on the
//      router input, marked lb, nothing is requested from the neighbour,
//      and occ_out is high while the loop carries it.
//   4. A neighbour packet already entering is not cut: the looped packet
//      waits for its end.
//   5. A disabled port (en low) refuses neighbour traffic.
module tb_loopback_module;
  import noc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic en, unav;
  cw_t  din, dout, rtout, rtin;
  logic req_in, occ_out, req_out, occ_in;
  logic rtout_v, rtout_r, rtin_v, rtin_lb, rtin_r, looping;

  cw_t  out_q [$];          // router output words still to send
  cw_t  nb_q  [$];          // neighbour words still to send
  cw_t  got_nb [$];         // seen on the link out
  cw_t  got_rt [$];         // seen at the router input
  logic got_lb [$];
  int   occ_while_loop = 0, loop_cycles = 0;

  always #5 clk = ~clk;

  loopback_module #(.PKT_FLITS(4)) dut (
    .clk, .rst_n, .en_i(en), .unavailable_i(unav),
    .data_in_i(din), .data_request_in_i(req_in), .occ_out_o(occ_out),
    .data_out_o(dout), .data_request_out_o(req_out), .occ_in_i(occ_in),
    .rt_out_i(rtout), .rt_out_valid_i(rtout_v), .rt_out_ready_o(rtout_r),
    .rt_in_o(rtin), .rt_in_valid_o(rtin_v), .rt_in_lb_o(rtin_lb), .rt_in_ready_i(rtin_r),
    .looping_o(looping));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign rtout_v = out_q.size() > 0;
  assign rtout   = rtout_v ? out_q[0] : '0;
  assign req_in  = nb_q.size() > 0;
  assign din     = req_in ? nb_q[0] : '0;

  always @(posedge clk) if (rst_n) begin
    if (looping) begin
      loop_cycles++;
      if (occ_out) occ_while_loop++;
      check(!req_out, "no request to an unavailable neighbour");
    end
    if (req_out && !occ_in) got_nb.push_back(dout);
    if (rtin_v && rtin_r) begin got_rt.push_back(rtin); got_lb.push_back(rtin_lb); end
    // Pop after the edge so the design samples this cycle's words.
    begin
      automatic bit po = rtout_v && rtout_r;
      automatic bit pn = req_in && !occ_out;
      #1;
      if (po) void'(out_q.pop_front());
      if (pn) void'(nb_q.pop_front());
    end
  end

  task automatic pkt(ref cw_t q [$], input int base);
    for (int k = 0; k < 4; k++) q.push_back(cw_t'(base + k));
  endtask

  initial begin
    en = 1; unav = 0; occ_in = 0; rtin_r = 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // 1. Out to the neighbour with stalls.
    pkt(out_q, 'h100); pkt(out_q, 'h200);
    for (int c = 0; c < 30; c++) begin @(negedge clk); occ_in = $urandom_range(1); end
    occ_in = 0;
    repeat (5) @(negedge clk);
    check(got_nb.size() == 8, $sformatf("sent %0d of 8", got_nb.size()));
    for (int k = 0; k < 8 && k < got_nb.size(); k++)
      check(got_nb[k] == cw_t'((k < 4 ? 'h100 : 'h200 - 4) + k), "link out order");
    check(got_rt.size() == 0, "nothing looped");
    // 2. In from the neighbour.
    pkt(nb_q, 'h300);
    repeat (8) @(negedge clk);
    check(got_rt.size() == 4 && got_rt[0] == 'h300 && got_rt[3] == 'h303 && !got_lb[0],
          "neighbour packet enters");
    got_rt.delete(); got_lb.delete();
    // 3. Loopback when the neighbour is unavailable.
    unav = 1;
    pkt(out_q, 'h400);
    repeat (8) @(negedge clk);
    check(got_rt.size() == 4 && got_lb.size() == 4, $sformatf("looped %0d", got_rt.size()));
    for (int k = 0; k < got_rt.size(); k++) check(got_rt[k] == cw_t'('h400 + k) && got_lb[k], "looped word");
    check(loop_cycles >= 4 && occ_while_loop == loop_cycles, "occ_out while looping");
    check(got_nb.size() == 8, "nothing sent to the unavailable neighbour");
    got_rt.delete(); got_lb.delete();
    // 4. Neighbour packet in flight, then a loop request: no interleaving.
    rtin_r = 0;
    pkt(nb_q, 'h500);
    @(negedge clk); rtin_r = 1;
    @(negedge clk);                  // first neighbour word taken
    pkt(out_q, 'h600);
    repeat (12) @(negedge clk);
    check(got_rt.size() == 8, $sformatf("both packets in: %0d", got_rt.size()));
    if (got_rt.size() == 8) begin
      for (int k = 0; k < 4; k++) check(got_rt[k] == cw_t'('h500 + k) && !got_lb[k], "neighbour first");
      for (int k = 0; k < 4; k++) check(got_rt[4+k] == cw_t'('h600 + k) && got_lb[4+k], "then looped");
    end
    // 5. Disabled port.
    unav = 0; en = 0;
    got_rt.delete(); got_lb.delete();
    pkt(nb_q, 'h700);
    repeat (6) @(negedge clk);
    check(got_rt.size() == 0 && occ_out, "disabled port refuses");
    en = 1;
    repeat (6) @(negedge clk);
    check(got_rt.size() == 4, "enabled again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
