// tb_elastic_buffer: drives the two-slot elastic buffer with random valid
// and ready patterns and checks, against a queue model:
//   * flits leave in order and unchanged, and none is lost;
//   * r_in is high exactly when fewer than two flits are held;
//   * w_out is high exactly when at least one flit is held;
//   * with valid and ready always high it passes one flit per cycle with
//     one cycle of latency.
module tb_elastic_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [15:0] d_in, d_out;
  logic w_in, r_in, w_out, r_out;
  logic [15:0] q [$];
  int   sent = 0, got = 0;

  always #5 clk = ~clk;

  elastic_buffer #(.W(16)) dut (.*);

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

  // Scoreboard: sample the handshake just before each rising edge.
  always @(negedge clk) if (rst_n) begin
    check(r_in == (q.size() < 2), $sformatf("r_in %0d with %0d held", r_in, q.size()));
    check(w_out == (q.size() > 0), $sformatf("w_out %0d with %0d held", w_out, q.size()));
    if (w_out && q.size() > 0) check(d_out == q[0], $sformatf("d_out %h exp %h", d_out, q[0]));
  end

  always @(posedge clk) if (rst_n) begin
    if (w_out && r_out) begin
      void'(q.pop_front());
      got++;
    end
    if (w_in && r_in) begin
      q.push_back(d_in);
      sent++;
    end
  end

  initial begin
    int t0, n0;
    w_in = 0; r_out = 0; d_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Random traffic.
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (!(w_in && !r_in)) begin       // keep an offered flit until taken
        w_in = ($urandom_range(3) != 0);
        d_in = 16'($urandom);
      end
      r_out = ($urandom_range(2) != 0);
    end
    // Drain.
    @(negedge clk);
    w_in = 0; r_out = 1;
    repeat (5) @(posedge clk);
    check(sent == got && sent > 1000, $sformatf("sent %0d got %0d", sent, got));
    // Throughput and latency: stream 100 flits.
    @(negedge clk);
    n0 = got;
    t0 = 0;
    w_in = 1;
    d_in = 16'h1234;
    @(posedge clk);
    @(negedge clk);
    check(w_out && d_out == 16'h1234, "one cycle latency");
    for (int c = 1; c < 100; c++) begin
      d_in = 16'(c);
      @(negedge clk);
    end
    w_in = 0;
    @(negedge clk);
    check(got - n0 == 100, $sformatf("streamed %0d flits in 101 cycles", got - n0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
