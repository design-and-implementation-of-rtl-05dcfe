// tb_data_error_journal: random corrected and uncorrectable reports on the
// four ports are counted by a saturating reference model and compared with
// the journal after every clock edge; then saturation at 255 (total 1020),
// clear (which wins over a report in the same cycle) and reset are checked.
module tb_data_error_journal;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear;
  logic [3:0] corr, unc;
  logic [7:0] cc [4], uc [4];
  logic [9:0] total;
  int   ec [4], eu [4];

  always #5 clk = ~clk;

  data_error_journal #(.NP(4), .CNT_W(8)) dut (.clk, .rst_n, .clear_i(clear),
    .corr_i(corr), .uncorr_i(unc), .corr_cnt_o(cc), .uncorr_cnt_o(uc), .uncorr_total_o(total));

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

  // Saturating reference counts, compared after every clock edge.
  task automatic compare(input string what);
    int t;
    t = 0;
    for (int i = 0; i < 4; i++) begin
      check(cc[i] == 8'(ec[i]) && uc[i] == 8'(eu[i]),
            $sformatf("%s port %0d: %0d/%0d exp %0d/%0d", what, i, cc[i], uc[i], ec[i], eu[i]));
      t += eu[i];
    end
    check(total == 10'(t), $sformatf("%s total %0d exp %0d", what, total, t));
  endtask

  task automatic step(input logic [3:0] c, input logic [3:0] u, input logic clr, input string what);
    corr = c; unc = u; clear = clr;
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      if (clr) begin
        ec[i] = 0; eu[i] = 0;
      end else begin
        if (c[i] && ec[i] < 255) ec[i]++;
        if (u[i] && eu[i] < 255) eu[i]++;
      end
    end
    compare(what);
  endtask

  initial begin
    clear = 0; corr = 0; unc = 0;
    foreach (ec[i]) begin ec[i] = 0; eu[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    compare("after reset");
    // Random reports.
    for (int c = 0; c < 200; c++)
      step(4'($urandom) & 4'($urandom), 4'($urandom) & 4'($urandom) & 4'($urandom), 1'b0, "random");
    // Every counter saturates at 255, and the total at 4 x 255.
    for (int c = 0; c < 300; c++) step(4'hF, 4'hF, 1'b0, "saturation");
    check(total == 10'd1020, "total saturates at 1020");
    // A clear wins over a report in the same cycle.
    step(4'hF, 4'hF, 1'b1, "clear");
    check(cc[0] == 0 && uc[3] == 0 && total == 0, "cleared");
    for (int c = 0; c < 20; c++) step(4'($urandom), 4'($urandom), c == 10, "after clear");
    // Reset also empties the journal.
    step(4'hF, 4'h0, 1'b0, "before reset");
    rst_n = 0;
    corr = 0; unc = 0;
    @(negedge clk);
    rst_n = 1;
    foreach (ec[i]) begin ec[i] = 0; eu[i] = 0; end
    compare("reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
