// data_error_journal: central record of data errors seen by the four ports.
//
// Each input port reports, one cycle wide, every code word it corrected
// (corr_i) and every one it could not correct (uncorr_i, the words answered
// with a Nack). The journal keeps a saturating count of both per port and a
// total of uncorrectable words, so a supervisor can tell a noisy link from a
// clean one. clear_i empties it.
//
// Counts update on the clock edge after a report. Synchronous active-low
// reset. A central journal of data packet errors is part of the described
// router; what it records and the counter width are this design's choices.
module data_error_journal #(
  parameter int NP     = noc_pkg::NPORTS,
  parameter int CNT_W  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear_i,
  input  logic [NP-1:0]    corr_i,
  input  logic [NP-1:0]    uncorr_i,
  output logic [CNT_W-1:0] corr_cnt_o   [NP],
  output logic [CNT_W-1:0] uncorr_cnt_o [NP],
  output logic [CNT_W+1:0] uncorr_total_o
);
  localparam logic [CNT_W-1:0] MAXC = '1;

  always_ff @(posedge clk) begin
    if (!rst_n || clear_i) begin
      for (int i = 0; i < NP; i++) begin
        corr_cnt_o[i]   <= '0;
        uncorr_cnt_o[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NP; i++) begin
        if (corr_i[i] && corr_cnt_o[i] != MAXC)     corr_cnt_o[i]   <= corr_cnt_o[i] + 1'b1;
        if (uncorr_i[i] && uncorr_cnt_o[i] != MAXC) uncorr_cnt_o[i] <= uncorr_cnt_o[i] + 1'b1;
      end
    end
  end

  always_comb begin
    uncorr_total_o = '0;
    for (int i = 0; i < NP; i++) uncorr_total_o += (CNT_W+2)'(uncorr_cnt_o[i]);
  end
endmodule
