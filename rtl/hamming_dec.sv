// hamming_dec: extended Hamming decoder and corrector for one flit.
//
// Computes the syndrome over positions 1..N and the parity over the whole
// word. A single flipped bit (overall parity odd) is corrected and flagged
// with corrected_o. Two flipped bits (syndrome non-zero, overall parity
// even), or a syndrome that points past the word, cannot be corrected and
// raise uncorrectable_o; the router answers that with a Nack to the sender,
// which is expected to retransmit.
//
// Purely combinational; the layout matches hamming_enc. Correcting with a
// Hamming code and requesting retransmission by Nack follow the described
// design; double-error detection is this design's own addition.
module hamming_dec #(
  parameter int DATA_W = noc_pkg::FLIT_W
) (
  input  logic [DATA_W+noc_pkg::hamming_p(DATA_W):0] cw_i,
  output logic [DATA_W-1:0]                          data_o,
  output logic                                       corrected_o,
  output logic                                       uncorrectable_o
);
  localparam int P = noc_pkg::hamming_p(DATA_W);
  localparam int N = DATA_W + P;

  always_comb begin
    int          j;
    int          s;
    logic        overall;
    logic [N:0]  w;
    w = cw_i;
    s = 0;
    for (int k = 0; k < P; k++) begin
      logic par;
      par = 1'b0;
      for (int pos = 1; pos <= N; pos++)
        if (((pos >> k) & 1) == 1) par ^= w[pos];
      if (par) s |= (1 << k);
    end
    overall         = ^w;
    corrected_o     = 1'b0;
    uncorrectable_o = 1'b0;
    if (overall) begin
      if (s <= N) begin
        w[s]        = ~w[s];     // s == 0 means the overall parity bit itself
        corrected_o = 1'b1;
      end else begin
        uncorrectable_o = 1'b1;
      end
    end else if (s != 0) begin
      uncorrectable_o = 1'b1;
    end
    j = 0;
    data_o = '0;
    for (int pos = 1; pos <= N; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        data_o[j] = w[pos];
        j++;
      end
    end
  end
endmodule
