// hamming_enc: extended Hamming encoder for one flit.
//
// The design checks flits switch to switch: every router re-encodes a flit
// before it leaves an output port, and the next router's input port decodes
// it. Code word bit 0 is an overall parity bit; bits 1..DATA_W+P follow the
// classic Hamming layout, parity bits at the power-of-two positions and the
// data bits, LSB first, in the others. With 16 data bits this is a
// (22,16) single-error-correcting, double-error-detecting code. The code is
// systematic: the data bits reach the code word unchanged, and only the six
// parity bits are computed.
//
// Purely combinational. Using Hamming codes at each input port follows the
// described design; the extended (SEC-DED) form and the bit layout are
// this design's own choices.
module hamming_enc #(
  parameter int DATA_W = noc_pkg::FLIT_W
) (
  input  logic [DATA_W-1:0]                          data_i,
  output logic [DATA_W+noc_pkg::hamming_p(DATA_W):0] cw_o
);
  localparam int P = noc_pkg::hamming_p(DATA_W);
  localparam int N = DATA_W + P;   // highest Hamming position

  always_comb begin
    int j;
    logic [N:0] w;
    w = '0;
    j = 0;
    // Place the data bits at the positions that are not powers of two.
    for (int pos = 1; pos <= N; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        w[pos] = data_i[j];
        j++;
      end
    end
    // Parity bit k covers every position whose index has bit k set.
    for (int k = 0; k < P; k++) begin
      logic par;
      par = 1'b0;
      for (int pos = 1; pos <= N; pos++)
        if (((pos >> k) & 1) == 1) par ^= w[pos];
      w[1 << k] = par;
    end
    w[0] = ^w[N:1];
    cw_o = w;
  end
endmodule
