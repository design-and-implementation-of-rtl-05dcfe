// output_fsm: allocation state machine and elastic buffer of one output port.
//
// In IDLE the machine looks at the four input ports that offer a header for
// this output and picks one in round-robin order, starting after the port
// that won last. The header is copied into the output elastic buffer in the
// same cycle (take_o to the winner) when the buffer can accept it, and the
// machine moves to BUSY, where it takes the following PKT_FLITS-1 flits from
// the same input only, so packets are never interleaved. After the last one
// it returns to IDLE.
//
// Interface: one request (valid, direction, header flag, flit) per input
// port; one take strobe per input port; the output buffer's flit and valid,
// with ready from the port's loopback module. Timing: a header is taken in
// the cycle it is offered if the buffer has room, and leaves the buffer one
// cycle later. Synchronous active-low reset.
//
// An FSM and an EB at each output follow the described router; round-robin
// arbitration and whole-packet locking are this design's own choices.
module output_fsm
  import noc_pkg::*;
#(
  parameter dir_e PORT      = DIR_N,
  parameter int   PKT_FLITS = PKT_LEN
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NPORTS-1:0]  req_valid_i,
  input  dir_e               req_dir_i  [NPORTS],
  input  logic [NPORTS-1:0]  req_hdr_i,
  input  flit_t              req_flit_i [NPORTS],
  output logic [NPORTS-1:0]  take_o,
  output flit_t              out_flit_o,
  output logic               out_valid_o,
  input  logic               out_ready_i
);
  typedef enum logic {S_IDLE, S_BUSY} state_e;

  state_e      state_q;
  logic [1:0]  owner_q, last_q, win;
  logic        win_v;
  localparam int CNT_W = $clog2(PKT_FLITS + 1);
  logic [CNT_W-1:0] cnt_q;
  logic        eb_ready, push;
  flit_t       push_flit;

  // Round-robin choice among the inputs offering a header to this port.
  always_comb begin
    win_v = 1'b0;
    win   = '0;
    for (int k = 1; k <= NPORTS; k++) begin
      logic [1:0] i;
      i = 2'(last_q + 2'(k));
      if (!win_v && req_valid_i[i] && req_hdr_i[i] && req_dir_i[i] == PORT) begin
        win_v = 1'b1;
        win   = i;
      end
    end
  end

  always_comb begin
    take_o    = '0;
    push      = 1'b0;
    push_flit = req_flit_i[owner_q];
    if (state_q == S_IDLE) begin
      push_flit = req_flit_i[win];
      if (win_v && eb_ready) begin
        push        = 1'b1;
        take_o[win] = 1'b1;
      end
    end else if (req_valid_i[owner_q] && req_dir_i[owner_q] == PORT && eb_ready) begin
      push           = 1'b1;
      take_o[owner_q] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      owner_q <= '0;
      last_q  <= 2'd3;
      cnt_q   <= '0;
    end else if (push) begin
      if (state_q == S_IDLE) begin
        owner_q <= win;
        last_q  <= win;
        cnt_q   <= CNT_W'(PKT_FLITS - 1);
        if (PKT_FLITS > 1) state_q <= S_BUSY;
      end else begin
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CNT_W'(1)) state_q <= S_IDLE;
      end
    end
  end

  elastic_buffer #(.W(FLIT_W)) u_eb (
    .clk   (clk),
    .rst_n (rst_n),
    .d_in  (push_flit),
    .w_in  (push),
    .r_in  (eb_ready),
    .d_out (out_flit_o),
    .w_out (out_valid_o),
    .r_out (out_ready_i)
  );

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(take_o));
endmodule
