// input_port: the "error and routing logic" of one router port.
//
// Code words from the port's loopback module are decoded and corrected by
// a Hamming decoder, then held in a two-slot elastic buffer together with
// their error flags and a bit saying whether they came round the loopback
// path. The flit at the head of the buffer drives the routing:
//   * A header is routed by adaptive XY (route_logic). Its route is offered
//     to the output allocators (req_valid_o, req_dir_o) until one takes it
//     (take_i); the port then forwards the remaining PKT_LEN-1 flits of the
//     packet to the same output. The header leaves with the new unique-path
//     bit.
//   * A header from a neighbouring router (not from the local port or the
//     loopback path) is checked by route_error_detect when it is taken; the
//     result goes into that port's routing error journal.
//   * A header that cannot be corrected is dropped with the whole packet.
//   * A data flit that arrives when a header is expected is dropped.
// Every code word that cannot be corrected raises nack_o for one cycle as it
// is written into the buffer, asking the sender to retransmit; corr_o does
// the same for corrected words, for the central error journal.
//
// The routing block's local and blocked flags are not needed here: a local
// packet is already steered to LOCAL_PORT, and a blocked one simply waits
// for its preferred output. The journal's transient flag is likewise left
// open, since the journal itself is brought out.
//
// Timing: one cycle from a code word on the input to its flit at the buffer
// head, then one flit per cycle to the output. Synchronous active-low reset.
// The ECC at every input port, the EB, the journal and the Nack follow the
// described design; the fixed packet length, dropping of uncorrectable
// headers and the packet framing are this design's own choices.
module input_port
  import noc_pkg::*;
#(
  parameter dir_e PORT       = DIR_N,
  parameter dir_e LOCAL_PORT = DIR_W,
  parameter bit   LOCAL_EN   = 1'b1,
  parameter int   PKT_FLITS  = PKT_LEN
) (
  input  logic       clk,
  input  logic       rst_n,
  input  addr_t      cur_i,         // this router's address
  input  logic [7:0] avail_i,       // diagonal availability of the neighbours
  // from the loopback module
  input  cw_t        cw_i,
  input  logic       valid_i,
  input  logic       lb_i,          // code word came from the loopback path
  output logic       ready_o,
  // to the output allocators
  output logic       req_valid_o,
  output dir_e       req_dir_o,
  output logic       req_hdr_o,     // offered flit is a header
  output flit_t      req_flit_o,
  input  logic       take_i,
  // status
  output logic       nack_o,
  output logic       corr_o,
  output logic       rerr_o,        // pulse: a checked header was misrouted
  output logic [2:0] journal_o,
  output logic       permanent_o
);
  typedef struct packed {
    flit_t flit;
    logic  uncorr;
    logic  lb;
  } entry_t;

  typedef enum logic [1:0] {S_HEAD, S_BODY, S_DROP} state_e;

  flit_t  dec_flit;
  logic   dec_corr, dec_uncorr;
  entry_t in_e, head;
  logic   head_v, pop;
  state_e state_q;
  localparam int CNT_W = $clog2(PKT_FLITS + 1);
  logic [CNT_W-1:0] cnt_q;
  dir_e   dir_q;

  hamming_dec #(.DATA_W(FLIT_W)) u_dec (
    .cw_i            (cw_i),
    .data_o          (dec_flit),
    .corrected_o     (dec_corr),
    .uncorrectable_o (dec_uncorr)
  );

  assign in_e = '{flit: dec_flit, uncorr: dec_uncorr, lb: lb_i};

  elastic_buffer #(.W($bits(entry_t))) u_eb (
    .clk   (clk),
    .rst_n (rst_n),
    .d_in  (in_e),
    .w_in  (valid_i),
    .r_in  (ready_o),
    .d_out (head),
    .w_out (head_v),
    .r_out (pop)
  );

  assign nack_o = valid_i && ready_o && dec_uncorr;
  assign corr_o = valid_i && ready_o && dec_corr;

  // Routing of the header at the head of the buffer.
  hdr_t  h;
  dir_e  rt_dir;
  logic  rt_local, rt_uniq, rt_blocked;
  logic  is_hdr, chk, err;

  assign h      = hdr_t'(head.flit);
  assign is_hdr = head.flit[FLIT_W-1];

  route_logic #(.LOCAL_PORT(LOCAL_PORT), .LOCAL_EN(LOCAL_EN)) u_route (
    .cur_i     (cur_i),
    .dst_i     (h.dst),
    .in_dir_i  (PORT),
    .avail_i   (avail_i),
    .out_dir_o (rt_dir),
    .local_o   (rt_local),
    .uniq_o    (rt_uniq),
    .blocked_o (rt_blocked)
  );

  // Only headers sent by the neighbouring router are checked.
  assign chk = head_v && state_q == S_HEAD && is_hdr && !head.uncorr && take_i &&
               !head.lb && !(LOCAL_EN && PORT == LOCAL_PORT);

  route_error_detect u_red (
    .clk         (clk),
    .rst_n       (rst_n),
    .cur_i       (cur_i),
    .dst_i       (h.dst),
    .uniq_i      (h.uniq),
    .in_dir_i    (PORT),
    .avail_i     (avail_i),
    .chk_i       (chk),
    .err_o       (err),
    .journal_o   (journal_o),
    .permanent_o (permanent_o),
    .transient_o ()
  );

  assign rerr_o = chk && err;

  logic drop_now;
  always_comb begin
    hdr_t ho;
    ho          = h;
    drop_now    = 1'b0;
    req_valid_o = 1'b0;
    req_hdr_o   = 1'b0;
    req_dir_o   = dir_q;
    req_flit_o  = head.flit;
    case (state_q)
      S_HEAD: begin
        if (head_v) begin
          if (!is_hdr || head.uncorr) begin
            drop_now = 1'b1;
          end else begin
            req_valid_o = 1'b1;
            req_hdr_o   = 1'b1;
            req_dir_o   = rt_dir;
            ho.uniq     = rt_uniq;
            req_flit_o  = flit_t'(ho);
          end
        end
      end
      S_BODY:  req_valid_o = head_v;
      default: drop_now    = head_v;
    endcase
  end

  assign pop = drop_now || (req_valid_o && take_i);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_HEAD;
      cnt_q   <= '0;
      dir_q   <= DIR_N;
    end else if (pop) begin
      case (state_q)
        S_HEAD: begin
          if (is_hdr && PKT_FLITS > 1) begin
            state_q <= head.uncorr ? S_DROP : S_BODY;
            cnt_q   <= CNT_W'(PKT_FLITS - 1);
          end
          dir_q <= rt_dir;
        end
        default: begin
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == CNT_W'(1)) state_q <= S_HEAD;
        end
      endcase
    end
  end

  // While a packet is forwarded its route must not change.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q == S_BODY && req_valid_o) |-> req_dir_o == dir_q);
endmodule
