// loopback_module: the link interface of one router port.
//
// Output side (a two-way "semi-crossbar"): the router's outgoing code words
// normally go to the neighbour on data_out_o with data_request_out_o as
// their valid, and the neighbour stops them with occ_in_i. When a packet's
// header reaches this module while the neighbour is unavailable
// (unavailable_i), the whole packet is switched onto the internal loopback
// bus instead. The decision is taken at the header and kept for the
// PKT_FLITS flits of the packet.
//
// Input side (a multiplexer): the router's input port receives either the
// neighbour's code words (data_in_i, data_request_in_i) or looped-back ones,
// which then enter the router as a new packet (lb_o marks them). The
// multiplexer switches only between packets; looped-back packets win, so
// the output buffer is emptied. While it carries a looped-back packet, while
// the input port is full, or while the port is disabled (en_i low), occ_out_o
// tells the neighbour to stop sending.
//
// The link output data_out_o is the router's code word bus itself; only its
// valid is steered. All paths are combinational; the small state (packet counters and the
// two selections) updates on the clock. Synchronous active-low reset.
// The multiplexer, semi-crossbar, loopback bus and occ_out behaviour follow
// the described loopback module; its link buffers are the router's elastic
// buffers, and the packet counting is this design's own choice.
module loopback_module
  import noc_pkg::*;
#(
  parameter int PKT_FLITS = PKT_LEN
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en_i,                // input port enabled
  input  logic unavailable_i,       // neighbour cannot receive
  // link to the neighbour
  input  cw_t  data_in_i,
  input  logic data_request_in_i,
  output logic occ_out_o,
  output cw_t  data_out_o,
  output logic data_request_out_o,
  input  logic occ_in_i,
  // router side, outgoing code words
  input  cw_t  rt_out_i,
  input  logic rt_out_valid_i,
  output logic rt_out_ready_o,
  // router side, incoming code words
  output cw_t  rt_in_o,
  output logic rt_in_valid_o,
  output logic rt_in_lb_o,
  input  logic rt_in_ready_i,
  // status
  output logic looping_o            // a packet is being looped back
);
  typedef enum logic [1:0] {P_IDLE, P_NB, P_LB} path_e;

  path_e       out_q, in_q;
  localparam int CNT_W = $clog2(PKT_FLITS + 1);
  logic [CNT_W-1:0] out_cnt_q, in_cnt_q;
  path_e       out_sel, in_sel;
  logic        lb_valid, lb_ready, ext_ready, out_fire, in_fire;

  // Semi-crossbar: choose the neighbour or the loopback bus per packet.
  assign out_sel = (out_q != P_IDLE) ? out_q : (unavailable_i ? P_LB : P_NB);

  assign data_out_o         = rt_out_i;
  assign data_request_out_o = rt_out_valid_i && out_sel == P_NB;
  assign lb_valid           = rt_out_valid_i && out_sel == P_LB;
  assign rt_out_ready_o     = (out_sel == P_NB) ? !occ_in_i : lb_ready;
  assign out_fire           = rt_out_valid_i && rt_out_ready_o;

  // Input multiplexer: a looped-back packet goes first.
  assign in_sel = (in_q != P_IDLE) ? in_q : (lb_valid ? P_LB : P_NB);

  always_comb begin
    if (in_sel == P_LB) begin
      rt_in_o       = rt_out_i;
      rt_in_valid_o = lb_valid;
      rt_in_lb_o    = 1'b1;
      lb_ready      = rt_in_ready_i;
      ext_ready     = 1'b0;
    end else begin
      rt_in_o       = data_in_i;
      rt_in_valid_o = data_request_in_i && en_i;
      rt_in_lb_o    = 1'b0;
      lb_ready      = 1'b0;
      ext_ready     = rt_in_ready_i && en_i;
    end
  end

  assign occ_out_o = !ext_ready;
  assign in_fire   = rt_in_valid_o && rt_in_ready_i;
  assign looping_o = out_sel == P_LB && rt_out_valid_i;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_q     <= P_IDLE;
      in_q      <= P_IDLE;
      out_cnt_q <= '0;
      in_cnt_q  <= '0;
    end else begin
      if (out_fire) begin
        if (out_q == P_IDLE) begin
          out_cnt_q <= CNT_W'(PKT_FLITS - 1);
          if (PKT_FLITS > 1) out_q <= out_sel;
        end else begin
          out_cnt_q <= out_cnt_q - 1'b1;
          if (out_cnt_q == CNT_W'(1)) out_q <= P_IDLE;
        end
      end
      if (in_fire) begin
        if (in_q == P_IDLE) begin
          in_cnt_q <= CNT_W'(PKT_FLITS - 1);
          if (PKT_FLITS > 1) in_q <= in_sel;
        end else begin
          in_cnt_q <= in_cnt_q - 1'b1;
          if (in_cnt_q == CNT_W'(1)) in_q <= P_IDLE;
        end
      end
    end
  end

  // A code word goes either to the neighbour or round the loop, never both.
  assert property (@(posedge clk) disable iff (!rst_n) !(data_request_out_o && lb_valid));
endmodule
