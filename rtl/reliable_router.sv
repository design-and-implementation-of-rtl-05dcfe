// reliable_router: four-port fault-tolerant mesh router with elastic buffers.
//
// The router sits at address id_i of a 2-D mesh and has four ports, N, E,
// S and W, each a pair of one-way links carrying Hamming-protected code
// words. A processing element may be attached to any side; the side chosen
// by LOCAL_PORT receives the packets addressed to this router (LOCAL_EN = 0
// for a router with no element attached, e.g. inside a mesh). Per port the
// path is:
//
//   link in -> loopback_module (mux) -> input_port: Hamming decode/correct,
//   input EB, adaptive XY route, routing error check and journal
//   -> output_fsm of the chosen port: allocation, output EB
//   -> Hamming encode -> loopback_module (semi-crossbar) -> link out
//
// There are no FIFOs: each port has one two-slot elastic buffer at its input
// and one at its output, and flow control is ready/valid throughout
// (data_request = valid, occ = not ready). If a neighbour becomes unavailable
// while a packet already waits for it, the loopback module sends the packet
// round into the same port's input, where it is routed again as a new packet
// and leaves by another side. control_logic derives the router's own
// availability (avail_o, low only when all four input ports are faulty),
// switches off faulty input ports, and turns the eight neighbours'
// availability bits (dai_i) into routing and loopback decisions. Uncorrectable
// words raise nack_o on their port; data_error_journal counts errors.
//
// Timing: a header that meets no contention appears on the output link two
// clock cycles after it is offered on the input link (one cycle in the input
// EB, one in the output EB), and the following flits stream one per cycle.
// Synchronous active-low reset. Headers from the local processing element
// are not checked for routing errors, so with LOCAL_EN set the local port's
// rerr_o bit and journal stay zero.
// The block structure follows the described router; widths, packet length,
// arbitration and the handling of unavailable local sides are this design's
// own choices.
module reliable_router
  import noc_pkg::*;
#(
  parameter dir_e LOCAL_PORT = DIR_W,
  parameter bit   LOCAL_EN   = 1'b1,
  parameter int   PKT_FLITS  = PKT_LEN
) (
  input  logic              clk,
  input  logic              rst_n,
  input  addr_t             id_i,
  input  logic [NPORTS-1:0] port_fault_i,
  input  logic [7:0]        dai_i,
  output logic              avail_o,
  // links, one per port
  input  cw_t               data_in_i          [NPORTS],
  input  logic [NPORTS-1:0] data_request_in_i,
  output logic [NPORTS-1:0] occ_out_o,
  output cw_t               data_out_o         [NPORTS],
  output logic [NPORTS-1:0] data_request_out_o,
  input  logic [NPORTS-1:0] occ_in_i,
  output logic [NPORTS-1:0] nack_o,
  // status
  output logic [NPORTS-1:0] looping_o,
  output logic [NPORTS-1:0] rerr_o,
  output logic [2:0]        route_journal_o    [NPORTS],
  input  logic              journal_clear_i,
  output logic [7:0]        corr_cnt_o         [NPORTS],
  output logic [7:0]        uncorr_cnt_o       [NPORTS],
  output logic [9:0]        uncorr_total_o
);
  logic [NPORTS-1:0] port_en, unavailable, route_perm, corr;
  logic [7:0]        nb_avail;

  cw_t               rin_cw    [NPORTS];
  logic [NPORTS-1:0] rin_valid, rin_lb, rin_ready;
  logic [NPORTS-1:0] req_valid, req_hdr;
  dir_e              req_dir   [NPORTS];
  flit_t             req_flit  [NPORTS];
  logic [NPORTS-1:0] take      [NPORTS];   // [output][input]
  logic [NPORTS-1:0] take_in;              // per input
  flit_t             out_flit  [NPORTS];
  cw_t               out_cw    [NPORTS];
  logic [NPORTS-1:0] out_valid, out_ready;

  control_logic u_ctrl (
    .port_fault_i  (port_fault_i),
    .dai_i         (dai_i),
    .route_perm_i  (route_perm),
    .port_en_o     (port_en),
    .avail_o       (avail_o),
    .nb_avail_o    (nb_avail),
    .unavailable_o (unavailable)
  );

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    loopback_module #(.PKT_FLITS(PKT_FLITS)) u_lb (
      .clk                (clk),
      .rst_n              (rst_n),
      .en_i               (port_en[p]),
      .unavailable_i      (unavailable[p]),
      .data_in_i          (data_in_i[p]),
      .data_request_in_i  (data_request_in_i[p]),
      .occ_out_o          (occ_out_o[p]),
      .data_out_o         (data_out_o[p]),
      .data_request_out_o (data_request_out_o[p]),
      .occ_in_i           (occ_in_i[p]),
      .rt_out_i           (out_cw[p]),
      .rt_out_valid_i     (out_valid[p]),
      .rt_out_ready_o     (out_ready[p]),
      .rt_in_o            (rin_cw[p]),
      .rt_in_valid_o      (rin_valid[p]),
      .rt_in_lb_o         (rin_lb[p]),
      .rt_in_ready_i      (rin_ready[p]),
      .looping_o          (looping_o[p])
    );

    input_port #(
      .PORT       (dir_e'(p)),
      .LOCAL_PORT (LOCAL_PORT),
      .LOCAL_EN   (LOCAL_EN),
      .PKT_FLITS  (PKT_FLITS)
    ) u_in (
      .clk         (clk),
      .rst_n       (rst_n),
      .cur_i       (id_i),
      .avail_i     (nb_avail),
      .cw_i        (rin_cw[p]),
      .valid_i     (rin_valid[p]),
      .lb_i        (rin_lb[p]),
      .ready_o     (rin_ready[p]),
      .req_valid_o (req_valid[p]),
      .req_dir_o   (req_dir[p]),
      .req_hdr_o   (req_hdr[p]),
      .req_flit_o  (req_flit[p]),
      .take_i      (take_in[p]),
      .nack_o      (nack_o[p]),
      .corr_o      (corr[p]),
      .rerr_o      (rerr_o[p]),
      .journal_o   (route_journal_o[p]),
      .permanent_o (route_perm[p])
    );

    output_fsm #(.PORT(dir_e'(p)), .PKT_FLITS(PKT_FLITS)) u_out (
      .clk         (clk),
      .rst_n       (rst_n),
      .req_valid_i (req_valid),
      .req_dir_i   (req_dir),
      .req_hdr_i   (req_hdr),
      .req_flit_i  (req_flit),
      .take_o      (take[p]),
      .out_flit_o  (out_flit[p]),
      .out_valid_o (out_valid[p]),
      .out_ready_i (out_ready[p])
    );

    hamming_enc #(.DATA_W(FLIT_W)) u_enc (
      .data_i (out_flit[p]),
      .cw_o   (out_cw[p])
    );

    // An input is taken by at most one output: the one it asked for.
    always_comb begin
      take_in[p] = 1'b0;
      for (int o = 0; o < NPORTS; o++) take_in[p] |= take[o][p];
    end
  end

  data_error_journal #(.NP(NPORTS), .CNT_W(8)) u_journal (
    .clk            (clk),
    .rst_n          (rst_n),
    .clear_i        (journal_clear_i),
    .corr_i         (corr),
    .uncorr_i       (nack_o),
    .corr_cnt_o     (corr_cnt_o),
    .uncorr_cnt_o   (uncorr_cnt_o),
    .uncorr_total_o (uncorr_total_o)
  );
endmodule
