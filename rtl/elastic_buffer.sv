// elastic_buffer: two-slot elastic buffer (EB) with a ready-valid handshake.
//
// The buffer is a flip-flop split into its master and slave storage, each
// with its own enable (enm, ens) driven by a small control block, so that it
// holds up to two flits. Data always leaves from the slave. A flit moves
// forward on a rising clock edge when valid and ready are both high:
//   w_in  / r_in  : upstream valid in, ready out
//   w_out / r_out : downstream valid out, ready in
// r_in is high while at least one of the two slots is empty; it depends only
// on the buffer's state, never combinationally on r_out, so chains of EBs
// act as a distributed FIFO without long ready paths.
//
// Timing: an arriving flit is written straight into the slave when the
// slave is empty or being emptied and the master holds nothing (the master
// is then transparent), giving one cycle of latency and one flit per cycle.
// Otherwise it is parked in the master and moves to the slave when that
// frees up. Reset (synchronous, active low) empties both slots.
//
// The two storage locations, the separate enables and the ready/valid rules
// follow the described EB; modelling the latches as enabled registers and the
// write-through of an empty master are this design's own choices.
module elastic_buffer #(
  parameter int W = noc_pkg::FLIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d_in,
  input  logic         w_in,
  output logic         r_in,
  output logic [W-1:0] d_out,
  output logic         w_out,
  input  logic         r_out
);
  logic [W-1:0] master_q, slave_q;
  logic         mv_q, sv_q;      // slot occupied
  logic         push, pop, enm, ens;

  assign r_in  = !(mv_q && sv_q);
  assign push  = w_in && r_in;
  assign pop   = sv_q && r_out;
  // Slave is written when it is (or becomes) free and there is data to take.
  assign ens   = (!sv_q || pop) && (mv_q || push);
  // Master holds an arriving flit that cannot go on into the slave.
  assign enm   = push && (mv_q || !ens);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mv_q <= 1'b0;
      sv_q <= 1'b0;
    end else begin
      if (ens)      sv_q <= 1'b1;
      else if (pop) sv_q <= 1'b0;
      if (enm)           mv_q <= 1'b1;
      else if (ens && mv_q) mv_q <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (ens) slave_q  <= mv_q ? master_q : d_in;
    if (enm) master_q <= d_in;
  end

  assign d_out = slave_q;
  assign w_out = sv_q;

  // A flit offered must stay offered until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (w_out && !r_out) |=> (w_out && d_out == $past(d_out));
  endproperty
  assert property (p_hold);
endmodule
