// control_logic: availability and port control of the router.
//
// A permanently faulty input port is switched off (port_en_o low) while the
// other ports keep working. A router whose four input ports are all faulty
// cannot receive anything and declares itself unavailable; avail_o goes to
// its eight neighbours as their diagonal availability indication. In the
// other direction, dai_i carries the availability of the eight neighbours
// (N, NE, E, SE, S, SW, W, NW) and the block turns the four direct ones into
// the per-port unavailable signal of the loopback modules. A neighbour whose
// routing error journal reports a permanent fault is treated as unavailable
// too, so packets are no longer sent to it.
//
// Purely combinational. Port disabling, the unavailability rule and the
// eight availability links follow the described design; taking the journal
// into account is this design's reading of "differentiate the permanent and
// transient errors".
module control_logic
  import noc_pkg::*;
(
  input  logic [NPORTS-1:0] port_fault_i,    // permanent input port faults
  input  logic [7:0]        dai_i,           // neighbours' availability
  input  logic [NPORTS-1:0] route_perm_i,    // journal: permanent routing fault
  output logic [NPORTS-1:0] port_en_o,
  output logic              avail_o,
  output logic [7:0]        nb_avail_o,      // availability used for routing
  output logic [NPORTS-1:0] unavailable_o    // per port, to the loopback modules
);
  always_comb begin
    port_en_o  = ~port_fault_i;
    avail_o    = !(&port_fault_i);
    nb_avail_o = dai_i;
    for (int p = 0; p < NPORTS; p++)
      if (route_perm_i[p]) nb_avail_o[dir_nb(dir_e'(p))] = 1'b0;
    for (int p = 0; p < NPORTS; p++)
      unavailable_o[p] = !nb_avail_o[dir_nb(dir_e'(p))];
  end
endmodule
