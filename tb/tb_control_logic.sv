// tb_control_logic: exhaustive over port faults and journal flags, random
// over the eight availability bits. Checks port enables, the router's own
// availability (low only with all four input ports faulty), and the
// per-port unavailable signals, including neighbours with a permanent
// routing fault.
module tb_control_logic;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] fault, perm, en, unav;
  logic [7:0] dai, nb;
  logic avail;

  control_logic dut (.port_fault_i(fault), .dai_i(dai), .route_perm_i(perm),
    .port_en_o(en), .avail_o(avail), .nb_avail_o(nb), .unavailable_o(unav));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 16; f++)
      for (int p = 0; p < 16; p++)
        for (int r = 0; r < 8; r++) begin
          fault = 4'(f); perm = 4'(p); dai = 8'($urandom);
          #1;
          check(en == ~fault, "port enable");
          check(avail == (f != 15), "availability");
          // Direct neighbours: N=bit0, E=bit2, S=bit4, W=bit6.
          check(unav[0] == (!dai[0] || perm[0]), "north");
          check(unav[1] == (!dai[2] || perm[1]), "east");
          check(unav[2] == (!dai[4] || perm[2]), "south");
          check(unav[3] == (!dai[6] || perm[3]), "west");
          check(nb[1] == dai[1] && nb[3] == dai[3] && nb[5] == dai[5] && nb[7] == dai[7],
                "diagonals pass");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
