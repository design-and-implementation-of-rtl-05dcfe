// tb_hamming_enc: checks the Hamming encoder against an independently
// written reference (explicit data positions and parity equations) for
// corner values and 2000 random flits, and checks that every code word has
// even overall parity and a zero syndrome.
module tb_hamming_enc;
  import noc_pkg::*;
  import tb_util_pkg::*;

  int    checks = 0, failures = 0;
  flit_t d;
  cw_t   cw;

  hamming_enc #(.DATA_W(FLIT_W)) dut (.data_i(d), .cw_o(cw));

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
    flit_t vals [4] = '{16'h0000, 16'hFFFF, 16'h8001, 16'h5A5A};
    foreach (vals[i]) begin
      d = vals[i];
      #1;
      check(cw == ref_encode(d), $sformatf("corner %h: %h vs %h", d, cw, ref_encode(d)));
    end
    for (int n = 0; n < 2000; n++) begin
      d = flit_t'($urandom);
      #1;
      check(cw == ref_encode(d), $sformatf("random %h: %h vs %h", d, cw, ref_encode(d)));
      check(^cw == 1'b0, "overall parity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
