// tb_hamming_dec: feeds the decoder reference code words of random flits
// with no error, with every single-bit error (all 22 positions) and with
// random double-bit errors. Expected: clean words pass untouched, single
// errors are corrected and flagged, double errors are flagged as
// uncorrectable.
module tb_hamming_dec;
  import noc_pkg::*;
  import tb_util_pkg::*;

  int    checks = 0, failures = 0;
  cw_t   cw;
  flit_t d, exp_d;
  logic  corr, unc;

  hamming_dec #(.DATA_W(FLIT_W)) dut (.cw_i(cw), .data_o(d), .corrected_o(corr),
                                      .uncorrectable_o(unc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      exp_d = flit_t'($urandom);
      cw = ref_encode(exp_d);
      #1;
      check(d == exp_d && !corr && !unc, $sformatf("clean %h -> %h c%0d u%0d", exp_d, d, corr, unc));
      for (int b = 0; b < CW_W; b++) begin
        cw = ref_encode(exp_d) ^ (CW_W'(1) << b);
        #1;
        check(d == exp_d && corr && !unc, $sformatf("single bit %0d of %h -> %h", b, exp_d, d));
      end
      for (int k = 0; k < 10; k++) begin
        int b1, b2;
        b1 = $urandom_range(CW_W - 1);
        b2 = (b1 + 1 + $urandom_range(CW_W - 2)) % CW_W;
        cw = ref_encode(exp_d) ^ (CW_W'(1) << b1) ^ (CW_W'(1) << b2);
        #1;
        check(unc && !corr, $sformatf("double bits %0d,%0d of %h", b1, b2, exp_d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
