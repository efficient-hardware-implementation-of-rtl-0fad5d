// tb_des_compression_pbox: checks the compression P-box (permuted choice 2).
// FIPS worked example: C1D1 = E19955FAACCF1E gives sub-key 1 = 1B02EFFC7072
// and C2D2 = C332ABF5599E3D gives sub-key 2 = 79AED9DBC9E5. The standard
// drops the eight DES bits 9, 18, 22, 25, 35, 38, 43 and 54; every other bit
// must reach exactly one sub-key bit.
module tb_des_compression_pbox;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [55:0] din;
  logic [47:0] dout;
  des_compression_pbox dut (.din, .dout);

  initial begin
    logic [47:0] hit;
    din = 56'hE19955FAACCF1E; #1;
    check(dout == 48'h1B02EFFC7072, $sformatf("sub-key 1: got %h", dout));
    din = 56'hC332ABF5599E3D; #1;
    check(dout == 48'h79AED9DBC9E5, $sformatf("sub-key 2: got %h", dout));
    hit = '0;
    for (int n = 1; n <= 56; n++) begin
      din = 56'h1 << (56 - n); #1;
      if (n inside {9, 18, 22, 25, 35, 38, 43, 54})
        check(dout == '0, $sformatf("dropped bit %0d reaches the sub-key", n));
      else begin
        check($countones(dout) == 1, $sformatf("bit %0d not mapped once", n));
        hit |= dout;
      end
    end
    check(&hit, "some sub-key bit is never driven");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
