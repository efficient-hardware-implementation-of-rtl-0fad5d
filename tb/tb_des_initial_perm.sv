// tb_des_initial_perm: checks the initial permutation.
// FIPS worked example 0123456789ABCDEF -> CC00CCFFF0AAF0AA; composed with the
// final permutation it must give back any random block; single input bits
// must map to single distinct output bits.
module tb_des_initial_perm;
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
  logic [63:0] din, dout, back;
  des_initial_perm dut (.din, .dout);
  des_final_perm   inv (.din(dout), .dout(back));

  initial begin
    logic [63:0] hit;
    din = 64'h0123456789ABCDEF; #1;
    check(dout == 64'hCC00CCFFF0AAF0AA, $sformatf("worked example: got %h", dout));
    hit = '0;
    for (int i = 0; i < 64; i++) begin
      din = 64'h1 << i; #1;
      check($countones(dout) == 1, "single bit not kept single");
      hit |= dout;
    end
    check(&hit, "not a permutation");
    // DES bit 58 becomes bit 1, bit 7 becomes bit 64
    din = 64'h1 << (64 - 58); #1;
    check(dout == 64'h8000_0000_0000_0000, "bit 58 -> 1");
    din = 64'h1 << (64 - 7); #1;
    check(dout == 64'h1, "bit 7 -> 64");
    for (int i = 0; i < 100; i++) begin
      din = {$urandom, $urandom}; #1;
      check(back == din, "FP(IP(x)) != x");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
