// tb_des_straight_pbox: checks the straight P-box.
// Each single-bit input must map to a single, distinct output bit (it is a
// permutation), bit weight is kept for random words, and the FIPS worked
// example 5C82B597 -> 234AA9BB must hold. Two spot positions: DES input
// bit 16 goes to output bit 1, input bit 25 to output bit 32.
module tb_des_straight_pbox;
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
  logic [31:0] din, dout;
  des_straight_pbox dut (.din, .dout);

  initial begin
    logic [31:0] hit;
    hit = '0;
    for (int i = 0; i < 32; i++) begin
      din = 32'h1 << i; #1;
      check($countones(dout) == 1, $sformatf("single bit %0d maps to %h", i, dout));
      hit |= dout;
    end
    check(hit == 32'hFFFF_FFFF, "not a permutation");
    din = 32'h5C82B597; #1;
    check(dout == 32'h234AA9BB, $sformatf("worked example: got %h", dout));
    din = 32'h1 << (32 - 16); #1;
    check(dout == 32'h8000_0000, "input bit 16 -> output bit 1");
    din = 32'h1 << (32 - 25); #1;
    check(dout == 32'h0000_0001, "input bit 25 -> output bit 32");
    for (int i = 0; i < 100; i++) begin
      din = $urandom; #1;
      check($countones(dout) == $countones(din), "weight changed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
