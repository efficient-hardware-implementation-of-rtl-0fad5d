// tb_des_parity_drop: checks the parity drop (permuted choice 1).
// FIPS worked example 133457799BBCDFF1 -> F0CCAAF556678F; the eight parity
// bits (the least significant bit of every byte) must not affect the result;
// every other key bit must reach exactly one output bit.
module tb_des_parity_drop;
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
  logic [63:0] din;
  logic [55:0] dout, ref0;
  des_parity_drop dut (.din, .dout);

  initial begin
    logic [55:0] hit;
    din = 64'h133457799BBCDFF1; #1;
    check(dout == 56'hF0CCAAF556678F, $sformatf("worked example: got %h", dout));
    hit = '0;
    for (int i = 0; i < 64; i++) begin
      din = 64'h1 << i; #1;
      if (i % 8 == 0) check(dout == '0, $sformatf("parity bit %0d reaches the output", i));
      else begin
        check($countones(dout) == 1, $sformatf("key bit %0d not mapped once", i));
        hit |= dout;
      end
    end
    check(&hit, "some output bit is never driven");
    for (int i = 0; i < 50; i++) begin
      din = {$urandom, $urandom}; #1;
      ref0 = dout;
      din ^= 64'h0101_0101_0101_0101 & {$urandom, $urandom}; #1;
      check(dout == ref0, "parity bits change the result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
