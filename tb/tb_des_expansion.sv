// tb_des_expansion: checks the expansion P-box against its definition.
// Group j (j = 0..7, from the MSB) of the 48-bit output must be the nibble j
// of the input with the last bit of nibble j-1 in front and the first bit of
// nibble j+1 behind (wrapping around). This is built here by explicit
// indexing, not from a table. Also the FIPS worked example F0AAF0AA ->
// 7A15557A1555.
module tb_des_expansion;
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
  logic [31:0] din;
  logic [47:0] dout;
  des_expansion dut (.din, .dout);

  function automatic logic [47:0] expect_e(logic [31:0] r);
    logic [47:0] e;
    for (int j = 0; j < 8; j++) begin
      // DES bits counted from 0 at the MSB
      int first = 4*j, last = 4*j + 3;
      e[47 - 6*j]     = r[31 - ((first + 31) % 32)];
      for (int b = 0; b < 4; b++) e[46 - 6*j - b] = r[31 - (first + b)];
      e[42 - 6*j]     = r[31 - ((last + 1) % 32)];
    end
    return e;
  endfunction

  initial begin
    din = 32'hF0AAF0AA; #1;
    check(dout == 48'h7A15557A1555, $sformatf("worked example: got %h", dout));
    for (int i = 0; i < 200; i++) begin
      din = $urandom; #1;
      check(dout == expect_e(din), $sformatf("E(%h) = %h, expected %h", din, dout, expect_e(din)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
