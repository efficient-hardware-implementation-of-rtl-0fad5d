// tb_des_final_perm: checks the final permutation.
// It must undo the initial permutation for random blocks, and turn the
// swapped round-16 output of the FIPS worked example (R16 L16 =
// 0A4CD995 43423234) into the ciphertext 85E813540F0AB405.
module tb_des_final_perm;
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
  logic [63:0] x, ipx, din, dout;
  des_initial_perm fwd (.din(x), .dout(ipx));
  des_final_perm   dut (.din, .dout);

  initial begin
    din = 64'h0A4CD99543423234; #1;
    check(dout == 64'h85E813540F0AB405, $sformatf("worked example: got %h", dout));
    // DES bit 40 becomes bit 1, bit 25 becomes bit 64
    din = 64'h1 << (64 - 40); #1;
    check(dout == 64'h8000_0000_0000_0000, "bit 40 -> 1");
    din = 64'h1 << (64 - 25); #1;
    check(dout == 64'h1, "bit 25 -> 64");
    for (int i = 0; i < 200; i++) begin
      x = {$urandom, $urandom}; #1;
      din = ipx; #1;
      check(dout == x, $sformatf("FP(IP(%h)) = %h", x, dout));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
