// tb_des_sbox: checks all eight S-box instances (S1..S8).
// Every row of every box must be a permutation of 0..15, a property the
// standard guarantees, and the eight boxes together must reproduce the
// S-box stage of the first round of the classic FIPS worked example
// (key 133457799BBCDFF1, plaintext 0123456789ABCDEF):
// 6117BA866527 -> 5C82B597. Spot values of the standard's tables are checked
// as well.
module tb_des_sbox;
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
  logic [7:0][5:0] din;
  logic [7:0][3:0] dout;
  for (genvar j = 0; j < 8; j++) begin : g
    des_sbox #(.BOX(j + 1)) dut (.din(din[7-j]), .dout(dout[7-j]));
  end

  initial begin
    // row property: for each box, each row (outer bits) hits all 16 values
    for (int row = 0; row < 4; row++) begin
      logic [15:0] seen [8];
      for (int j = 0; j < 8; j++) seen[j] = '0;
      for (int col = 0; col < 16; col++) begin
        for (int j = 0; j < 8; j++) din[7-j] = {row[1], col[3:0], row[0]};
        #1;
        for (int j = 0; j < 8; j++) seen[j][dout[7-j]] = 1'b1;
      end
      for (int j = 0; j < 8; j++)
        check(seen[j] == 16'hFFFF, $sformatf("S%0d row %0d is not a permutation", j+1, row));
    end
    din = 48'h6117BA866527; #1;
    check(dout == 32'h5C82B597, $sformatf("worked example: got %h", dout));
    // S1(011011) = 5 (row 01, column 1101); S8(000000) = 13; S5(111111) = 3
    din = '0; din[7] = 6'b011011; #1;
    check(dout[7] == 4'd5,  "S1(011011) != 5");
    check(dout[0] == 4'd13, "S8(000000) != 13");
    din[3] = 6'b111111; #1;
    check(dout[3] == 4'd3,  "S5(111111) != 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
