// tb_des_key_round: checks three key-round configurations with a new random
// 56-bit C/D state every clock cycle: round 1 (split and combine registers,
// 7-cycle C/D delay), a two-bit round with the 6-cycle delay, and the last
// round (no delay). The sub-key must be the compression of the rotated state
// SPLIT_REG+COMBINE_REG+2 cycles after the state entered, and cd_o the
// rotated state SPLIT_REG+1+CD_DELAY cycles after. State 0 is the FIPS worked
// example: C0D0 = F0CCAAF556678F -> sub-key 1 = 1B02EFFC7072.
module tb_des_key_round;
  import des_pkg::*;
  import des_ref_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int NBLK = 300;
  logic [55:0] CD [NBLK];
  logic [55:0] cd_i, cdo_a, cdo_b, cdo_c;
  logic [47:0] k_a, k_b, k_c;

  des_key_round #(.SHIFT(1), .SPLIT_REG(1'b1), .COMBINE_REG(1'b1), .CD_DELAY(7))
    dut_a (.clk, .rst, .cd_i, .k_o(k_a), .cd_o(cdo_a));
  des_key_round #(.SHIFT(2), .SPLIT_REG(1'b0), .COMBINE_REG(1'b0), .CD_DELAY(6))
    dut_b (.clk, .rst, .cd_i, .k_o(k_b), .cd_o(cdo_b));
  des_key_round #(.SHIFT(1), .SPLIT_REG(1'b0), .COMBINE_REG(1'b0), .CD_DELAY(0))
    dut_c (.clk, .rst, .cd_i, .k_o(k_c), .cd_o(cdo_c));

  task automatic expect_at(int c, int lat, logic [47:0] kv, int klat,
                           logic [55:0] cdv, int shift, string name);
    int b;
    b = c - (klat - 1);
    if (b >= 0 && b < NBLK)
      check(kv == perm_pc2(ref_rot(CD[b], shift)), $sformatf("%s sub-key, state %0d", name, b));
    b = c - (lat - 1);
    if (b >= 0 && b < NBLK)
      check(cdv == ref_rot(CD[b], shift), $sformatf("%s C/D out, state %0d", name, b));
  endtask

  initial begin
    for (int i = 0; i < NBLK; i++) CD[i] = {$urandom, $urandom};
    CD[0] = 56'hF0CCAAF556678F;
    cd_i = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c < NBLK + 10; c++) begin
      cd_i = (c < NBLK) ? CD[c] : '0;
      @(posedge clk); #1;
      expect_at(c, 1 + 1 + 7, k_a, 1 + 1 + 2, cdo_a, 1, "round-1");
      expect_at(c, 1 + 6,     k_b, 2,         cdo_b, 2, "two-bit");
      expect_at(c, 1,         k_c, 2,         cdo_c, 1, "last");
      if (c == 3) check(k_a == 48'h1B02EFFC7072, "worked example sub-key 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
