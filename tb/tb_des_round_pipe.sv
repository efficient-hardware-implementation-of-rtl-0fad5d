// tb_des_round_pipe: checks both round configurations, the 10-stage first
// round (SPLIT_REG=1, E_DELAY=2) and the 7-stage later rounds, with a new
// random (L, R, K) every clock cycle. The sub-key of a block is presented
// SPLIT_REG+1+E_DELAY cycles after its halves, as the core does. Every
// output pair must equal the Feistel round L' = R, R' = L xor f(R, K) of the
// behavioural reference, exactly LAT cycles after the block entered (10 and
// 7). Block 0 is round 1 of the FIPS worked example:
// L0 R0 = CC00CCFF F0AAF0AA, K1 = 1B02EFFC7072 -> R1 = EF4A6544.
module tb_des_round_pipe;
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
  localparam int NBLK = 400;
  localparam int LAT1 = 10, LATN = 7, KOFF1 = 4, KOFFN = 1;

  logic [31:0] L [NBLK], R [NBLK];
  logic [47:0] K [NBLK];
  logic [31:0] l_i, r_i, l1, r1, ln, rn;
  logic [47:0] k1, kn;

  des_round_pipe #(.SPLIT_REG(1'b1), .E_DELAY(2)) dut1 (
    .clk, .rst, .l_i, .r_i, .k_i(k1), .l_o(l1), .r_o(r1));
  des_round_pipe #(.SPLIT_REG(1'b0), .E_DELAY(0)) dutn (
    .clk, .rst, .l_i, .r_i, .k_i(kn), .l_o(ln), .r_o(rn));

  initial begin
    int b;
    for (int i = 0; i < NBLK; i++) begin
      L[i] = $urandom; R[i] = $urandom; K[i] = {$urandom, $urandom};
    end
    L[0] = 32'hCC00CCFF; R[0] = 32'hF0AAF0AA; K[0] = 48'h1B02EFFC7072;
    l_i = '0; r_i = '0; k1 = '0; kn = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c < NBLK + LAT1; c++) begin
      l_i = (c < NBLK) ? L[c] : '0;
      r_i = (c < NBLK) ? R[c] : '0;
      k1  = (c >= KOFF1 && c - KOFF1 < NBLK) ? K[c - KOFF1] : '0;
      kn  = (c >= KOFFN && c - KOFFN < NBLK) ? K[c - KOFFN] : '0;
      @(posedge clk); #1;
      b = c - (LAT1 - 1);
      if (b >= 0 && b < NBLK)
        check(l1 == R[b] && r1 == (L[b] ^ ref_f(R[b], K[b])),
              $sformatf("round-1 config, block %0d: got %h %h", b, l1, r1));
      else if (b == -1)
        check(!(l1 == R[0] && r1 == (L[0] ^ ref_f(R[0], K[0]))), "round-1 config early");
      b = c - (LATN - 1);
      if (b >= 0 && b < NBLK)
        check(ln == R[b] && rn == (L[b] ^ ref_f(R[b], K[b])),
              $sformatf("later-round config, block %0d: got %h %h", b, ln, rn));
      else if (b == -1)
        check(!(ln == R[0] && rn == (L[0] ^ ref_f(R[0], K[0]))), "later-round config early");
      if (b == 0) check(rn == 32'hEF4A6544, "worked example R1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
