// tb_des_superpipe: end-to-end test of the 119-stage DES core.
// A new random plaintext and a new random key enter on every clock cycle
// (so the key changes between every two blocks); each ciphertext is compared
// with the unpipelined reference exactly 119 cycles after its block entered,
// and must not appear one cycle earlier. The first blocks are published
// known-answer pairs: the three plaintext/key/ciphertext triples of the
// design's test table, the FIPS worked example and the all-zero vector.
// Midway the core is reset: the output must read zero at once, and a new
// stream entered after the reset must come out 119 cycles later.
module tb_des_superpipe;
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
  localparam int NBLK = 600;
  localparam int RST_AT = 300;   // reset after block RST_AT-1 entered
  logic [63:0] PT [NBLK], KEY [NBLK], EXP [NBLK];
  logic [63:0] plaintext, cipherkey, ciphertext;
  int n_key_change = 0, n_b2b = 0, n_reset = 0;

  des_superpipe dut (.clk, .rst, .plaintext, .cipherkey, .ciphertext);

  initial begin
    int b;
    for (int i = 0; i < NBLK; i++) begin
      PT[i] = {$urandom, $urandom}; KEY[i] = {$urandom, $urandom};
    end
    PT[0] = 64'h123456ABCD132536; KEY[0] = 64'hAABB09182736CCDD;
    PT[1] = 64'h0000000000000000; KEY[1] = 64'h22234512987ABB23;
    PT[2] = 64'h0000000000000001; KEY[2] = 64'h22234512987ABB23;
    PT[3] = 64'h0123456789ABCDEF; KEY[3] = 64'h133457799BBCDFF1;
    PT[4] = 64'h0000000000000000; KEY[4] = 64'h0000000000000000;
    for (int i = 0; i < NBLK; i++) EXP[i] = ref_des(PT[i], KEY[i]);
    check(EXP[0] == 64'hC0B7A8D05F3A829C, "reference: table pair 1");
    check(EXP[1] == 64'h4789FD476E82A5F1, "reference: table pair 2");
    check(EXP[2] == 64'h0A4ED5C15A63FEA3, "reference: table pair 3");
    check(EXP[3] == 64'h85E813540F0AB405, "reference: FIPS example");
    check(EXP[4] == 64'h8CA64DE9C1B123A7, "reference: zero vector");
    plaintext = '0; cipherkey = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // first stream: blocks 0 .. RST_AT-1, then the reset
    for (int c = 0; c < RST_AT; c++) begin
      plaintext = PT[c]; cipherkey = KEY[c];
      if (c > 0 && KEY[c] != KEY[c-1]) n_key_change++;
      @(posedge clk); #1;
      b = c - (LATENCY - 1);
      if (b >= 0) begin
        check(ciphertext == EXP[b], $sformatf("block %0d: got %h expected %h", b, ciphertext, EXP[b]));
        if (b > 0) n_b2b++;
      end
      if (b == -1) check(ciphertext != EXP[0], "block 0 one cycle early");
    end
    rst = 1'b1;
    @(posedge clk); #1;
    check(ciphertext == '0, "reset does not clear the output");
    n_reset++;
    rst = 1'b0;
    // second stream: blocks RST_AT .. NBLK-1, drained to the end
    for (int c = 0; c < NBLK - RST_AT + LATENCY; c++) begin
      int i;
      i = RST_AT + c;
      plaintext = (i < NBLK) ? PT[i] : '0;
      cipherkey = (i < NBLK) ? KEY[i] : '0;
      if (i < NBLK && KEY[i] != KEY[i-1]) n_key_change++;
      @(posedge clk); #1;
      b = c - (LATENCY - 1);
      if (b >= 0 && RST_AT + b < NBLK) begin
        check(ciphertext == EXP[RST_AT + b],
              $sformatf("block %0d: got %h", RST_AT + b, ciphertext));
        if (b > 0) n_b2b++;
      end
    end
    $display("key changed between consecutive blocks: %0d", n_key_change);
    $display("ciphertexts on consecutive cycles: %0d", n_b2b);
    $display("resets in mid-stream: %0d", n_reset);
    check(n_key_change > 0, "no key change exercised");
    check(n_b2b > 0, "no back-to-back blocks exercised");
    check(n_reset > 0, "no reset exercised");
    check(LATENCY == 119, "latency constant is not 119");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
