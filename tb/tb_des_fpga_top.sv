// tb_des_fpga_top: end-to-end test of the whole board design at its default
// parameters. The switch setting changes every clock cycle (random, and then
// every one of the 16 settings in order), so the selected plaintext and key
// change from block to block; each ciphertext must equal the reference
// encryption of the stored pair the switches selected 119 cycles earlier.
// The published pairs are checked by value: switches 0000 -> C0B7A8D05F3A829C,
// 0101 -> 4789FD476E82A5F1, 0110 -> 0A4ED5C15A63FEA3, and 1111 (stored
// FIPS weak-plaintext pair) -> 0000000000000000. Counts how often each
// mechanism happened: every switch setting, a plaintext change, a key change,
// a ciphertext on consecutive cycles, and a reset.
module tb_des_fpga_top;
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
  localparam logic [3:0][63:0] PTS = {64'h8787878787878787, 64'h0000000000000001,
                                      64'h0000000000000000, 64'h123456ABCD132536};
  localparam logic [3:0][63:0] KEYS = {64'h0E329232EA6D0D73, 64'h133457799BBCDFF1,
                                       64'h22234512987ABB23, 64'hAABB09182736CCDD};
  localparam int NBLK = 500;
  logic [3:0]  sw;
  logic [63:0] ciphertext;
  logic [3:0]  SW [NBLK];
  int n_setting [16];
  int n_pt_change = 0, n_key_change = 0, n_b2b = 0, n_reset = 0;

  des_fpga_top dut (.clk, .rst, .sw, .ciphertext);

  function automatic logic [63:0] expected(logic [3:0] s);
    return ref_des(PTS[s[1:0]], KEYS[s[3:2]]);
  endfunction

  initial begin
    int b;
    for (int i = 0; i < 16; i++) n_setting[i] = 0;
    for (int i = 0; i < NBLK; i++) SW[i] = 4'($urandom);
    SW[0] = 4'b0000; SW[1] = 4'b0101; SW[2] = 4'b0110; SW[3] = 4'b1111;
    for (int i = 0; i < 16; i++) SW[100 + i] = 4'(i);
    check(expected(4'b0000) == 64'hC0B7A8D05F3A829C, "reference: table pair 1");
    check(expected(4'b1111) == 64'h0, "reference: weak-plaintext pair");
    sw = 4'b0000;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c < NBLK + LATENCY; c++) begin
      if (c < NBLK) begin
        sw = SW[c];
        n_setting[sw]++;
        if (c > 0 && SW[c][1:0] != SW[c-1][1:0]) n_pt_change++;
        if (c > 0 && SW[c][3:2] != SW[c-1][3:2]) n_key_change++;
      end
      @(posedge clk); #1;
      b = c - (LATENCY - 1);
      if (b >= 0 && b < NBLK) begin
        check(ciphertext == expected(SW[b]),
              $sformatf("block %0d (sw %b): got %h", b, SW[b], ciphertext));
        if (b > 0) n_b2b++;
      end
      if (b == 0) check(ciphertext == 64'hC0B7A8D05F3A829C, "pair 1 after 119 cycles");
      if (b == 1) check(ciphertext == 64'h4789FD476E82A5F1, "pair 2");
      if (b == 2) check(ciphertext == 64'h0A4ED5C15A63FEA3, "pair 3");
      if (b == 3) check(ciphertext == 64'h0, "weak-plaintext pair");
    end
    rst = 1'b1;
    @(posedge clk); #1;
    check(ciphertext == '0, "reset does not clear the output");
    n_reset++;
    for (int i = 0; i < 16; i++) begin
      if (n_setting[i] == 0) begin
        failures++; $display("FAIL: switch setting %b never used", 4'(i));
      end
    end
    $display("plaintext changes %0d, key changes %0d, back-to-back outputs %0d, resets %0d",
              n_pt_change, n_key_change, n_b2b, n_reset);
    check(n_pt_change > 0 && n_key_change > 0 && n_b2b > 0 && n_reset > 0,
          "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
