// tb_des_delay: checks delay lines of 0, 1, 2 and 9 registers: after reset
// the output is zero, and afterwards each output equals the input exactly N
// clock edges earlier, for a new random word every cycle.
module tb_des_delay;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [31:0] din;
  logic [31:0] d0, d1, d2, d9;
  des_delay #(.W(32), .N(0)) u0 (.clk, .rst, .din, .dout(d0));
  des_delay #(.W(32), .N(1)) u1 (.clk, .rst, .din, .dout(d1));
  des_delay #(.W(32), .N(2)) u2 (.clk, .rst, .din, .dout(d2));
  des_delay #(.W(32), .N(9)) u9 (.clk, .rst, .din, .dout(d9));

  logic [31:0] hist [$];

  initial begin
    din = 32'hDEAD_BEEF;
    repeat (12) @(posedge clk);
    #1;
    check(d1 == '0 && d2 == '0 && d9 == '0, "reset does not clear");
    rst = 1'b0;
    for (int c = 0; c < 300; c++) begin
      din = $urandom;
      hist.push_front(din);
      #1;
      check(d0 == din, "N=0 is not a wire");
      @(posedge clk); #1;
      // hist[0] was sampled at this edge
      check(d1 == hist[0], "N=1 wrong");
      if (hist.size() >= 2) check(d2 == hist[1], "N=2 wrong");
      if (hist.size() >= 9) check(d9 == hist[8], "N=9 wrong");
      else check(d9 == '0, "N=9 not zero while filling");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
