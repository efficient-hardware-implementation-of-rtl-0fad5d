// tb_des_mux4: checks the 4x1 multiplexer with random words on all four
// inputs and every select value.
module tb_des_mux4;
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
  logic [3:0][63:0] din;
  logic [1:0]       sel;
  logic [63:0]      dout;
  des_mux4 #(.W(64)) dut (.din, .sel, .dout);

  initial begin
    for (int i = 0; i < 100; i++) begin
      for (int j = 0; j < 4; j++) din[j] = {$urandom, $urandom};
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s); #1;
        check(dout == din[s], $sformatf("sel %0d: got %h expected %h", s, dout, din[s]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
