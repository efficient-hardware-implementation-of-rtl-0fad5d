// des_delay: synchronisation delay line ("no operation" stage) of N registers.
//
// The superpipeline computes the two halves of a round, the expanded right
// half and the round sub-key at different depths; these delay lines hold the
// earlier value back until its partner is ready, one register per clock
// cycle. dout is din delayed by exactly N rising clock edges; N = 0 makes it
// a plain wire. A synchronous, active-high rst clears every register. The
// lengths of the delays come from the document's stage schedule; the reset is
// this design's choice.
module des_delay #(
  parameter int unsigned W = 32,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (N == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [W-1:0] q [N];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < int'(N); i++) q[i] <= '0;
      end else begin
        q[0] <= din;
        for (int i = 1; i < int'(N); i++) q[i] <= q[i-1];
      end
    end
    assign dout = q[N-1];
  end

endmodule
