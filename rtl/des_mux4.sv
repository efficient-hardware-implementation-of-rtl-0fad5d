// des_mux4: 4x1 multiplexer of W-bit words.
//
// dout is din[sel], combinationally. In the input/output unit two of them
// pick one of four stored plaintexts and one of four stored cipher keys, each
// under the control of two board switches. Width and structure follow the
// document's input/output unit (64-bit words, 4 inputs); the index order
// (sel = 0 selects word 0) is this design's choice.
module des_mux4 #(
  parameter int unsigned W = 64
) (
  input  logic [3:0][W-1:0] din,
  input  logic [1:0]        sel,
  output logic [W-1:0]      dout
);

  always_comb begin
    unique case (sel)
      2'd0: dout = din[0];
      2'd1: dout = din[1];
      2'd2: dout = din[2];
      default: dout = din[3];
    endcase
  end

endmodule
