// des_compression_pbox: Compression P-box (permuted choice 2): 56 bits to a
// 48-bit sub-key.
//
// Selects and reorders 48 of the 56 bits of the rotated C and D halves to form
// a round sub-key.
// Purely combinational, no clock: the register that follows it belongs to the
// enclosing pipeline stage. Bit numbering: DES bit n (1 = most significant) of
// a W-bit vector v is v[W-n]. The table is the standard DES table, held in
// des_pkg; the document names this box and its role but not its wiring.
module des_compression_pbox
  import des_pkg::*;
(
  input  logic [55:0] din,
  output logic [47:0] dout
);

  always_comb dout = perm_pc2(din);

endmodule
