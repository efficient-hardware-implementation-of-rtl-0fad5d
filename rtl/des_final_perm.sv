// des_final_perm: Final permutation, the inverse of the initial permutation.
//
// Reorders the 64 bits of the swapped round-16 output (R16 in the top half, L16
// in the bottom half) into the ciphertext.
// Purely combinational, no clock: the register that follows it belongs to the
// enclosing pipeline stage. Bit numbering: DES bit n (1 = most significant) of
// a W-bit vector v is v[W-n]. The table is the standard DES table, held in
// des_pkg; the document names this box and its role but not its wiring.
module des_final_perm
  import des_pkg::*;
(
  input  logic [63:0] din,
  output logic [63:0] dout
);

  always_comb dout = perm_fp(din);

endmodule
