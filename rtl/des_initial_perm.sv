// des_initial_perm: Initial permutation of the 64-bit plaintext block.
//
// Reorders the 64 plaintext bits before the first round; the left half of the
// result is the top 32 bits and the right half the bottom 32 bits.
// Purely combinational, no clock: the register that follows it belongs to the
// enclosing pipeline stage. Bit numbering: DES bit n (1 = most significant) of
// a W-bit vector v is v[W-n]. The table is the standard DES table, held in
// des_pkg; the document names this box and its role but not its wiring.
module des_initial_perm
  import des_pkg::*;
(
  input  logic [63:0] din,
  output logic [63:0] dout
);

  always_comb dout = perm_ip(din);

endmodule
