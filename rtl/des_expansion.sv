// des_expansion: Expansion P-box, 32 to 48 bits.
//
// Spreads the 32-bit right half over eight 6-bit groups; the two outer bits of
// each group repeat the neighbouring nibbles' edge bits.
// Purely combinational, no clock: the register that follows it belongs to the
// enclosing pipeline stage. Bit numbering: DES bit n (1 = most significant) of
// a W-bit vector v is v[W-n]. The table is the standard DES table, held in
// des_pkg; the document names this box and its role but not its wiring.
module des_expansion
  import des_pkg::*;
(
  input  logic [31:0] din,
  output logic [47:0] dout
);

  always_comb dout = perm_e(din);

endmodule
