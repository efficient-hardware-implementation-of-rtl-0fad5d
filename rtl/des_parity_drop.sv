// des_parity_drop: Parity drop (permuted choice 1): 64-bit cipher key to 56
// bits.
//
// Discards every eighth key bit (the parity bits) and reorders the rest into
// the two 28-bit halves C (top) and D (bottom).
// Purely combinational, no clock: the register that follows it belongs to the
// enclosing pipeline stage. Bit numbering: DES bit n (1 = most significant) of
// a W-bit vector v is v[W-n]. The table is the standard DES table, held in
// des_pkg; the document names this box and its role but not its wiring.
module des_parity_drop
  import des_pkg::*;
(
  input  logic [63:0] din,
  output logic [55:0] dout
);

  always_comb dout = perm_pc1(din);

endmodule
