// des_straight_pbox: Straight permutation (P) of the 32-bit S-box output.
//
// Reorders the eight 4-bit S-box outputs, the last operation of the f-function.
// Purely combinational, no clock: the register that follows it belongs to the
// enclosing pipeline stage. Bit numbering: DES bit n (1 = most significant) of
// a W-bit vector v is v[W-n]. The table is the standard DES table, held in
// des_pkg; the document names this box and its role but not its wiring.
module des_straight_pbox
  import des_pkg::*;
(
  input  logic [31:0] din,
  output logic [31:0] dout
);

  always_comb dout = perm_p(din);

endmodule
