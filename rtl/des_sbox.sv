// des_sbox: one DES substitution box, 6 bits in, 4 bits out.
//
// BOX selects S1..S8. The outer input bits (din[5] and din[0]) pick one of
// four rows, the inner four bits (din[4:1]) one of sixteen columns, and the
// entry of the standard DES table at that place is the output. Purely
// combinational; in the round pipeline eight of them sit between the "split"
// and "S-box" registers. The document shows the eight boxes and their 6-to-4
// bit widths; the table contents are those of the DES standard.
module des_sbox
  import des_pkg::*;
#(
  parameter int unsigned BOX = 1   // 1..8
) (
  input  logic [5:0] din,
  output logic [3:0] dout
);

  always_comb dout = sbox_lookup(3'(BOX - 1), din);

endmodule
