// des_fpga_top: the DES encryption system of the FPGA board, i.e. the
// superpipelined core with its input/output unit.
//
// Four plaintexts and four cipher keys are stored inside the chip (the
// PLAINTEXTS and CIPHERKEYS parameters). Two 4x1 multiplexers (des_mux4)
// choose one of each with the board's four slide switches: sw[1:0] (Sw1,
// Sw0) pick the plaintext and sw[3:2] (Sw3, Sw2) the key. The selected pair
// feeds the 119-stage core (des_superpipe) every clock cycle, and the
// ciphertext of the pair selected 119 cycles earlier leaves on ciphertext,
// the 64-bit value the board's LCD shows in hexadecimal. The LCD controller
// is outside this design.
//
// The storage, the switch assignment and the multiplexers follow the
// document's input/output unit. The stored words include the document's three
// published test pairs: switches 0000 select 123456ABCD132536 with key
// AABB09182736CCDD, 0101 select 0000000000000000 with key 22234512987ABB23,
// and 0110 select 0000000000000001 with the same key. Plaintext word 3 and
// keys 2 and 3 are standard FIPS test values (8787878787878787 under key
// 0E329232EA6D0D73 encrypts to zero). Those extra words, the binary
// weighting of the switches (Sw0 and Sw2 as the low bits) and the absence of
// a switch synchroniser (the core samples the selected words in its first
// register stage) are this design's choices.
module des_fpga_top
  import des_pkg::*;
#(
  parameter logic [3:0][63:0] PLAINTEXTS = {
    64'h8787_8787_8787_8787,   // word 3
    64'h0000_0000_0000_0001,   // word 2
    64'h0000_0000_0000_0000,   // word 1
    64'h1234_56AB_CD13_2536},  // word 0
  parameter logic [3:0][63:0] CIPHERKEYS = {
    64'h0E32_9232_EA6D_0D73,   // key 3
    64'h1334_5779_9BBC_DFF1,   // key 2
    64'h2223_4512_987A_BB23,   // key 1
    64'hAABB_0918_2736_CCDD}   // key 0
) (
  input  logic   clk,
  input  logic   rst,
  input  logic [3:0] sw,
  output block_t ciphertext
);

  block_t pt_sel, key_sel;

  des_mux4 #(.W(64)) u_pt_mux  (.din(PLAINTEXTS), .sel(sw[1:0]), .dout(pt_sel));
  des_mux4 #(.W(64)) u_key_mux (.din(CIPHERKEYS), .sel(sw[3:2]), .dout(key_sel));

  des_superpipe u_des (
    .clk,
    .rst,
    .plaintext (pt_sel),
    .cipherkey (key_sel),
    .ciphertext
  );

endmodule
