// des_round_pipe: one superpipelined DES round (Feistel round split into
// register stages).
//
// A DES round computes L' = R and R' = L xor P(S(E(R) xor K)). Here each
// operation of that chain gets its own register stage, so that the longest
// path between two registers is a single S-box lookup or a single XOR:
//
//   [split]   R registered                        (only if SPLIT_REG = 1)
//   expand    E(R), 32 -> 48 bits                 (des_expansion)
//   [delay]   E_DELAY no-operation registers to wait for the sub-key
//   key xor   E(R) xor K
//   split     48 bits regrouped as eight 6-bit blocks
//   S-box     eight des_sbox lookups
//   combine   eight 4-bit outputs joined into 32 bits
//   P-box     straight permutation                (des_straight_pbox)
//   xor L     R' = L xor P, and L' = R
//
// The left half and the right half travel beside this chain in delay lines
// (des_delay) so that L meets P(..) and R leaves together with R'.
//
// Timing: l_o/r_o are l_i/r_i after LAT = SPLIT_REG + E_DELAY + 7 rising
// edges. k_i is used combinationally by the key-xor stage: it must hold the
// sub-key of the block that entered SPLIT_REG + 1 + E_DELAY edges earlier.
// One new block may enter every cycle. Rounds 2..16 of the document use
// SPLIT_REG = 0, E_DELAY = 0 (7 stages); round 1 uses SPLIT_REG = 1,
// E_DELAY = 2 (10 stages), as in the document's round-1 schedule. The order of
// the stages is the document's; the synchronous active-high reset is this
// design's own choice.
module des_round_pipe
  import des_pkg::*;
#(
  parameter bit          SPLIT_REG = 1'b0,
  parameter int unsigned E_DELAY   = 0
) (
  input  logic    clk,
  input  logic    rst,
  input  half_t   l_i,
  input  half_t   r_i,
  input  subkey_t k_i,
  output half_t   l_o,
  output half_t   r_o
);

  localparam int unsigned LAT = int'(SPLIT_REG) + E_DELAY + ROUND_STAGES;

  half_t                r_s;       // right half entering the expansion
  subkey_t              e_w, e_q, e_d;
  subkey_t              x_q;       // E(R) xor K
  logic [7:0][5:0]      six_q;     // split into eight 6-bit blocks
  logic [7:0][3:0]      sb_w, sb_q;
  half_t                c_q;       // combined S-box output
  half_t                p_w, p_q;  // after straight P-box
  half_t                l_d, r_d;  // delayed halves
  half_t                l_q, r_q;

  if (SPLIT_REG) begin : g_split
    always_ff @(posedge clk) begin
      if (rst) r_s <= '0;
      else     r_s <= r_i;
    end
  end else begin : g_nosplit
    assign r_s = r_i;
  end

  des_expansion u_exp (.din(r_s), .dout(e_w));

  if (E_DELAY > 0) begin : g_edly
    des_delay #(.W(48), .N(E_DELAY)) u_edly (.clk, .rst, .din(e_q), .dout(e_d));
  end else begin : g_noedly
    assign e_d = e_q;
  end

  // Block j = 0 is S1, which takes the most significant 6 bits.
  for (genvar j = 0; j < 8; j++) begin : g_sbox
    des_sbox #(.BOX(j + 1)) u_sbox (.din(six_q[7-j]), .dout(sb_w[7-j]));
  end

  des_straight_pbox u_p (.din(c_q), .dout(p_w));

  des_delay #(.W(32), .N(LAT - 1)) u_ldly (.clk, .rst, .din(l_i), .dout(l_d));
  des_delay #(.W(32), .N(LAT - 1)) u_rdly (.clk, .rst, .din(r_i), .dout(r_d));

  always_ff @(posedge clk) begin
    if (rst) begin
      e_q   <= '0;
      x_q   <= '0;
      six_q <= '0;
      sb_q  <= '0;
      c_q   <= '0;
      p_q   <= '0;
      l_q   <= '0;
      r_q   <= '0;
    end else begin
      e_q   <= e_w;
      x_q   <= e_d ^ k_i;
      six_q <= x_q;
      sb_q  <= sb_w;
      c_q   <= sb_q;
      p_q   <= p_w;
      r_q   <= l_d ^ p_q;
      l_q   <= r_d;
    end
  end

  assign l_o = l_q;
  assign r_o = r_q;

endmodule
