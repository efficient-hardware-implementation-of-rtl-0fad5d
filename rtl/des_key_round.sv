// des_key_round: pipelined sub-key generation for one DES round.
//
// The key schedule runs beside the data pipeline, so each block carries its
// own key and the key may change every clock cycle. For round r the 56-bit
// C/D state left by round r-1 is
//
//   [split]    registered                          (only if SPLIT_REG = 1)
//   rotate     C and D each rotated left by SHIFT (1 or 2) bits
//   [combine]  the two 28-bit halves joined and registered (COMBINE_REG = 1)
//   compress   compression P-box to the 48-bit sub-key (des_compression_pbox)
//
// and the rotated state goes on to round r+1 through a CD_DELAY-register delay
// line (des_delay).
//
// Timing: k_o holds the sub-key of the state that arrived on cd_i
// SPLIT_REG + COMBINE_REG + 2 rising edges earlier; cd_o is the rotated state
// SPLIT_REG + 1 + CD_DELAY edges after cd_i (CD_DELAY = 0: straight from the
// rotate register). The rotation amounts follow the document (one bit in
// rounds 1, 2, 9 and 16, two otherwise). Where the rotation of round r sits
// in the pipeline (just before that round's compression) is this design's
// choice; the synchronous active-high reset is too.
module des_key_round
  import des_pkg::*;
#(
  parameter int unsigned SHIFT       = 1,
  parameter bit          SPLIT_REG   = 1'b0,
  parameter bit          COMBINE_REG = 1'b0,
  parameter int unsigned CD_DELAY    = 6
) (
  input  logic    clk,
  input  logic    rst,
  input  cd_t     cd_i,
  output subkey_t k_o,
  output cd_t     cd_o
);

  cd_t     cd_s, rot_w, rot_q, cmb;
  subkey_t k_w, k_q;

  if (SPLIT_REG) begin : g_split
    always_ff @(posedge clk) begin
      if (rst) cd_s <= '0;
      else     cd_s <= cd_i;
    end
  end else begin : g_nosplit
    assign cd_s = cd_i;
  end

  // Rotate each 28-bit half left by SHIFT bits.
  always_comb begin
    logic [27:0] c, d;
    c = cd_s[55:28];
    d = cd_s[27:0];
    rot_w = {28'((c << SHIFT) | (c >> (28 - SHIFT))),
             28'((d << SHIFT) | (d >> (28 - SHIFT)))};
  end

  if (COMBINE_REG) begin : g_combine
    always_ff @(posedge clk) begin
      if (rst) cmb <= '0;
      else     cmb <= rot_q;
    end
  end else begin : g_nocombine
    assign cmb = rot_q;
  end

  des_compression_pbox u_pc2 (.din(cmb), .dout(k_w));

  always_ff @(posedge clk) begin
    if (rst) begin
      rot_q <= '0;
      k_q   <= '0;
    end else begin
      rot_q <= rot_w;
      k_q   <= k_w;
    end
  end

  if (CD_DELAY > 0) begin : g_cddly
    des_delay #(.W(56), .N(CD_DELAY)) u_cddly (.clk, .rst, .din(rot_q), .dout(cd_o));
  end else begin : g_nocddly
    assign cd_o = rot_q;
  end

  assign k_o = k_q;

endmodule
