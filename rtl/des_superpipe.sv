// des_superpipe: 119-stage superpipelined DES encryption core.
//
// The sixteen Feistel rounds of DES are unrolled, and each round is further
// cut into single-operation register stages (des_round_pipe), so the clock
// period is set by one S-box lookup or one XOR rather than by a whole round.
// The key schedule is unrolled and pipelined beside it (des_key_round), so
// every block carries its own 64-bit key through the pipe and the key may
// change on every clock cycle.
//
// Stage schedule (register stage n holds a block n edges after it entered):
//   1         initial permutation of the plaintext, parity drop of the key
//   2..11     round 1 (split, expansion, 2-cycle wait for sub-key 1, key
//             xor, split, S-boxes, combine, P-box, xor with L)
//   12..116   rounds 2..16, 7 stages each (expansion, key xor, split,
//             S-boxes, combine, P-box, xor with L)
//   117       the halves swapped (R16 on top, L16 below)
//   118       final permutation
//   119       ciphertext output register
//
// Interface: plaintext and cipherkey are sampled on every rising edge of clk;
// ciphertext shows the encryption of the pair sampled 119 edges earlier, so
// one 64-bit block is encrypted per clock cycle. A synchronous, active-high
// rst clears every stage. Bits are numbered as in the DES standard with DES
// bit 1 in bit 63. The stage split, the 119-cycle latency and the ports
// (plaintext, cipherkey, clk, rst, ciphertext) follow the document; where the
// rotation of each round's key happens and the reset style are this design's
// own choices. Encryption only: the document builds no decryption path.
module des_superpipe
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  block_t plaintext,
  input  block_t cipherkey,
  output block_t ciphertext
);

  // Depth as built below: stage 1, round 1 (split + 2-cycle wait + 7),
  // rounds 2..16, then swap, final permutation and output register.
  localparam int unsigned BUILT_LATENCY = 1 + (1 + 2 + ROUND_STAGES)
                                          + (ROUNDS - 1) * ROUND_STAGES + 3;
  if (BUILT_LATENCY != LATENCY) begin : g_latency_mismatch
    $error("des_superpipe: built depth %0d differs from LATENCY %0d",
           BUILT_LATENCY, LATENCY);
  end

  block_t  ip_w, ip_q;
  cd_t     pc1_w, pc1_q;
  half_t   l [ROUNDS+1];
  half_t   r [ROUNDS+1];
  cd_t     cd [ROUNDS+1];
  subkey_t k [1:ROUNDS];
  block_t  sw_q, fp_w, fp_q, ct_q;

  // Stage 1: initial permutation and parity drop.
  des_initial_perm u_ip  (.din(plaintext), .dout(ip_w));
  des_parity_drop  u_pc1 (.din(cipherkey), .dout(pc1_w));

  always_ff @(posedge clk) begin
    if (rst) begin
      ip_q  <= '0;
      pc1_q <= '0;
    end else begin
      ip_q  <= ip_w;
      pc1_q <= pc1_w;
    end
  end

  assign l[0]  = ip_q[63:32];
  assign r[0]  = ip_q[31:0];
  assign cd[0] = pc1_q;

  // Round 1: data in at stage 1, sub-key 1 ready after stage 5, out at 11.
  des_key_round #(.SHIFT(SHIFTS[0]), .SPLIT_REG(1'b1), .COMBINE_REG(1'b1),
                  .CD_DELAY(7))
    u_key1 (.clk, .rst, .cd_i(cd[0]), .k_o(k[1]), .cd_o(cd[1]));

  des_round_pipe #(.SPLIT_REG(1'b1), .E_DELAY(2))
    u_round1 (.clk, .rst, .l_i(l[0]), .r_i(r[0]), .k_i(k[1]),
              .l_o(l[1]), .r_o(r[1]));

  // Rounds 2..16: data in at stage b = 11 + 7(n-2), C/D state in at b-1,
  // sub-key n ready after stage b+1, data out at b+7.
  for (genvar n = 2; n <= ROUNDS; n++) begin : g_round
    des_key_round #(.SHIFT(SHIFTS[n-1]), .SPLIT_REG(1'b0), .COMBINE_REG(1'b0),
                    .CD_DELAY((n == ROUNDS) ? 0 : 6))
      u_key (.clk, .rst, .cd_i(cd[n-1]), .k_o(k[n]), .cd_o(cd[n]));

    des_round_pipe #(.SPLIT_REG(1'b0), .E_DELAY(0))
      u_round (.clk, .rst, .l_i(l[n-1]), .r_i(r[n-1]), .k_i(k[n]),
               .l_o(l[n]), .r_o(r[n]));
  end

  // Stages 117..119: swap, final permutation, output register.
  des_final_perm u_fp (.din(sw_q), .dout(fp_w));

  always_ff @(posedge clk) begin
    if (rst) begin
      sw_q <= '0;
      fp_q <= '0;
      ct_q <= '0;
    end else begin
      sw_q <= {r[ROUNDS], l[ROUNDS]};
      fp_q <= fp_w;
      ct_q <= fp_q;
    end
  end

  assign ciphertext = ct_q;

endmodule
