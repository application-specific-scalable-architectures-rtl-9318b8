// aes_sbox: AES S-box and inverse S-box for one byte, computed in logic.
//
// No lookup table: the byte is inverted in GF(2^8) as x^254, split into the
// partial products x^14 and x^240 (= x^16 * x^32 * x^64 * x^128), and the
// AES affine transform is applied after the inversion (encryption) or its
// inverse before it (decryption). Using inversion logic instead of a table
// follows the document; the square-and-multiply chain is this design's own
// choice, the document only says that GF(2^8) inversion is used.
//
// STAGES = 0: purely combinational, dout follows din and dec.
// STAGES = 1: one register between the two halves of the inversion chain
//             (sub-pipelining); dout is valid one clock after din.
module aes_sbox #(
  parameter int unsigned STAGES = 0
) (
  input  logic       clk,
  input  logic       dec,     // 0: S-box, 1: inverse S-box
  input  logic [7:0] din,
  output logic [7:0] dout
);
  import aes_pkg::*;

  logic [7:0] pre;            // byte entering the inversion
  logic [7:0] p14, p16;       // x^14 and x^16
  logic [7:0] p14_q, p16_q;
  logic       dec_q;
  logic [7:0] inv;

  assign pre = dec ? inv_affine(din) : din;
  assign p14 = gf_pow14(pre);
  assign p16 = gf_pow16(pre);

  if (STAGES == 0) begin : g_comb
    assign p14_q = p14;
    assign p16_q = p16;
    assign dec_q = dec;
  end else begin : g_pipe
    always_ff @(posedge clk) begin
      p14_q <= p14;
      p16_q <= p16;
      dec_q <= dec;
    end
  end

  assign inv  = gf_mul(p14_q, gf_pow240_from16(p16_q));
  assign dout = dec_q ? inv : affine(inv);
endmodule
