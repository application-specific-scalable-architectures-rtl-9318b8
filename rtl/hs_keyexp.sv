// hs_keyexp: on-the-fly AES-128 key expansion for the high-speed core.
//
// A 128-bit cipher key is taken in when load is high. The module then puts
// the 44 expanded words w[0..43] on a 32-bit round-key bus, one word per clock
// (kw_valid, kw_idx = word index, kw_data), and raises done when the last
// word has been sent. Four word registers hold the last four words; the next
// word is w[i-4] XOR either w[i-1] or SubWord(RotWord(w[i-1])) XOR Rcon, the
// AES key schedule. In decryption mode the words of rounds 1..NR-1 pass
// through InvMixColumn before reaching the bus, so that the decryptor can use
// the same order of transformations as the encryptor (the M^-1 path of the
// document's key expansion figure). The four S-boxes are shared with nothing
// else. Timing: load high in clock 0; w[i] is on the bus during clock i+2; done
// rises with the last word (clock 45) and stays high until the next load.
// The word-per-clock schedule and bus format are this design's own choice.
module hs_keyexp (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         dec,
  input  logic [127:0] key,
  input  logic         load,
  output logic [31:0]  kw_data,
  output logic [5:0]   kw_idx,
  output logic         kw_valid,
  output logic         done
);
  import aes_pkg::*;

  logic [31:0] w [4];          // w[i-4] .. w[i-1]
  logic [5:0]  idx;            // index of the next word to send
  logic        busy;
  logic [7:0]  rcon;
  logic [31:0] sub, nxt, word;

  // SubWord(RotWord(w[i-1]))
  for (genvar b = 0; b < 4; b++) begin : g_sbox
    aes_sbox #(.STAGES(0)) u_sbox (
      .clk  (clk),
      .dec  (1'b0),
      .din  (w[3][31-8*((b+1)%4) -: 8]),
      .dout (sub[31-8*b -: 8])
    );
  end

  always_comb begin
    if (idx[1:0] == 2'd0) nxt = w[0] ^ sub ^ {rcon, 24'h0};
    else                  nxt = w[0] ^ w[3];
    // first four words come straight from the key registers
    word = (idx < 6'(NK)) ? w[idx[1:0]] : nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      idx      <= '0;
      rcon     <= 8'h01;
      kw_valid <= 1'b0;
      kw_idx   <= '0;
      kw_data  <= '0;
      for (int i = 0; i < 4; i++) w[i] <= '0;
    end else if (load) begin
      busy     <= 1'b1;
      done     <= 1'b0;
      idx      <= '0;
      rcon     <= 8'h01;
      kw_valid <= 1'b0;
      w[0] <= key[127:96];
      w[1] <= key[95:64];
      w[2] <= key[63:32];
      w[3] <= key[31:0];
    end else if (busy) begin
      kw_valid <= 1'b1;
      kw_idx   <= idx;
      kw_data  <= (dec && idx >= 6'(NK) && idx < 6'(NWORDS - NK)) ? inv_mixcol(word) : word;
      if (idx >= 6'(NK)) begin
        w[0] <= w[1];
        w[1] <= w[2];
        w[2] <= w[3];
        w[3] <= nxt;
        if (idx[1:0] == 2'd0) rcon <= xtime(rcon);
      end
      idx <= idx + 6'd1;
      if (idx == 6'(NWORDS - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end else begin
      kw_valid <= 1'b0;
    end
  end
endmodule
