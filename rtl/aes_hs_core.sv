// aes_hs_core: high-speed, fully unrolled AES-128 encryptor/decryptor.
//
// Data enters and leaves as 32-bit state columns, one per clock, with no
// loop anywhere: an initial AddRoundKey, nine full rounds (SubBytes,
// ShiftRows, MixColumn, AddRoundKey) and a final round without MixColumn are
// laid out one after the other, so a 128-bit block takes four clocks to enter
// and blocks may follow each other without gaps for as long as the key stays
// the same. Decryption runs through the same chain with every unit in its
// inverse mode (equivalent inverse cipher) and the round keys taken in reverse
// order, InvMixColumn applied to those of rounds 1..9 by the key expansion.
//
// Usage: set dec, pulse key_load with the key and wait for key_ready (45
// clocks). Then pulse sync during the clock before the first column of a
// session and present columns on din with din_valid, column 0 of each block
// (bits 127:96 of the block) first. sync is carried along the chain and
// re-times every ShiftRows state machine and every AddRoundKey counter (11
// pulses in all). The result leaves on dout, dout_valid, 90 clocks
// after the column entered; sync_out marks the clock before the first output
// column. Changing dec needs a new key_load and a new sync pulse. An
// assertion flags data presented before key_ready.
// The structure follows the document; stage latencies are this design's own.
module aes_hs_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         dec,
  input  logic [127:0] key,
  input  logic         key_load,
  output logic         key_ready,
  input  logic         sync,
  input  logic [31:0]  din,
  input  logic         din_valid,
  output logic [31:0]  dout,
  output logic         dout_valid,
  output logic         sync_out
);
  import aes_pkg::*;


  logic [31:0] kw_data;
  logic [5:0]  kw_idx;
  logic        kw_valid;

  hs_keyexp u_keyexp (
    .clk(clk), .rst_n(rst_n), .dec(dec), .key(key), .load(key_load),
    .kw_data(kw_data), .kw_idx(kw_idx), .kw_valid(kw_valid), .done(key_ready)
  );

  // stream at the output of each AddRoundKey
  logic [31:0] ark_d [NR+1];
  logic        ark_v [NR+1];
  logic        ark_s [NR+1];

  hs_addroundkey #(.ROUND(0)) u_ark0 (
    .clk(clk), .rst_n(rst_n), .dec(dec),
    .kw_data(kw_data), .kw_idx(kw_idx), .kw_valid(kw_valid),
    .din(din), .din_valid(din_valid), .sync_in(sync),
    .dout(ark_d[0]), .dout_valid(ark_v[0]), .sync_out(ark_s[0])
  );

  for (genvar r = 1; r <= NR; r++) begin : g_round
    logic [31:0] sb_d, sr_d, mc_d;
    logic        sb_v, sr_v, mc_v;
    logic        sb_s, sr_s, mc_s;

    hs_subbytes u_sb (
      .clk(clk), .rst_n(rst_n), .dec(dec),
      .din(ark_d[r-1]), .din_valid(ark_v[r-1]), .sync_in(ark_s[r-1]),
      .dout(sb_d), .dout_valid(sb_v), .sync_out(sb_s)
    );

    hs_shiftrows u_sr (
      .clk(clk), .rst_n(rst_n), .dec(dec),
      .din(sb_d), .din_valid(sb_v), .sync_in(sb_s),
      .dout(sr_d), .dout_valid(sr_v), .sync_out(sr_s)
    );

    if (r < NR) begin : g_mix
      hs_mixcolumn u_mc (
        .clk(clk), .rst_n(rst_n), .dec(dec),
        .din(sr_d), .din_valid(sr_v), .sync_in(sr_s),
        .dout(mc_d), .dout_valid(mc_v), .sync_out(mc_s)
      );
    end else begin : g_final
      assign mc_d = sr_d;
      assign mc_v = sr_v;
      assign mc_s = sr_s;
    end

    hs_addroundkey #(.ROUND(r)) u_ark (
      .clk(clk), .rst_n(rst_n), .dec(dec),
      .kw_data(kw_data), .kw_idx(kw_idx), .kw_valid(kw_valid),
      .din(mc_d), .din_valid(mc_v), .sync_in(mc_s),
      .dout(ark_d[r]), .dout_valid(ark_v[r]), .sync_out(ark_s[r])
    );
  end

  // data may only enter once every round key is stored
  a_key_before_data: assert property (@(posedge clk) disable iff (!rst_n)
    din_valid |-> key_ready);

  assign dout       = ark_d[NR];
  assign dout_valid = ark_v[NR];
  assign sync_out   = ark_s[NR];
endmodule
