// la_key_sched: byte-serial AES-128 key schedule with key memory (low-area).
//
// The key memory holds the cipher key (loaded one byte per clock through
// load/load_addr/din) and a working round key, each 16 bytes addressed
// 4*column + row. start copies the cipher key into the working key and sets
// Rcon to 01. Each step pulse (with step_idx = i) updates working byte i in
// place to the next round key:
//   i < 4 : k[i] ^= S(k[12 + (i+1) mod 4]) ^ (i == 0 ? Rcon : 0)
//   i >= 4: k[i] ^= k[i-4]   (k[i-4] is already the new value)
// so sixteen steps, i = 0..15, produce the next round key, and Rcon doubles
// on step 15. The S-box is not inside: sb_in goes to the core's shared S-box
// and its result comes back on sb_out. rk_addr reads the working key for
// AddRoundKey. The document names the key schedule and its size only; the
// byte-serial in-place algorithm and the separate cipher-key copy are this
// design's own.
module la_key_sched (
  input  logic       clk,
  input  logic       load,
  input  logic [3:0] load_addr,
  input  logic [7:0] din,
  input  logic       start,
  input  logic       step,
  input  logic [3:0] step_idx,
  output logic [7:0] sb_in,
  input  logic [7:0] sb_out,
  input  logic [3:0] rk_addr,
  output logic [7:0] rk_byte
);
  import aes_pkg::*;

  logic [7:0] ck [16];   // cipher key
  logic [7:0] rk [16];   // working round key
  logic [7:0] rcon;
  logic [7:0] nb;

  assign sb_in = rk[{2'b11, step_idx[1:0] + 2'd1}];

  always_comb begin
    if (step_idx < 4'd4) nb = rk[step_idx] ^ sb_out ^ ((step_idx == 4'd0) ? rcon : 8'h00);
    else                 nb = rk[step_idx] ^ rk[step_idx - 4'd4];
  end

  always_ff @(posedge clk) begin
    if (load) ck[load_addr] <= din;
    if (start) begin
      for (int i = 0; i < 16; i++) rk[i] <= ck[i];
      rcon <= 8'h01;
    end else if (step) begin
      rk[step_idx] <= nb;
      if (step_idx == 4'd15) rcon <= xtime(rcon);
    end
  end

  assign rk_byte = rk[rk_addr];
endmodule
