// hs_addroundkey: AddRoundKey of one round of the high-speed core.
//
// The four 32-bit columns of this round's key are kept in a small register
// storage. A 2-bit binary counter addresses it; the counter is cleared by
// sync_in, a pulse during the clock before column 0 of a data session, so the
// key column always matches the state column it is added to. Each clock one
// state column is XORed with the addressed key column and registered (latency
// 1, one column per clock).
//
// Round keys arrive on the 32-bit key bus of hs_keyexp as (word index, word)
// pairs. This instance stores the four words of round ROUND when encrypting,
// or of round NR-ROUND when decrypting (the decryption keys are used in
// reverse order, and hs_keyexp has already passed rounds 1..NR-1 through
// InvMixColumn). A new key simply overwrites the storage. Storage, counter,
// pulse and XOR are the document's; the bus format with a word index is this
// design's own. rst_n clears only the valid and sync side-band bits.
module hs_addroundkey #(
  parameter int unsigned ROUND = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dec,
  // round-key bus
  input  logic [31:0] kw_data,
  input  logic [5:0]  kw_idx,
  input  logic        kw_valid,
  // state stream
  input  logic [31:0] din,
  input  logic        din_valid,
  input  logic        sync_in,
  output logic [31:0] dout,
  output logic        dout_valid,
  output logic        sync_out
);
  import aes_pkg::*;

  logic [31:0] rk [4];
  logic [1:0]  cnt;
  logic [3:0]  my_round;

  assign my_round = dec ? 4'(NR - ROUND) : 4'(ROUND);

  always_ff @(posedge clk) begin
    if (kw_valid && kw_idx[5:2] == my_round) rk[kw_idx[1:0]] <= kw_data;
  end

  always_ff @(posedge clk) begin
    if (sync_in) cnt <= 2'd0;
    else         cnt <= cnt + 2'd1;
  end

  always_ff @(posedge clk) dout <= din ^ rk[cnt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_valid <= 1'b0;
      sync_out   <= 1'b0;
    end else begin
      dout_valid <= din_valid;
      sync_out   <= sync_in;
    end
  end
endmodule
