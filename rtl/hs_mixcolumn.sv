// hs_mixcolumn: MixColumn / InvMixColumn of one 32-bit state column per clock.
//
// Encryption multiplies the column by the circulant matrix (02 03 01 01),
// decryption by (0e 0b 0d 09), both over GF(2^8). The result is registered:
// latency 1 clock, throughput one column per clock. valid and sync side-band
// bits (cleared by rst_n) are delayed with the data. The matrices are those of the AES standard;
// the single output register is this design's own sub-pipelining choice.
module hs_mixcolumn (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dec,
  input  logic [31:0] din,
  input  logic        din_valid,
  input  logic        sync_in,
  output logic [31:0] dout,
  output logic        dout_valid,
  output logic        sync_out
);
  import aes_pkg::*;

  always_ff @(posedge clk) dout <= dec ? inv_mixcol(din) : mixcol(din);

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
