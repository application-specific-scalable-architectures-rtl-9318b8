// aes_asa_top: the two application-specific AES-128 cores side by side.
//
// hs_*: the high-speed core (aes_hs_core), a fully unrolled, sub-pipelined
//       encryptor/decryptor taking and returning one 32-bit state column per
//       clock (a 128-bit block every four clocks), with a 128-bit key input
//       and on-the-fly key expansion. See aes_hs_core for the protocol.
// la_*: the low-area core (aes_la_core), an 8-bit encryptor built around a
//       16-byte state memory with a single S-box, roughly 1100 clocks per
//       block. See aes_la_core for the protocol.
// The two designs share only clock and reset; each has its own ports.
module aes_asa_top (
  input  logic         clk,
  input  logic         rst_n,
  // high-speed core
  input  logic         hs_dec,
  input  logic [127:0] hs_key,
  input  logic         hs_key_load,
  output logic         hs_key_ready,
  input  logic         hs_sync,
  input  logic [31:0]  hs_din,
  input  logic         hs_din_valid,
  output logic [31:0]  hs_dout,
  output logic         hs_dout_valid,
  output logic         hs_sync_out,
  // low-area core
  input  logic [7:0]   la_din,
  input  logic         la_key_we,
  input  logic         la_data_we,
  output logic [7:0]   la_dout,
  output logic         la_dout_valid,
  output logic         la_busy
);
  aes_hs_core u_hs (
    .clk(clk), .rst_n(rst_n), .dec(hs_dec), .key(hs_key), .key_load(hs_key_load),
    .key_ready(hs_key_ready), .sync(hs_sync), .din(hs_din), .din_valid(hs_din_valid),
    .dout(hs_dout), .dout_valid(hs_dout_valid), .sync_out(hs_sync_out)
  );

  aes_la_core u_la (
    .clk(clk), .rst_n(rst_n), .din(la_din), .key_we(la_key_we), .data_we(la_data_we),
    .dout(la_dout), .dout_valid(la_dout_valid), .busy(la_busy)
  );
endmodule
