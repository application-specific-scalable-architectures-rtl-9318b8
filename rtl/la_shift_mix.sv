// la_shift_mix: shift register and byte-serial MixColumn unit (low-area core).
//
// A 4-byte shift register sits on top of the MixColumn logic. When load is
// high a byte from the state memory enters at the top (path 1) and the
// register shifts by one byte; when rot is high the register rotates by one
// byte, the byte leaving at the bottom re-entering at the top (path 2). With
// sr[0] at the bottom, MixColumn produces one output byte per clock:
// mc_out = 2*sr[0] ^ 3*sr[1] ^ sr[2] ^ sr[3]. Loading a column in four clocks
// and then reading mc_out while rotating four times yields the four bytes of
// the mixed column. Loading a row and rotating it n times turns the register
// into the ShiftRows unit; sr_out (= sr[0]) is then written back. Shift
// register, two paths and reuse for ShiftRows follow the document; the byte
// equation is the AES MixColumn matrix row.
module la_shift_mix (
  input  logic       clk,
  input  logic       load,     // path 1: shift in din
  input  logic       rot,      // path 2: rotate
  input  logic [7:0] din,
  output logic [7:0] sr_out,
  output logic [7:0] mc_out
);
  import aes_pkg::*;

  logic [7:0] sr [4];

  always_ff @(posedge clk) begin
    if (load || rot) begin
      for (int i = 0; i < 3; i++) sr[i] <= sr[i+1];
      sr[3] <= load ? din : sr[0];
    end
  end

  assign sr_out = sr[0];
  assign mc_out = xtime(sr[0]) ^ xtime(sr[1]) ^ sr[1] ^ sr[2] ^ sr[3];
endmodule
