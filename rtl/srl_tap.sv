// srl_tap: programmable-tap shift register, modelled on an SRL16 element.
//
// Every clock the register shifts in din. dout is the stage selected by tap,
// so a byte presented at din leaves at dout tap+1 clocks later. The tap may
// change every clock. DEPTH = 16 matches the 16-bit shift register look-up
// table the document builds the row shifting module from.
module srl_tap #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic [W-1:0]             din,
  input  logic [$clog2(DEPTH)-1:0] tap,
  output logic [W-1:0]             dout
);
  logic [W-1:0] sr [DEPTH];

  always_ff @(posedge clk) begin
    sr[0] <= din;
    for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
  end

  assign dout = sr[tap];
endmodule
