// la_state_mem: 4x4 byte state memory of the low-area AES core.
//
// Sixteen bytes, addressed as 4*column + row, with one write port and two
// combinational read ports. The read address acts as the first multiplexer of
// the low-area organisation: it selects any byte of any row or column. The
// write port is the feedback path through which the result of every operation
// (SubBytes, ShiftRows, MixColumn, AddRoundKey) or an input byte is loaded
// back. Writes take effect at the clock edge. The document gives the memory
// and its feedback path; the register-array form is this design's own.
module la_state_mem (
  input  logic       clk,
  input  logic       we,
  input  logic [3:0] waddr,
  input  logic [7:0] wdata,
  input  logic [3:0] raddr,
  output logic [7:0] rdata,
  input  logic [3:0] raddr2,
  output logic [7:0] rdata2
);
  logic [7:0] mem [16];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata  = mem[raddr];
  assign rdata2 = mem[raddr2];
endmodule
