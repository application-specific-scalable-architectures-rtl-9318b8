// hs_shiftrows: ShiftRows / InvShiftRows on a stream of 32-bit state columns.
//
// Columns enter one per clock (column 0 of a block first) and leave in the
// same order, rearranged, a fixed LATENCY = 5 clocks later. Each row is held
// in programmable-tap shift registers (srl_tap, SRL16 style), seven in all as
// in the document: row 0 has one with a fixed delay; rows 1-3 have a byte
// rearranging register whose tap changes with the column being produced, and
// a daisy-chained variable-delay register whose tap depends on row and mode.
//
// Output column j, row r must carry input column k = (j+r) mod 4
// (encryption) or (j-r) mod 4 (decryption) of the same block, so that byte is
// delayed d = LATENCY + j - k clocks. With dmin the smallest d of a row, the
// variable-delay register delays dmin-1 clocks and the rearranging register
// d-dmin+1 clocks. The state machine is a 2-bit column counter. sync_in is
// the synchronisation pulse: high during the clock before column 0 of a data
// session; it resets the counter asynchronously, as the document describes.
// After a mode change the module needs a new sync pulse and the first LATENCY
// output columns are not valid. rst_n clears the valid and sync side-band
// delay line. The delay split and the value of LATENCY are
// this design's own choices; the document gives the structure only.
module hs_shiftrows (
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
  localparam int unsigned LATENCY = 5;

  // column index of the current input
  logic [1:0] cnt;

  always_ff @(posedge clk or posedge sync_in) begin
    if (sync_in) cnt <= 2'd0;
    else         cnt <= cnt + 2'd1;
  end

  // total delay of row r, output column j
  function automatic int unsigned row_delay(input int unsigned r, input int unsigned j,
                                            input logic d);
    int unsigned k;
    k = d ? ((j + 4 - r) % 4) : ((j + r) % 4);
    return LATENCY + j - k;
  endfunction

  function automatic int unsigned row_dmin(input int unsigned r, input logic d);
    int unsigned m;
    m = row_delay(r, 0, d);
    for (int unsigned j = 1; j < 4; j++)
      if (row_delay(r, j, d) < m) m = row_delay(r, j, d);
    return m;
  endfunction

  logic [7:0] row_in  [4];
  logic [7:0] row_mid [4];
  logic [7:0] row_out [4];

  for (genvar r = 0; r < 4; r++) begin : g_row
    assign row_in[r] = din[31-8*r -: 8];
    assign dout[31-8*r -: 8] = row_out[r];
  end

  // row 0: fixed delay
  srl_tap #(.W(8), .DEPTH(16)) u_row0 (
    .clk(clk), .din(row_in[0]), .tap(4'(LATENCY - 1)), .dout(row_out[0])
  );
  assign row_mid[0] = row_in[0];

  for (genvar r = 1; r < 4; r++) begin : g_prog
    logic [3:0]  tap_re, tap_vd;
    int unsigned vd, jr;

    // state machine outputs: tap positions for this row
    always_comb begin
      vd = row_dmin(r, dec) - 1;
      jr = (int'(cnt) + vd + 8 - LATENCY) % 4;
      tap_vd = 4'(vd - 1);
      tap_re = 4'(row_delay(r, jr, dec) - row_dmin(r, dec));
    end

    srl_tap #(.W(8), .DEPTH(16)) u_rearrange (
      .clk(clk), .din(row_in[r]), .tap(tap_re), .dout(row_mid[r])
    );
    srl_tap #(.W(8), .DEPTH(16)) u_delay (
      .clk(clk), .din(row_mid[r]), .tap(tap_vd), .dout(row_out[r])
    );
  end

  logic [LATENCY-1:0] v_q, s_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      s_q <= '0;
    end else begin
      v_q <= {v_q[LATENCY-2:0], din_valid};
      s_q <= {s_q[LATENCY-2:0], sync_in};
    end
  end
  assign dout_valid = v_q[LATENCY-1];
  assign sync_out   = s_q[LATENCY-1];
endmodule
