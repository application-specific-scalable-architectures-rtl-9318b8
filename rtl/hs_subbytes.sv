// hs_subbytes: 32-bit SubBytes / InvSubBytes stage of the high-speed core.
//
// Four aes_sbox instances substitute the four bytes of one state column per
// clock. The stage is sub-pipelined in two registers: one inside each S-box,
// between the two halves of the GF(2^8) inversion, and one at the output.
// Latency is LATENCY = 2 clocks, throughput one column per clock. The valid
// and sync side-band bits (cleared by rst_n) are delayed by the same amount so that the next
// module receives its synchronisation pulse one clock before column 0.
// Sub-pipelining follows the document; the split point is this design's own.
module hs_subbytes (
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
  localparam int unsigned LATENCY = 2;

  logic [31:0] sb;
  logic [1:0]  v_q, s_q;

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox #(.STAGES(1)) u_sbox (
      .clk  (clk),
      .dec  (dec),
      .din  (din[8*i +: 8]),
      .dout (sb[8*i +: 8])
    );
  end

  always_ff @(posedge clk) dout <= sb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      s_q <= '0;
    end else begin
      v_q <= {v_q[0], din_valid};
      s_q <= {s_q[0], sync_in};
    end
  end

  assign dout_valid = v_q[LATENCY-1];
  assign sync_out   = s_q[LATENCY-1];
endmodule
