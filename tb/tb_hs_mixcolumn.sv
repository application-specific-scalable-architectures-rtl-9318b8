// tb_hs_mixcolumn: checks MixColumn and InvMixColumn on random columns and
// the FIPS-197 example column (db 13 53 45 -> 8e 4d a1 bc), with the
// 1-clock latency of data and side-band bits, and that the two modes invert
// each other.
module tb_hs_mixcolumn;
  import aes_ref_pkg::*;

  logic        clk = 0, dec = 0, rst_n = 0;
  logic [31:0] din = '0;
  logic        din_valid = 0, sync_in = 0;
  logic [31:0] dout;
  logic        dout_valid, sync_out;
  int checks = 0, failures = 0;

  hs_mixcolumn dut (.*);

  always #5 clk = ~clk;
  initial #12 rst_n = 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_col(input logic [31:0] c, input logic d);
    state_t s, o;
    for (int i = 0; i < 16; i++) s[i] = 8'h00;
    for (int r = 0; r < 4; r++) s[r] = c[31-8*r -: 8];
    o = d ? mix(s, 8'h0e, 8'h0b, 8'h0d, 8'h09) : mix(s, 8'h02, 8'h03, 8'h01, 8'h01);
    return {o[0], o[1], o[2], o[3]};
  endfunction

  task automatic apply(input logic [31:0] c, input logic d, output logic [31:0] r);
    logic v, s;
    v = $urandom; s = $urandom;
    @(negedge clk) begin din = c; dec = d; din_valid = v; sync_in = s; end
    @(negedge clk);
    r = dout;
    checks++;
    if (dout !== ref_col(c, d) || dout_valid !== v || sync_out !== s) begin
      failures++; $display("col %h dec=%0d got %h exp %h", c, d, dout, ref_col(c, d));
    end
  endtask

  initial begin
    logic [31:0] c, r1, r2;
    apply(32'hdb135345, 1'b0, r1);
    checks++;
    if (r1 !== 32'h8e4da1bc) failures++;
    for (int i = 0; i < 300; i++) begin
      c = $urandom;
      apply(c, 1'b0, r1);
      apply(r1, 1'b1, r2);
      checks++;
      if (r2 !== c) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
