// tb_aes_sbox: exhaustive test of the computed S-box, both directions.
//
// All 256 inputs are checked against the reference S-box and inverse S-box,
// first with the combinational instance, then with the one-register
// (sub-pipelined) instance, whose result must appear one clock later.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic       clk = 0;
  logic       dec = 0;
  logic [7:0] din = '0;
  logic [7:0] dout_c, dout_p;
  int checks = 0, failures = 0;

  aes_sbox #(.STAGES(0)) dut_c (.clk(clk), .dec(dec), .din(din), .dout(dout_c));
  aes_sbox #(.STAGES(1)) dut_p (.clk(clk), .dec(dec), .din(din), .dout(dout_p));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_v;
    build_tables();
    for (int m = 0; m < 2; m++)
      for (int x = 0; x < 256; x++) begin
        @(negedge clk) begin dec = m[0]; din = 8'(x); end
        exp_v = m ? ISB[x] : SB[x];
        #1;
        checks++;
        if (dout_c !== exp_v) begin
          failures++; $display("comb dec=%0d x=%h got %h exp %h", m, x, dout_c, exp_v);
        end
        @(negedge clk);
        checks++;
        if (dout_p !== exp_v) begin
          failures++; $display("pipe dec=%0d x=%h got %h exp %h", m, x, dout_p, exp_v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
