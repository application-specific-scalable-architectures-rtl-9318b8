// tb_hs_subbytes: streams random columns through the 32-bit SubBytes stage
// in both modes, one per clock, and checks each output column, the 2-clock
// latency of data, valid and sync.
module tb_hs_subbytes;
  import aes_ref_pkg::*;

  localparam int N = 200;

  logic        clk = 0, dec = 0, rst_n = 0;
  logic [31:0] din = '0;
  logic        din_valid = 0, sync_in = 0;
  logic [31:0] dout;
  logic        dout_valid, sync_out;
  int checks = 0, failures = 0;

  hs_subbytes dut (.*);

  always #5 clk = ~clk;
  initial #12 rst_n = 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] hist [N+2];
  logic        vhist [N+2];
  logic        shist [N+2];

  initial begin
    logic [31:0] e;
    build_tables();
    for (int m = 0; m < 2; m++) begin
      dec = m[0];
      for (int t = 0; t < N + 2; t++) begin
        @(negedge clk);
        if (t >= 2) begin
          for (int b = 0; b < 4; b++)
            e[8*b +: 8] = m ? ISB[hist[t-2][8*b +: 8]] : SB[hist[t-2][8*b +: 8]];
          checks++;
          if (dout !== e || dout_valid !== vhist[t-2] || sync_out !== shist[t-2]) begin
            failures++; $display("t=%0d got %h exp %h", t, dout, e);
          end
        end
        din = $urandom; din_valid = $urandom; sync_in = ($urandom % 7 == 0);
        hist[t] = din; vhist[t] = din_valid; shist[t] = sync_in;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
