// tb_la_shift_mix: loads random columns through path 1 and checks the four
// byte-serial MixColumn outputs while rotating (path 2) against the reference
// MixColumn; then loads a row, rotates it n times and checks that sr_out
// delivers the row rotated left by n (the ShiftRows use).
module tb_la_shift_mix;
  import aes_ref_pkg::*;

  logic       clk = 0, load = 0, rot = 0;
  logic [7:0] din = '0;
  logic [7:0] sr_out, mc_out;
  int checks = 0, failures = 0;

  la_shift_mix dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load4(input logic [7:0] b [4]);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk) begin load = 1; rot = 0; din = b[i]; end
    end
    @(negedge clk) load = 0;
  endtask

  initial begin
    logic [7:0] b [4];
    state_t s, o;
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 4; i++) b[i] = 8'($urandom);
      load4(b);
      for (int i = 0; i < 16; i++) s[i] = 8'h00;
      for (int i = 0; i < 4; i++) s[i] = b[i];
      o = mix(s, 8'h02, 8'h03, 8'h01, 8'h01);
      for (int i = 0; i < 4; i++) begin
        #1;
        checks++;
        if (mc_out !== o[i]) begin failures++; $display("mix byte %0d got %h exp %h", i, mc_out, o[i]); end
        rot = 1;
        @(negedge clk);
        rot = 0;
      end
      // register holds the column again after four rotations
      checks++;
      if (sr_out !== b[0]) failures++;
      // row rotation
      begin
        int r;
        r = n % 4;
        load4(b);
        for (int i = 0; i < r; i++) begin
          rot = 1; @(negedge clk); rot = 0;
        end
        for (int c = 0; c < 4; c++) begin
          #1;
          checks++;
          if (sr_out !== b[(c + r) % 4]) begin
            failures++; $display("rotate %0d byte %0d got %h exp %h", r, c, sr_out, b[(c+r)%4]);
          end
          rot = 1; @(negedge clk); rot = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
