// tb_hs_addroundkey: sends all 44 key words over the key bus (so the block
// must pick its own four), then streams columns after a sync pulse and checks
// dout = column XOR key column, with 1-clock latency, for round ROUND in
// encryption mode (words 4*ROUND..) and decryption mode (words 4*(10-ROUND)..).
module tb_hs_addroundkey;
  localparam int unsigned ROUND = 3;

  logic        clk = 0, dec = 0, rst_n = 0;
  logic [31:0] kw_data = '0;
  logic [5:0]  kw_idx = '0;
  logic        kw_valid = 0;
  logic [31:0] din = '0;
  logic        din_valid = 0, sync_in = 0;
  logic [31:0] dout;
  logic        dout_valid, sync_out;
  int checks = 0, failures = 0;

  hs_addroundkey #(.ROUND(ROUND)) dut (.*);

  always #5 clk = ~clk;
  initial #12 rst_n = 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] words [44];

  task automatic session(input logic d);
    int rnd;
    logic [31:0] col, e;
    for (int i = 0; i < 44; i++) words[i] = $urandom;
    @(negedge clk) dec = d;
    for (int i = 0; i < 44; i++) begin
      @(negedge clk) begin kw_valid = 1; kw_idx = 6'(i); kw_data = words[i]; end
    end
    @(negedge clk) begin kw_valid = 0; sync_in = 1; end
    rnd = d ? 10 - ROUND : ROUND;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk) begin
        sync_in = 0; col = $urandom; din = col; din_valid = 1;
        // a stray key word for another round must not disturb the storage
        kw_valid = (n == 7); kw_idx = 6'(4 * ((rnd + 1) % 11) + 1); kw_data = $urandom;
      end
      @(posedge clk); #1;
      e = col ^ words[4*rnd + n%4];
      checks++;
      if (dout !== e || !dout_valid) begin
        failures++; $display("dec=%0d n=%0d got %h exp %h", d, n, dout, e);
      end
    end
    @(negedge clk) begin din_valid = 0; kw_valid = 0; end
  endtask

  initial begin
    session(1'b0);
    session(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
