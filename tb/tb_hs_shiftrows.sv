// tb_hs_shiftrows: streams random blocks, back to back, through the row
// shifting module after a sync pulse, in encryption and in decryption mode.
// Each output block must be the ShiftRows (or InvShiftRows) of the input
// block, leave exactly 5 clocks after it entered, without gaps, and valid
// and sync must travel with the same delay.
module tb_hs_shiftrows;
  localparam int NBLK = 20;
  localparam int LAT  = 5;

  logic        clk = 0, dec = 0, rst_n = 0;
  logic [31:0] din = '0;
  logic        din_valid = 0, sync_in = 0;
  logic [31:0] dout;
  logic        dout_valid, sync_out;
  int checks = 0, failures = 0;

  hs_shiftrows dut (.*);

  always #5 clk = ~clk;
  initial #12 rst_n = 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] blk [NBLK][16];   // byte 4*c + r

  task automatic session(input logic d);
    int sent, recv, t, tsync;
    for (int b = 0; b < NBLK; b++) for (int i = 0; i < 16; i++) blk[b][i] = 8'($urandom);
    @(negedge clk) begin dec = d; sync_in = 1; din_valid = 0; end
    tsync = 0;
    sent = 0; recv = 0; t = 0;
    while (recv < 4*NBLK) begin
      @(negedge clk);
      t++;
      sync_in = 0;
      // check what the module shows in this clock
      if (t == LAT) begin
        checks++;
        if (!sync_out) begin failures++; $display("sync not delayed by %0d", LAT); end
      end
      if (t > LAT && t - LAT <= 4*NBLK) begin
        int n, b, j, k;
        logic [31:0] e;
        n = t - 1 - LAT; b = n / 4; j = n % 4;
        for (int r = 0; r < 4; r++) begin
          k = d ? (j + 4 - r) % 4 : (j + r) % 4;
          e[31-8*r -: 8] = blk[b][4*k + r];
        end
        checks++;
        if (!dout_valid || dout !== e) begin
          failures++; $display("dec=%0d blk %0d col %0d got %h exp %h v=%0d", d, b, j, dout, e, dout_valid);
        end
        recv++;
      end
      if (sent < 4*NBLK) begin
        for (int r = 0; r < 4; r++) din[31-8*r -: 8] = blk[sent/4][4*(sent%4) + r];
        din_valid = 1;
        sent++;
      end else din_valid = 0;
      #1;
    end
    @(negedge clk) din_valid = 0;
    repeat (LAT + 1) @(negedge clk);
    checks++;
    if (dout_valid) begin failures++; $display("valid after stream end"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    session(1'b0);
    session(1'b1);
    session(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
