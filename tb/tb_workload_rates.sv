// tb_workload_rates: sustained-rate runs of both cores.
//
// High-speed core: 256 random blocks are streamed without a pause; every
// result is checked against the reference model and the clocks between the
// first and the last output column are counted. The core must deliver one
// 128-bit block per 4 clocks (32 bits per clock, 6080 Mbit/s at 190 MHz).
// Low-area core: 8 blocks are encrypted one after the other as fast as the
// interface allows; the clocks per block must be 1116 (16 in, 1084 processing,
// 16 out), about 6.4 Mbit/s at 56 MHz.
module tb_workload_rates;
  import aes_ref_pkg::*;

  localparam int HS_BLK = 256;
  localparam int LA_BLK = 8;

  logic         clk = 0, rst_n = 0;
  logic         hs_dec = 0;
  logic [127:0] hs_key = '0;
  logic         hs_key_load = 0, hs_key_ready;
  logic         hs_sync = 0;
  logic [31:0]  hs_din = '0;
  logic         hs_din_valid = 0;
  logic [31:0]  hs_dout;
  logic         hs_dout_valid, hs_sync_out;
  logic [7:0]   la_din = '0;
  logic         la_key_we = 0, la_data_we = 0;
  logic [7:0]   la_dout;
  logic         la_dout_valid, la_busy;

  int checks = 0, failures = 0, cyc = 0;

  aes_asa_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] blk [HS_BLK];

  task automatic run_hs();
    logic [127:0] got;
    int n, t0, t1;
    hs_key = {$urandom, $urandom, $urandom, $urandom};
    for (int b = 0; b < HS_BLK; b++) blk[b] = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk) hs_key_load = 1;
    @(negedge clk) hs_key_load = 0;
    while (!hs_key_ready) @(negedge clk);
    hs_sync = 1;
    @(negedge clk) hs_sync = 0;
    fork
      begin
        for (int i = 0; i < 4*HS_BLK; i++) begin
          hs_din = blk[i/4][127-32*(i%4) -: 32];
          hs_din_valid = 1;
          @(negedge clk);
        end
        hs_din_valid = 0;
      end
      begin
        n = 0;
        while (n < 4*HS_BLK) begin
          @(posedge clk); #1;
          if (hs_dout_valid) begin
            if (n == 0) t0 = cyc;
            t1 = cyc;
            got[127-32*(n%4) -: 32] = hs_dout;
            if (n % 4 == 3) begin
              checks++;
              if (got !== encrypt(hs_key, blk[n/4])) begin
                failures++; $display("hs block %0d wrong", n/4);
              end
            end
            n++;
          end
        end
      end
    join
    checks++;
    if (t1 - t0 + 1 != 4*HS_BLK) begin
      failures++; $display("hs: %0d clocks for %0d blocks", t1 - t0 + 1, HS_BLK);
    end
    $display("high-speed core: %0d blocks in %0d clocks = %0d bits/clock, %0d Mbit/s at 190 MHz",
             HS_BLK, t1 - t0 + 1, 128*HS_BLK/(t1 - t0 + 1), 190*128*HS_BLK/(t1 - t0 + 1));
  endtask

  task automatic run_la();
    logic [127:0] k, pt, ct;
    int n, t0, t1;
    k = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin la_din = k[127-8*i -: 8]; la_key_we = 1; end
    end
    @(negedge clk) la_key_we = 0;
    for (int b = 0; b < LA_BLK; b++) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      while (la_busy) @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        if (i == 0) t0 = cyc;
        la_din = pt[127-8*i -: 8]; la_data_we = 1;
        @(negedge clk);
      end
      la_data_we = 0;
      n = 0;
      while (n < 16) begin
        @(posedge clk); #1;
        if (la_dout_valid) begin ct[127-8*n -: 8] = la_dout; n++; t1 = cyc; end
      end
      checks++;
      if (ct !== encrypt(k, pt)) begin failures++; $display("la block %0d wrong", b); end
      checks++;
      if (t1 - t0 + 1 != 1116) begin
        failures++; $display("la block %0d took %0d clocks", b, t1 - t0 + 1);
      end
      @(negedge clk);
    end
    $display("low-area core: %0d clocks per block, %0d kbit/s at 56 MHz",
             t1 - t0 + 1, 56000*128/(t1 - t0 + 1));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_hs();
      run_la();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
