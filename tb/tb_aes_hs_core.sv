// tb_aes_hs_core: end-to-end test of the unrolled high-speed AES core.
//
// Encrypts a stream of blocks (the two FIPS-197 examples, then random ones)
// fed back to back at one column per clock, compares every block with the
// reference model, checks the 90-clock latency and that output columns leave
// without gaps (one block per four clocks), then reloads the key in
// decryption mode and decrypts the ciphertexts back.
module tb_aes_hs_core;
  import aes_ref_pkg::*;

  localparam int NBLK    = 12;
  localparam int LATENCY = 90;

  logic         clk = 0, rst_n = 0;
  logic         dec = 0;
  logic [127:0] key;
  logic         key_load = 0, key_ready;
  logic         sync = 0;
  logic [31:0]  din = '0;
  logic         din_valid = 0;
  logic [31:0]  dout;
  logic         dout_valid, sync_out;

  int checks = 0, failures = 0;

  aes_hs_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] blocks [NBLK];
  logic [127:0] expect_q [NBLK];
  logic [127:0] got [NBLK];
  int t_first_in, t_first_out, cyc;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic load_key(input logic [127:0] k);
    @(negedge clk) begin key = k; key_load = 1; end
    @(negedge clk) key_load = 0;
    fork
      begin : wait_ready
        int n = 0;
        while (!key_ready) begin @(posedge clk); n++; end
        checks++;
        if (n != 45) begin failures++; $display("key expansion took %0d clocks", n); end
      end
    join
  endtask

  // stream all blocks, then collect NBLK outputs
  task automatic run_stream();
    int nout;
    @(negedge clk) sync = 1;
    @(negedge clk) sync = 0;
    fork
      begin
        for (int b = 0; b < NBLK; b++)
          for (int c = 0; c < 4; c++) begin
            din = blocks[b][127-32*c -: 32];
            din_valid = 1;
            if (b == 0 && c == 0) t_first_in = cyc;
            @(negedge clk);
          end
        din_valid = 0;
      end
      begin
        nout = 0;
        while (nout < 4*NBLK) begin
          @(posedge clk);
          #1;
          if (dout_valid) begin
            if (nout == 0) t_first_out = cyc;
            // columns must follow each other without gaps
            checks++;
            if (cyc - t_first_out != nout) begin
              failures++; $display("gap in output stream at column %0d", nout);
            end
            got[nout/4][127-32*(nout%4) -: 32] = dout;
            nout++;
          end
        end
      end
    join
    checks++;
    if (t_first_out - t_first_in != LATENCY) begin
      failures++; $display("latency %0d, expected %0d", t_first_out - t_first_in, LATENCY);
    end
  endtask

  initial begin
    cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // encryption
    blocks[0] = 128'h00112233445566778899aabbccddeeff;
    blocks[1] = 128'h3243f6a8885a308d313198a2e0370734;
    for (int b = 2; b < NBLK; b++) blocks[b] = {$urandom, $urandom, $urandom, $urandom};
    key = 128'h000102030405060708090a0b0c0d0e0f;
    dec = 0;
    load_key(key);
    run_stream();
    for (int b = 0; b < NBLK; b++) begin
      expect_q[b] = encrypt(key, blocks[b]);
      checks++;
      if (got[b] !== expect_q[b]) begin
        failures++; $display("enc block %0d: got %h expected %h", b, got[b], expect_q[b]);
      end
    end
    checks++;
    if (got[0] !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;
    // second FIPS-197 example uses its own key
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    load_key(key);
    run_stream();
    checks++;
    if (got[1] !== 128'h3925841d02dc09fbdc118597196a0b32) begin
      failures++; $display("FIPS-197 appendix B: got %h", got[1]);
    end
    for (int b = 0; b < NBLK; b++) blocks[b] = got[b];
    // decryption of what was just encrypted
    @(negedge clk) dec = 1;
    load_key(key);
    run_stream();
    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (got[b] !== decrypt(key, blocks[b])) begin
        failures++; $display("dec block %0d: got %h expected %h", b, got[b], decrypt(key, blocks[b]));
      end
    end
    checks++;
    if (got[1] !== 128'h3243f6a8885a308d313198a2e0370734) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
