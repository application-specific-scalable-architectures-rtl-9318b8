// tb_aes_asa_top: end-to-end test of both AES cores through the top level.
//
// Runs at the default (and only) size. The high-speed core encrypts a
// back-to-back stream of blocks, gets a new key, switches to decryption and
// decrypts the results, with a fresh sync pulse for every session; the
// low-area core meanwhile encrypts blocks under two keys. Every result is
// compared with the reference model. The test also counts how often each
// mechanism of the design happened and fails if one never did:
//   key changes and enc/dec mode switches of the high-speed core, sync pulses,
//   blocks streamed without a gap, low-area key loads, and the low-area
//   ShiftRows-by-rotation and byte-serial MixColumn phases.
module tb_aes_asa_top;
  import aes_ref_pkg::*;

  localparam int NBLK = 8;

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

  int checks = 0, failures = 0;
  int n_key_change = 0, n_mode_switch = 0, n_sync = 0, n_gapless = 0;
  int n_la_key = 0, n_la_rotate = 0, n_la_mix = 0;

  aes_asa_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters observed at the ports
  logic prev_dec = 0, prev_ov = 0;
  logic prev_rot = 0, prev_mix = 0;
  always @(posedge clk) begin
    if (hs_key_load) n_key_change++;
    if (hs_sync) n_sync++;
    if (hs_dec != prev_dec) n_mode_switch++;
    prev_dec <= hs_dec;
    if (hs_dout_valid && prev_ov) n_gapless++;
    prev_ov <= hs_dout_valid;
    // rotation-only clocks of the row shift, and MixColumn write-back clocks
    if (dut.u_la.sm_rot && !dut.u_la.we && !prev_rot) n_la_rotate++;
    prev_rot <= dut.u_la.sm_rot && !dut.u_la.we;
    if (dut.u_la.st == dut.u_la.S_MC_WR && !prev_mix) n_la_mix++;
    prev_mix <= (dut.u_la.st == dut.u_la.S_MC_WR);
  end

  // ---------------- high-speed core ----------------
  logic [127:0] hs_blk [NBLK];
  logic [127:0] hs_got [NBLK];

  task automatic hs_load_key(input logic [127:0] k, input logic d);
    @(negedge clk) begin hs_dec = d; hs_key = k; hs_key_load = 1; end
    @(negedge clk) hs_key_load = 0;
    while (!hs_key_ready) @(negedge clk);
  endtask

  task automatic hs_session();
    int n;
    @(negedge clk) hs_sync = 1;
    @(negedge clk) hs_sync = 0;
    fork
      begin
        for (int b = 0; b < NBLK; b++)
          for (int c = 0; c < 4; c++) begin
            hs_din = hs_blk[b][127-32*c -: 32];
            hs_din_valid = 1;
            @(negedge clk);
          end
        hs_din_valid = 0;
      end
      begin
        n = 0;
        while (n < 4*NBLK) begin
          @(posedge clk); #1;
          if (hs_dout_valid) begin
            hs_got[n/4][127-32*(n%4) -: 32] = hs_dout;
            n++;
          end
        end
      end
    join
  endtask

  task automatic run_hs();
    logic [127:0] k1, k2;
    k1 = {$urandom, $urandom, $urandom, $urandom};
    k2 = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int b = 0; b < NBLK; b++) hs_blk[b] = {$urandom, $urandom, $urandom, $urandom};
    hs_blk[0] = 128'h3243f6a8885a308d313198a2e0370734;
    // encrypt under k1
    hs_load_key(k1, 1'b0);
    hs_session();
    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (hs_got[b] !== encrypt(k1, hs_blk[b])) begin
        failures++; $display("hs enc k1 block %0d wrong", b);
      end
    end
    // key change, encrypt under k2
    hs_load_key(k2, 1'b0);
    hs_session();
    checks++;
    if (hs_got[0] !== 128'h3925841d02dc09fbdc118597196a0b32) begin
      failures++; $display("hs FIPS-197 vector wrong: %h", hs_got[0]);
    end
    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (hs_got[b] !== encrypt(k2, hs_blk[b])) begin
        failures++; $display("hs enc k2 block %0d wrong", b);
      end
    end
    // mode switch: decrypt the ciphertexts again
    for (int b = 0; b < NBLK; b++) hs_blk[b] = hs_got[b];
    hs_load_key(k2, 1'b1);
    hs_session();
    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (hs_got[b] !== decrypt(k2, hs_blk[b])) begin
        failures++; $display("hs dec block %0d wrong", b);
      end
    end
    checks++;
    if (hs_got[0] !== 128'h3243f6a8885a308d313198a2e0370734) failures++;
  endtask

  // ---------------- low-area core ----------------
  task automatic la_load_key(input logic [127:0] k);
    n_la_key++;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin la_din = k[127-8*i -: 8]; la_key_we = 1; end
    end
    @(negedge clk) la_key_we = 0;
  endtask

  task automatic la_block(input logic [127:0] k, input logic [127:0] pt);
    logic [127:0] ct;
    int n;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin la_din = pt[127-8*i -: 8]; la_data_we = 1; end
    end
    @(negedge clk) la_data_we = 0;
    n = 0;
    while (n < 16) begin
      @(posedge clk); #1;
      if (la_dout_valid) begin ct[127-8*n -: 8] = la_dout; n++; end
    end
    checks++;
    if (ct !== encrypt(k, pt)) begin
      failures++; $display("la block %h: got %h expected %h", pt, ct, encrypt(k, pt));
    end
    @(negedge clk);
  endtask

  task automatic run_la();
    logic [127:0] k;
    k = 128'h000102030405060708090a0b0c0d0e0f;
    la_load_key(k);
    la_block(k, 128'h00112233445566778899aabbccddeeff);
    la_block(k, {$urandom, $urandom, $urandom, $urandom});
    k = {$urandom, $urandom, $urandom, $urandom};
    la_load_key(k);
    la_block(k, {$urandom, $urandom, $urandom, $urandom});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_hs();
      run_la();
    join
    // every mechanism must have happened
    checks++; if (n_key_change < 3) begin failures++; $display("key changes: %0d", n_key_change); end
    checks++; if (n_mode_switch < 1) begin failures++; $display("no mode switch"); end
    checks++; if (n_sync < 3) begin failures++; $display("sync pulses: %0d", n_sync); end
    checks++; if (n_gapless < 3*(4*NBLK-1)) begin failures++; $display("gapless columns: %0d", n_gapless); end
    checks++; if (n_la_key < 2) begin failures++; $display("la key loads: %0d", n_la_key); end
    checks++; if (n_la_rotate < 3) begin failures++; $display("la row rotations: %0d", n_la_rotate); end
    checks++; if (n_la_mix < 3) begin failures++; $display("la mix phases: %0d", n_la_mix); end
    $display("mechanisms: key_change=%0d mode_switch=%0d sync=%0d gapless_columns=%0d la_key_loads=%0d la_row_rotations=%0d la_mix_columns=%0d",
             n_key_change, n_mode_switch, n_sync, n_gapless, n_la_key, n_la_rotate, n_la_mix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
