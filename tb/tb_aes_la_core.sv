// tb_aes_la_core: end-to-end test of the 8-bit low-area AES encryptor.
//
// Loads a key byte by byte, encrypts the FIPS-197 example block and several
// random blocks one after another with the same key, compares each result
// with the reference model, and checks the fixed 1085-clock latency from the
// last input byte to the first output byte. A second key is then loaded and
// the FIPS-197 appendix B example is checked.
module tb_aes_la_core;
  import aes_ref_pkg::*;

  localparam int LATENCY = 1085;

  logic       clk = 0, rst_n = 0;
  logic [7:0] din = '0;
  logic       key_we = 0, data_we = 0;
  logic [7:0] dout;
  logic       dout_valid, busy;

  int checks = 0, failures = 0, cyc = 0;

  aes_la_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_key(input logic [127:0] k);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin din = k[127-8*i -: 8]; key_we = 1; end
    end
    @(negedge clk) key_we = 0;
  endtask

  task automatic encrypt_one(input logic [127:0] k, input logic [127:0] pt);
    logic [127:0] ct, exp_ct;
    int t_last, n;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin din = pt[127-8*i -: 8]; data_we = 1; end
      t_last = cyc;
    end
    @(negedge clk) data_we = 0;
    n = 0;
    while (n < 16) begin
      @(posedge clk); #1;
      if (dout_valid) begin
        if (n == 0) begin
          checks++;
          if (cyc - t_last != LATENCY) begin
            failures++; $display("latency %0d expected %0d", cyc - t_last, LATENCY);
          end
        end
        ct[127-8*n -: 8] = dout;
        n++;
      end
    end
    exp_ct = encrypt(k, pt);
    checks++;
    if (ct !== exp_ct) begin
      failures++; $display("pt %h: got %h expected %h", pt, ct, exp_ct);
    end
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("busy still high after output"); end
  endtask

  logic [127:0] k;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    k = 128'h000102030405060708090a0b0c0d0e0f;
    load_key(k);
    encrypt_one(k, 128'h00112233445566778899aabbccddeeff);
    for (int i = 0; i < 3; i++) encrypt_one(k, {$urandom, $urandom, $urandom, $urandom});
    k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    load_key(k);
    encrypt_one(k, 128'h3243f6a8885a308d313198a2e0370734);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
