// tb_hs_keyexp: loads random keys and the FIPS-197 key, and checks every word
// on the round-key bus against the reference key expansion: index order,
// one word per clock starting two clocks after load, done with the last word.
// In decryption mode the words of rounds 1..9 must be InvMixColumn'ed.
module tb_hs_keyexp;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0, dec = 0;
  logic [127:0] key = '0;
  logic         load = 0;
  logic [31:0]  kw_data;
  logic [5:0]   kw_idx;
  logic         kw_valid, done;
  int checks = 0, failures = 0;

  hs_keyexp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] imc(input logic [31:0] c);
    state_t s, o;
    for (int i = 0; i < 16; i++) s[i] = 8'h00;
    for (int r = 0; r < 4; r++) s[r] = c[31-8*r -: 8];
    o = mix(s, 8'h0e, 8'h0b, 8'h0d, 8'h09);
    return {o[0], o[1], o[2], o[3]};
  endfunction

  task automatic run(input logic [127:0] k, input logic d);
    logic [31:0] w [44];
    logic [31:0] e;
    expand(k, w);
    @(negedge clk) begin key = k; dec = d; load = 1; end
    @(negedge clk) load = 0;
    // one clock to take the key in
    @(negedge clk);
    for (int i = 0; i < 44; i++) begin
      e = (d && i >= 4 && i < 40) ? imc(w[i]) : w[i];
      checks++;
      if (!kw_valid || kw_idx !== 6'(i) || kw_data !== e) begin
        failures++; $display("dec=%0d word %0d: v=%0d idx=%0d got %h exp %h", d, i, kw_valid, kw_idx, kw_data, e);
      end
      checks++;
      if (done !== (i == 43)) begin failures++; $display("done wrong at word %0d", i); end
      @(negedge clk);
    end
    checks++;
    if (kw_valid || !done) begin failures++; $display("bus not idle after last word"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 1'b0);
    checks++;
    // last word of the FIPS-197 appendix A.1 expansion was seen on the bus
    if (kw_data !== 32'hb6630ca6) begin failures++; $display("w43 = %h", kw_data); end
    run({$urandom, $urandom, $urandom, $urandom}, 1'b0);
    run({$urandom, $urandom, $urandom, $urandom}, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
