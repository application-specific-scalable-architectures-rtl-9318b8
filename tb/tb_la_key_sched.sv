// tb_la_key_sched: loads a cipher key byte by byte, starts the schedule and
// steps it through ten rounds of sixteen byte steps, acting as the shared
// S-box itself (reference table). After start and after each round all 16
// working-key bytes are read through rk_addr and compared with the reference
// expansion; start must restore round key 0.
module tb_la_key_sched;
  import aes_ref_pkg::*;

  logic       clk = 0, load = 0, start = 0, step = 0;
  logic [3:0] load_addr = '0, step_idx = '0, rk_addr = '0;
  logic [7:0] din = '0;
  logic [7:0] sb_in, sb_out, rk_byte;
  int checks = 0, failures = 0;

  la_key_sched dut (.*);

  always_comb sb_out = ref_sbox(sb_in);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_round(input logic [31:0] w [44], input int rnd);
    for (int i = 0; i < 16; i++) begin
      rk_addr = 4'(i);
      #1;
      checks++;
      if (rk_byte !== w[4*rnd + i/4][31-8*(i%4) -: 8]) begin
        failures++; $display("round %0d byte %0d got %h", rnd, i, rk_byte);
      end
    end
    @(negedge clk);
  endtask

  task automatic run(input logic [127:0] k);
    logic [31:0] w [44];
    expand(k, w);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin load = 1; load_addr = 4'(i); din = k[127-8*i -: 8]; end
    end
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk) begin load = 0; start = 1; end
      @(negedge clk) start = 0;
      check_round(w, 0);
      for (int rnd = 1; rnd <= 10; rnd++) begin
        for (int i = 0; i < 16; i++) begin
          step = 1; step_idx = 4'(i);
          @(negedge clk);
        end
        step = 0;
        check_round(w, rnd);
      end
    end
  endtask

  initial begin
    build_tables();
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    run({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
