// tb_la_state_mem: random writes and reads on both read ports of the 16-byte
// state memory, compared with a model array; a write is visible from the
// next clock.
module tb_la_state_mem;
  logic       clk = 0, we = 0;
  logic [3:0] waddr = '0, raddr = '0, raddr2 = '0;
  logic [7:0] wdata = '0;
  logic [7:0] rdata, rdata2;
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  la_state_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin we = 1; waddr = 4'(i); wdata = 8'($urandom); end
      model[i] = wdata;
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk) begin
        we = $urandom; waddr = $urandom; wdata = $urandom; raddr = $urandom; raddr2 = $urandom;
      end
      #1;
      checks++;
      if (rdata !== model[raddr] || rdata2 !== model[raddr2]) begin
        failures++; $display("read %0d/%0d got %h/%h exp %h/%h", raddr, raddr2, rdata, rdata2,
                             model[raddr], model[raddr2]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
