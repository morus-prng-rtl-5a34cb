// Self-checking test of prng_register_file: reset values, writes to every
// register, reads with exactly one cycle of latency, the parallel N and key
// outputs, and the ignored out-of-range address.
module tb_prng_register_file;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we = 0, re = 0, rvalid;
  logic [2:0] waddr, raddr;
  logic [31:0] wdata, rdata, n_reg;
  logic [3:0][31:0] key;

  int checks = 0, failures = 0;
  logic [31:0] model [8];

  prng_register_file dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk);
    re = 1; raddr = a;
    @(negedge clk);
    re = 0;
    check(rvalid, "rvalid one cycle after re");
    d = rdata;
    @(negedge clk);
    check(!rvalid, "rvalid is a single pulse");
  endtask

  initial begin
    logic [31:0] d;
    for (int i = 0; i < 8; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      rd(i, d);
      check(d == 0, "reset value 0");
    end
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      we = 1; waddr = $urandom_range(0, 7); wdata = $urandom;
      if (waddr < 5) model[waddr] = wdata;
      @(negedge clk);
      we = 0;
      check(n_reg == model[0], "n_reg output");
      for (int k = 0; k < 4; k++) check(key[k] == model[1 + k], "key output");
      rd($urandom_range(0, 7), d);
      check(d == ((raddr < 5) ? model[raddr] : 32'd0), $sformatf("read of register %0d", raddr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
