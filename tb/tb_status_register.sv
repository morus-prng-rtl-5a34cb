// Self-checking test of status_register: random event sequences compared
// with a model of the FREE / BUSY / ERROR rules, plus a directed sequence.
module tb_status_register;
  import ixiam_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic op_start = 0, op_done = 0, op_error = 0, err_set = 0, clear = 0;
  acc_status_e status, model;

  int checks = 0, failures = 0;

  status_register dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit s, input bit d, input bit e, input bit es, input bit c);
    @(negedge clk);
    op_start = s; op_done = d; op_error = e; err_set = es; clear = c;
    if (s)                              model = ST_BUSY;
    else if (d)                         model = e ? ST_ERROR : ST_FREE;
    else if (es && model != ST_BUSY)    model = ST_ERROR;
    else if (c && model != ST_BUSY)     model = ST_FREE;
    @(negedge clk);
    op_start = 0; op_done = 0; op_error = 0; err_set = 0; clear = 0;
    checks++;
    if (status != model) begin
      failures++;
      $display("FAIL: status %s expected %s", status.name(), model.name());
    end
  endtask

  initial begin
    model = ST_FREE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    step(0, 0, 0, 0, 0);
    step(1, 0, 0, 0, 0);   // busy
    step(0, 0, 0, 1, 1);   // ignored while busy
    step(0, 1, 0, 0, 0);   // free
    step(1, 0, 0, 0, 0);
    step(0, 1, 1, 0, 0);   // error
    step(0, 0, 0, 0, 1);   // cleared
    step(0, 0, 0, 1, 0);   // controller error
    step(1, 0, 0, 0, 0);   // new operation leaves error
    for (int t = 0; t < 300; t++)
      step($urandom_range(0, 3) == 0, $urandom_range(0, 3) == 0, $urandom_range(0, 1),
           $urandom_range(0, 5) == 0, $urandom_range(0, 5) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
