// Self-checking test of reservation_queue (depth 4): random reserve and
// release traffic compared with a queue model, covering full, empty,
// duplicate reservations, simultaneous enqueue and dequeue and wrap-around.
module tb_reservation_queue;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned ID_W  = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enq = 0, deq = 0, q_present, head_valid, full;
  logic [ID_W-1:0] enq_id, q_id, head_id;
  logic [2:0] count;

  int checks = 0, failures = 0;
  int n_full = 0, n_dup = 0;
  logic [ID_W-1:0] model [$];

  reservation_queue #(.DEPTH(DEPTH), .ID_W(ID_W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enq_id = 0; q_id = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      bit present, mfull;
      @(negedge clk);
      // compare the combinational views with the model
      check(count == model.size(), "count");
      check(head_valid == (model.size() != 0), "head_valid");
      if (model.size() != 0) check(head_id == model[0], "head_id");
      check(full == (model.size() == DEPTH), "full");
      q_id = $urandom_range(0, 7);
      #1;
      present = 0;
      foreach (model[i]) if (model[i] == q_id) present = 1;
      check(q_present == present, "q_present");
      // next request
      enq = $urandom_range(0, 1);
      deq = ($urandom_range(0, 2) == 0);
      enq_id = $urandom_range(0, 7);
      present = 0;
      foreach (model[i]) if (model[i] == enq_id) present = 1;
      mfull = (model.size() == DEPTH);
      if (enq && mfull) n_full++;
      if (enq && present) n_dup++;
      if (deq && model.size() != 0) void'(model.pop_front());
      if (enq && !present && (!mfull || deq)) model.push_back(enq_id);
    end
    check(n_full > 0 && n_dup > 0, "full and duplicate cases reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
