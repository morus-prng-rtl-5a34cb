// Self-checking test of morus_prng_engine with a 64-word buffer.
// Checks, against the reference model: Initialize takes 16 busy cycles;
// Generate writes ceil(N/4) lines starting at line 0, one per cycle, with the
// expected numbers; a second Generate continues the sequence; Generate with
// N above capacity, or before any Initialize, ends with error and writes
// nothing; N = 0 ends at once; a new Initialize restarts the sequence.
module tb_morus_prng_engine;
  import tb_morus_ref_pkg::*;

  localparam int unsigned BUF_WORDS = 64;
  localparam int unsigned LINES = BUF_WORDS / 4;
  localparam logic [127:0] IV = 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, op_gen = 0;
  logic [3:0][31:0] key;
  logic [31:0] n_words;
  logic busy, done, error, initialized, wr_en;
  logic [$clog2(LINES)-1:0] wr_line;
  logic [127:0] wr_data;

  int checks = 0, failures = 0;

  morus_prng_engine #(.BUF_WORDS(BUF_WORDS), .IV(IV)) dut (.*);

  // capture of everything the engine writes
  logic [127:0] lines [LINES];
  int           n_writes;
  int           busy_cycles;
  always @(posedge clk) begin
    if (wr_en) begin
      lines[wr_line] <= wr_data;
      n_writes++;
    end
    if (busy) busy_cycles++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // run one operation, return the error flag
  task automatic run(input bit gen, input int n, output bit err);
    n_writes = 0;
    busy_cycles = 0;
    @(negedge clk);
    op_gen = gen; n_words = n; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    err = error;
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t ref_s;
    logic [31:0] k [4];
    logic [127:0] ctr;
    logic [127:0] expv;
    bit err;
    int sizes [6] = '{10, 7, 64, 1, 4, 33};

    for (int i = 0; i < 4; i++) begin
      k[i] = $urandom;
      key[i] = k[i];
    end
    n_words = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    run(1, 8, err);
    check(err && n_writes == 0 && busy_cycles == 0, "generate before initialize is an error");

    run(0, 0, err);
    check(!err && initialized, "initialize completes");
    check(busy_cycles == 16, $sformatf("initialize busy %0d cycles, expected 16", busy_cycles));
    init(ref_s, k, IV);
    ctr = 0;

    foreach (sizes[t]) begin
      automatic int nl = (sizes[t] + 3) / 4;
      run(1, sizes[t], err);
      check(!err, "generate without error");
      check(n_writes == nl && busy_cycles == nl,
            $sformatf("N=%0d: %0d writes in %0d cycles, expected %0d", sizes[t], n_writes, busy_cycles, nl));
      for (int l = 0; l < nl; l++) begin
        expv = gen_step(ref_s, ctr);
        ctr++;
        check(lines[l] == expv, $sformatf("N=%0d line %0d: %h vs %h", sizes[t], l, lines[l], expv));
      end
    end

    run(1, BUF_WORDS + 1, err);
    check(err && n_writes == 0 && busy_cycles == 0, "N above capacity is an error");
    run(1, 0, err);
    check(!err && n_writes == 0, "N = 0 generates nothing");

    // the rejected calls left the sequence where it was
    run(1, 4, err);
    expv = gen_step(ref_s, ctr);
    ctr++;
    check(!err && lines[0] == expv, "sequence continues after rejected calls");

    // key change while idle, then Initialize restarts with the new key
    for (int i = 0; i < 4; i++) begin
      k[i] = $urandom;
      key[i] = k[i];
    end
    run(0, 0, err);
    init(ref_s, k, IV);
    ctr = 0;
    run(1, 12, err);
    for (int l = 0; l < 3; l++) begin
      expv = gen_step(ref_s, ctr);
      ctr++;
      check(lines[l] == expv, $sformatf("after re-init line %0d", l));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
