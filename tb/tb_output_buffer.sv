// Self-checking test of output_buffer (64 words): random line writes, then
// back-to-back and scattered word reads checked against a model array, with
// the read data required exactly two cycles after the request.
module tb_output_buffer;
  localparam int unsigned WORDS = 64;
  localparam int unsigned LINES = WORDS / 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0, rd_valid;
  logic [$clog2(LINES)-1:0] wr_line;
  logic [127:0] wr_data;
  logic [$clog2(WORDS)-1:0] rd_addr;
  logic [31:0] rd_data;

  int checks = 0, failures = 0;
  logic [31:0] model [WORDS];

  output_buffer #(.WORDS(WORDS)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected-data pipeline: what a read issued at cycle t must return at t+2
  logic [31:0] exp_q [2];
  logic        expv_q [2];
  always @(posedge clk) begin
    if (rst_n) begin
      if (expv_q[1] || rd_valid) begin
        checks++;
        if (!(expv_q[1] && rd_valid && rd_data == exp_q[1])) begin
          failures++;
          $display("FAIL: read valid %0b/%0b data %h expected %h", rd_valid, expv_q[1], rd_data, exp_q[1]);
        end
      end
    end
    expv_q[1] <= expv_q[0];
    exp_q[1]  <= exp_q[0];
    expv_q[0] <= rd_en;
    exp_q[0]  <= model[rd_addr];
  end

  initial begin
    expv_q[0] = 0; expv_q[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill every line
    for (int l = 0; l < LINES; l++) begin
      @(negedge clk);
      wr_en = 1; wr_line = l;
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < 4; b++) model[4*l + b] = wr_data[32*b +: 32];
    end
    @(negedge clk);
    wr_en = 0;
    // streaming reads of all words
    for (int a = 0; a < WORDS; a++) begin
      rd_en = 1; rd_addr = a;
      @(negedge clk);
    end
    rd_en = 0;
    // random reads and rewrites, the model updated after each write edge
    for (int t = 0; t < 300; t++) begin
      rd_en = $urandom_range(0, 1);
      rd_addr = $urandom_range(0, WORDS - 1);
      wr_en = ($urandom_range(0, 3) == 0);
      wr_line = $urandom_range(0, LINES - 1);
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      #1;
      if (wr_en) for (int b = 0; b < 4; b++) model[4*wr_line + b] = wr_data[32*b +: 32];
      @(negedge clk);
    end
    rd_en = 0; wr_en = 0;
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
