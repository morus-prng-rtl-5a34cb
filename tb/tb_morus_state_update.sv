// Self-checking test of morus_state_update: random states and messages are
// pushed through the combinational update and compared with the word-level
// reference model. A clock only paces the checks.
module tb_morus_state_update;
  import morus_pkg::*;
  import tb_morus_ref_pkg::*;

  state_t s_in, s_out;
  blk_t   msg;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  morus_state_update dut (.s_in(s_in), .msg(msg), .s_out(s_out));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t ref_s;
    w64_t m [4];
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 4; j++) ref_s[i][j] = {$urandom, $urandom};
      for (int j = 0; j < 4; j++) m[j] = (t % 3 == 0) ? 64'd0 : {$urandom, $urandom};
      s_in = state_t'(pack(ref_s));
      for (int j = 0; j < 4; j++) msg[64*j +: 64] = m[j];
      @(posedge clk);
      upd(ref_s, m);
      checks++;
      if (s_out !== state_t'(pack(ref_s))) begin
        failures++;
        if (failures < 5) $display("mismatch at test %0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
