// Self-checking test of accel_noc_interface. Random incoming packets
// (commands, memory read data, stray kinds) with a slow command consumer,
// and random replies and memory requests with a stalling outgoing link.
// Checks: commands arrive in order with the source node as core; read data
// arrives one cycle later; stray packets are dropped; outgoing packets keep
// the order of each source, carry the right kind and node, and both sources
// are served when both wait; the FIFO pushes back when full.
module tb_accel_noc_interface;
  import ixiam_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic noc_in_valid = 0, noc_in_ready, noc_out_valid, noc_out_ready = 0;
  noc_pkt_t noc_in, noc_out;
  logic cmd_valid, cmd_ready = 0, mrsp_valid;
  ixiam_cmd_t cmd;
  logic [31:0] mrsp_data;
  logic resp_valid = 0, resp_ready, mreq_valid = 0, mreq_ready;
  ixiam_resp_t resp;
  mem_req_t mreq;

  int checks = 0, failures = 0;
  int n_backpressure = 0, n_both = 0, n_cmd = 0, n_out = 0;

  accel_noc_interface #(.CMD_FIFO_DEPTH(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ixiam_cmd_t  exp_cmd [$];
  logic [31:0] exp_rd  [$];
  noc_pkt_t    exp_resp_pkt [$], exp_mreq_pkt [$];

  function automatic ixiam_cmd_t rand_cmd();
    ixiam_cmd_t c;
    c = '{op: ixiam_op_e'($urandom_range(0, 11)), core: 4'($urandom), pid: 8'($urandom),
          op_id: 8'($urandom), src_res: res_e'($urandom_range(0, 1)), src_off: LOC_W'($urandom),
          dst_res: res_e'($urandom_range(0, 1)), dst_off: LOC_W'($urandom),
          mem_addr: {$urandom, $urandom}, len: LEN_W'($urandom), data: $urandom};
    return c;
  endfunction

  // checker, sampled at each rising edge
  always @(posedge clk) if (rst_n) begin
    if (noc_in_valid && !noc_in_ready) n_backpressure++;
    if (resp_valid && mreq_valid) n_both++;
    if (mrsp_valid) begin
      check(exp_rd.size() > 0 && mrsp_data == exp_rd[0], "memory read data");
      if (exp_rd.size() > 0) void'(exp_rd.pop_front());
    end
    if (cmd_valid && cmd_ready) begin
      check(exp_cmd.size() > 0 && cmd == exp_cmd[0], "command order and contents");
      if (exp_cmd.size() > 0) void'(exp_cmd.pop_front());
      n_cmd++;
    end
    if (noc_out_valid && noc_out_ready) begin
      n_out++;
      if (noc_out.kind == NOC_RESP) begin
        check(exp_resp_pkt.size() > 0 && noc_out == exp_resp_pkt[0], "reply packet");
        if (exp_resp_pkt.size() > 0) void'(exp_resp_pkt.pop_front());
      end else begin
        check(exp_mreq_pkt.size() > 0 && noc_out == exp_mreq_pkt[0], "memory request packet");
        if (exp_mreq_pkt.size() > 0) void'(exp_mreq_pkt.pop_front());
      end
    end
  end

  // incoming traffic
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      if (!noc_in_valid || noc_in_ready) begin
        noc_in_valid = $urandom_range(0, 1);
        case ($urandom_range(0, 4))
          0, 1, 2: begin
            automatic ixiam_cmd_t c = rand_cmd();
            noc_in.kind = NOC_CMD;
            noc_in.node = 4'($urandom);
            noc_in.payload = PAY_W'(c);
          end
          3: begin
            noc_in.kind = NOC_MEM_RDATA;
            noc_in.node = MEM_NODE;
            noc_in.payload = PAY_W'($urandom);
          end
          default: begin
            noc_in.kind = NOC_RESP;   // not meant for the accelerator
            noc_in.node = 4'($urandom);
            noc_in.payload = {$urandom, $urandom};
          end
        endcase
      end
      cmd_ready = ($urandom_range(0, 3) == 0);
      noc_out_ready = ($urandom_range(0, 2) != 0);
      // record what this cycle's handshake will deliver
      #1;
      if (noc_in_valid && noc_in_ready) begin
        if (noc_in.kind == NOC_CMD) begin
          automatic ixiam_cmd_t c = ixiam_cmd_t'(noc_in.payload[CMD_W-1:0]);
          c.core = noc_in.node;
          exp_cmd.push_back(c);
        end else if (noc_in.kind == NOC_MEM_RDATA) begin
          exp_rd.push_back(noc_in.payload[31:0]);
        end
      end
    end
    @(posedge clk);
    #1;
    noc_in_valid = 0;
    cmd_ready = 1;
    noc_out_ready = 1;
    repeat (40) @(negedge clk);
    check(exp_cmd.size() == 0 && exp_rd.size() == 0, "all incoming delivered");
    check(exp_resp_pkt.size() == 0 && exp_mreq_pkt.size() == 0, "all outgoing delivered");
    check(n_backpressure > 0 && n_both > 0 && n_cmd > 50 && n_out > 50, "stalls and contention reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // outgoing traffic from the controller side
  initial begin
    @(posedge rst_n);
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      if (!resp_valid || resp_ready) begin
        resp_valid = ($urandom_range(0, 1) == 0);
        resp = '{op: ixiam_op_e'($urandom_range(0, 11)), core: 4'($urandom), pid: 8'($urandom),
                 ok: 1'($urandom), data: $urandom};
      end
      if (!mreq_valid || mreq_ready) begin
        mreq_valid = ($urandom_range(0, 1) == 0);
        mreq = '{we: 1'($urandom), addr: {$urandom, $urandom}, wdata: $urandom};
      end
      #1;
      if (resp_valid && resp_ready)
        exp_resp_pkt.push_back('{kind: NOC_RESP, node: resp.core, payload: PAY_W'(resp)});
      if (mreq_valid && mreq_ready)
        exp_mreq_pkt.push_back('{kind: mreq.we ? NOC_MEM_WR : NOC_MEM_RD, node: MEM_NODE, payload: PAY_W'(mreq)});
    end
    @(negedge clk);
    if (resp_valid && !resp_ready) begin
      while (!resp_ready) @(negedge clk);
    end
    resp_valid = 0;
    mreq_valid = 0;
  end
endmodule
