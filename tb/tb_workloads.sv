// Workload test of morus_prng_accel at its default size: the three ways
// the accelerator is used by software, each run as a core would run it.
//  * generate: one call per workload size (1, 11, 24, 36, 196, 4096
//    numbers): TRL N, EXEC Generate, poll ISBUSY, TGS to memory, AFENCE.
//  * naive: 24 calls that each generate and fetch (TRS) a single number.
//  * buffered: 64 numbers fetched in refills of 32.
// All numbers are compared with the MORUS reference model, following the
// counter across calls; each Generate must keep the engine busy for exactly
// ceil(N/4) cycles. The accelerator-side cycles of each workload, from the
// first command to the last reply, are printed.
module tb_workloads;
  import ixiam_pkg::*;
  import tb_morus_ref_pkg::*;

  localparam int unsigned MEM_LAT = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic noc_in_valid = 0, noc_in_ready, noc_out_valid, noc_out_ready = 0;
  noc_pkt_t noc_in, noc_out;

  int checks = 0, failures = 0;
  int n_trs = 0, n_afence = 0, n_busy_seen = 0, n_error_seen = 0, n_tgs_words = 0;
  int gen_busy = 0;

  morus_prng_accel dut (.*);

  always @(posedge clk) if (dut.u_eng.st == dut.u_eng.E_GEN) gen_busy++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- interconnect model ----------------
  noc_pkt_t    cmd_q [$];          // commands waiting to enter the accelerator
  noc_pkt_t    rdata_q [$];        // memory read data waiting to enter
  logic [31:0] mem [logic [63:0]];
  ixiam_resp_t resp_q [16][$];     // replies, per core

  // injector: memory read data goes first; a command held back by a full
  // FIFO is withdrawn and retried so that read data is never blocked
  initial begin
    forever begin
      @(negedge clk);
      if (rdata_q.size() > 0) begin
        noc_in = rdata_q[0];
        noc_in_valid = 1;
        #4;
        if (noc_in_ready) void'(rdata_q.pop_front());
      end else if (cmd_q.size() > 0) begin
        noc_in = cmd_q[0];
        noc_in_valid = 1;
        #4;
        if (noc_in_ready) void'(cmd_q.pop_front());
      end else begin
        noc_in_valid = 0;
      end
    end
  end

  // receiver: replies to the cores, requests to the memory
  initial begin
    forever begin
      @(negedge clk);
      noc_out_ready = ($urandom_range(0, 3) != 0);
      #4;
      if (noc_out_valid && noc_out_ready) begin
        unique case (noc_out.kind)
          NOC_RESP: begin
            automatic ixiam_resp_t r = ixiam_resp_t'(noc_out.payload[RESP_W-1:0]);
            check(noc_out.node == r.core, "reply routed to its core");
            resp_q[r.core].push_back(r);
          end
          NOC_MEM_WR: begin
            automatic mem_req_t m = mem_req_t'(noc_out.payload[MREQ_W-1:0]);
            check(noc_out.node == MEM_NODE, "write routed to memory");
            mem[m.addr] = m.wdata;
          end
          NOC_MEM_RD: begin
            automatic mem_req_t m = mem_req_t'(noc_out.payload[MREQ_W-1:0]);
            fork
              begin
                automatic noc_pkt_t p;
                repeat (MEM_LAT) @(posedge clk);
                p.kind = NOC_MEM_RDATA;
                p.node = MEM_NODE;
                p.payload = PAY_W'(mem.exists(m.addr) ? mem[m.addr] : 32'd0);
                rdata_q.push_back(p);
              end
            join_none
          end
          default: check(0, "unexpected outgoing packet kind");
        endcase
      end
    end
  end

  // ---------------- core side ----------------
  task automatic post(input ixiam_op_e op, input logic [3:0] core, input logic [7:0] pid,
                      input logic [7:0] op_id = 0, input res_e sres = RES_REGFILE,
                      input int soff = 0, input res_e dres = RES_REGFILE, input int doff = 0,
                      input logic [63:0] maddr = 0, input int len = 0, input logic [31:0] data = 0);
    noc_pkt_t p;
    ixiam_cmd_t c;
    c = '{op: op, core: 4'd0, pid: pid, op_id: op_id, src_res: sres, src_off: LOC_W'(soff),
          dst_res: dres, dst_off: LOC_W'(doff), mem_addr: maddr, len: LEN_W'(len), data: data};
    p.kind = NOC_CMD;
    p.node = core;
    p.payload = PAY_W'(c);
    cmd_q.push_back(p);
  endtask

  task automatic wait_resp(input logic [3:0] core, output ixiam_resp_t r);
    while (resp_q[core].size() == 0) @(posedge clk);
    r = resp_q[core].pop_front();
  endtask

  task automatic sync(input ixiam_op_e op, input logic [3:0] core, input logic [7:0] pid,
                      output ixiam_resp_t r, input res_e sres = RES_REGFILE, input int soff = 0);
    post(op, core, pid, 0, sres, soff);
    wait_resp(core, r);
    check(r.op == op && r.pid == pid, "reply matches its instruction");
    if (op == OP_TRS) n_trs++;
    if (op == OP_AFENCE) n_afence++;
  endtask

  task automatic wait_free(input logic [3:0] core, input logic [7:0] pid, output acc_status_e s);
    ixiam_resp_t r;
    do begin
      sync(OP_ISBUSY, core, pid, r);
      if (r.data[1:0] == ST_BUSY) n_busy_seen++;
      repeat (20) @(posedge clk);
    end while (r.data[1:0] == ST_BUSY);
    s = acc_status_e'(r.data[1:0]);
    if (s == ST_ERROR) n_error_seen++;
  endtask

  // copy words [first, first+n) of the buffer to memory and compare
  task automatic tgs_check(input int first, input int n, ref logic [31:0] nums [], input string what);
    ixiam_resp_t r;
    logic [63:0] base = 64'h1000_0000;
    int bad = 0;
    post(OP_TGS, 1, 5, .sres(RES_OUTBUF), .soff(first), .maddr(base), .len(n));
    sync(OP_AFENCE, 1, 5, r);
    n_tgs_words += n;
    for (int i = 0; i < n; i++) begin
      if (!mem.exists(base + 4*i) || mem[base + 4*i] != nums[first + i]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d of %0d words wrong", what, bad, n));
  endtask

  // reference state of the generator, advanced one line at a time
  st_t ref_s;
  logic [127:0] ref_ctr;
  function automatic logic [127:0] next_line();
    logic [127:0] l;
    l = gen_step(ref_s, ref_ctr);
    ref_ctr++;
    return l;
  endfunction

  // one Generate of n numbers, engine time checked
  task automatic run_generate(input int n);
    acc_status_e s;
    gen_busy = 0;
    post(OP_TRL, 1, 5, .doff(0), .data(n));
    post(OP_EXEC, 1, 5, .op_id(EXEC_GENERATE));
    wait_free(1, 5, s);
    check(s == ST_FREE, $sformatf("Generate of %0d ends FREE", n));
    check(gen_busy == (n + 3) / 4, $sformatf("Generate of %0d: %0d engine cycles", n, gen_busy));
  endtask

  initial begin
    ixiam_resp_t r;
    acc_status_e s;
    logic [31:0] k [4];
    int sizes [6] = '{1, 11, 24, 36, 196, 4096};
    int t0, bad;
    logic [127:0] l;
    logic [31:0] exp_nums [$];

    for (int i = 0; i < 4; i++) k[i] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    post(OP_RESERVE, 1, 5);
    sync(OP_CHECK, 1, 5, r);
    check(r.data[0], "reservation granted");
    for (int i = 0; i < 4; i++) post(OP_TRL, 1, 5, .doff(1 + i), .data(k[i]));
    post(OP_EXEC, 1, 5, .op_id(EXEC_INITIALIZE));
    wait_free(1, 5, s);
    init(ref_s, k, '0);
    ref_ctr = 0;

    // generate
    foreach (sizes[w]) begin
      automatic int n = sizes[w];
      automatic logic [63:0] base = 64'h4000_0000;
      t0 = cyc;
      run_generate(n);
      post(OP_TGS, 1, 5, .sres(RES_OUTBUF), .soff(0), .maddr(base), .len(n));
      sync(OP_AFENCE, 1, 5, r);
      exp_nums.delete();
      for (int i = 0; i < (n + 3) / 4; i++) begin
        l = next_line();
        for (int b = 0; b < 4; b++) exp_nums.push_back(l[32*b +: 32]);
      end
      bad = 0;
      for (int i = 0; i < n; i++)
        if (!mem.exists(base + 4*i) || mem[base + 4*i] != exp_nums[i]) bad++;
      check(bad == 0, $sformatf("generate %0d: %0d numbers wrong", n, bad));
      $display("workload generate n=%0d: %0d accelerator cycles", n, cyc - t0);
    end

    // naive: one number per call
    t0 = cyc;
    bad = 0;
    for (int i = 0; i < 24; i++) begin
      run_generate(1);
      sync(OP_TRS, 1, 5, r, RES_OUTBUF, 0);
      l = next_line();
      if (r.data != l[31:0]) bad++;
    end
    check(bad == 0, $sformatf("naive: %0d of 24 numbers wrong", bad));
    $display("workload naive 24 numbers: %0d accelerator cycles", cyc - t0);

    // buffered: refills of 32 numbers into a local buffer in memory
    t0 = cyc;
    bad = 0;
    for (int refill = 0; refill < 2; refill++) begin
      automatic logic [63:0] base = 64'h5000_0000;
      run_generate(32);
      post(OP_TGS, 1, 5, .sres(RES_OUTBUF), .soff(0), .maddr(base), .len(32));
      sync(OP_AFENCE, 1, 5, r);
      for (int i = 0; i < 8; i++) begin
        l = next_line();
        for (int b = 0; b < 4; b++)
          if (!mem.exists(base + 16*i + 4*b) || mem[base + 16*i + 4*b] != l[32*b +: 32]) bad++;
      end
    end
    check(bad == 0, $sformatf("buffered: %0d of 64 numbers wrong", bad));
    $display("workload buffered 32, 64 numbers: %0d accelerator cycles", cyc - t0);

    post(OP_RELEASE, 1, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
