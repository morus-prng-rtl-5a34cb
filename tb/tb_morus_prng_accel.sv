// End-to-end test of morus_prng_accel at its default size (1 MiB buffer).
//
// The testbench plays two cores and the memory node on the interconnect
// link. Core 1 reserves the accelerator, loads the key (two words by TRL,
// two by TGL from memory), runs Initialize and a Generate that fills the
// whole buffer, and copies numbers out with TGS; all numbers read are
// compared with the MORUS reference model. It then checks the error on an
// N above capacity, a Generate that continues the sequence, TL and TRS,
// ownership (core 2 is refused until core 1 releases), and a burst of
// commands that fills the command FIFO. The outgoing link stalls at random.
// Each mechanism is counted and must happen at least once.
module tb_morus_prng_accel;
  import ixiam_pkg::*;
  import tb_morus_ref_pkg::*;

  localparam int unsigned BUF_WORDS = 262144;
  localparam int unsigned MEM_LAT   = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic noc_in_valid = 0, noc_in_ready, noc_out_valid, noc_out_ready = 0;
  noc_pkt_t noc_in, noc_out;

  int checks = 0, failures = 0;

  morus_prng_accel dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_init = 0, n_gen = 0, n_busy_seen = 0, n_error_seen = 0, n_exec_wait = 0;
  int n_refused = 0, n_granted = 0, n_fifo_full = 0, n_out_stall = 0;
  int init_busy = 0, gen_busy = 0;   // engine cycles spent in each operation
  int n_tgl = 0, n_tgs_words = 0, n_tl = 0, n_trs = 0, n_afence = 0, n_release = 0;

  always @(posedge clk) if (rst_n) begin
    if (noc_in_valid && !noc_in_ready) n_fifo_full++;
    if (noc_out_valid && !noc_out_ready) n_out_stall++;
    if (dut.u_ctl.st == dut.u_ctl.C_EXEC_WAIT && dut.eng_busy) n_exec_wait++;
    if (dut.u_eng.st == dut.u_eng.E_INIT) init_busy++;
    if (dut.u_eng.st == dut.u_eng.E_GEN) gen_busy++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
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

  initial begin
    ixiam_resp_t r;
    acc_status_e s;
    st_t ref_s;
    logic [31:0] k [4];
    logic [127:0] ctr, line;
    logic [31:0] nums [];

    nums = new[BUF_WORDS];
    for (int i = 0; i < 4; i++) k[i] = $urandom;
    mem[64'h8000] = k[2];
    mem[64'h8004] = k[3];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // reservation: core 1 first, core 2 waits
    post(OP_RESERVE, 1, 5);
    post(OP_RESERVE, 2, 9);
    sync(OP_CHECK, 1, 5, r);
    check(r.data[1:0] == 2'b11, "core 1 granted");
    if (r.data[0]) n_granted++;
    sync(OP_CHECK, 2, 9, r);
    check(r.data[1:0] == 2'b10, "core 2 queued");

    // key
    post(OP_TRL, 1, 5, .doff(1), .data(k[0]));
    post(OP_TRL, 1, 5, .doff(2), .data(k[1]));
    post(OP_TGL, 1, 5, .doff(3), .maddr(64'h8000), .len(2));
    n_tgl++;
    post(OP_TRL, 2, 9, .doff(1), .data(32'h0bad_0bad));   // not the owner
    sync(OP_TRS, 2, 9, r, RES_REGFILE, 1);
    check(!r.ok, "core 2 refused while core 1 owns");
    if (!r.ok) n_refused++;
    sync(OP_TRS, 1, 5, r, RES_REGFILE, 4);
    check(r.ok && r.data == k[3], "key word K3 loaded from memory");
    sync(OP_TRS, 1, 5, r, RES_REGFILE, 1);
    check(r.data == k[0], "key word K0 kept");

    // Initialize, then straight away a full-buffer Generate: the second
    // EXEC waits in the controller for the engine
    post(OP_EXEC, 1, 5, .op_id(EXEC_INITIALIZE));
    post(OP_TRL, 1, 5, .doff(0), .data(BUF_WORDS));
    post(OP_EXEC, 1, 5, .op_id(EXEC_GENERATE));
    n_init++;
    n_gen++;
    wait_free(1, 5, s);
    check(s == ST_FREE, "Generate ended without error");
    check(init_busy == 16, $sformatf("Initialize took %0d cycles, expected 16", init_busy));
    check(gen_busy == BUF_WORDS / 4,
          $sformatf("full Generate took %0d cycles, expected %0d", gen_busy, BUF_WORDS / 4));

    init(ref_s, k, '0);
    ctr = 0;
    for (int l = 0; l < BUF_WORDS / 4; l++) begin
      line = gen_step(ref_s, ctr);
      ctr++;
      for (int b = 0; b < 4; b++) nums[4*l + b] = line[32*b +: 32];
    end
    tgs_check(0, 40, nums, "start of the buffer");
    tgs_check(131070, 9, nums, "middle of the buffer");
    tgs_check(BUF_WORDS - 23, 23, nums, "end of the buffer");
    sync(OP_TRS, 1, 5, r, RES_OUTBUF, 77777);
    check(r.ok && r.data == nums[77777], "TRS of buffer word 77777");

    // N above capacity: ERROR, nothing generated
    post(OP_TRL, 1, 5, .doff(0), .data(BUF_WORDS + 1));
    post(OP_EXEC, 1, 5, .op_id(EXEC_GENERATE));
    wait_free(1, 5, s);
    check(s == ST_ERROR, "N above capacity gives ERROR");

    // a small Generate continues the sequence
    post(OP_TRL, 1, 5, .doff(0), .data(6));
    post(OP_EXEC, 1, 5, .op_id(EXEC_GENERATE));
    n_gen++;
    wait_free(1, 5, s);
    check(s == ST_FREE, "small Generate clears ERROR");
    for (int l = 0; l < 2; l++) begin
      line = gen_step(ref_s, ctr);
      ctr++;
      for (int b = 0; b < 4; b++) nums[4*l + b] = line[32*b +: 32];
    end
    tgs_check(0, 6, nums, "continued sequence");

    // TL: a generated number becomes key word K2
    post(OP_TL, 1, 5, .sres(RES_OUTBUF), .soff(5), .dres(RES_REGFILE), .doff(3), .len(1));
    n_tl++;
    sync(OP_TRS, 1, 5, r, RES_REGFILE, 3);
    check(r.data == nums[5], "TL copied a number into K2");

    // burst of commands while a long TGS runs: the command FIFO fills
    post(OP_TGS, 1, 5, .sres(RES_OUTBUF), .soff(0), .maddr(64'h2000_0000), .len(64));
    for (int i = 0; i < 8; i++) post(OP_ISBUSY, 1, 5);
    for (int i = 0; i < 8; i++) begin
      wait_resp(1, r);
      check(r.op == OP_ISBUSY && r.data[1:0] == ST_FREE, "burst reply");
    end
    n_tgs_words += 64;
    for (int i = 0; i < 8; i++)
      check(mem.exists(64'h2000_0000 + 4*i) && mem[64'h2000_0000 + 4*i] == nums[i], "burst TGS data");

    // hand-over to core 2
    post(OP_RELEASE, 1, 5);
    n_release++;
    sync(OP_CHECK, 2, 9, r);
    check(r.data[1:0] == 2'b11, "core 2 granted after release");
    if (r.data[0]) n_granted++;
    sync(OP_TRS, 2, 9, r, RES_OUTBUF, 2);
    check(r.ok && r.data == nums[2], "core 2 reads the buffer");

    // every mechanism happened
    check(n_init > 0, "Initialize ran");
    check(n_gen > 1, "Generate ran");
    check(n_busy_seen > 0, "BUSY status observed");
    check(n_error_seen > 0, "ERROR status observed");
    check(n_exec_wait > 0, "EXEC waited for the busy engine");
    check(n_refused > 0, "non-owner refused");
    check(n_granted > 1, "reservation granted to both cores");
    check(n_release > 0, "RELEASE handed over");
    check(n_fifo_full > 0, "command FIFO full");
    check(n_out_stall > 0, "outgoing link stalled");
    check(n_tgl > 0 && n_tgs_words > 0 && n_tl > 0 && n_trs > 0 && n_afence > 0, "all transfer kinds used");
    $display("mechanisms: init=%0d gen=%0d busy=%0d error=%0d exec_wait=%0d refused=%0d granted=%0d fifo_full=%0d out_stall=%0d tgs_words=%0d trs=%0d afence=%0d",
             n_init, n_gen, n_busy_seen, n_error_seen, n_exec_wait, n_refused, n_granted,
             n_fifo_full, n_out_stall, n_tgs_words, n_trs, n_afence);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
