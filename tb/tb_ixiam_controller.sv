// Self-checking test of ixiam_controller, driven with commands directly.
// The real register file, output buffer (64 words), engine, status register
// and reservation queue are connected to it; a memory model answers memory
// requests after 3 cycles and stalls writes at random. Checks decode
// latencies (reply 2 cycles after a command is taken, 4 for CHECK),
// ownership, every transfer instruction, both EXEC operations against the
// MORUS reference model, and the error cases.
module tb_ixiam_controller;
  import ixiam_pkg::*;
  import tb_morus_ref_pkg::*;

  localparam int unsigned BUF_WORDS = 64;
  localparam int unsigned BUF_AW = $clog2(BUF_WORDS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic cmd_valid = 0, cmd_ready, resp_valid, resp_ready = 1;
  ixiam_cmd_t cmd;
  ixiam_resp_t resp;
  logic mreq_valid, mreq_ready, mrsp_valid;
  mem_req_t mreq;
  logic [31:0] mrsp_data;
  logic rf_we, rf_re, rf_rvalid, buf_re, buf_rvalid;
  logic [2:0] rf_waddr, rf_raddr;
  logic [31:0] rf_wdata, rf_rdata, buf_rdata, n_reg;
  logic [3:0][31:0] key;
  logic [BUF_AW-1:0] buf_raddr;
  logic eng_start, eng_op_gen, eng_busy, eng_done, eng_error, eng_init;
  logic buf_we;
  logic [BUF_AW-3:0] buf_wline;
  logic [127:0] buf_wdata;
  acc_status_e status;
  logic st_err_set, st_clear;
  logic q_enq, q_deq, q_present, q_head_valid, q_full;
  logic [ID_W-1:0] q_id, q_head_id;
  logic [3:0] q_count;

  int checks = 0, failures = 0;

  ixiam_controller #(.BUF_WORDS(BUF_WORDS)) dut (.*);
  prng_register_file u_rf (.clk, .rst_n, .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .re(rf_re), .raddr(rf_raddr), .rdata(rf_rdata), .rvalid(rf_rvalid), .n_reg, .key);
  output_buffer #(.WORDS(BUF_WORDS)) u_buf (.clk, .rst_n, .wr_en(buf_we), .wr_line(buf_wline),
    .wr_data(buf_wdata), .rd_en(buf_re), .rd_addr(buf_raddr), .rd_data(buf_rdata), .rd_valid(buf_rvalid));
  morus_prng_engine #(.BUF_WORDS(BUF_WORDS)) u_eng (.clk, .rst_n, .start(eng_start), .op_gen(eng_op_gen),
    .key, .n_words(n_reg), .busy(eng_busy), .done(eng_done), .error(eng_error), .initialized(eng_init),
    .wr_en(buf_we), .wr_line(buf_wline), .wr_data(buf_wdata));
  status_register u_st (.clk, .rst_n, .op_start(eng_start), .op_done(eng_done), .op_error(eng_error),
    .err_set(st_err_set), .clear(st_clear), .status);
  reservation_queue #(.DEPTH(8), .ID_W(ID_W)) u_q (.clk, .rst_n, .enq(q_enq), .enq_id(q_id), .deq(q_deq),
    .q_id, .q_present, .head_valid(q_head_valid), .head_id(q_head_id), .full(q_full), .count(q_count));

  // ---- memory model: word-addressed by byte address / 4 ----
  logic [31:0] mem [logic [63:0]];
  int rd_pending = 0;
  logic [63:0] rd_addr_q;
  int n_mem_wr = 0, n_mem_rd = 0;
  always @(posedge clk) begin
    mrsp_valid <= 1'b0;
    if (mreq_valid && mreq_ready) begin
      if (mreq.we) begin
        mem[mreq.addr] = mreq.wdata;
        n_mem_wr++;
      end else begin
        rd_pending = 3;
        rd_addr_q  = mreq.addr;
        n_mem_rd++;
      end
    end else if (rd_pending > 0) begin
      rd_pending--;
      if (rd_pending == 0) begin
        mrsp_valid <= 1'b1;
        mrsp_data  <= mem.exists(rd_addr_q) ? mem[rd_addr_q] : 32'd0;
      end
    end
    mreq_ready <= ($urandom_range(0, 3) != 0);
  end

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

  int t_accept;
  task automatic send(input ixiam_op_e op, input logic [3:0] core, input logic [7:0] pid,
                      input logic [7:0] op_id = 0, input res_e sres = RES_REGFILE,
                      input int soff = 0, input res_e dres = RES_REGFILE, input int doff = 0,
                      input logic [63:0] maddr = 0, input int len = 0, input logic [31:0] data = 0);
    @(negedge clk);
    cmd = '{op: op, core: core, pid: pid, op_id: op_id, src_res: sres, src_off: LOC_W'(soff),
            dst_res: dres, dst_off: LOC_W'(doff), mem_addr: maddr, len: LEN_W'(len), data: data};
    cmd_valid = 1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    t_accept = cyc;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic get_resp(output ixiam_resp_t r, output int lat);
    while (!resp_valid) @(posedge clk);
    r = resp;
    lat = cyc - t_accept;
    @(posedge clk);
  endtask

  // synchronous instruction: send and wait for the reply
  task automatic sync(input ixiam_op_e op, input logic [3:0] core, input logic [7:0] pid,
                      output ixiam_resp_t r, input res_e sres = RES_REGFILE, input int soff = 0);
    int lat;
    send(op, core, pid, 0, sres, soff);
    get_resp(r, lat);
  endtask

  task automatic wait_free(input logic [3:0] core, input logic [7:0] pid, output acc_status_e s);
    ixiam_resp_t r;
    do begin
      sync(OP_ISBUSY, core, pid, r);
    end while (r.data[1:0] == ST_BUSY);
    s = acc_status_e'(r.data[1:0]);
  endtask

  initial begin
    ixiam_resp_t r;
    int lat;
    acc_status_e s;
    st_t ref_s;
    logic [31:0] k [4];
    logic [127:0] ctr, line;
    logic [31:0] nums [64];

    for (int i = 0; i < 4; i++) k[i] = $urandom;
    mem[64'h100] = k[2];
    mem[64'h104] = k[3];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // latencies and status before any reservation
    send(OP_ISBUSY, 1, 5);
    get_resp(r, lat);
    check(r.data[1:0] == ST_FREE && lat == 2, $sformatf("ISBUSY reply FREE after 2 cycles (lat %0d)", lat));
    send(OP_CHECK, 1, 5);
    get_resp(r, lat);
    check(r.data[1:0] == 2'b00 && lat == 4, $sformatf("CHECK before RESERVE after 4 cycles (lat %0d)", lat));

    // reservations: A = core 1 pid 5, B = core 2 pid 9
    send(OP_RESERVE, 1, 5);
    send(OP_RESERVE, 2, 9);
    send(OP_RESERVE, 1, 5);   // duplicate, ignored
    sync(OP_CHECK, 1, 5, r);
    check(r.data[1:0] == 2'b11, "A owns the accelerator");
    sync(OP_CHECK, 2, 9, r);
    check(r.data[1:0] == 2'b10, "B queued, not owner");
    check(q_count == 2, "duplicate reservation ignored");
    // C = core 1 pid 6: same core as the owner, another process
    send(OP_RESERVE, 1, 6);
    sync(OP_CHECK, 1, 6, r);
    check(r.data[1:0] == 2'b10, "another process on the owner's core is not the owner");
    sync(OP_TRS, 1, 6, r, RES_REGFILE, 0);
    check(!r.ok, "TRS from another process on the owner's core refused");

    // B is not the owner: its writes are dropped and its TRS refused
    send(OP_TRL, 2, 9, .dres(RES_REGFILE), .doff(1), .data(32'hdead_beef));
    sync(OP_TRS, 2, 9, r, RES_REGFILE, 1);
    check(!r.ok, "TRS from non-owner refused");
    sync(OP_TRS, 1, 5, r, RES_REGFILE, 1);
    check(r.ok && r.data == 0, "non-owner TRL dropped");

    // key: K0, K1 by TRL, K2, K3 by TGL from memory
    send(OP_TRL, 1, 5, .doff(1), .data(k[0]));
    send(OP_TRL, 1, 5, .doff(2), .data(k[1]));
    send(OP_TGL, 1, 5, .dres(RES_REGFILE), .doff(3), .maddr(64'h100), .len(2));
    sync(OP_TRS, 1, 5, r, RES_REGFILE, 3);
    check(r.ok && r.data == k[2], "TGL loaded K2");
    sync(OP_TRS, 1, 5, r, RES_REGFILE, 4);
    check(r.data == k[3], "TGL loaded K3");
    check(n_mem_rd == 2, "TGL issued two memory reads");

    // Initialize
    send(OP_EXEC, 1, 5, .op_id(EXEC_INITIALIZE));
    sync(OP_ISBUSY, 1, 5, r);
    check(r.data[1:0] == ST_BUSY, "busy during Initialize");
    wait_free(1, 5, s);
    check(s == ST_FREE && eng_init, "Initialize done");
    init(ref_s, k, '0);
    ctr = 0;

    // Generate 10 numbers, copy them out with TGS
    send(OP_TRL, 1, 5, .doff(0), .data(10));
    send(OP_EXEC, 1, 5, .op_id(EXEC_GENERATE));
    wait_free(1, 5, s);
    check(s == ST_FREE, "Generate done");
    for (int l = 0; l < 3; l++) begin
      line = gen_step(ref_s, ctr);
      ctr++;
      for (int b = 0; b < 4; b++) nums[4*l + b] = line[32*b +: 32];
    end
    n_mem_wr = 0;
    send(OP_TGS, 1, 5, .sres(RES_OUTBUF), .soff(0), .maddr(64'h2000), .len(10));
    sync(OP_AFENCE, 1, 5, r);
    check(r.ok && n_mem_wr == 10, $sformatf("AFENCE after TGS of 10 words (%0d writes)", n_mem_wr));
    for (int i = 0; i < 10; i++)
      check(mem.exists(64'h2000 + 4*i) && mem[64'h2000 + 4*i] == nums[i], $sformatf("number %0d in memory", i));

    // TL from the buffer into K0, TRS from the buffer
    send(OP_TL, 1, 5, .sres(RES_OUTBUF), .soff(3), .dres(RES_REGFILE), .doff(1), .len(1));
    sync(OP_TRS, 1, 5, r, RES_REGFILE, 1);
    check(r.data == nums[3], "TL copied buffer word 3 into K0");
    sync(OP_TRS, 1, 5, r, RES_OUTBUF, 9);
    check(r.ok && r.data == nums[9], "TRS of buffer word 9");

    // errors
    send(OP_TRL, 1, 5, .doff(0), .data(BUF_WORDS + 1));
    send(OP_EXEC, 1, 5, .op_id(EXEC_GENERATE));
    wait_free(1, 5, s);
    check(s == ST_ERROR, "Generate above capacity sets ERROR");
    send(OP_EXEC, 1, 5, .op_id(8'd7));
    sync(OP_ISBUSY, 1, 5, r);
    check(r.data[1:0] == ST_ERROR, "unknown op_id sets ERROR");
    send(OP_TRL, 1, 5, .doff(0), .data(8));
    send(OP_EXEC, 1, 5, .op_id(EXEC_GENERATE));
    wait_free(1, 5, s);
    check(s == ST_FREE, "new operation leaves ERROR");
    line = gen_step(ref_s, ctr); ctr++;
    for (int b = 0; b < 4; b++) nums[b] = line[32*b +: 32];
    line = gen_step(ref_s, ctr); ctr++;
    for (int b = 0; b < 4; b++) nums[4 + b] = line[32*b +: 32];
    sync(OP_TRS, 1, 5, r, RES_OUTBUF, 6);
    check(r.data == nums[6], "second Generate continues the sequence");
    n_mem_wr = 0;
    send(OP_TGS, 1, 5, .sres(RES_OUTBUF), .soff(60), .maddr(64'h3000), .len(8));
    sync(OP_ISBUSY, 1, 5, r);
    check(r.data[1:0] == ST_ERROR && n_mem_wr == 0, "TGS outside the buffer refused");
    send(OP_TL, 1, 5, .sres(RES_REGFILE), .soff(0), .dres(RES_OUTBUF), .doff(0), .len(1));

    // hand-over
    send(OP_RELEASE, 2, 9);   // not the owner: ignored
    sync(OP_CHECK, 1, 5, r);
    check(r.data[0], "release by non-owner ignored");
    send(OP_RELEASE, 1, 5);
    sync(OP_ISBUSY, 2, 9, r);
    check(r.data[1:0] == ST_FREE, "RELEASE clears ERROR");
    sync(OP_CHECK, 2, 9, r);
    check(r.data[1:0] == 2'b11, "B owns after release");
    sync(OP_CHECK, 1, 5, r);
    check(r.data[1:0] == 2'b00, "A no longer queued");
    sync(OP_TRS, 2, 9, r, RES_OUTBUF, 1);
    check(r.ok && r.data == nums[1], "new owner reads the buffer");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
