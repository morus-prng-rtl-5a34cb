// MORUS-PRNG: an integrated pseudo-random number generator accelerator driven
// by IXIAM instructions.
//
// The accelerator sits on the SoC interconnect. Cores send it IXIAM command
// packets; the interconnect interface queues them for the controller, which
// checks ownership against the reservation queue, moves words between the
// cores, main memory, the register file and the output buffer, and starts the
// MORUS PRNG engine. Software writes the four key words (Initialize) or the
// amount N of numbers wanted (Generate) into the register file, issues EXEC,
// polls ISBUSY until the status register reads FREE, and copies the numbers
// from the output buffer to memory with TGS.
//
//   interconnect <-> accel_noc_interface <-> ixiam_controller
//                                            |   |   |   |
//                      prng_register_file ---+   |   |   +--- reservation_queue
//                      output_buffer (read) -----+   +------- status_register
//                      morus_prng_engine -> output_buffer (write, 128 bits/cycle)
//
// Interface: one incoming and one outgoing packet stream (noc_pkt_t, with
// valid/ready). Active-low asynchronous reset.
//
// The block set and their links follow the document's accelerator; the
// packet format and the handshakes are this design's choices.
module morus_prng_accel
  import ixiam_pkg::*;
#(
  parameter int unsigned  BUF_WORDS      = 262144,   // 1 MiB of 32-bit numbers
  parameter int unsigned  QUEUE_DEPTH    = 8,
  parameter int unsigned  CMD_FIFO_DEPTH = 4,
  parameter logic [127:0] IV             = '0,
  localparam int unsigned BUF_AW         = $clog2(BUF_WORDS),
  localparam int unsigned LINE_AW        = BUF_AW - 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     noc_in_valid,
  input  noc_pkt_t noc_in,
  output logic     noc_in_ready,
  output logic     noc_out_valid,
  output noc_pkt_t noc_out,
  input  logic     noc_out_ready
);

  // interface <-> controller
  logic              cmd_valid, cmd_ready, resp_valid, resp_ready;
  logic              mreq_valid, mreq_ready, mrsp_valid;
  ixiam_cmd_t        cmd;
  ixiam_resp_t       resp;
  mem_req_t          mreq;
  logic [DATA_W-1:0] mrsp_data;

  // register file
  logic              rf_we, rf_re, rf_rvalid;
  logic [2:0]        rf_waddr, rf_raddr;
  logic [31:0]       rf_wdata, rf_rdata, n_reg;
  logic [3:0][31:0]  key;

  // output buffer
  logic              buf_re, buf_rvalid, buf_we;
  logic [BUF_AW-1:0] buf_raddr;
  logic [31:0]       buf_rdata;
  logic [LINE_AW-1:0] buf_wline;
  logic [127:0]      buf_wdata;

  // engine and status
  logic              eng_start, eng_op_gen, eng_busy, eng_done, eng_error, eng_initialized;
  acc_status_e       status;
  logic              st_err_set, st_clear;

  // reservation queue
  logic              q_enq, q_deq, q_present, q_head_valid, q_full;
  logic [ID_W-1:0]   q_id, q_head_id;
  logic [$clog2(QUEUE_DEPTH):0] q_count;

  accel_noc_interface #(.CMD_FIFO_DEPTH(CMD_FIFO_DEPTH)) u_if (
    .clk, .rst_n,
    .noc_in_valid, .noc_in, .noc_in_ready,
    .noc_out_valid, .noc_out, .noc_out_ready,
    .cmd_valid, .cmd, .cmd_ready,
    .mrsp_valid, .mrsp_data,
    .resp_valid, .resp, .resp_ready,
    .mreq_valid, .mreq, .mreq_ready
  );

  ixiam_controller #(.BUF_WORDS(BUF_WORDS)) u_ctl (
    .clk, .rst_n,
    .cmd_valid, .cmd, .cmd_ready,
    .resp_valid, .resp, .resp_ready,
    .mreq_valid, .mreq, .mreq_ready,
    .mrsp_valid, .mrsp_data,
    .rf_we, .rf_waddr, .rf_wdata, .rf_re, .rf_raddr, .rf_rdata, .rf_rvalid,
    .buf_re, .buf_raddr, .buf_rdata, .buf_rvalid,
    .eng_start, .eng_op_gen, .eng_busy,
    .status, .st_err_set, .st_clear,
    .q_enq, .q_deq, .q_id, .q_present, .q_head_valid, .q_head_id
  );

  prng_register_file u_rf (
    .clk, .rst_n,
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .re(rf_re), .raddr(rf_raddr), .rdata(rf_rdata), .rvalid(rf_rvalid),
    .n_reg, .key
  );

  output_buffer #(.WORDS(BUF_WORDS)) u_buf (
    .clk, .rst_n,
    .wr_en(buf_we), .wr_line(buf_wline), .wr_data(buf_wdata),
    .rd_en(buf_re), .rd_addr(buf_raddr), .rd_data(buf_rdata), .rd_valid(buf_rvalid)
  );

  morus_prng_engine #(.BUF_WORDS(BUF_WORDS), .IV(IV)) u_eng (
    .clk, .rst_n,
    .start(eng_start), .op_gen(eng_op_gen), .key, .n_words(n_reg),
    .busy(eng_busy), .done(eng_done), .error(eng_error), .initialized(eng_initialized),
    .wr_en(buf_we), .wr_line(buf_wline), .wr_data(buf_wdata)
  );

  status_register u_st (
    .clk, .rst_n,
    .op_start(eng_start), .op_done(eng_done), .op_error(eng_error),
    .err_set(st_err_set), .clear(st_clear), .status
  );

  reservation_queue #(.DEPTH(QUEUE_DEPTH), .ID_W(ID_W)) u_q (
    .clk, .rst_n,
    .enq(q_enq), .enq_id(q_id), .deq(q_deq), .q_id,
    .q_present, .head_valid(q_head_valid), .head_id(q_head_id),
    .full(q_full), .count(q_count)
  );

endmodule
