// Controller of the MORUS-PRNG accelerator: executes IXIAM command packets.
//
// Commands are taken one at a time, in order. Each is first decoded and
// executed for a fixed time, one cycle, or three for the instructions that
// use the reservation queue (RESERVE, CHECK, RELEASE); its operative part
// (data moves, waiting for the engine) follows. Only the process at the head
// of the reservation queue (the owner) may use the accelerator: transfers and
// EXEC from anyone else are dropped, and a TRS from anyone else is answered
// with ok = 0.
//   RESERVE  queue the sender (ignored if full or already queued)
//   CHECK    reply data bit 0 = sender owns the accelerator, bit 1 = queued
//   RELEASE  owner only: leave the queue and clear the status register
//   TRL      write the packet's data word to a register
//   TRS      reply with one local word (register or output buffer)
//   TGL      read len words from memory at mem_addr into registers
//   TGS      write len local words to memory from mem_addr on
//   TL       copy len local words into registers
//   EXEC     op_id 0 Initialize, 1 Generate; waits while the engine is busy,
//            starts it and goes on (asynchronous)
//   ISBUSY   reply with the status register
//   AFENCE   reply once earlier transfers are done; as transfers complete
//            before the next command is taken, it replies at once
// RUISR concerns only the cores and is ignored. Memory addresses advance by
// 4 bytes per word. A transfer that leaves a local memory, names the output
// buffer as destination (only the engine writes it), or an unknown op_id sets
// the status register to ERROR and does nothing.
//
// Timing: a command taken at cycle t is decoded at t+1 (t+1..t+3 for queue
// instructions); a reply is offered at the next cycle. Each transferred word
// costs one local read (1 cycle from the register file, 2 from the buffer)
// plus, for TGS, one memory write handshake, or for TGL one memory read
// request and its reply.
//
// Follows the document: the instruction set, owner-only use through the
// reservation queue, EXEC op_ids 0 and 1, the 1- and 3-cycle decode
// latencies and the local access latencies. This design's choices: the
// packet fields, the address map, the CHECK reply coding, the error cases,
// and word-by-word, unpipelined transfers.
module ixiam_controller
  import ixiam_pkg::*;
#(
  parameter int unsigned  BUF_WORDS = 262144,
  localparam int unsigned BUF_AW    = (BUF_WORDS > 1) ? $clog2(BUF_WORDS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // commands and replies
  input  logic              cmd_valid,
  input  ixiam_cmd_t        cmd,
  output logic              cmd_ready,
  output logic              resp_valid,
  output ixiam_resp_t       resp,
  input  logic              resp_ready,
  // memory requests
  output logic              mreq_valid,
  output mem_req_t          mreq,
  input  logic              mreq_ready,
  input  logic              mrsp_valid,
  input  logic [DATA_W-1:0] mrsp_data,
  // register file
  output logic              rf_we,
  output logic [2:0]        rf_waddr,
  output logic [31:0]       rf_wdata,
  output logic              rf_re,
  output logic [2:0]        rf_raddr,
  input  logic [31:0]       rf_rdata,
  input  logic              rf_rvalid,
  // output buffer read port
  output logic              buf_re,
  output logic [BUF_AW-1:0] buf_raddr,
  input  logic [31:0]       buf_rdata,
  input  logic              buf_rvalid,
  // engine
  output logic              eng_start,
  output logic              eng_op_gen,
  input  logic              eng_busy,
  // status register
  input  acc_status_e       status,
  output logic              st_err_set,
  output logic              st_clear,
  // reservation queue
  output logic              q_enq,
  output logic              q_deq,
  output logic [ID_W-1:0]   q_id,
  input  logic              q_present,
  input  logic              q_head_valid,
  input  logic [ID_W-1:0]   q_head_id
);

  typedef enum logic [3:0] {
    C_IDLE, C_DECODE, C_EXEC_WAIT, C_RD_ISSUE, C_RD_WAIT,
    C_MEMWR, C_MEMRD_ISSUE, C_MEMRD_WAIT, C_RESP
  } ctl_state_e;

  ctl_state_e        st;
  ixiam_cmd_t        c;
  logic [1:0]        dec_cnt;
  logic [LEN_W-1:0]  idx, len;
  logic [31:0]       word_q;
  logic              resp_ok_q;
  logic [DATA_W-1:0] resp_data_q;

  logic              owner;
  logic [LOC_W-1:0]  src_a, dst_a;
  logic              src_ok, dst_ok;
  logic              last_word;
  logic              rd_done;

  function automatic logic range_ok(input res_e r, input logic [LOC_W-1:0] off,
                                    input logic [LEN_W-1:0] n);
    logic [31:0] end_w;
    end_w = 32'(off) + 32'(n);
    return (r == RES_REGFILE) ? (end_w <= RF_WORDS) : (end_w <= BUF_WORDS);
  endfunction

  assign q_id      = {c.core, c.pid};
  assign owner     = q_head_valid && (q_head_id == q_id);
  assign src_a     = c.src_off + LOC_W'(idx);
  assign dst_a     = c.dst_off + LOC_W'(idx);
  assign last_word = (idx + 1'b1 == len);
  assign rd_done   = (c.src_res == RES_REGFILE) ? rf_rvalid : buf_rvalid;

  // transfer length: one word for TRS/TRL
  always_comb begin
    len = ((c.op == OP_TRS) || (c.op == OP_TRL)) ? LEN_W'(1) : c.len;
  end
  assign src_ok = range_ok(c.src_res, c.src_off, len);
  assign dst_ok = (c.dst_res == RES_REGFILE) && range_ok(c.dst_res, c.dst_off, len);

  assign cmd_ready  = (st == C_IDLE);
  assign resp_valid = (st == C_RESP);
  assign resp       = '{op: c.op, core: c.core, pid: c.pid, ok: resp_ok_q, data: resp_data_q};

  assign rf_raddr   = src_a[2:0];
  assign buf_raddr  = src_a[BUF_AW-1:0];
  assign rf_re      = (st == C_RD_ISSUE) && (c.src_res == RES_REGFILE);
  assign buf_re     = (st == C_RD_ISSUE) && (c.src_res == RES_OUTBUF);

  assign mreq_valid = (st == C_MEMWR) || (st == C_MEMRD_ISSUE);
  assign mreq.we    = (st == C_MEMWR);
  assign mreq.addr  = c.mem_addr + (ADDR_W'(idx) << 2);
  assign mreq.wdata = word_q;

  // register writes: TRL at decode, TL after a local read, TGL on memory data
  always_comb begin
    rf_we    = 1'b0;
    rf_waddr = dst_a[2:0];
    rf_wdata = c.data;
    if (st == C_DECODE && dec_cnt == 0 && c.op == OP_TRL && owner && dst_ok) begin
      rf_we = 1'b1;
    end else if (st == C_RD_WAIT && rd_done && c.op == OP_TL) begin
      rf_we    = 1'b1;
      rf_wdata = (c.src_res == RES_REGFILE) ? rf_rdata : buf_rdata;
    end else if (st == C_MEMRD_WAIT && mrsp_valid) begin
      rf_we    = 1'b1;
      rf_wdata = mrsp_data;
    end
  end

  // single-cycle actions of the decode step
  logic decode_now;
  assign decode_now = (st == C_DECODE) && (dec_cnt == 0);
  assign q_enq      = decode_now && (c.op == OP_RESERVE);
  assign q_deq      = decode_now && (c.op == OP_RELEASE) && owner;
  assign st_clear   = q_deq;
  assign eng_start  = (st == C_EXEC_WAIT) && !eng_busy &&
                      (c.op_id == EXEC_INITIALIZE || c.op_id == EXEC_GENERATE);
  assign eng_op_gen = (c.op_id == EXEC_GENERATE);

  always_comb begin
    st_err_set = 1'b0;
    if (decode_now && owner) begin
      unique case (c.op)
        OP_TRL, OP_TGL: st_err_set = !dst_ok;
        OP_TRS, OP_TGS: st_err_set = !src_ok;
        OP_TL:          st_err_set = !src_ok || !dst_ok;
        OP_EXEC:        st_err_set = !(c.op_id == EXEC_INITIALIZE || c.op_id == EXEC_GENERATE);
        default:        st_err_set = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= C_IDLE;
      c           <= '0;
      dec_cnt     <= '0;
      idx         <= '0;
      word_q      <= '0;
      resp_ok_q   <= 1'b0;
      resp_data_q <= '0;
    end else begin
      unique case (st)
        C_IDLE: if (cmd_valid) begin
          c       <= cmd;
          dec_cnt <= (cmd.op == OP_RESERVE || cmd.op == OP_CHECK || cmd.op == OP_RELEASE) ? 2'd2 : 2'd0;
          idx     <= '0;
          st      <= C_DECODE;
        end
        C_DECODE: if (dec_cnt != 0) begin
          dec_cnt <= dec_cnt - 2'd1;
        end else begin
          st          <= C_IDLE;
          resp_ok_q   <= 1'b1;
          resp_data_q <= '0;
          unique case (c.op)
            OP_CHECK: begin
              resp_data_q <= {30'd0, q_present, owner};
              st          <= C_RESP;
            end
            OP_ISBUSY: begin
              resp_data_q <= {30'd0, status};
              st          <= C_RESP;
            end
            OP_AFENCE: st <= C_RESP;
            OP_TRS: begin
              if (owner && src_ok) st <= C_RD_ISSUE;
              else begin
                resp_ok_q <= 1'b0;
                st        <= C_RESP;
              end
            end
            OP_TGS: if (owner && src_ok && len != 0) st <= C_RD_ISSUE;
            OP_TL:  if (owner && src_ok && dst_ok && len != 0) st <= C_RD_ISSUE;
            OP_TGL: if (owner && dst_ok && len != 0) st <= C_MEMRD_ISSUE;
            OP_EXEC: if (owner && !st_err_set) st <= C_EXEC_WAIT;
            default: st <= C_IDLE;   // RESERVE, RELEASE, TRL act during decode
          endcase
        end
        C_EXEC_WAIT: if (!eng_busy) st <= C_IDLE;
        C_RD_ISSUE: st <= C_RD_WAIT;
        C_RD_WAIT: if (rd_done) begin
          word_q <= (c.src_res == RES_REGFILE) ? rf_rdata : buf_rdata;
          unique case (c.op)
            OP_TRS: begin
              resp_data_q <= (c.src_res == RES_REGFILE) ? rf_rdata : buf_rdata;
              st          <= C_RESP;
            end
            OP_TGS: st <= C_MEMWR;
            default: begin   // TL
              idx <= idx + 1'b1;
              st  <= last_word ? C_IDLE : C_RD_ISSUE;
            end
          endcase
        end
        C_MEMWR: if (mreq_ready) begin
          idx <= idx + 1'b1;
          st  <= last_word ? C_IDLE : C_RD_ISSUE;
        end
        C_MEMRD_ISSUE: if (mreq_ready) st <= C_MEMRD_WAIT;
        C_MEMRD_WAIT: if (mrsp_valid) begin
          idx <= idx + 1'b1;
          st  <= last_word ? C_IDLE : C_MEMRD_ISSUE;
        end
        C_RESP: if (resp_ready) st <= C_IDLE;
        default: st <= C_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   mreq_valid && !mreq_ready |=> mreq_valid && $stable(mreq))
    else $error("memory request changed before it was taken");
  assert property (@(posedge clk) disable iff (!rst_n)
                   resp_valid && !resp_ready |=> resp_valid && $stable(resp))
    else $error("reply changed before it was taken");

endmodule
