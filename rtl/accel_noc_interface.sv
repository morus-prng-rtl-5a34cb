// Accelerator-interconnect interface: the accelerator's port on the SoC interconnect.
//
// Incoming packets are sorted by kind: IXIAM command packets go into a small
// FIFO in front of the controller (their source node is copied into the
// command's core field), memory read data is passed to the controller the
// next cycle, and any other kind is dropped. Outgoing, the controller's
// response packets (to a core) and memory requests (to the memory node) are
// merged, alternating when both wait, into one output register.
//
// Interface: valid/ready on every stream; a transfer happens when both are
// high at a clock edge. noc_in_ready is low only when a command arrives and
// the FIFO is full; memory read data is always taken, as the controller keeps
// at most one read outstanding and waits for it. Command latency: one cycle
// through an empty FIFO; outgoing latency: one cycle.
//
// The document names this interface and its role; the packet kinds, the
// FIFO (depth 4 by default) and the arbitration are this design's choices.
module accel_noc_interface
  import ixiam_pkg::*;
#(
  parameter int unsigned  CMD_FIFO_DEPTH = 4,
  localparam int unsigned PW = (CMD_FIFO_DEPTH > 1) ? $clog2(CMD_FIFO_DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  // interconnect side
  input  logic         noc_in_valid,
  input  noc_pkt_t     noc_in,
  output logic         noc_in_ready,
  output logic         noc_out_valid,
  output noc_pkt_t     noc_out,
  input  logic         noc_out_ready,
  // controller side
  output logic         cmd_valid,
  output ixiam_cmd_t   cmd,
  input  logic         cmd_ready,
  output logic         mrsp_valid,
  output logic [DATA_W-1:0] mrsp_data,
  input  logic         resp_valid,
  input  ixiam_resp_t  resp,
  output logic         resp_ready,
  input  logic         mreq_valid,
  input  mem_req_t     mreq,
  output logic         mreq_ready
);

  // ---------------- incoming ----------------
  ixiam_cmd_t      fifo [CMD_FIFO_DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic [PW:0]     count;
  logic            in_is_cmd, push, pop;
  ixiam_cmd_t      in_cmd;

  assign in_is_cmd    = (noc_in.kind == NOC_CMD);
  assign noc_in_ready = !in_is_cmd || (count != (PW+1)'(CMD_FIFO_DEPTH));
  assign push         = noc_in_valid && noc_in_ready && in_is_cmd;
  assign cmd_valid    = (count != 0);
  assign cmd          = fifo[rd_ptr];
  assign pop          = cmd_valid && cmd_ready;

  always_comb begin
    in_cmd      = ixiam_cmd_t'(noc_in.payload[CMD_W-1:0]);
    in_cmd.core = noc_in.node;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr     <= '0;
      wr_ptr     <= '0;
      count      <= '0;
      mrsp_valid <= 1'b0;
      mrsp_data  <= '0;
      for (int i = 0; i < CMD_FIFO_DEPTH; i++) fifo[i] <= '0;
    end else begin
      if (push) begin
        fifo[wr_ptr] <= in_cmd;
        wr_ptr       <= (wr_ptr == PW'(CMD_FIFO_DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (pop) rd_ptr <= (rd_ptr == PW'(CMD_FIFO_DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
      mrsp_valid <= noc_in_valid && (noc_in.kind == NOC_MEM_RDATA);
      if (noc_in_valid && noc_in.kind == NOC_MEM_RDATA) mrsp_data <= noc_in.payload[DATA_W-1:0];
    end
  end

  // ---------------- outgoing ----------------
  logic out_free, grant_resp, last_resp;

  assign out_free   = !noc_out_valid || noc_out_ready;
  // alternate between the two sources when both are waiting
  assign grant_resp = resp_valid && (!mreq_valid || !last_resp);
  assign resp_ready = out_free && grant_resp;
  assign mreq_ready = out_free && !grant_resp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      noc_out_valid <= 1'b0;
      noc_out       <= '0;
      last_resp     <= 1'b0;
    end else if (out_free) begin
      noc_out_valid <= resp_valid || mreq_valid;
      if (grant_resp) begin
        noc_out.kind    <= NOC_RESP;
        noc_out.node    <= resp.core;
        noc_out.payload <= PAY_W'(resp);
        last_resp       <= 1'b1;
      end else if (mreq_valid) begin
        noc_out.kind    <= mreq.we ? NOC_MEM_WR : NOC_MEM_RD;
        noc_out.node    <= MEM_NODE;
        noc_out.payload <= PAY_W'(mreq);
        last_resp       <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   noc_out_valid && !noc_out_ready |=> noc_out_valid && $stable(noc_out))
    else $error("outgoing packet changed before it was taken");

endmodule
