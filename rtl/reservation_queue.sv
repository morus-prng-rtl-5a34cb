// IXIAM reservation queue: FIFO of the processes that asked for the accelerator.
//
// A process is named by an ID_W-bit id (core node and process id). RESERVE
// appends an id (enq), unless the queue is full or the id is already queued;
// the entry at the head owns the accelerator, which CHECK reports; RELEASE
// by the owner removes the head (deq). A lookup port (q_id) tells whether an
// id is anywhere in the queue, so a process cannot queue twice.
//
// Interface: enq/enq_id and deq act at the clock edge (both may come in one
// cycle); head_valid/head_id, full, count and q_present are combinational
// views of the stored queue. Resets to empty.
//
// A FIFO reservation queue per accelerator follows the document; its depth
// (8 by default), the duplicate rule and the lookup port are this design's
// choices.
module reservation_queue #(
  parameter int unsigned  DEPTH = 8,
  parameter int unsigned  ID_W  = 12,
  localparam int unsigned PW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enq,
  input  logic [ID_W-1:0] enq_id,
  input  logic            deq,
  input  logic [ID_W-1:0] q_id,
  output logic            q_present,
  output logic            head_valid,
  output logic [ID_W-1:0] head_id,
  output logic            full,
  output logic [PW:0]     count
);

  logic [ID_W-1:0] ids [DEPTH];
  logic [DEPTH-1:0] live;          // entry holds a queued id
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic            do_enq, do_deq;

  assign head_valid = (count != 0);
  assign head_id    = ids[rd_ptr];
  assign full       = (count == (PW+1)'(DEPTH));

  logic enq_present;
  always_comb begin
    q_present   = 1'b0;
    enq_present = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      if (live[i] && ids[i] == q_id)   q_present   = 1'b1;
      if (live[i] && ids[i] == enq_id) enq_present = 1'b1;
    end
  end

  assign do_deq = deq && head_valid;
  assign do_enq = enq && !enq_present && (!full || do_deq);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      live   <= '0;
      for (int i = 0; i < DEPTH; i++) ids[i] <= '0;
    end else begin
      if (do_deq) live[rd_ptr] <= 1'b0;
      if (do_enq) begin
        ids[wr_ptr]  <= enq_id;
        live[wr_ptr] <= 1'b1;
        wr_ptr      <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (do_deq) rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PW+1)'(do_enq) - (PW+1)'(do_deq);
    end
  end

endmodule
