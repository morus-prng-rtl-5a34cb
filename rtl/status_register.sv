// IXIAM status register of the accelerator: FREE, BUSY or ERROR.
//
// BUSY from the cycle an operation is started (op_start) until it reports
// op_done; it then becomes FREE, or ERROR if op_error comes with op_done.
// The controller can also flag an error of its own (err_set, e.g. a transfer
// outside a local memory) and return the register to FREE (clear, on
// RELEASE). Starting a new operation leaves ERROR. Priority, highest first:
// op_start (an operation may start in the cycle the previous one reports
// done), op_done, err_set, clear; neither err_set nor clear ends BUSY.
//
// Interface: status is the registered value, read by ISBUSY. Resets to FREE.
//
// The three states follow the document; the encoding and the rules for
// leaving ERROR are this design's choices.
module status_register
  import ixiam_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        op_start,
  input  logic        op_done,
  input  logic        op_error,
  input  logic        err_set,
  input  logic        clear,
  output acc_status_e status
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status <= ST_FREE;
    end else if (op_start) begin
      status <= ST_BUSY;
    end else if (op_done) begin
      status <= op_error ? ST_ERROR : ST_FREE;
    end else if (err_set && status != ST_BUSY) begin
      status <= ST_ERROR;
    end else if (clear && status != ST_BUSY) begin
      status <= ST_FREE;
    end
  end

endmodule
