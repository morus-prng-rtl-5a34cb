// Register file of the accelerator: five 32-bit registers.
//
// Word 0 is N, the amount of numbers Generate produces; words 1..4 are the
// key words K0..K3 used by Initialize. The controller writes them (TRL, TGL,
// TL) and reads them (TRS, TGS, TL) one word at a time; the engine sees all
// five at once on n_reg and key.
//
// Write port: we, waddr, wdata, written at the clock edge; an address above
// 4 is ignored. Read port: re with raddr; rdata is valid, with rvalid, one
// cycle later (0 for an address above 4). All registers reset to 0.
//
// The five registers and the 1-cycle access follow the document; the
// address map and the reset value are this design's choices.
module prng_register_file #(
  parameter int unsigned  NREGS = 5,
  localparam int unsigned AW    = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [31:0]       wdata,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [31:0]       rdata,
  output logic              rvalid,
  output logic [31:0]       n_reg,
  output logic [3:0][31:0]  key
);

  logic [NREGS-1:0][31:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs   <= '0;
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      if (we && waddr < AW'(NREGS)) regs[waddr] <= wdata;
      rvalid <= re;
      if (re) rdata <= (raddr < AW'(NREGS)) ? regs[raddr] : '0;
    end
  end

  assign n_reg = regs[0];
  assign key   = {regs[4], regs[3], regs[2], regs[1]};

endmodule
