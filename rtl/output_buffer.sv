// Output buffer of the accelerator: holds the generated 32-bit numbers.
//
// Organised as four banks of 32-bit words, one per number of a 128-bit
// line, so that the engine can store a whole line (four numbers) per cycle
// while word i of the buffer lives in bank i % 4 at row i / 4. The transfer
// side reads one 32-bit word at a time.
//
// Write port: wr_en, wr_line, wr_data (number 0 in bits [31:0]); written at
// the clock edge.
// Read port: rd_en with word address rd_addr; rd_data is valid, with
// rd_valid, two cycles later (the banks' registered read, then the word
// select register). Reading and writing the same word in one cycle returns
// the old contents.
//
// The 1 MiB capacity (262,144 numbers) and the 2-cycle read latency follow
// the document; the banked organisation and the port protocol are this
// design's choices.
module output_buffer #(
  parameter int unsigned  WORDS    = 262144,
  localparam int unsigned LINES    = WORDS / 4,
  localparam int unsigned LINE_AW  = (LINES > 1) ? $clog2(LINES) : 1,
  localparam int unsigned WORD_AW  = LINE_AW + 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [LINE_AW-1:0] wr_line,
  input  logic [127:0]       wr_data,
  input  logic               rd_en,
  input  logic [WORD_AW-1:0] rd_addr,
  output logic [31:0]        rd_data,
  output logic               rd_valid
);

  logic [3:0][31:0] bank_q;
  logic [1:0]       sel_q;
  logic             v1_q;

  for (genvar b = 0; b < 4; b++) begin : g_bank
    logic [31:0] mem [LINES];
    always_ff @(posedge clk) begin
      if (wr_en) mem[wr_line] <= wr_data[32*b +: 32];
      if (rd_en) bank_q[b] <= mem[rd_addr[WORD_AW-1:2]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q    <= '0;
      v1_q     <= 1'b0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      v1_q     <= rd_en;
      sel_q    <= rd_addr[1:0];
      rd_valid <= v1_q;
      if (v1_q) rd_data <= bank_q[sel_q];
    end
  end

endmodule
