// staging_area: the one-row SRAM buffer of the R+D configuration memory.
//
// Holds exactly one row of programming bits. It is filled either word by
// word from the incoming configuration bitstream (word_we, word_idx,
// word_data) or, for defragmentation, in one cycle with a row read back from
// the array (row_we, row_in). Its contents drive the array's write data
// (row_out). A word write and a row load in the same cycle: the row load
// wins. Both writes take effect at the next rising clock edge. The word-wide
// load path and its width are this design's choice; the one-row buffer and
// its two sources follow the R+D architecture.
module staging_area #(
  parameter int unsigned ROW_BITS  = rdp_pkg::ROW_BITS_D,
  parameter int unsigned WORD_BITS = rdp_pkg::WORD_BITS_D,
  parameter int unsigned WORDS     = ROW_BITS / WORD_BITS,
  parameter int unsigned WIDX_W    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 word_we,
  input  logic [WIDX_W-1:0]    word_idx,
  input  logic [WORD_BITS-1:0] word_data,
  input  logic                 row_we,
  input  logic [ROW_BITS-1:0]  row_in,
  output logic [ROW_BITS-1:0]  row_out
);
  logic [WORDS-1:0][WORD_BITS-1:0] buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      buf_q <= '0;
    else if (row_we)
      buf_q <= row_in;
    else if (word_we)
      buf_q[word_idx] <= word_data;
  end

  assign row_out = buf_q;

  initial assert (ROW_BITS == WORDS * WORD_BITS)
    else $error("staging_area: ROW_BITS must be a multiple of WORD_BITS");
endmodule
