// rd_config_memory: configuration memory of a Partial R+D FPGA.
//
// An array of ROWS x ROW_BITS SRAM bits addressed only by rows: a row
// decoder selects one row and a staging area, one row wide, takes the place
// of a column decoder. Commands (one per cycle, effective at the next edge):
//   CM_STAGE_WR  write word_data into word word_idx of the staging area;
//   CM_WRITE     copy the staging area into array row row_addr (relocation:
//                the row is whatever the caller picks at run time);
//   CM_READ      read array row row_addr back into the staging area, the
//                first half of a defragmentation move.
// A configuration row is therefore written with ROW_BITS/WORD_BITS
// CM_STAGE_WR cycles and one CM_WRITE; a row is moved with one CM_READ and
// one CM_WRITE. cfg_bits is the whole array, the programming bits that drive
// the logic fabric. The architecture follows the R+D model; array size and
// word width are this design's defaults. The array resets to all zero.
module rd_config_memory
  import rdp_pkg::*;
#(
  parameter int unsigned ROWS      = rdp_pkg::ROWS_D,
  parameter int unsigned ROW_BITS  = rdp_pkg::ROW_BITS_D,
  parameter int unsigned WORD_BITS = rdp_pkg::WORD_BITS_D,
  parameter int unsigned WORDS     = ROW_BITS / WORD_BITS,
  parameter int unsigned ADDR_W    = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned WIDX_W    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  cmem_cmd_e                          cmd,
  input  logic [ADDR_W-1:0]                  row_addr,
  input  logic [WIDX_W-1:0]                  word_idx,
  input  logic [WORD_BITS-1:0]               word_data,
  output logic [ROW_BITS-1:0]                stage_row,
  output logic [ROWS-1:0][ROW_BITS-1:0]      cfg_bits
);
  logic [ROWS-1:0]               row_en;
  logic [ROWS-1:0][ROW_BITS-1:0] array_q;
  logic [ROW_BITS-1:0]           read_row;

  row_decoder #(.ROWS(ROWS), .ADDR_W(ADDR_W)) u_row_decoder (
    .en      (cmd == CM_WRITE || cmd == CM_READ),
    .row_addr(row_addr),
    .row_en  (row_en)
  );

  // Read-back path: the decoded row enables gate the rows onto the bit lines.
  always_comb begin
    read_row = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      if (row_en[r]) read_row |= array_q[r];
  end

  staging_area #(.ROW_BITS(ROW_BITS), .WORD_BITS(WORD_BITS), .WORDS(WORDS), .WIDX_W(WIDX_W))
  u_staging_area (
    .clk      (clk),
    .rst_n    (rst_n),
    .word_we  (cmd == CM_STAGE_WR),
    .word_idx (word_idx),
    .word_data(word_data),
    .row_we   (cmd == CM_READ),
    .row_in   (read_row),
    .row_out  (stage_row)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      array_q <= '0;
    else if (cmd == CM_WRITE)
      for (int unsigned r = 0; r < ROWS; r++)
        if (row_en[r]) array_q[r] <= stage_row;
  end

  assign cfg_bits = array_q;
endmodule
