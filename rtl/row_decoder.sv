// row_decoder: row address decoder of the R+D configuration memory.
//
// Turns the row address supplied at run time into one enable line per row of
// the SRAM array. Because the address is chosen at run time by the
// configuration manager rather than fixed in the bitstream, the same
// configuration can be placed (relocated) at any row. Purely combinational:
// row_en is one-hot while en is high and all zero otherwise. An address at or
// beyond ROWS enables nothing.
module row_decoder #(
  parameter int unsigned ROWS   = rdp_pkg::ROWS_D,
  parameter int unsigned ADDR_W = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic              en,
  input  logic [ADDR_W-1:0] row_addr,
  output logic [ROWS-1:0]   row_en
);
  always_comb begin
    row_en = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      row_en[r] = en && (row_addr == ADDR_W'(r));
  end
endmodule
