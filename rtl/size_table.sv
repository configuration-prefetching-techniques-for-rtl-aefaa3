// size_table: configuration size S_k of every RFUOP, in array rows.
//
// A register per RFUOP ID, written by the host (or at system set-up) through
// one write port and read in parallel by the prefetch queue and the
// configuration manager, which need S_k to respect the chip capacity C and
// to allocate rows. Writes take effect at the next rising edge. Reset value
// is RESET_SIZE rows for every RFUOP. The table itself is this design's
// choice: the prefetching scheme only needs S_k to be known.
module size_table #(
  parameter int unsigned NUM_RFUOPS = rdp_pkg::NUM_RFUOPS_D,
  parameter int unsigned ROWS       = rdp_pkg::ROWS_D,
  parameter int unsigned ID_W       = $clog2(NUM_RFUOPS),
  parameter int unsigned SIZE_W     = $clog2(ROWS + 1),
  parameter int unsigned RESET_SIZE = 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              wr_en,
  input  logic [ID_W-1:0]                   wr_id,
  input  logic [SIZE_W-1:0]                 wr_size,
  output logic [NUM_RFUOPS-1:0][SIZE_W-1:0] sizes
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      sizes <= {NUM_RFUOPS{SIZE_W'(RESET_SIZE)}};
    else if (wr_en)
      sizes[wr_id] <= wr_size;
  end
endmodule
