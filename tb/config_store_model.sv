// config_store_model: behavioural model of the external configuration store
// (the off-chip memory that holds every RFUOP's bitstream). Not
// synthesizable design content: it answers each read request with exactly
// one response LAT cycles later. The data word is a fixed function of
// (RFUOP, row, word), given by word_of(), so a testbench can check any
// configuration row in the array without storing bitstreams.
module config_store_model #(
  parameter int LAT = 3
) (
  input  logic        clk,
  input  logic        rd_en,
  input  logic [5:0]  id,
  input  logic [5:0]  row,
  input  logic [1:0]  word,
  output logic        rd_valid,
  output logic [31:0] rd_data
);
  function automatic logic [31:0] word_of(logic [5:0] i, logic [5:0] r, logic [1:0] w);
    return {i, r, w, 18'(({i, r, w} * 18'd40503) ^ 18'h2A5C3)};
  endfunction

  logic [LAT-1:0]        v_pipe = '0;
  logic [LAT-1:0][31:0]  d_pipe = '0;

  always_ff @(posedge clk) begin
    v_pipe <= {v_pipe[LAT-2:0], rd_en};
    d_pipe <= {d_pipe[LAT-2:0], word_of(id, row, word)};
  end

  assign rd_valid = v_pipe[LAT-1];
  assign rd_data  = d_pipe[LAT-1];
endmodule
