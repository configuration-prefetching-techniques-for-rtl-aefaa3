// tb_staging_area: fills the one-row staging buffer word by word, checks
// the assembled row, then loads a whole row (read-back path) and checks that
// the row load wins over a simultaneous word write. Reference row kept in the
// testbench.
module tb_staging_area;
  localparam int ROW_BITS = 128, WORD_BITS = 32, WORDS = 4;
  logic clk = 0, rst_n = 0;
  logic word_we, row_we;
  logic [1:0] word_idx;
  logic [WORD_BITS-1:0] word_data;
  logic [ROW_BITS-1:0] row_in, row_out, model;
  int checks = 0, failures = 0;

  staging_area dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (row_out !== model) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, row_out, model);
    end
  endtask

  initial begin
    word_we = 0; row_we = 0; word_idx = 0; word_data = 0; row_in = 0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); check("reset");
    for (int rep = 0; rep < 20; rep++) begin
      for (int w = 0; w < WORDS; w++) begin
        @(negedge clk);
        word_we = 1; word_idx = 2'(($urandom % 4)); word_data = $urandom;
        @(posedge clk); #1;
        model[word_idx*WORD_BITS +: WORD_BITS] = word_data;
        word_we = 0;
        check("word write");
      end
      @(negedge clk);
      row_we = 1; row_in = {$urandom, $urandom, $urandom, $urandom};
      word_we = 1; word_idx = 1; word_data = 32'hDEADBEEF;
      @(posedge clk); #1;
      model = row_in;
      row_we = 0; word_we = 0;
      check("row load");
      @(posedge clk); #1;
      check("hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
