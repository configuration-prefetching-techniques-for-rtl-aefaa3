// tb_row_decoder: exhaustive check of the row address decoder at its default
// size. For every address, with the enable high and low, the enable vector
// must equal 1 << address, or be all zero when disabled.
module tb_row_decoder;
  localparam int unsigned ROWS = 64;
  logic              en;
  logic [5:0]        row_addr;
  logic [ROWS-1:0]   row_en;
  int checks = 0, failures = 0;

  row_decoder dut (.en(en), .row_addr(row_addr), .row_en(row_en));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < ROWS; a++) begin
        en = e[0];
        row_addr = 6'(a);
        #1;
        checks++;
        if (row_en !== (e ? (64'd1 << a) : 64'd0)) begin
          failures++;
          $display("FAIL en=%0d addr=%0d row_en=%h", e, a, row_en);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
