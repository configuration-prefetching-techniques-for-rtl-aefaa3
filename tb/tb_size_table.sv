// tb_size_table: checks the reset size of every RFUOP, then random writes
// against a reference array.
module tb_size_table;
  localparam int M = 64;
  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [5:0] wr_id;
  logic [6:0] wr_size;
  logic [M-1:0][6:0] sizes;
  logic [6:0] model [M];
  int checks = 0, failures = 0;

  size_table dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < M; i++) begin
      checks++;
      if (sizes[i] !== model[i]) begin
        failures++;
        $display("FAIL id %0d size %0d want %0d", i, sizes[i], model[i]);
      end
    end
  endtask

  initial begin
    wr_en = 0; wr_id = 0; wr_size = 0;
    foreach (model[i]) model[i] = 7'd1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); check_all();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      wr_en = ($urandom % 4) != 0; wr_id = 6'($urandom); wr_size = 7'($urandom % 65);
      @(posedge clk); #1;
      if (wr_en) model[wr_id] = wr_size;
      wr_en = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
