// tb_rd_config_memory: exercises the R+D configuration memory the way the
// configuration manager does. It loads configuration rows word by word into
// the staging area and writes them to rows picked at random (relocation). It
// moves rows by read-back and rewrite (defragmentation) and compares the
// whole array with a reference model after every command. The staging area
// is checked after read-backs. Each row takes 4 word writes plus 1 array
// write, and a row move takes 2 commands.
module tb_rd_config_memory;
  import rdp_pkg::*;
  localparam int ROWS = 64, ROW_BITS = 128, WORD_BITS = 32, WORDS = 4;
  logic clk = 0, rst_n = 0;
  cmem_cmd_e cmd;
  logic [5:0] row_addr;
  logic [1:0] word_idx;
  logic [WORD_BITS-1:0] word_data;
  logic [ROW_BITS-1:0] stage_row;
  logic [ROWS-1:0][ROW_BITS-1:0] cfg_bits;
  logic [ROWS-1:0][ROW_BITS-1:0] m_array;
  logic [ROW_BITS-1:0] m_stage;
  int checks = 0, failures = 0;

  rd_config_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(cmem_cmd_e c, int row, int w, logic [31:0] d);
    @(negedge clk);
    cmd = c; row_addr = 6'(row); word_idx = 2'(w); word_data = d;
    @(posedge clk); #1;
    cmd = CM_NOP;
    case (c)
      CM_STAGE_WR: m_stage[w*WORD_BITS +: WORD_BITS] = d;
      CM_WRITE:    m_array[row] = m_stage;
      CM_READ:     m_stage = m_array[row];
      default: ;
    endcase
    checks++;
    if (cfg_bits !== m_array || stage_row !== m_stage) begin
      failures++;
      $display("FAIL after cmd %s row %0d", c.name(), row);
    end
  endtask

  initial begin
    cmd = CM_NOP; row_addr = 0; word_idx = 0; word_data = 0;
    m_array = '0; m_stage = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // relocation: load rows of random configurations to run-time rows
    for (int n = 0; n < 100; n++) begin
      for (int w = 0; w < WORDS; w++) issue(CM_STAGE_WR, 0, w, $urandom);
      issue(CM_WRITE, $urandom % ROWS, 0, 0);
    end
    // defragmentation: move rows upward through the staging area
    for (int n = 0; n < 100; n++) begin
      int src, dst;
      src = 1 + ($urandom % (ROWS - 1));
      dst = $urandom % src;
      issue(CM_READ, src, 0, 0);
      issue(CM_WRITE, dst, 0, 0);
      checks++;
      if (cfg_bits[dst] !== cfg_bits[src]) begin
        failures++;
        $display("FAIL move %0d -> %0d", src, dst);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
