// tb_prefetch_termination: the termination-instruction scenario, run on the
// whole coprocessor at its default size in static mode.
//
// The control flow is a small tree. Prefetch point P4 leads to P3. From P3
// the program goes either to RFUOP 3, to RFUOP 4, or on to P1 and P2, which
// lead to RFUOPs 1 and 2. The code at P4/P3 prefetches 4 and 3. Shortly
// afterwards the program reaches P1, where 3 and 4 can no longer be
// reached, and prefetches 1 and 2. Each RFUOP is 20 of the 64 rows, so at
// most three fit on chip, and one load takes 20 * 17 + 1 = 341 cycles with
// a store latency of 3.
//
// The same host program runs twice, with a reset in between:
//   run 0: no termination instruction. The obsolete prefetches of 4 and 3
//          are still queued in front of 1, so RFUOP 1 stalls.
//   run 1: a TERMINATE just before the prefetches at P1. The load of 4 is
//          abandoned, 3 is never loaded, and both 1 and 2 are loaded in time.
// Checks:
//   - RFUOP 1 stalls in run 0 and does not stall in run 1;
//   - exactly one load is abandoned in run 1, and RFUOPs 3 and 4 are not
//     resident when 1 is called;
//   - the total penalty of run 1 is lower than that of run 0;
//   - the configuration data of every call is correct.
// The scenario, the sizes and the distances are this testbench's choice.
module tb_prefetch_termination;
  import rdp_pkg::*;
  localparam int M = 64, ROWS = 64, WORDS = 4, LAT = 3, ROW_BITS = 128;
  localparam int SIZE = 20;
  localparam int LOAD = SIZE * (WORDS * (LAT + 1) + 1) + 1;   // 341 cycles

  logic clk = 0, rst_n = 0;
  pf_mode_e mode;
  logic size_wr_en;
  logic [5:0] size_wr_id;
  logic [6:0] size_wr_size;
  logic instr_valid, instr_ready;
  pf_instr_e instr_kind;
  logic [5:0] instr_id;
  logic call_valid, call_ready, ret_valid, ret_ready;
  logic [5:0] call_id, call_base_row, ret_id;
  logic cs_rd_en, cs_rd_valid;
  logic [5:0] cs_id, cs_row;
  logic [1:0] cs_word;
  logic [31:0] cs_rd_data;
  logic [ROWS-1:0][ROW_BITS-1:0] cfg_bits;
  logic [M-1:0] resident, flags;
  rdp_events_t events;

  int checks = 0, failures = 0;
  int penalty, n_abort;
  int pen [2], stall1 [2], aborts [2];
  logic [M-1:0] res_at_call1 [2];

  rd_prefetch_coprocessor dut (.*);
  config_store_model #(.LAT(LAT)) u_store (
    .clk(clk), .rd_en(cs_rd_en), .id(cs_id), .row(cs_row), .word(cs_word),
    .rd_valid(cs_rd_valid), .rd_data(cs_rd_data));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    penalty += int'(events.stall);
    n_abort += int'(events.load_abort);
  end

  task automatic instr(pf_instr_e kind, int id);
    @(negedge clk);
    instr_valid = 1; instr_kind = kind; instr_id = 6'(id);
    do @(posedge clk); while (!instr_ready);
    #1 instr_valid = 0;
  endtask

  // returns the stall cycles of the call
  task automatic call(int id, int exec, output int stall, input int run);
    @(negedge clk);
    call_valid = 1; call_id = 6'(id);
    stall = 0;
    #1;
    while (!call_ready) begin @(negedge clk); stall++; #1; end
    if (id == 1) res_at_call1[run] = resident;
    checks++;
    for (int r = 0; r < SIZE; r++)
      for (int w = 0; w < WORDS; w++)
        if (cfg_bits[int'(call_base_row) + r][w*32 +: 32] !== u_store.word_of(6'(id), 6'(r), 2'(w))) begin
          failures++;
          $display("FAIL RFUOP %0d row %0d word %0d wrong", id, r, w);
          r = SIZE; break;
        end
    @(posedge clk); #1;
    call_valid = 0;
    repeat (exec) @(posedge clk);
    @(negedge clk);
    ret_valid = 1; ret_id = 6'(id);
    do @(posedge clk); while (!ret_ready);
    #1 ret_valid = 0;
  endtask

  initial begin
    int s;
    mode = MODE_STATIC;
    size_wr_en = 0; size_wr_id = 0; size_wr_size = 0;
    instr_valid = 0; instr_kind = INSTR_PREFETCH; instr_id = 0;
    call_valid = 0; call_id = 0; ret_valid = 0; ret_id = 0;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk); rst_n = 0;
      repeat (3) @(negedge clk); rst_n = 1;
      for (int id = 1; id <= 4; id++) begin
        @(negedge clk);
        size_wr_en = 1; size_wr_id = 6'(id); size_wr_size = 7'(SIZE);
      end
      @(negedge clk); size_wr_en = 0;
      penalty = 0; n_abort = 0;
      // P4 and P3
      instr(INSTR_PREFETCH, 4);
      instr(INSTR_PREFETCH, 3);
      repeat (LOAD / 3) @(posedge clk);
      // P1 and P2: RFUOPs 3 and 4 can no longer be reached
      if (run == 1) instr(INSTR_TERMINATE, 0);
      instr(INSTR_PREFETCH, 1);
      instr(INSTR_PREFETCH, 2);
      repeat (LOAD + 20) @(posedge clk);
      call(1, 30, s, run);
      stall1[run] = s;
      repeat (LOAD) @(posedge clk);
      call(2, 30, s, run);
      pen[run] = penalty;
      aborts[run] = n_abort;
      $display("%s: penalty %0d cycles, RFUOP 1 stalled %0d, loads abandoned %0d",
               run != 0 ? "with TERMINATE   " : "without TERMINATE", pen[run], stall1[run], aborts[run]);
    end
    checks++;
    if (stall1[0] == 0) begin failures++; $display("FAIL RFUOP 1 did not stall without TERMINATE"); end
    checks++;
    if (stall1[1] != 0) begin failures++; $display("FAIL RFUOP 1 stalled %0d with TERMINATE", stall1[1]); end
    checks++;
    if (aborts[1] != 1) begin failures++; $display("FAIL %0d loads abandoned with TERMINATE, expected 1", aborts[1]); end
    checks++;
    if (res_at_call1[1][3] || res_at_call1[1][4]) begin
      failures++; $display("FAIL obsolete RFUOP loaded despite TERMINATE");
    end
    checks++;
    if (pen[1] >= pen[0]) begin failures++; $display("FAIL TERMINATE did not lower the penalty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
