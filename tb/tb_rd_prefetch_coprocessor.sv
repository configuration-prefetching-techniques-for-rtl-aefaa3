// tb_rd_prefetch_coprocessor: end-to-end test of the coprocessor at its
// default size (64 RFUOP IDs, 64 x 128-bit configuration array, K = N = 8).
//
// A host model runs two programs under each prefetching technique, with a
// reset in between. "Demand only" is static mode with no prefetch
// instructions: every configuration is fetched when called.
//   Program A is the loop nest where dynamic prediction fails. An inner
//     loop alternates RFUOPs 2 and 1. When it exits, instruction I1 runs and
//     then RFUOP 3. Each of these RFUOPs takes 30 of the 64 rows, so the
//     RFUOP just executed plus one predicted RFUOP fit on chip. The static code prefetches the next RFUOP before
//     each call, with a termination first. At I1 it prefetches 3.
//   Program B is a random mix of loops over 12 RFUOPs of 4 to 20 rows. It
//     causes fragmentation, defragmentation and evictions. Its static code
//     also prefetches RFUOP 22 at the top of every loop body, a path that is
//     never taken: in hybrid mode only the first of these is issued.
// Every granted call is checked: the rows at call_base_row in cfg_bits must
// hold the called RFUOP's bitstream. The reconfiguration penalty (stall
// cycles) is measured per technique. On program A every prefetching
// technique must beat demand fetching, and hybrid must beat dynamic. The
// test also counts each mechanism and fails if one never happened: demand
// stall, prefetch hit, load, eviction, defragmentation row move, abandoned
// load, demand interrupt, termination, static issue, hybrid static ignore,
// dynamic prefetch.
module tb_rd_prefetch_coprocessor;
  import rdp_pkg::*;
  localparam int M = 64, ROWS = 64, WORDS = 4, LAT = 3, ROW_BITS = 128;
  localparam int GAP = 800;   // host computation between RFUOP calls, cycles

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
  int sizes [M];
  int penalty;
  int n_stall = 0, n_hit = 0, n_load = 0, n_evict = 0, n_move = 0, n_abort = 0,
      n_interrupt = 0, n_term = 0, n_sissue = 0, n_signore = 0, n_dyn = 0;
  int pen_a [4], pen_b [4], pen3_a [4];
  int pen3;   // stall cycles of the calls to RFUOP 3 (the loop exit)

  rd_prefetch_coprocessor dut (.*);
  config_store_model #(.LAT(LAT)) u_store (
    .clk(clk), .rd_en(cs_rd_en), .id(cs_id), .row(cs_row), .word(cs_word),
    .rd_valid(cs_rd_valid), .rd_data(cs_rd_data));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    penalty     += int'(events.stall);
    n_stall     += int'(events.stall);
    n_load      += int'(events.load_done);
    n_evict     += int'(events.evict);
    n_move      += int'(events.move_row);
    n_abort     += int'(events.load_abort);
    n_interrupt += int'(events.load_abort && call_valid && !call_ready);
    n_term      += int'(events.term);
    n_sissue    += int'(events.static_issue);
    n_signore   += int'(events.static_ignore);
    n_dyn       += int'(events.dyn_prefetch);
  end

  // ---------------- host model ----------------
  task automatic compute(int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic instr(pf_instr_e kind, int id);
    @(negedge clk);
    instr_valid = 1; instr_kind = kind; instr_id = 6'(id);
    do @(posedge clk); while (!instr_ready);
    #1 instr_valid = 0;
  endtask

  task automatic prefetch_next(int id);   // compiler-inserted code before a gap
    if (mode == MODE_STATIC && !demand_only) instr(INSTR_TERMINATE, 0);
    if (!demand_only) instr(INSTR_PREFETCH, id);
  endtask

  bit demand_only;

  task automatic call(int id, int exec);
    int stall;
    @(negedge clk);
    call_valid = 1; call_id = 6'(id);
    stall = 0;
    #1;
    while (!call_ready) begin @(negedge clk); stall++; #1; end
    if (stall == 0) n_hit++;
    if (id == 3) pen3 += stall;
    // the configuration must be in the array where the coprocessor says
    checks++;
    for (int r = 0; r < sizes[id]; r++)
      for (int w = 0; w < WORDS; w++)
        if (cfg_bits[call_base_row + r][w*32 +: 32] !== u_store.word_of(6'(id), 6'(r), 2'(w))) begin
          failures++;
          $display("FAIL RFUOP %0d row %0d word %0d wrong at array row %0d", id, r, w, call_base_row + r);
          r = sizes[id]; break;
        end
    @(posedge clk); #1;
    call_valid = 0;
    compute(exec);
    @(negedge clk);
    ret_valid = 1; ret_id = 6'(id);
    do @(posedge clk); while (!ret_ready);
    #1 ret_valid = 0;
  endtask

  task automatic set_size(int id, int s);
    @(negedge clk);
    size_wr_en = 1; size_wr_id = 6'(id); size_wr_size = 7'(s);
    sizes[id] = s;
    @(negedge clk);
    size_wr_en = 0;
  endtask

  task automatic do_reset();
    @(negedge clk); rst_n = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < M; i++) sizes[i] = 1;
    set_size(1, 30); set_size(2, 30); set_size(3, 30); set_size(22, 8);
    for (int i = 10; i < 22; i++) set_size(i, 4 + ((i * 7) % 17));
  endtask

  // Program A: the loop nest of the dynamic-prediction failure case
  task automatic program_a();
    prefetch_next(2);
    compute(GAP);
    for (int outer = 0; outer < 4; outer++) begin
      for (int inner = 0; inner < 3; inner++) begin
        call(2, 20);
        prefetch_next(1);
        compute(GAP);
        call(1, 20);
        if (inner < 2) prefetch_next(2);
        compute(GAP / 8);
      end
      // I1: leaves the inner loop
      prefetch_next(3);
      compute(GAP);
      call(3, 20);
      prefetch_next(2);
      compute(GAP);
    end
  endtask

  // Program B: loops over RFUOPs 10..21 of different sizes
  task automatic program_b();
    int body [$];
    int seed_state;
    seed_state = 7;
    for (int loop = 0; loop < 10; loop++) begin
      body.delete();
      for (int j = 0; j < 2 + (loop % 3); j++) begin
        seed_state = (seed_state * 1103515245 + 12345) & 32'h7fffffff;
        body.push_back(10 + (seed_state >> 8) % 12);
      end
      for (int it = 0; it < 3; it++)
        foreach (body[j]) begin
          prefetch_next(body[j]);
          // a statically predicted path that is never taken
          if (!demand_only && j == 0) instr(INSTR_PREFETCH, 22);
          compute(GAP / 2);
          call(body[j], 10);
        end
    end
  endtask

  initial begin
    string names [4] = '{"demand only", "static", "dynamic", "hybrid"};
    pf_mode_e modes [4] = '{MODE_STATIC, MODE_STATIC, MODE_DYNAMIC, MODE_HYBRID};
    mode = MODE_STATIC; demand_only = 1;
    size_wr_en = 0; size_wr_id = 0; size_wr_size = 0;
    instr_valid = 0; instr_kind = INSTR_PREFETCH; instr_id = 0;
    call_valid = 0; call_id = 0; ret_valid = 0; ret_id = 0;
    for (int t = 0; t < 4; t++) begin
      mode = modes[t];
      demand_only = (t == 0);
      do_reset();
      penalty = 0;
      pen3 = 0;
      program_a();
      pen_a[t] = penalty;
      pen3_a[t] = pen3;
      do_reset();
      penalty = 0;
      program_b();
      pen_b[t] = penalty;
      $display("%-12s penalty: program A %0d cycles (calls of RFUOP 3: %0d), program B %0d cycles",
             names[t], pen_a[t], pen3_a[t], pen_b[t]);
    end
    for (int t = 1; t < 4; t++) begin
      checks++;
      if (pen_a[t] >= pen_a[0]) begin failures++; $display("FAIL %s does not beat demand fetching on A", names[t]); end
    end
    checks++;
    if (pen_a[3] >= pen_a[2]) begin failures++; $display("FAIL hybrid does not beat dynamic on A"); end
    // the static prefetch at I1 must hide the load of RFUOP 3 in hybrid mode
    checks++;
    if (pen3_a[3] != 0 || pen3_a[2] == 0) begin
      failures++; $display("FAIL loop exit: RFUOP 3 stalls hybrid %0d, dynamic %0d", pen3_a[3], pen3_a[2]);
    end
    $display("stall=%0d hit=%0d load=%0d evict=%0d move_row=%0d abort=%0d interrupt=%0d term=%0d static_issue=%0d static_ignore=%0d dyn_prefetch=%0d",
             n_stall, n_hit, n_load, n_evict, n_move, n_abort, n_interrupt, n_term, n_sissue, n_signore, n_dyn);
    begin
      int cnt [11];
      cnt = '{n_stall, n_hit, n_load, n_evict, n_move, n_abort, n_interrupt, n_term, n_sissue, n_signore, n_dyn};
      foreach (cnt[i]) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
