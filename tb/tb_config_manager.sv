// tb_config_manager: checks the configuration management unit with a
// behavioural configuration store and a reference model of the R+D
// configuration memory, driven only by the manager's memory commands.
// Directed parts:
//   * demand fetch into an empty chip: stall cycles must equal
//     2 + S * (WORDS * (LAT + 1) + 1) (the cycle the call is seen, one check cycle, then per row one
//     request plus LAT wait cycles per word and one array write);
//   * prefetches filling the chip, then a load that needs eviction: the
//     victim must be the lowest-ID resident RFUOP outside the keep set, and
//     the resulting hole is closed by defragmentation (rows moved);
//   * pf_abort during a prefetch: the RFUOP must not become resident;
//   * demand interrupt: a call to another RFUOP during a prefetch abandons it;
//   * a locked (executing) RFUOP is never evicted; a prefetch with nothing
//     evictable is dropped.
// A random phase then mixes calls, prefetches, aborts and keep sets. After
// every granted call, the rows at call_base_row must hold exactly that
// RFUOP's bitstream, and resident configurations must never overlap.
module tb_config_manager;
  import rdp_pkg::*;
  localparam int M = 64, ROWS = 64, WORDS = 4, LAT = 3;
  logic clk = 0, rst_n = 0;
  logic [M-1:0][6:0] sizes;
  logic pf_req_valid, pf_req_ready, pf_drop_valid, pf_abort;
  logic [5:0] pf_req_id, pf_drop_id;
  logic [M-1:0] keep;
  logic call_valid, call_ready, ret;
  logic [5:0] call_id, call_base_row;
  logic cs_rd_en, cs_rd_valid;
  logic [5:0] cs_id, cs_row;
  logic [1:0] cs_word;
  logic [31:0] cs_rd_data;
  cmem_cmd_e cm_cmd;
  logic [5:0] cm_row;
  logic [1:0] cm_word_idx;
  logic [31:0] cm_word_data;
  logic [M-1:0] resident;
  logic [M-1:0][5:0] res_base;
  logic busy, loading, loading_demand;
  logic [5:0] loading_id;
  logic ev_load_done, ev_evict, ev_move_row, ev_abort, ev_stall;
  int checks = 0, failures = 0;
  int n_evict = 0, n_move = 0, n_abort = 0, n_drop = 0, n_load = 0;

  logic [ROWS-1:0][WORDS-1:0][31:0] m_array;
  logic [WORDS-1:0][31:0] m_stage;

  config_manager dut (.*);
  config_store_model #(.LAT(LAT)) u_store (
    .clk(clk), .rd_en(cs_rd_en), .id(cs_id), .row(cs_row), .word(cs_word),
    .rd_valid(cs_rd_valid), .rd_data(cs_rd_data));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of the configuration memory
  always @(posedge clk) begin
    case (cm_cmd)
      CM_STAGE_WR: m_stage[cm_word_idx] <= cm_word_data;
      CM_WRITE:    m_array[cm_row] <= m_stage;
      CM_READ:     m_stage <= m_array[cm_row];
      default: ;
    endcase
    if (rst_n) begin
      n_evict += int'(ev_evict); n_move += int'(ev_move_row);
      n_abort += int'(ev_abort); n_load += int'(ev_load_done);
      n_drop  += int'(pf_drop_valid);
    end
  end

  function automatic logic [31:0] word_of(int i, int r, int w);
    return u_store.word_of(6'(i), 6'(r), 2'(w));
  endfunction

  task automatic check_rfuop(int id, int base, string what);
    checks++;
    for (int r = 0; r < sizes[id]; r++)
      for (int w = 0; w < WORDS; w++)
        if (m_array[base + r][w] !== word_of(id, r, w)) begin
          failures++;
          $display("FAIL %s: RFUOP %0d row %0d word %0d at array row %0d", what, id, r, w, base + r);
          return;
        end
  endtask

  task automatic check_layout(string what);
    logic [ROWS-1:0] used;
    used = '0;
    checks++;
    for (int i = 0; i < M; i++)
      if (resident[i]) begin
        for (int r = 0; r < sizes[i]; r++) begin
          if (res_base[i] + r >= ROWS || used[res_base[i] + r]) begin
            failures++; $display("FAIL %s: overlap/overflow at RFUOP %0d", what, i); return;
          end
          used[res_base[i] + r] = 1'b1;
        end
        check_rfuop(i, res_base[i], what);
      end
  endtask

  task automatic wait_idle();
    @(posedge clk);
    while (busy || (pf_req_valid && pf_req_ready)) @(posedge clk);
    #1;
  endtask

  // demand call; returns stall cycles; leaves the RFUOP locked until do_ret
  task automatic do_call(int id, output int stall);
    @(negedge clk);
    call_valid = 1; call_id = 6'(id);
    stall = 0;
    #1;
    while (!call_ready) begin @(negedge clk); stall++; #1; end
    @(posedge clk); #1;
    check_rfuop(id, call_base_row, "granted call");
    call_valid = 0;
  endtask

  task automatic do_ret();
    @(negedge clk); ret = 1; @(negedge clk); ret = 0;
  endtask

  task automatic prefetch(int id);
    @(negedge clk);
    pf_req_valid = 1; pf_req_id = 6'(id);
    #1;
    while (!pf_req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    pf_req_valid = 0;
  endtask

  initial begin
    int st, exp_st, victim;
    pf_req_valid = 0; pf_req_id = 0; pf_abort = 0; keep = '0;
    call_valid = 0; call_id = 0; ret = 0;
    m_array = '0; m_stage = '0;
    for (int i = 0; i < M; i++) sizes[i] = 7'(1 + (i % 12));
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- demand fetch latency ----
    do_call(5, st);
    exp_st = 2 + sizes[5] * (WORDS * (LAT + 1) + 1);
    checks++;
    if (st != exp_st) begin failures++; $display("FAIL demand stall %0d want %0d", st, exp_st); end
    checks++; if (res_base[5] != 0) begin failures++; $display("FAIL first base %0d", res_base[5]); end
    do_ret();

    // ---- fill by prefetch: 5(6) + 11(12) + 23(12) + 10(11) + 9(10) = 51 rows, then 3(4) ----
    keep = '0; keep[5] = 1; keep[11] = 1; keep[23] = 1; keep[10] = 1; keep[9] = 1; keep[3] = 1;
    prefetch(3);  wait_idle();
    prefetch(9);  wait_idle();
    prefetch(10); wait_idle();
    prefetch(11); wait_idle();
    prefetch(23); wait_idle();
    check_layout("after fill");
    // packed in request order: 5 at 0, then 3, 9, 10, 11, 23
    checks++; if (res_base[3] != 6 || res_base[9] != 10 || res_base[10] != 20 || res_base[11] != 31 || res_base[23] != 43)
      begin failures++; $display("FAIL fill placement %0d %0d %0d %0d %0d", res_base[3], res_base[9], res_base[10], res_base[11], res_base[23]); end
    // ---- eviction + defragmentation: keep drops 11 and 10, new 35 (12 rows) needs room ----
    keep[11] = 0; keep[10] = 0; keep[35] = 1;
    begin int e0, m0; e0 = n_evict; m0 = n_move;
      prefetch(35); wait_idle();
      checks++;
      if (resident[10] || !resident[11] || !resident[35] || n_evict != e0 + 1 || n_move <= m0) begin
        failures++; $display("FAIL evict/defrag: r10=%0d r11=%0d r35=%0d ev=%0d mv=%0d", resident[10], resident[11], resident[35], n_evict - e0, n_move - m0);
      end
    end
    check_layout("after defragmentation");

    // ---- abort ----
    keep[30] = 1;
    prefetch(30);
    repeat (10) @(posedge clk);
    @(negedge clk); pf_abort = 1; @(negedge clk); pf_abort = 0;
    wait_idle();
    checks++; if (resident[30]) begin failures++; $display("FAIL aborted prefetch became resident"); end

    // ---- demand interrupt ----
    prefetch(30);
    repeat (10) @(posedge clk);
    do_call(7, st);
    do_ret();
    wait_idle();
    checks++; if (resident[30] || !resident[7]) begin failures++; $display("FAIL demand interrupt"); end
    check_layout("after interrupt");

    // ---- lock and drop: everything kept, RFUOP 7 locked, prefetch of 47 (12 rows) ----
    do_call(7, st);
    keep = resident; keep[47] = 1;
    begin int d0; d0 = n_drop;
      prefetch(47); wait_idle();
      checks++; if (resident[47] || n_drop != d0 + 1 || !resident[7]) begin failures++; $display("FAIL drop"); end
    end
    // Nothing is kept now: 47 may evict anything but the locked RFUOP 7. If 7
    // sits where it leaves no 12-row space above it, the prefetch is dropped.
    keep = '0; keep[47] = 1;
    begin int d0; d0 = n_drop;
      prefetch(47); wait_idle();
      checks++;
      if (!resident[7] || (!resident[47] && n_drop != d0 + 1)) begin
        failures++; $display("FAIL locked RFUOP evicted or 47 lost without a drop");
      end
    end
    do_ret();
    check_layout("after lock test");

    // ---- random phase ----
    for (int n = 0; n < 300; n++) begin
      keep = '0;
      for (int j = 0; j < 4; j++) keep[$urandom % 24] = 1'b1;
      case ($urandom % 4)
        0, 1: begin do_call($urandom % 24, st); repeat ($urandom % 20) @(posedge clk); do_ret(); end
        2: begin prefetch($urandom % 24); repeat ($urandom % 40) @(posedge clk); end
        3: begin prefetch($urandom % 24); repeat ($urandom % 30) @(posedge clk);
                 @(negedge clk); pf_abort = 1; @(negedge clk); pf_abort = 0; end
      endcase
      wait_idle();
      check_layout("random phase");
    end
    $display("loads=%0d evictions=%0d row moves=%0d aborts=%0d drops=%0d", n_load, n_evict, n_move, n_abort, n_drop);
    checks++;
    if (n_evict == 0 || n_move == 0 || n_abort == 0 || n_drop == 0) begin failures++; $display("FAIL a mechanism never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
