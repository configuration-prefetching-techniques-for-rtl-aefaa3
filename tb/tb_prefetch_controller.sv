// tb_prefetch_controller: drives the prefetch controller in its three modes
// and checks every queue operation it emits against a reference of the
// algorithms:
//   static   TERMINATE -> clear + abort; PREFETCH id -> append id;
//   dynamic  completion of k -> clear + abort + append k, then k's Markov
//            successors in decreasing weighted probability, computed from an
//            independent history model; static instructions do nothing;
//   hybrid   as dynamic, plus: a static PREFETCH of an RFUOP outside the keep
//            set with flag 1 -> abort + head insertion and flag cleared; with
//            flag 0 -> ignored; flag set again when the RFUOP completes;
//            TERMINATE ignored.
// The dynamic pass must take 1 + (number of successors) cycles: checked.
module tb_prefetch_controller;
  import rdp_pkg::*;
  localparam int M = 64, K = 8, N = 8;
  logic clk = 0, rst_n = 0;
  pf_mode_e mode;
  logic instr_valid, instr_ready, ret_valid, ret_ready;
  pf_instr_e instr_kind;
  logic [5:0] instr_id, ret_id;
  logic q_clear, q_push_valid, q_push_front, q_push_ok;
  logic [5:0] q_push_id;
  logic [M-1:0] keep, resident, flags;
  logic pf_abort, ev_term, ev_static_issue, ev_static_ignore, ev_dyn_prefetch;
  int checks = 0, failures = 0;
  int hist [M][N];
  int prev = -1;

  typedef struct { bit clear; bit push; bit front; int id; bit abort; } op_t;
  op_t log_q [$];

  prefetch_controller dut (.*);
  always #5 clk = ~clk;
  assign q_push_ok = 1'b1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && (q_clear || q_push_valid || pf_abort))
      log_q.push_back('{q_clear, q_push_valid, q_push_front, int'(q_push_id), pf_abort});

  task automatic expect_op(string what, bit clear, bit push, bit front, int id, bit abort);
    op_t o;
    checks++;
    if (log_q.size() == 0) begin
      failures++; $display("FAIL %s: no queue operation", what); return;
    end
    o = log_q.pop_front();
    if (o.clear != clear || o.push != push || (push && (o.front != front || o.id != id)) || o.abort != abort) begin
      failures++;
      $display("FAIL %s: got clr=%0d push=%0d front=%0d id=%0d abort=%0d, want %0d %0d %0d %0d %0d",
               what, o.clear, o.push, o.front, o.id, o.abort, clear, push, front, id, abort);
    end
  endtask

  task automatic expect_none(string what);
    checks++;
    if (log_q.size() != 0) begin
      failures++; $display("FAIL %s: %0d unexpected operations", what, log_q.size()); log_q.delete();
    end
  endtask

  task automatic instr(pf_instr_e kind, int id);
    @(negedge clk);
    instr_valid = 1; instr_kind = kind; instr_id = 6'(id);
    do @(posedge clk); while (!instr_ready);
    #1 instr_valid = 0;
    repeat (2) @(posedge clk);
  endtask

  // expected successors of u, sorted by decreasing weighted probability
  function automatic void succ_sorted(int u, ref int ids[$]);
    int p [$];
    int seen [int];
    ids.delete();
    for (int i = 0; i < N; i++)
      if (hist[u][i] >= 0 && !seen.exists(hist[u][i])) begin
        int w = 0;
        seen[hist[u][i]] = 1;
        for (int j = 0; j < N; j++) if (hist[u][j] == hist[u][i]) w |= 1 << (N - 1 - j);
        ids.push_back(hist[u][i]); p.push_back(w);
      end
    for (int a = 0; a < ids.size(); a++)
      for (int b = a + 1; b < ids.size(); b++)
        if (p[b] > p[a]) begin
          int t;
          t = p[a]; p[a] = p[b]; p[b] = t;
          t = ids[a]; ids[a] = ids[b]; ids[b] = t;
        end
  endfunction

  task automatic ret(int k);
    int ids [$];
    int t0, cyc;
    succ_sorted(k, ids);
    @(negedge clk);
    ret_valid = 1; ret_id = 6'(k);
    do @(posedge clk); while (!ret_ready);
    t0 = $time;
    #1 ret_valid = 0;
    while (!ret_ready) @(posedge clk);
    cyc = ($time - t0) / 10;
    if (mode != MODE_STATIC) begin
      expect_op("ret head", 1, 1, 0, k, 1);
      foreach (ids[i]) expect_op($sformatf("successor %0d of %0d", i, k), 0, 1, 0, ids[i], 0);
      checks++;
      if (cyc != ((ids.size() == 0) ? 1 : ids.size()) + 1 && !(ids.size() == K && cyc == K + 1)) begin
        failures++; $display("FAIL dynamic pass of %0d took %0d cycles for %0d successors", k, cyc, ids.size());
      end
    end
    expect_none("after ret");
    if (prev >= 0 && prev != k) begin
      for (int i = N - 1; i > 0; i--) hist[prev][i] = hist[prev][i-1];
      hist[prev][0] = k;
    end
    prev = k;
    checks++;
    if (!flags[k]) begin failures++; $display("FAIL flag of %0d not set on completion", k); end
  endtask

  initial begin
    mode = MODE_STATIC;
    instr_valid = 0; instr_kind = INSTR_PREFETCH; instr_id = 0; ret_valid = 0; ret_id = 0;
    keep = '0; resident = '0;
    foreach (hist[u, i]) hist[u][i] = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (flags !== '1) begin failures++; $display("FAIL flags not all 1 after reset"); end

    // ---- static ----
    instr(INSTR_TERMINATE, 0);      expect_op("terminate", 1, 0, 0, 0, 1);
    instr(INSTR_PREFETCH, 1);       expect_op("prefetch 1", 0, 1, 0, 1, 0);
    instr(INSTR_PREFETCH, 2);       expect_op("prefetch 2", 0, 1, 0, 2, 0);
    ret(1);                          // static mode: no dynamic pass, but trains the table
    ret(2);

    // ---- dynamic: loop 1 2 1 3 1 2 ... ----
    mode = MODE_DYNAMIC;
    instr(INSTR_PREFETCH, 5);  expect_none("static prefetch in dynamic mode");
    instr(INSTR_TERMINATE, 0); expect_none("terminate in dynamic mode");
    for (int n = 0; n < 40; n++) ret((n % 2 == 0) ? 1 : ((n % 6 == 1) ? 3 : 2));
    for (int n = 0; n < 300; n++) ret($urandom % 14);

    // ---- hybrid ----
    mode = MODE_HYBRID;
    keep = '0; keep[4] = 1'b1;
    instr(INSTR_PREFETCH, 4);  expect_none("static prefetch agreeing with dynamic");
    instr(INSTR_TERMINATE, 0); expect_none("terminate in hybrid mode");
    instr(INSTR_PREFETCH, 9);  expect_op("hybrid static 9, flag 1", 0, 1, 1, 9, 1);
    checks++; if (flags[9]) begin failures++; $display("FAIL flag 9 not cleared"); end
    instr(INSTR_PREFETCH, 9);  expect_none("hybrid static 9, flag 0");
    ret(9);
    instr(INSTR_PREFETCH, 9);  expect_op("hybrid static 9 after completion", 0, 1, 1, 9, 1);
    for (int n = 0; n < 100; n++) begin
      if ($urandom % 2) ret($urandom % 14);
      else begin
        int id; bit was;
        id = $urandom % 14;
        keep = '0; keep[$urandom % 14] = 1'b1;
        was = flags[id];
        instr(INSTR_PREFETCH, id);
        if (keep[id] || !was) expect_none("hybrid static ignored");
        else expect_op("hybrid static issued", 0, 1, 1, id, 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
