// tb_markov_table: checks the Markov transition table against an
// independent model. With weight coefficient 1 the N-bit register of (u, v)
// holds, bit by bit from the MSB, whether each of u's last N successors was
// v. The model keeps u's last 8 successors as a list and derives the
// expected sorted successor list from it. The first part replays the access
// string A B C D C C C A B D E and checks the expected registers. The second
// part replays a long random access string over 12 RFUOPs, which forces
// more than 8 distinct successors per row (entry reuse), and includes
// self-loops, which must not be recorded.
module tb_markov_table;
  localparam int M = 64, K = 8, N = 8;
  logic clk = 0, rst_n = 0;
  logic upd_en;
  logic [5:0] upd_from, upd_to, rd_id;
  logic [K-1:0][5:0] rd_succ;
  logic [K-1:0][N-1:0] rd_prob;
  logic [K-1:0] rd_valid;
  int checks = 0, failures = 0;
  int hist [M][N];   // hist[u][0] = most recent successor, -1 = none

  markov_table dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_prob(int u, int v);
    int p = 0;
    for (int i = 0; i < N; i++) if (hist[u][i] == v) p |= 1 << (N - 1 - i);
    return p;
  endfunction

  task automatic transition(int u, int v);
    @(negedge clk);
    upd_en = 1; upd_from = 6'(u); upd_to = 6'(v);
    @(posedge clk); #1;
    upd_en = 0;
    if (u != v) begin
      for (int i = N - 1; i > 0; i--) hist[u][i] = hist[u][i-1];
      hist[u][0] = v;
    end
  endtask

  task automatic check_row(int u);
    int exp_id [$];
    int exp_p  [$];
    int seen [int];
    // distinct successors in the history, sorted by decreasing model probability
    for (int i = 0; i < N; i++)
      if (hist[u][i] >= 0 && !seen.exists(hist[u][i])) begin
        seen[hist[u][i]] = 1;
        exp_id.push_back(hist[u][i]);
        exp_p.push_back(model_prob(u, hist[u][i]));
      end
    for (int a = 0; a < exp_id.size(); a++)
      for (int b = a + 1; b < exp_id.size(); b++)
        if (exp_p[b] > exp_p[a]) begin
          int t;
          t = exp_p[a]; exp_p[a] = exp_p[b]; exp_p[b] = t;
          t = exp_id[a]; exp_id[a] = exp_id[b]; exp_id[b] = t;
        end
    @(negedge clk);
    rd_id = 6'(u);
    #1;
    for (int s = 0; s < K; s++) begin
      checks++;
      if (s < exp_id.size()) begin
        if (!rd_valid[s] || rd_succ[s] != 6'(exp_id[s]) || rd_prob[s] != 8'(exp_p[s])) begin
          failures++;
          $display("FAIL row %0d slot %0d: got v=%0b id=%0d p=%h want id=%0d p=%h",
                   u, s, rd_valid[s], rd_succ[s], rd_prob[s], exp_id[s], exp_p[s]);
        end
      end else if (rd_valid[s]) begin
        failures++;
        $display("FAIL row %0d slot %0d should be empty", u, s);
      end
    end
  endtask

  initial begin
    int seq [] = '{0, 1, 2, 3, 2, 2, 2, 0, 1, 3, 4};   // A B C D C C C A B D E
    int prev;
    upd_en = 0; upd_from = 0; upd_to = 0; rd_id = 0;
    foreach (hist[u, i]) hist[u][i] = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 1; i < seq.size(); i++) transition(seq[i-1], seq[i]);
    for (int u = 0; u < 5; u++) check_row(u);
    // spot values of the example: A->B twice, B->D most recent, C->A most recent
    @(negedge clk); rd_id = 0; #1;
    checks++; if (rd_succ[0] != 1 || rd_prob[0] != 8'hC0) begin failures++; $display("FAIL A->B"); end
    rd_id = 1; #1;
    checks++; if (rd_succ[0] != 3 || rd_prob[0] != 8'h80 || rd_succ[1] != 2 || rd_prob[1] != 8'h40)
      begin failures++; $display("FAIL B row"); end
    rd_id = 2; #1;
    checks++; if (rd_succ[0] != 0 || rd_succ[1] != 3 || rd_valid[2]) begin failures++; $display("FAIL C row"); end
    // long random access string
    prev = 0;
    for (int n = 0; n < 3000; n++) begin
      int nxt;
      nxt = ($urandom % 5 == 0) ? prev : int'($urandom % 12);
      transition(prev, nxt);
      if (n % 10 == 0) check_row(prev);
      prev = nxt;
    end
    for (int u = 0; u < 12; u++) check_row(u);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
