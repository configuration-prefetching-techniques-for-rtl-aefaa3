// markov_table: the Markov graph of RFUOP transitions used by dynamic prefetching.
//
// One row per RFUOP u. Each row keeps K successor entries (v, P[u,v]) where
// P is an N-bit weighted-probability register. An entry whose register is
// zero is empty. With weight coefficient C = 1 the update on a transition
// (u, v) is:
//   P[u,w] = P[u,w] / 2        for every other successor w (right shift);
//   P[u,v] = (P[u,v] + 1) / 2  (right shift, then set the MSB).
// A register so becomes zero after N executions of u without (u, v), and at
// most N-1 distinct successors can be non-zero after the shift, so with
// K = N a new successor always finds an empty entry (lowest index chosen).
// Self-loops (u == v) are ignored. Updates take effect at the next edge.
//
// Read side (combinational): the K entries of row rd_id are presented sorted
// by decreasing probability, ties broken by lower entry index, with empty
// entries last (rd_valid low). The sort is a rank-count network: entry i is
// placed at position #{j : P_j > P_i or (P_j == P_i and j < i)}.
//
// The table layout (M rows, K successors, N-bit shift registers, K = N = 8)
// follows the prefetching scheme; doing the shift in dedicated logic in one
// cycle, and the sort network, are this design's choices.
module markov_table #(
  parameter int unsigned NUM_RFUOPS = rdp_pkg::NUM_RFUOPS_D,
  parameter int unsigned K          = rdp_pkg::MARKOV_K_D,
  parameter int unsigned PROB_BITS  = rdp_pkg::PROB_BITS_D,
  parameter int unsigned ID_W       = $clog2(NUM_RFUOPS)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // transition update
  input  logic                            upd_en,
  input  logic [ID_W-1:0]                 upd_from,
  input  logic [ID_W-1:0]                 upd_to,
  // sorted read-out of one row
  input  logic [ID_W-1:0]                 rd_id,
  output logic [K-1:0][ID_W-1:0]          rd_succ,
  output logic [K-1:0][PROB_BITS-1:0]     rd_prob,
  output logic [K-1:0]                    rd_valid
);
  logic [NUM_RFUOPS-1:0][K-1:0][ID_W-1:0]      succ_q;
  logic [NUM_RFUOPS-1:0][K-1:0][PROB_BITS-1:0] prob_q;

  // ---------------- update ----------------
  logic [K-1:0][ID_W-1:0]      urow_succ;
  logic [K-1:0][PROB_BITS-1:0] urow_prob, urow_shift;
  logic [K-1:0]                hit_vec, free_vec;
  logic                        hit, free_found;
  logic [$clog2(K)-1:0]        hit_idx, free_idx;

  always_comb begin
    urow_succ  = succ_q[upd_from];
    urow_prob  = prob_q[upd_from];
    hit        = 1'b0;
    hit_idx    = '0;
    free_found = 1'b0;
    free_idx   = '0;
    for (int unsigned i = 0; i < K; i++) begin
      urow_shift[i] = urow_prob[i] >> 1;
      hit_vec[i]    = (urow_prob[i] != '0) && (urow_succ[i] == upd_to);
      free_vec[i]   = (urow_shift[i] == '0);
    end
    for (int i = K - 1; i >= 0; i--) begin
      if (hit_vec[i])  begin hit = 1'b1;        hit_idx  = ($clog2(K))'(i); end
      if (free_vec[i]) begin free_found = 1'b1; free_idx = ($clog2(K))'(i); end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      succ_q <= '0;
      prob_q <= '0;
    end else if (upd_en && upd_from != upd_to) begin
      prob_q[upd_from] <= urow_shift;
      if (hit) begin
        prob_q[upd_from][hit_idx] <= urow_shift[hit_idx] | {1'b1, {(PROB_BITS-1){1'b0}}};
      end else if (free_found) begin
        succ_q[upd_from][free_idx] <= upd_to;
        prob_q[upd_from][free_idx] <= {1'b1, {(PROB_BITS-1){1'b0}}};
      end
    end
  end

  // With K >= PROB_BITS a new successor always finds an empty entry.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (upd_en && upd_from != upd_to) |-> (hit || free_found || K < PROB_BITS));

  // ---------------- sorted read ----------------
  logic [K-1:0][ID_W-1:0]      rrow_succ;
  logic [K-1:0][PROB_BITS-1:0] rrow_prob;
  logic [K-1:0][$clog2(K)-1:0] rank;

  always_comb begin
    rrow_succ = succ_q[rd_id];
    rrow_prob = prob_q[rd_id];
    for (int unsigned i = 0; i < K; i++) begin
      rank[i] = '0;
      for (int unsigned j = 0; j < K; j++)
        if (j != i && ((rrow_prob[j] > rrow_prob[i]) || (rrow_prob[j] == rrow_prob[i] && j < i)))
          rank[i] = rank[i] + 1'b1;
    end
    rd_succ  = '0;
    rd_prob  = '0;
    rd_valid = '0;
    for (int unsigned i = 0; i < K; i++) begin
      rd_succ[rank[i]]  = rrow_succ[i];
      rd_prob[rank[i]]  = rrow_prob[i];
      rd_valid[rank[i]] = (rrow_prob[i] != '0);
    end
  end
endmodule
