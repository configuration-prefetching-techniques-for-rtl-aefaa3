// prefetch_queue: buffer of prefetch requests, in priority order.
//
// Holds up to QDEPTH RFUOP IDs, highest priority at entry 0, valid entries
// packed at the front. It serves three roles:
//   * FIFO of prefetch requests for static and dynamic prefetching
//     (push_back appends, clear flushes it to terminate earlier prefetches);
//   * priority queue for hybrid prefetching (push_front inserts a statically
//     predicted RFUOP with the highest priority; lower-priority entries at
//     the tail are dropped until the whole queue again fits the chip);
//   * the set of RFUOPs the prefetcher wants on chip (keep): the
//     configuration manager may evict only resident RFUOPs outside it.
// The queue never holds more than CAPACITY rows in total: a push_back whose
// configuration does not fit is refused, so that, walked in order, the
// entries are exactly the candidates "selected under the size constraint of
// the chip". A second push of an ID already queued changes nothing.
//
// Entries stay in the queue after they are loaded, so they keep protecting
// their configuration until the next clear. The load request (req_*) points
// at the first entry that is neither resident nor marked failed; an entry is
// marked failed when the manager reports (drop_*) that it could not make
// room. An aborted load is simply requested again later. All updates are
// single-cycle; push_ok reports in the same cycle whether the pushed ID is in
// the queue after the edge. Order of effect in one cycle: drop, then clear,
// then the push (so clear and push together leave a one-entry queue).
// Keeping loaded entries and the failed mark are this design's choices.
module prefetch_queue #(
  parameter int unsigned NUM_RFUOPS = rdp_pkg::NUM_RFUOPS_D,
  parameter int unsigned QDEPTH     = rdp_pkg::QDEPTH_D,
  parameter int unsigned CAPACITY   = rdp_pkg::ROWS_D,
  parameter int unsigned ID_W       = $clog2(NUM_RFUOPS),
  parameter int unsigned SIZE_W     = $clog2(CAPACITY + 1)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [NUM_RFUOPS-1:0][SIZE_W-1:0] sizes,
  input  logic [NUM_RFUOPS-1:0]             resident,
  // control
  input  logic                              clear,
  input  logic                              push_valid,
  input  logic                              push_front,
  input  logic [ID_W-1:0]                   push_id,
  output logic                              push_ok,
  // load requests to the configuration manager
  output logic                              req_valid,
  output logic [ID_W-1:0]                   req_id,
  input  logic                              drop_valid,
  input  logic [ID_W-1:0]                   drop_id,
  // status
  output logic [NUM_RFUOPS-1:0]             keep,
  output logic [$clog2(QDEPTH+1)-1:0]       count,
  output logic [$clog2(CAPACITY+1)+3:0]     used_rows,
  output logic [QDEPTH-1:0][ID_W-1:0]       entry_id,
  output logic [QDEPTH-1:0]                 entry_valid
);
  localparam int unsigned SUM_W = $clog2(CAPACITY + 1) + 4;

  typedef struct packed {
    logic            valid;
    logic            failed;
    logic [ID_W-1:0] id;
  } entry_t;

  entry_t [QDEPTH-1:0] q, q_drop, q_clr, q_next;
  logic   [SUM_W-1:0]  used_clr, cum;
  logic   [SUM_W-1:0]  psize;
  logic                present;
  logic [$clog2(QDEPTH+1)-1:0] cnt_clr;
  logic                keep_going;

  always_comb begin
    // 1. failed mark from the manager
    q_drop = q;
    for (int unsigned i = 0; i < QDEPTH; i++)
      if (drop_valid && q[i].valid && q[i].id == drop_id) q_drop[i].failed = 1'b1;
    // 2. flush
    q_clr = clear ? '0 : q_drop;
    used_clr = '0;
    present  = 1'b0;
    cnt_clr  = '0;
    for (int unsigned i = 0; i < QDEPTH; i++)
      if (q_clr[i].valid) begin
        cnt_clr  = cnt_clr + 1'b1;
        used_clr = used_clr + SUM_W'(sizes[q_clr[i].id]);
        if (q_clr[i].id == push_id) present = 1'b1;
      end
    // 3. push
    psize      = SUM_W'(sizes[push_id]);
    q_next     = q_clr;
    push_ok    = 1'b0;
    cum        = '0;
    keep_going = 1'b1;
    if (push_valid) begin
      if (present) begin
        push_ok = 1'b1;
      end else if (psize != '0 && psize <= SUM_W'(CAPACITY)) begin
        if (!push_front) begin
          if (!q_clr[QDEPTH-1].valid && used_clr + psize <= SUM_W'(CAPACITY)) begin
            push_ok = 1'b1;
            for (int unsigned i = 0; i < QDEPTH; i++)
              if (i == 32'(cnt_clr)) begin
                q_next[i].valid  = 1'b1;
                q_next[i].failed = 1'b0;
                q_next[i].id     = push_id;
              end
          end
        end else begin
          push_ok          = 1'b1;
          q_next           = '0;
          q_next[0].valid  = 1'b1;
          q_next[0].id     = push_id;
          cum              = psize;
          for (int unsigned i = 0; i + 1 < QDEPTH; i++) begin
            if (keep_going && q_clr[i].valid &&
                cum + SUM_W'(sizes[q_clr[i].id]) <= SUM_W'(CAPACITY)) begin
              q_next[i+1] = q_clr[i];
              cum         = cum + SUM_W'(sizes[q_clr[i].id]);
            end else begin
              keep_going = 1'b0;
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end

  // outputs
  always_comb begin
    keep      = '0;
    count     = '0;
    used_rows = '0;
    req_valid = 1'b0;
    req_id    = '0;
    for (int unsigned i = 0; i < QDEPTH; i++) begin
      entry_id[i]    = q[i].id;
      entry_valid[i] = q[i].valid;
      if (q[i].valid) begin
        keep[q[i].id] = 1'b1;
        count         = count + 1'b1;
        used_rows     = used_rows + SUM_W'(sizes[q[i].id]);
      end
    end
    for (int i = QDEPTH - 1; i >= 0; i--)
      if (q[i].valid && !q[i].failed && !resident[q[i].id]) begin
        req_valid = 1'b1;
        req_id    = q[i].id;
      end
  end

  // Valid entries stay packed at the front.
  for (genvar g = 1; g < QDEPTH; g++) begin : g_packed
    assert property (@(posedge clk) disable iff (!rst_n) q[g].valid |-> q[g-1].valid);
  end
endmodule
