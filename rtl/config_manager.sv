// config_manager: configuration management unit of the R+D coprocessor.
//
// Owns the placement of RFUOP configurations in the R+D configuration
// memory. For each RFUOP it records whether it is resident, its base row and
// its size. A configuration always occupies consecutive rows, and its rows
// are placed at run time (relocation) at the first free row above the
// highest occupied one.
//
// Loading an RFUOP (a demand fetch for the host, or a prefetch from the
// prefetch queue) runs these steps:
//   CHECK   enough free rows above the occupied area -> LOAD;
//           enough free rows in total but fragmented, and not compacted
//           since the last eviction -> DEFRAG;
//           otherwise evict one victim and check again. The victim is the
//           lowest-ID resident RFUOP outside the prefetcher's keep set. A
//           demand fetch may also evict keep-set RFUOPs. The executing
//           (locked) RFUOP is never evicted. A prefetch that cannot make
//           room is dropped and reported on pf_drop_*.
//   DEFRAG  compacts the array towards row 0. Resident configurations are
//           taken in row order, and each one that has a hole above it is
//           moved row by row, lowest row first: read back into the staging
//           area, then written to its new, lower-numbered row. Moving down
//           in that order never overwrites a row that is still to be read. One row move takes
//           2 cycles. A move is never cut short, so the array always stays
//           consistent. The executing (locked) RFUOP is not moved: the pass
//           steps over it and leaves any hole below it.
//   LOAD    for every row: WORDS word reads from the configuration store
//           (cs_*, one request outstanding), each written into the staging
//           area, then one staging-to-array write at base + row. The RFUOP
//           becomes resident after its last row.
// A prefetch load is abandoned when pf_abort is pulsed (terminate previous
// prefetches). It is also abandoned when the host calls an RFUOP that is
// not on chip and is not the one being loaded: that is the interrupt for a
// demand fetch. Both take effect at the next point where no store read is
// outstanding, or at the end of the current defragmentation move. A call to
// the RFUOP being prefetched turns that load into a demand fetch.
//
// Host side: call_valid/call_id is held until call_ready. call_ready is high
// when the RFUOP is resident and not being moved. call_base_row gives its
// rows. The granted RFUOP is locked (not evicted or moved) until ret.
// Stall cycles (call_valid without call_ready) are the reconfiguration
// penalty.
//
// What follows the document: row-wise loading through the staging area,
// run-time relocation, defragmentation by read-back and rewrite, eviction
// of RFUOPs the prefetcher did not select, and interruption of a load by a
// demand fetch. This design's own choices: the placement rule, the
// lowest-ID victim, the lock, and the store handshake.
module config_manager
  import rdp_pkg::*;
#(
  parameter int unsigned NUM_RFUOPS = rdp_pkg::NUM_RFUOPS_D,
  parameter int unsigned ROWS       = rdp_pkg::ROWS_D,
  parameter int unsigned ROW_BITS   = rdp_pkg::ROW_BITS_D,
  parameter int unsigned WORD_BITS  = rdp_pkg::WORD_BITS_D,
  parameter int unsigned WORDS      = ROW_BITS / WORD_BITS,
  parameter int unsigned ID_W       = $clog2(NUM_RFUOPS),
  parameter int unsigned ADDR_W     = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned SIZE_W     = $clog2(ROWS + 1),
  parameter int unsigned WIDX_W     = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [NUM_RFUOPS-1:0][SIZE_W-1:0] sizes,
  // prefetch requests
  input  logic                              pf_req_valid,
  input  logic [ID_W-1:0]                   pf_req_id,
  output logic                              pf_req_ready,
  output logic                              pf_drop_valid,
  output logic [ID_W-1:0]                   pf_drop_id,
  input  logic                              pf_abort,
  input  logic [NUM_RFUOPS-1:0]             keep,
  // host RFUOP calls
  input  logic                              call_valid,
  input  logic [ID_W-1:0]                   call_id,
  output logic                              call_ready,
  output logic [ADDR_W-1:0]                 call_base_row,
  input  logic                              ret,
  // configuration store (bitstream source)
  output logic                              cs_rd_en,
  output logic [ID_W-1:0]                   cs_id,
  output logic [ADDR_W-1:0]                 cs_row,
  output logic [WIDX_W-1:0]                 cs_word,
  input  logic                              cs_rd_valid,
  input  logic [WORD_BITS-1:0]              cs_rd_data,
  // R+D configuration memory
  output cmem_cmd_e                         cm_cmd,
  output logic [ADDR_W-1:0]                 cm_row,
  output logic [WIDX_W-1:0]                 cm_word_idx,
  output logic [WORD_BITS-1:0]              cm_word_data,
  // status
  output logic [NUM_RFUOPS-1:0]             resident,
  output logic [NUM_RFUOPS-1:0][ADDR_W-1:0] res_base,
  output logic                              busy,
  output logic                              loading,
  output logic [ID_W-1:0]                   loading_id,
  output logic                              loading_demand,
  // one-cycle event pulses
  output logic                              ev_load_done,
  output logic                              ev_evict,
  output logic                              ev_move_row,
  output logic                              ev_abort,
  output logic                              ev_stall
);
  localparam int unsigned W = SIZE_W + 1;

  typedef enum logic [3:0] {
    S_IDLE, S_CHECK, S_EVICT, S_DFIND, S_DREAD, S_DWRITE, S_LREQ, S_LWAIT, S_LWRITE
  } state_e;

  state_e                            state_q;
  logic [NUM_RFUOPS-1:0][SIZE_W-1:0] res_size;
  logic [ID_W-1:0]                   tgt_id_q, victim_id_q, mv_id_q;
  logic [SIZE_W-1:0]                 tgt_size_q;
  logic                              tgt_demand_q;
  logic [W-1:0]                      tgt_base_q, ptr_q, mv_src_q;
  logic [SIZE_W-1:0]                 row_cnt_q;
  logic [WIDX_W-1:0]                 word_cnt_q;
  logic                              abort_pend_q;
  logic                              defrag_done_q;  // compaction already tried for this target
  logic                              lock_q;
  logic [ID_W-1:0]                   lock_id_q;

  // ---------------- occupancy summary ----------------
  logic [W+6:0]  used_total;
  logic [W-1:0]  top_free;
  logic [W-1:0]  end_row;
  always_comb begin
    used_total = '0;
    top_free   = '0;
    end_row    = '0;
    for (int unsigned i = 0; i < NUM_RFUOPS; i++)
      if (resident[i]) begin
        used_total = used_total + (W+7)'(res_size[i]);
        end_row    = W'(res_base[i]) + W'(res_size[i]);
        if (end_row > top_free) top_free = end_row;
      end
  end

  // ---------------- victim choice ----------------
  logic          victim_found;
  logic [ID_W-1:0] victim_id;
  logic [NUM_RFUOPS-1:0] cand_soft, cand_hard;
  always_comb begin
    for (int unsigned i = 0; i < NUM_RFUOPS; i++) begin
      cand_hard[i] = resident[i] && !(lock_q && lock_id_q == ID_W'(i)) && tgt_id_q != ID_W'(i);
      cand_soft[i] = cand_hard[i] && !keep[i];
    end
    victim_found = 1'b0;
    victim_id    = '0;
    for (int i = NUM_RFUOPS - 1; i >= 0; i--)
      if (cand_hard[i] && tgt_demand_q) begin victim_found = 1'b1; victim_id = ID_W'(i); end
    for (int i = NUM_RFUOPS - 1; i >= 0; i--)
      if (cand_soft[i]) begin victim_found = 1'b1; victim_id = ID_W'(i); end
  end

  // ---------------- next configuration to compact ----------------
  logic            df_found;
  logic [ID_W-1:0] df_id;
  logic [W-1:0]    df_base;
  always_comb begin
    df_found = 1'b0;
    df_id    = '0;
    df_base  = W'(ROWS);
    for (int i = NUM_RFUOPS - 1; i >= 0; i--)
      if (resident[i] && W'(res_base[i]) >= ptr_q && W'(res_base[i]) <= df_base) begin
        df_found = 1'b1;
        df_id    = ID_W'(i);
        df_base  = W'(res_base[i]);
      end
  end

  // ---------------- host side ----------------
  logic moving_call, call_miss, interrupt;
  assign moving_call = (state_q == S_DREAD || state_q == S_DWRITE) && mv_id_q == call_id;
  assign call_ready  = call_valid && resident[call_id] && !moving_call;
  assign call_base_row = res_base[call_id];
  assign call_miss   = call_valid && !resident[call_id];
  assign interrupt   = call_miss && call_id != tgt_id_q;
  assign ev_stall    = call_valid && !call_ready;

  logic kill;  // abandon the current (prefetch) operation at a safe point
  assign kill = interrupt || (!tgt_demand_q && (abort_pend_q || pf_abort));

  // ---------------- outputs ----------------
  assign busy           = state_q != S_IDLE;
  assign loading        = state_q inside {S_CHECK, S_EVICT, S_DFIND, S_DREAD, S_DWRITE,
                                          S_LREQ, S_LWAIT, S_LWRITE};
  assign loading_id     = tgt_id_q;
  assign loading_demand = tgt_demand_q;
  assign pf_req_ready   = state_q == S_IDLE && !call_miss && !pf_abort;

  always_comb begin
    cs_rd_en     = state_q == S_LREQ && !kill;
    cs_id        = tgt_id_q;
    cs_row       = ADDR_W'(row_cnt_q);
    cs_word      = word_cnt_q;
    cm_cmd       = CM_NOP;
    cm_row       = '0;
    cm_word_idx  = word_cnt_q;
    cm_word_data = cs_rd_data;
    case (state_q)
      S_LWAIT:  if (cs_rd_valid) cm_cmd = CM_STAGE_WR;
      S_LWRITE: if (!kill) begin cm_cmd = CM_WRITE; cm_row = ADDR_W'(tgt_base_q + W'(row_cnt_q)); end
      S_DREAD:  begin cm_cmd = CM_READ;  cm_row = ADDR_W'(mv_src_q + W'(row_cnt_q)); end
      S_DWRITE: begin cm_cmd = CM_WRITE; cm_row = ADDR_W'(ptr_q + W'(row_cnt_q)); end
      default: ;
    endcase
  end

  // ---------------- state machine ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      resident     <= '0;
      res_base     <= '0;
      res_size     <= '0;
      tgt_id_q     <= '0;
      tgt_size_q   <= '0;
      tgt_demand_q <= 1'b0;
      tgt_base_q   <= '0;
      victim_id_q  <= '0;
      mv_id_q      <= '0;
      mv_src_q     <= '0;
      ptr_q        <= '0;
      row_cnt_q    <= '0;
      word_cnt_q   <= '0;
      abort_pend_q <= 1'b0;
      defrag_done_q <= 1'b0;
      lock_q       <= 1'b0;
      lock_id_q    <= '0;
      pf_drop_valid <= 1'b0;
      pf_drop_id   <= '0;
      ev_load_done <= 1'b0;
      ev_evict     <= 1'b0;
      ev_move_row  <= 1'b0;
      ev_abort     <= 1'b0;
    end else begin
      pf_drop_valid <= 1'b0;
      ev_load_done  <= 1'b0;
      ev_evict      <= 1'b0;
      ev_move_row   <= 1'b0;
      ev_abort      <= 1'b0;

      if (ret)                     lock_q <= 1'b0;
      if (call_valid && call_ready) begin
        lock_q    <= 1'b1;
        lock_id_q <= call_id;
      end
      if (pf_abort && state_q != S_IDLE && !tgt_demand_q) abort_pend_q <= 1'b1;
      // A call to the RFUOP being prefetched promotes it to a demand fetch.
      if (state_q != S_IDLE && call_miss && call_id == tgt_id_q) begin
        tgt_demand_q <= 1'b1;
        abort_pend_q <= 1'b0;
      end

      unique case (state_q)
        S_IDLE: begin
          abort_pend_q  <= 1'b0;
          defrag_done_q <= 1'b0;
          row_cnt_q    <= '0;
          word_cnt_q   <= '0;
          if (call_miss) begin
            tgt_id_q     <= call_id;
            tgt_size_q   <= sizes[call_id];
            tgt_demand_q <= 1'b1;
            state_q      <= S_CHECK;
          end else if (pf_req_valid && pf_req_ready && !resident[pf_req_id]) begin
            tgt_id_q     <= pf_req_id;
            tgt_size_q   <= sizes[pf_req_id];
            tgt_demand_q <= 1'b0;
            state_q      <= S_CHECK;
          end
        end

        S_CHECK: begin
          if (kill) begin
            ev_abort <= 1'b1;
            state_q  <= S_IDLE;
          end else if (tgt_size_q == '0 || W'(tgt_size_q) > W'(ROWS)) begin
            pf_drop_valid <= !tgt_demand_q;
            pf_drop_id    <= tgt_id_q;
            state_q       <= S_IDLE;
          end else if (W'(ROWS) - top_free >= W'(tgt_size_q)) begin
            tgt_base_q <= top_free;
            row_cnt_q  <= '0;
            word_cnt_q <= '0;
            state_q    <= S_LREQ;
          end else if (!defrag_done_q &&
                       (W+7)'(ROWS) - used_total >= (W+7)'(tgt_size_q)) begin
            ptr_q   <= '0;
            state_q <= S_DFIND;
          end else if (victim_found) begin
            victim_id_q   <= victim_id;
            defrag_done_q <= 1'b0;
            state_q       <= S_EVICT;
          end else if (!tgt_demand_q) begin
            pf_drop_valid <= 1'b1;
            pf_drop_id    <= tgt_id_q;
            state_q       <= S_IDLE;
          end
          // else: a demand fetch waits for the locked RFUOP to be released
        end

        S_EVICT: begin
          resident[victim_id_q] <= 1'b0;
          ev_evict              <= 1'b1;
          state_q               <= S_CHECK;
        end

        S_DFIND: begin
          row_cnt_q <= '0;
          if (kill) begin
            ev_abort <= 1'b1;
            state_q  <= S_IDLE;
          end else if (!df_found) begin
            defrag_done_q <= 1'b1;
            state_q       <= S_CHECK;
          end else if (df_base == ptr_q || (lock_q && lock_id_q == df_id)) begin
            // already in place, or executing and so not movable: skip it
            ptr_q <= df_base + W'(res_size[df_id]);
          end else begin
            mv_id_q  <= df_id;
            mv_src_q <= df_base;
            state_q  <= S_DREAD;
          end
        end

        S_DREAD: begin
          ev_move_row <= 1'b1;
          state_q     <= S_DWRITE;
        end

        S_DWRITE: begin
          if (row_cnt_q + 1'b1 == res_size[mv_id_q]) begin
            res_base[mv_id_q] <= ADDR_W'(ptr_q);
            ptr_q             <= ptr_q + W'(res_size[mv_id_q]);
            state_q           <= S_DFIND;
          end else begin
            row_cnt_q <= row_cnt_q + 1'b1;
            state_q   <= S_DREAD;
          end
        end

        S_LREQ: begin
          if (kill) begin
            ev_abort <= 1'b1;
            state_q  <= S_IDLE;
          end else begin
            state_q <= S_LWAIT;
          end
        end

        S_LWAIT: begin
          if (cs_rd_valid) begin
            if (word_cnt_q == WIDX_W'(WORDS - 1)) begin
              state_q <= S_LWRITE;
            end else begin
              word_cnt_q <= word_cnt_q + 1'b1;
              state_q    <= S_LREQ;
            end
          end
        end

        S_LWRITE: begin
          word_cnt_q <= '0;
          if (kill) begin
            ev_abort <= 1'b1;
            state_q  <= S_IDLE;
          end else if (row_cnt_q + 1'b1 == tgt_size_q) begin
            resident[tgt_id_q] <= 1'b1;
            res_base[tgt_id_q] <= ADDR_W'(tgt_base_q);
            res_size[tgt_id_q] <= tgt_size_q;
            ev_load_done       <= 1'b1;
            state_q            <= S_IDLE;
          end else begin
            row_cnt_q <= row_cnt_q + 1'b1;
            state_q   <= S_LREQ;
          end
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ---------------- protocol rules ----------------
  // A waiting call is held stable until it is granted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (call_valid && !call_ready) |=> (call_valid && $stable(call_id)));
  // Resident configurations never exceed the array.
  assert property (@(posedge clk) disable iff (!rst_n) used_total <= (W+7)'(ROWS));
endmodule
