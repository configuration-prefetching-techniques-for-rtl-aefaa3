// prefetch_controller: decides which RFUOP configurations to prefetch.
//
// Runs one of three prefetching techniques, chosen by mode:
//   MODE_STATIC   Prefetch and termination instructions inserted in the host
//                 code by the compiler. PREFETCH appends the RFUOP to the
//                 prefetch queue (a no-op if it is already queued or on
//                 chip). TERMINATE clears the queue and stops the load in
//                 progress. Configurations already loaded stay on chip.
//   MODE_DYNAMIC  On every RFUOP completion (ret) of RFUOP k: clear the
//                 queue and stop the current load. Queue k first, then k's
//                 Markov successors in decreasing weighted probability. The
//                 queue refuses those that no longer fit the chip. Then
//                 update the transition (j, k), where j is the RFUOP that
//                 completed before k. Self-loops are not recorded. Static
//                 instructions are ignored.
//   MODE_HYBRID   The dynamic behaviour, plus one flag bit per RFUOP (all 1
//                 after reset, set again when that RFUOP completes). A static
//                 PREFETCH of an RFUOP the dynamic prediction already keeps
//                 changes nothing. Otherwise it is issued only if the RFUOP's
//                 flag is 1: the current load is stopped, the flag is cleared
//                 and the RFUOP is inserted at the head of the queue, which
//                 drops low-priority entries until everything fits.
//                 TERMINATE instructions are ignored.
// The Markov table (markov_table) is inside this block.
//
// Handshakes: instr_* and ret_* are valid/ready. Only one is taken per
// cycle, ret first. A ret starts a dynamic pass: one cycle to clear the
// queue and queue k, then one cycle per successor. During the pass
// instr_ready and ret_ready are low. Static instructions take one cycle.
// Queue and abort outputs are combinational, in the cycle the event is
// accepted. The Markov table trains in every mode.
//
// What follows the document: the three algorithms, the flag rule, the
// Markov update and queue flushing. This design's own choices: running the
// candidate pass one successor per cycle; that a static prefetch "conflicts"
// only when the RFUOP is not in the dynamically kept set; and ignoring
// TERMINATE in hybrid mode.
module prefetch_controller
  import rdp_pkg::*;
#(
  parameter int unsigned NUM_RFUOPS = rdp_pkg::NUM_RFUOPS_D,
  parameter int unsigned K          = rdp_pkg::MARKOV_K_D,
  parameter int unsigned PROB_BITS  = rdp_pkg::PROB_BITS_D,
  parameter int unsigned ID_W       = $clog2(NUM_RFUOPS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  pf_mode_e              mode,
  // static prefetch instructions from the host
  input  logic                  instr_valid,
  input  pf_instr_e             instr_kind,
  input  logic [ID_W-1:0]       instr_id,
  output logic                  instr_ready,
  // RFUOP completions from the host
  input  logic                  ret_valid,
  input  logic [ID_W-1:0]       ret_id,
  output logic                  ret_ready,
  // prefetch queue
  output logic                  q_clear,
  output logic                  q_push_valid,
  output logic                  q_push_front,
  output logic [ID_W-1:0]       q_push_id,
  input  logic                  q_push_ok,
  input  logic [NUM_RFUOPS-1:0] keep,
  input  logic [NUM_RFUOPS-1:0] resident,
  // terminate the current configuration load
  output logic                  pf_abort,
  // status and one-cycle event pulses
  output logic [NUM_RFUOPS-1:0] flags,
  output logic                  ev_term,
  output logic                  ev_static_issue,
  output logic                  ev_static_ignore,
  output logic                  ev_dyn_prefetch
);
  typedef enum logic { P_IDLE, P_DYN } pstate_e;

  pstate_e                  state_q;
  logic [ID_W-1:0]          prev_q, cur_q;
  logic                     prev_valid_q;
  logic [$clog2(K+1)-1:0]   idx_q;
  logic [K-1:0][ID_W-1:0]   snap_succ_q;
  logic [K-1:0]             snap_valid_q;

  logic [K-1:0][ID_W-1:0]      rd_succ;
  logic [K-1:0][PROB_BITS-1:0] rd_prob;
  logic [K-1:0]                rd_valid;
  logic                        upd_en;

  markov_table #(.NUM_RFUOPS(NUM_RFUOPS), .K(K), .PROB_BITS(PROB_BITS), .ID_W(ID_W))
  u_markov_table (
    .clk     (clk),
    .rst_n   (rst_n),
    .upd_en  (upd_en),
    .upd_from(prev_q),
    .upd_to  (ret_id),
    .rd_id   (ret_id),
    .rd_succ (rd_succ),
    .rd_prob (rd_prob),
    .rd_valid(rd_valid)
  );

  logic take_ret, take_instr;
  assign ret_ready   = state_q == P_IDLE;
  assign instr_ready = state_q == P_IDLE && !ret_valid;
  assign take_ret    = ret_valid && ret_ready;
  assign take_instr  = instr_valid && instr_ready;
  assign upd_en      = take_ret && prev_valid_q;

  logic [K-1:0] next_valid;  // bit 0: the successor after the current one exists
  assign next_valid = snap_valid_q >> (idx_q + 1'b1);

  logic dyn_push;  // the current successor is pushed this cycle
  assign dyn_push = state_q == P_DYN && idx_q < ($clog2(K+1))'(K) &&
                    snap_valid_q[idx_q[$clog2(K)-1:0]] && snap_succ_q[idx_q[$clog2(K)-1:0]] != cur_q;

  always_comb begin
    q_clear          = 1'b0;
    q_push_valid     = 1'b0;
    q_push_front     = 1'b0;
    q_push_id        = '0;
    pf_abort         = 1'b0;
    ev_term          = 1'b0;
    ev_static_issue  = 1'b0;
    ev_static_ignore = 1'b0;
    if (take_ret && mode != MODE_STATIC) begin
      q_clear      = 1'b1;
      pf_abort     = 1'b1;
      q_push_valid = 1'b1;
      q_push_id    = ret_id;
    end else if (take_instr) begin
      unique case (mode)
        MODE_STATIC: begin
          if (instr_kind == INSTR_TERMINATE) begin
            q_clear = 1'b1;
            pf_abort = 1'b1;
            ev_term = 1'b1;
          end else begin
            q_push_valid    = 1'b1;
            q_push_id       = instr_id;
            ev_static_issue = 1'b1;
          end
        end
        MODE_HYBRID: begin
          if (instr_kind == INSTR_PREFETCH && !keep[instr_id] && flags[instr_id]) begin
            pf_abort        = 1'b1;
            q_push_valid    = 1'b1;
            q_push_front    = 1'b1;
            q_push_id       = instr_id;
            ev_static_issue = 1'b1;
          end else if (instr_kind == INSTR_PREFETCH && !keep[instr_id]) begin
            ev_static_ignore = 1'b1;
          end
        end
        default: ;
      endcase
    end else if (dyn_push) begin
      q_push_valid = 1'b1;
      q_push_id    = snap_succ_q[idx_q[$clog2(K)-1:0]];
    end
  end

  assign ev_dyn_prefetch = dyn_push && q_push_ok &&
                           !resident[snap_succ_q[idx_q[$clog2(K)-1:0]]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= P_IDLE;
      prev_q       <= '0;
      prev_valid_q <= 1'b0;
      cur_q        <= '0;
      idx_q        <= '0;
      snap_succ_q  <= '0;
      snap_valid_q <= '0;
      flags        <= '1;
    end else begin
      unique case (state_q)
        P_IDLE: begin
          if (take_ret) begin
            prev_q       <= ret_id;
            prev_valid_q <= 1'b1;
            flags[ret_id] <= 1'b1;
            if (mode != MODE_STATIC) begin
              cur_q        <= ret_id;
              snap_succ_q  <= rd_succ;
              snap_valid_q <= rd_valid;
              idx_q        <= '0;
              state_q      <= P_DYN;
            end
          end else if (take_instr && mode == MODE_HYBRID && instr_kind == INSTR_PREFETCH &&
                       !keep[instr_id] && flags[instr_id]) begin
            flags[instr_id] <= 1'b0;
          end
        end
        P_DYN: begin
          if (idx_q + 1'b1 >= ($clog2(K+1))'(K) || !next_valid[0])
            state_q <= P_IDLE;
          idx_q <= idx_q + 1'b1;
        end
        default: state_q <= P_IDLE;
      endcase
    end
  end

  // A started instruction or completion is held until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (instr_valid && !instr_ready) |=> instr_valid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   (ret_valid && !ret_ready) |=> ret_valid);
endmodule
