// rd_prefetch_coprocessor: partially reconfigurable R+D coprocessor with
// configuration prefetching.
//
// A host processor calls RFUOPs, each of which needs its configuration in
// the coprocessor's Relocation + Defragmentation configuration memory. This
// block hides the load time by prefetching configurations while the host
// computes. It is built from:
//   size_table          size of every RFUOP configuration, in rows;
//   prefetch_controller static / dynamic (Markov) / hybrid prediction;
//   prefetch_queue      ordered prefetch requests and the set to keep;
//   config_manager      loading, relocation, defragmentation, eviction,
//                       demand fetch and load interruption;
//   rd_config_memory    SRAM array, row decoder and staging area.
// The host CPU, the external configuration store and the logic fabric
// driven by cfg_bits are outside this block and connect through its ports.
//
// Host protocol:
//   size_wr_*  set an RFUOP's size (before it is used);
//   instr_*    PREFETCH id / TERMINATE instructions (valid/ready);
//   call_*     call an RFUOP: hold call_valid until call_ready. The cycles in
//              between are the reconfiguration penalty. call_base_row says
//              where its rows are. The RFUOP stays locked on chip until ...
//   ret_*      ... its completion is reported (valid/ready). That also drives
//              dynamic prediction.
// The host should report ret before its next call. The store answers every
// cs_rd_en with exactly one cs_rd_valid, any number of cycles later.
// events carries one-cycle pulses for performance counting.
module rd_prefetch_coprocessor
  import rdp_pkg::*;
#(
  parameter int unsigned NUM_RFUOPS = rdp_pkg::NUM_RFUOPS_D,
  parameter int unsigned K          = rdp_pkg::MARKOV_K_D,
  parameter int unsigned PROB_BITS  = rdp_pkg::PROB_BITS_D,
  parameter int unsigned ROWS       = rdp_pkg::ROWS_D,
  parameter int unsigned ROW_BITS   = rdp_pkg::ROW_BITS_D,
  parameter int unsigned WORD_BITS  = rdp_pkg::WORD_BITS_D,
  parameter int unsigned QDEPTH     = rdp_pkg::QDEPTH_D,
  parameter int unsigned WORDS      = ROW_BITS / WORD_BITS,
  parameter int unsigned ID_W       = $clog2(NUM_RFUOPS),
  parameter int unsigned ADDR_W     = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned SIZE_W     = $clog2(ROWS + 1),
  parameter int unsigned WIDX_W     = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  pf_mode_e                      mode,
  // RFUOP sizes
  input  logic                          size_wr_en,
  input  logic [ID_W-1:0]               size_wr_id,
  input  logic [SIZE_W-1:0]             size_wr_size,
  // static prefetch instructions
  input  logic                          instr_valid,
  input  pf_instr_e                     instr_kind,
  input  logic [ID_W-1:0]               instr_id,
  output logic                          instr_ready,
  // RFUOP calls and completions
  input  logic                          call_valid,
  input  logic [ID_W-1:0]               call_id,
  output logic                          call_ready,
  output logic [ADDR_W-1:0]             call_base_row,
  input  logic                          ret_valid,
  input  logic [ID_W-1:0]               ret_id,
  output logic                          ret_ready,
  // external configuration store
  output logic                          cs_rd_en,
  output logic [ID_W-1:0]               cs_id,
  output logic [ADDR_W-1:0]             cs_row,
  output logic [WIDX_W-1:0]             cs_word,
  input  logic                          cs_rd_valid,
  input  logic [WORD_BITS-1:0]          cs_rd_data,
  // programming bits to the logic fabric
  output logic [ROWS-1:0][ROW_BITS-1:0] cfg_bits,
  // status
  output logic [NUM_RFUOPS-1:0]         resident,
  output logic [NUM_RFUOPS-1:0]         flags,
  output rdp_events_t                   events
);
  logic [NUM_RFUOPS-1:0][SIZE_W-1:0] sizes;
  logic                              q_clear, q_push_valid, q_push_front, q_push_ok;
  logic [ID_W-1:0]                   q_push_id;
  logic [NUM_RFUOPS-1:0]             keep;
  logic                              pf_abort;
  logic                              req_valid, req_ready, drop_valid;
  logic [ID_W-1:0]                   req_id, drop_id;
  cmem_cmd_e                         cm_cmd;
  logic [ADDR_W-1:0]                 cm_row;
  logic [WIDX_W-1:0]                 cm_word_idx;
  logic [WORD_BITS-1:0]              cm_word_data;
  logic [ROW_BITS-1:0]               stage_row;
  logic [NUM_RFUOPS-1:0][ADDR_W-1:0] res_base;
  logic                              mgr_busy, mgr_loading, mgr_loading_demand;
  logic [ID_W-1:0]                   mgr_loading_id;
  logic [$clog2(QDEPTH+1)-1:0]       q_count;
  logic [$clog2(ROWS+1)+3:0]         q_used_rows;
  logic [QDEPTH-1:0][ID_W-1:0]       q_entry_id;
  logic [QDEPTH-1:0]                 q_entry_valid;

  size_table #(.NUM_RFUOPS(NUM_RFUOPS), .ROWS(ROWS), .ID_W(ID_W), .SIZE_W(SIZE_W)) u_size_table (
    .clk    (clk),
    .rst_n  (rst_n),
    .wr_en  (size_wr_en),
    .wr_id  (size_wr_id),
    .wr_size(size_wr_size),
    .sizes  (sizes)
  );

  prefetch_controller #(.NUM_RFUOPS(NUM_RFUOPS), .K(K), .PROB_BITS(PROB_BITS), .ID_W(ID_W))
  u_prefetch_controller (
    .clk             (clk),
    .rst_n           (rst_n),
    .mode            (mode),
    .instr_valid     (instr_valid),
    .instr_kind      (instr_kind),
    .instr_id        (instr_id),
    .instr_ready     (instr_ready),
    .ret_valid       (ret_valid),
    .ret_id          (ret_id),
    .ret_ready       (ret_ready),
    .q_clear         (q_clear),
    .q_push_valid    (q_push_valid),
    .q_push_front    (q_push_front),
    .q_push_id       (q_push_id),
    .q_push_ok       (q_push_ok),
    .keep            (keep),
    .resident        (resident),
    .pf_abort        (pf_abort),
    .flags           (flags),
    .ev_term         (events.term),
    .ev_static_issue (events.static_issue),
    .ev_static_ignore(events.static_ignore),
    .ev_dyn_prefetch (events.dyn_prefetch)
  );

  prefetch_queue #(.NUM_RFUOPS(NUM_RFUOPS), .QDEPTH(QDEPTH), .CAPACITY(ROWS), .ID_W(ID_W),
                   .SIZE_W(SIZE_W))
  u_prefetch_queue (
    .clk        (clk),
    .rst_n      (rst_n),
    .sizes      (sizes),
    .resident   (resident),
    .clear      (q_clear),
    .push_valid (q_push_valid),
    .push_front (q_push_front),
    .push_id    (q_push_id),
    .push_ok    (q_push_ok),
    .req_valid  (req_valid),
    .req_id     (req_id),
    .drop_valid (drop_valid),
    .drop_id    (drop_id),
    .keep       (keep),
    .count      (q_count),
    .used_rows  (q_used_rows),
    .entry_id   (q_entry_id),
    .entry_valid(q_entry_valid)
  );

  config_manager #(.NUM_RFUOPS(NUM_RFUOPS), .ROWS(ROWS), .ROW_BITS(ROW_BITS),
                   .WORD_BITS(WORD_BITS), .WORDS(WORDS), .ID_W(ID_W), .ADDR_W(ADDR_W),
                   .SIZE_W(SIZE_W), .WIDX_W(WIDX_W))
  u_config_manager (
    .clk           (clk),
    .rst_n         (rst_n),
    .sizes         (sizes),
    .pf_req_valid  (req_valid),
    .pf_req_id     (req_id),
    .pf_req_ready  (req_ready),
    .pf_drop_valid (drop_valid),
    .pf_drop_id    (drop_id),
    .pf_abort      (pf_abort),
    .keep          (keep),
    .call_valid    (call_valid),
    .call_id       (call_id),
    .call_ready    (call_ready),
    .call_base_row (call_base_row),
    .ret           (ret_valid && ret_ready),
    .cs_rd_en      (cs_rd_en),
    .cs_id         (cs_id),
    .cs_row        (cs_row),
    .cs_word       (cs_word),
    .cs_rd_valid   (cs_rd_valid),
    .cs_rd_data    (cs_rd_data),
    .cm_cmd        (cm_cmd),
    .cm_row        (cm_row),
    .cm_word_idx   (cm_word_idx),
    .cm_word_data  (cm_word_data),
    .resident      (resident),
    .res_base      (res_base),
    .busy          (mgr_busy),
    .loading       (mgr_loading),
    .loading_id    (mgr_loading_id),
    .loading_demand(mgr_loading_demand),
    .ev_load_done  (events.load_done),
    .ev_evict      (events.evict),
    .ev_move_row   (events.move_row),
    .ev_abort      (events.load_abort),
    .ev_stall      (events.stall)
  );

  assign events.pf_drop = drop_valid;

  rd_config_memory #(.ROWS(ROWS), .ROW_BITS(ROW_BITS), .WORD_BITS(WORD_BITS), .WORDS(WORDS),
                     .ADDR_W(ADDR_W), .WIDX_W(WIDX_W))
  u_rd_config_memory (
    .clk      (clk),
    .rst_n    (rst_n),
    .cmd      (cm_cmd),
    .row_addr (cm_row),
    .word_idx (cm_word_idx),
    .word_data(cm_word_data),
    .stage_row(stage_row),
    .cfg_bits (cfg_bits)
  );
endmodule
