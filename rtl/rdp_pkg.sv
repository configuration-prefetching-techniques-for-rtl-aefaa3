// rdp_pkg: shared types and default sizes of the R+D prefetching coprocessor.
//
// The coprocessor is a Partial Reconfigurable FPGA with Relocation and
// Defragmentation (R+D) whose configuration memory is filled by a
// configuration management unit, steered by a prefetch unit that runs
// static, dynamic (Markov) or hybrid configuration prefetching.
//
// Numbers fixed by the prefetching scheme: the Markov table keeps K = N = 8
// successors per RFUOP with 8-bit weighted-probability registers (weight
// coefficient C = 1, so an update is a one-bit right shift). Everything else
// here (number of RFUOP IDs, array geometry, queue depth) is this design's
// own choice and can be overridden through the parameters of each module.
package rdp_pkg;

  // Number of RFUOP IDs (rows of the Markov table); IDs of at least 56 occur.
  parameter int unsigned NUM_RFUOPS_D = 64;
  // Successors kept per Markov table row (K) and probability register width (N).
  parameter int unsigned MARKOV_K_D   = 8;
  parameter int unsigned PROB_BITS_D  = 8;
  // Configuration array geometry: rows, bits per row, bitstream word width.
  parameter int unsigned ROWS_D       = 64;
  parameter int unsigned ROW_BITS_D   = 128;
  parameter int unsigned WORD_BITS_D  = 32;
  // Entries of the prefetch queue.
  parameter int unsigned QDEPTH_D     = 16;

  // Prefetching technique in use.
  typedef enum logic [1:0] {
    MODE_STATIC  = 2'd0,  // compiler-inserted prefetch/termination instructions only
    MODE_DYNAMIC = 2'd1,  // Markov prediction on every RFUOP completion only
    MODE_HYBRID  = 2'd2   // both, arbitrated by per-RFUOP flag bits
  } pf_mode_e;

  // Prefetch-related instructions executed by the host processor.
  typedef enum logic {
    INSTR_PREFETCH  = 1'b0,  // prefetch the configuration of one RFUOP
    INSTR_TERMINATE = 1'b1   // terminate all previously issued prefetches
  } pf_instr_e;

  // Commands of the R+D configuration memory.
  typedef enum logic [1:0] {
    CM_NOP      = 2'd0,
    CM_STAGE_WR = 2'd1,  // write one bitstream word into the staging area
    CM_WRITE    = 2'd2,  // staging area -> array row (relocation)
    CM_READ     = 2'd3   // array row -> staging area (read back for defragmentation)
  } cmem_cmd_e;

  // One-cycle event pulses of the coprocessor, for performance counting.
  typedef struct packed {
    logic stall;          // a host RFUOP call is waiting (reconfiguration penalty cycle)
    logic load_done;      // a configuration finished loading
    logic evict;          // a configuration was evicted
    logic move_row;       // defragmentation moved one row
    logic load_abort;     // a load was abandoned (terminate or demand interrupt)
    logic pf_drop;        // a prefetch could not get room and was dropped
    logic term;           // a termination instruction cleared the queue
    logic static_issue;   // a static prefetch was issued
    logic static_ignore;  // a static prefetch was ignored (hybrid flag bit 0)
    logic dyn_prefetch;   // dynamic prediction queued an RFUOP that is not on chip
  } rdp_events_t;

endpackage
