// Shared sizes and types of the checkpointed thread-level-speculation (TLS)
// support logic. The processor count, checkpoint limit and the insertion
// threshold are the values of the evaluated system; word and register widths
// follow a 32-bit MIPS-like core and are this design's choice.
package tls_ckpt_pkg;
  localparam int unsigned NCPU    = 4;    // processors in the CMP
  localparam int unsigned CP_MAX  = 8;    // checkpoints per task
  localparam int unsigned TPC     = CP_MAX + 1;  // task slots per processor: task + checkpoints
  localparam int unsigned NT      = NCPU * TPC;  // task slots in the system
  localparam int unsigned TID_W   = $clog2(NT);
  localparam int unsigned XLEN    = 32;
  localparam int unsigned NREGS   = 32;
  localparam int unsigned TS_W    = 32;   // timestamp width (system clock cycles)
  localparam int unsigned VIOL_LAT = 12;  // cycles from violation to kill/restart

  typedef logic [TID_W-1:0] tid_t;
  typedef logic [TS_W-1:0]  ts_t;

  // One entry of the global speculation-order list.
  typedef struct packed {
    logic valid;
    tid_t tid;
    logic has_parent;   // parent (spawning or checkpointed) task still in the list
    tid_t parent;
    ts_t  start_ts;     // cycle the task (last) began execution
    ts_t  end_ts;       // cycle it finished; meaningful when done
    logic done;         // reached its end (commit instruction or checkpointed)
  } task_entry_t;

  // Squash propagation rule.
  typedef enum logic [1:0] {
    RST_BASE      = 2'd0,   // restart violated task, kill every successor
    RST_PARENT    = 2'd1,   // kill children of squashed tasks, restart the rest
    RST_TIMESTAMP = 2'd2    // as RST_PARENT, restart only overlapping tasks
  } restart_mode_e;

  // Hybrid predictor combining rule.
  typedef enum logic [1:0] {
    HY_BIMODAL = 2'd0,
    HY_OR      = 2'd1,
    HY_AND     = 2'd2
  } hybrid_mode_e;
endpackage
