// Checkpoint support attached to one processor core. It gathers the
// per-processor parts: the hybrid dependence predictor, the checkpoint
// insertion policy, the checkpoint controller, the register file with its
// shadow copies, and the speculative version state of the L1 data cache.
// Core interface: at most one memory operation per cycle (mem_*); a load asks
// the predictor, the policy may place a checkpoint right before it, and the
// access is then tagged with the task it belongs to. A store is only
// performed when mem_ready, i.e. once the shared bus has granted it; it is
// then broadcast to every processor's cache for violation detection.
// ret_count is the number of instructions retired this cycle, used to measure
// task size. The register write/read ports are the architectural register file
// of the core. redirect_* tells the core to resume at a PC after a restart
// or rewind (the register file is restored in the same cycle); stall holds
// the core. System interface: order-list insertion and state changes, store
// snoop, the squash unit's masks, and detected violations for training.
module cpu_ckpt_unit
  import tls_ckpt_pkg::*;
#(
  parameter int unsigned CPU_ID       = 0,
  parameter int unsigned CAB_ENTRIES  = 32,
  parameter int unsigned CPT_ENTRIES  = 32,
  parameter int unsigned XT_ENTRIES   = 64,
  parameter int unsigned META_ENTRIES = 128,
  parameter int unsigned META_CBITS   = 5,
  parameter int unsigned C_THRESH     = 100,
  parameter int unsigned L1_SETS      = 128,
  parameter int unsigned L1_WAYS      = 4,
  parameter bit          MEM_OPT      = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  // ---- core side
  input  logic [2:0]      ret_count,
  input  logic            mem_valid,
  input  logic            mem_store,
  input  logic [XLEN-1:0] mem_pc,
  input  logic [XLEN-1:0] mem_addr,
  output logic            mem_ready,
  input  logic            commit_instr,
  input  logic            rf_we,
  input  logic [$clog2(NREGS)-1:0] rf_waddr,
  input  logic [XLEN-1:0] rf_wdata,
  input  logic [$clog2(NREGS)-1:0] rf_raddr_a,
  output logic [XLEN-1:0] rf_rdata_a,
  input  logic [$clog2(NREGS)-1:0] rf_raddr_b,
  output logic [XLEN-1:0] rf_rdata_b,
  output logic            redirect_valid,
  output logic [XLEN-1:0] redirect_pc,
  output logic [XLEN-1:0] redirect_sp,
  output logic            stall,
  output logic            running,
  output logic            idle,
  output tid_t            cur_tid,          // running task (registered)
  // ---- spawn onto this processor
  input  logic            start_valid,
  input  logic [XLEN-1:0] start_pc,
  input  logic [XLEN-1:0] start_sp,
  // ---- system side
  output logic            bus_req,
  input  logic            bus_gnt,
  input  logic            cur_is_head,
  output logic            ins_valid,
  output tid_t            ins_tid,
  output tid_t            ins_parent,
  output logic [NT-1:0]   fin_mask,
  output logic [NT-1:0]   req_restart,
  input  logic            commit_valid,
  input  tid_t            commit_tid,
  input  logic [NT-1:0]   commit_mask,
  input  logic [NT-1:0]   restart_mask,
  input  logic [NT-1:0]   kill_mask,
  input  logic [XLEN-1:0] snp_addr,
  output logic [NT-1:0]   snp_exposed,
  input  logic            det_valid,
  input  logic [NT-1:0]   det_mask,
  input  logic [XLEN-1:0] det_addr,
  // ---- events, for statistics
  output logic            ev_pred,
  output logic            ev_ckpt,
  output logic            ev_shared,
  output logic            ev_alloc_fail,
  output logic            ev_rewind,
  output logic            ev_stall
);
  localparam int unsigned LW = $clog2(TPC);
  localparam int unsigned SW = $clog2(CP_MAX);

  logic            acc_valid, is_load, pred, pred_a, pred_p, do_ckpt;
  logic            acc_exposed, acc_fail, acc_shared, acc_has_parent;
  tid_t            acc_tid, acc_parent;
  logic [LW-1:0]   cur;
  logic            task_start, snap_v, rest_v;
  logic [SW-1:0]   snap_s, rest_s;
  logic [XLEN-1:0] waddr_aligned, viol_addr;
  logic            own_viol;
  logic [19:0]     tsize;

  assign bus_req       = mem_valid && mem_store && running && !stall;
  assign mem_ready     = running && !stall && (!mem_store || bus_gnt);
  assign acc_valid     = mem_valid && mem_ready;
  assign is_load       = acc_valid && !mem_store;
  assign waddr_aligned = {mem_addr[XLEN-1:2], 2'b00};
  assign viol_addr     = {det_addr[XLEN-1:2], 2'b00};
  assign own_viol      = det_valid && |(det_mask & (NT'({TPC{1'b1}}) << (CPU_ID * TPC)));

  dep_predictor #(
    .CAB_ENTRIES(CAB_ENTRIES), .CPT_ENTRIES(CPT_ENTRIES), .XT_ENTRIES(XT_ENTRIES),
    .META_ENTRIES(META_ENTRIES), .META_CBITS(META_CBITS)
  ) u_pred (
    .clk, .rst_n,
    .q_valid   (is_load),
    .q_pc      (mem_pc),
    .q_addr    (waddr_aligned),
    .pred      (pred),
    .pred_addr (pred_a),
    .pred_pc   (pred_p),
    .exp_valid (is_load && acc_exposed),
    .exp_addr  (waddr_aligned),
    .exp_pc    (mem_pc),
    .viol_valid(own_viol),
    .viol_addr (viol_addr)
  );

  ckpt_policy #(.CP_MAX(CP_MAX), .C(C_THRESH), .IW(3), .SIZE_W(20)) u_policy (
    .clk, .rst_n,
    .task_start(task_start),
    .cp        (cur),
    .inst_count(ret_count),
    .pred      (is_load && pred),
    .do_ckpt   (do_ckpt),
    .size      (tsize)
  );

  ckpt_controller #(.CPU_ID(CPU_ID)) u_ctrl (
    .clk, .rst_n,
    .start_valid, .start_pc, .start_sp, .idle,
    .ld_valid      (is_load),
    .ld_pc         (mem_pc),
    .do_ckpt       (do_ckpt),
    .commit_instr  (commit_instr),
    .alloc_fail    (acc_fail),
    .cur           (cur),
    .run_tid       (cur_tid),
    .acc_tid       (acc_tid),
    .acc_has_parent(acc_has_parent),
    .acc_parent    (acc_parent),
    .running       (running),
    .stall         (stall),
    .cur_is_head   (cur_is_head),
    .ins_valid, .ins_tid, .ins_parent, .fin_mask, .req_restart,
    .commit_valid, .commit_tid, .restart_mask, .kill_mask,
    .snap_valid    (snap_v),
    .snap_slot     (snap_s),
    .rest_valid    (rest_v),
    .rest_slot     (rest_s),
    .redirect_valid, .redirect_pc, .redirect_sp,
    .task_start    (task_start)
  );

  shadow_regfile #(.NREGS(NREGS), .XLEN(XLEN), .NSNAP(CP_MAX)) u_rf (
    .clk, .rst_n,
    .we        (rf_we),
    .waddr     (rf_waddr),
    .wdata     (rf_wdata),
    .raddr_a   (rf_raddr_a),
    .rdata_a   (rf_rdata_a),
    .raddr_b   (rf_raddr_b),
    .rdata_b   (rf_rdata_b),
    .snap_valid(snap_v),
    .snap_slot (snap_s),
    .rest_valid(rest_v),
    .rest_slot (rest_s)
  );

  spec_line_state #(.SETS(L1_SETS), .WAYS(L1_WAYS), .LINE_WORDS(8), .MEM_OPT(MEM_OPT)) u_vers (
    .clk, .rst_n,
    .acc_valid     (acc_valid),
    .acc_store     (mem_store),
    .acc_addr      (waddr_aligned),
    .acc_tid       (acc_tid),
    .acc_has_parent(acc_has_parent),
    .acc_parent    (acc_parent),
    .acc_exposed   (acc_exposed),
    .acc_alloc_fail(acc_fail),
    .acc_shared    (acc_shared),
    .snp_addr      (snp_addr),
    .snp_exposed   (snp_exposed),
    .commit_mask   (commit_mask),
    .discard_mask  (restart_mask | kill_mask)
  );

  assign ev_pred       = is_load && pred;
  assign ev_ckpt       = ins_valid;
  assign ev_shared     = acc_shared;
  assign ev_alloc_fail = acc_fail;
  assign ev_rewind     = rest_v;
  assign ev_stall      = stall;
endmodule
