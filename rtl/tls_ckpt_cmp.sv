// Checkpointed thread-level speculation support for a 4-processor chip
// multiprocessor. Speculative tasks run in parallel; when a store of a less
// speculative task hits a word a more speculative task has already read, the
// reader must be squashed. Instead of always rolling a task back to its start,
// each processor places checkpoints (hardware-spawned successor tasks, pinned
// to the same processor, with a register snapshot) right before loads that a
// dependence predictor flags, so a violation only rewinds to the nearest
// checkpoint. Kills and restarts are propagated selectively: only tasks
// spawned by squashed execution are killed, and of the rest only those that
// overlap in time with squashed tasks are restarted.
// Structure: NCPU cpu_ckpt_unit (predictor, policy, controller, shadow
// register file, speculative cache state), a task_order_list holding the
// speculation order, a squash_unit, a store bus granting one store per cycle
// (lowest processor number first) that is snooped by all caches, and spawn
// handling: a spawn request from a running task takes the lowest-numbered
// idle processor, is inserted in the order right after its parent at once,
// and the child starts SPAWN_LAT cycles later. A spawn that finds no idle
// processor, or coincides with a checkpoint of the same processor, is refused
// (spawn_ack low) and the core runs the code itself. boot_* starts the first,
// non-speculative task on processor 0 when no task exists.
// Core-side ports are arrays indexed by processor; the ev_* outputs count
// mechanisms for monitoring. Widths and handshakes are this design's own.
module tls_ckpt_cmp
  import tls_ckpt_pkg::*;
#(
  parameter int unsigned   SPAWN_LAT = 12,
  parameter restart_mode_e RST_MODE  = RST_TIMESTAMP,
  parameter bit            MEM_OPT   = 1'b1,
  parameter int unsigned   L1_SETS   = 128
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            boot_valid,
  input  logic [XLEN-1:0] boot_pc,
  input  logic [XLEN-1:0] boot_sp,
  // core interfaces
  input  logic [2:0]      ret_count    [NCPU],
  input  logic            mem_valid    [NCPU],
  input  logic            mem_store    [NCPU],
  input  logic [XLEN-1:0] mem_pc       [NCPU],
  input  logic [XLEN-1:0] mem_addr     [NCPU],
  output logic            mem_ready    [NCPU],
  input  logic            commit_instr [NCPU],
  input  logic            spawn_req    [NCPU],
  input  logic [XLEN-1:0] spawn_pc     [NCPU],
  input  logic [XLEN-1:0] spawn_sp     [NCPU],
  output logic            spawn_ack    [NCPU],
  input  logic            rf_we        [NCPU],
  input  logic [$clog2(NREGS)-1:0] rf_waddr [NCPU],
  input  logic [XLEN-1:0] rf_wdata     [NCPU],
  input  logic [$clog2(NREGS)-1:0] rf_raddr [NCPU],
  output logic [XLEN-1:0] rf_rdata     [NCPU],
  output logic            start_valid  [NCPU],   // a task begins on this core
  output logic [XLEN-1:0] start_pc     [NCPU],
  output logic [XLEN-1:0] start_sp     [NCPU],
  output logic            redirect_valid [NCPU],
  output logic [XLEN-1:0] redirect_pc  [NCPU],
  output logic [XLEN-1:0] redirect_sp  [NCPU],
  output logic            stall        [NCPU],
  output logic            running      [NCPU],
  output logic            idle         [NCPU],
  output tid_t            cur_tid      [NCPU],
  // system status and events
  output logic            commit_valid,
  output tid_t            commit_tid,
  output logic            squash_valid,
  output logic [NT-1:0]   squash_restart,
  output logic [NT-1:0]   squash_kill,
  output logic            violation,
  output logic [TID_W:0]  task_count,
  output logic            ev_pred      [NCPU],
  output logic            ev_ckpt      [NCPU],
  output logic            ev_shared    [NCPU],
  output logic            ev_alloc_fail[NCPU],
  output logic            ev_rewind    [NCPU],
  output logic            ev_stall     [NCPU]
);
  localparam int unsigned SLW = $clog2(SPAWN_LAT + 1);

  ts_t now;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;

  // ---------------- order list and squash unit
  task_entry_t    order [NT];
  logic [TID_W:0] pos_of [NT];
  logic [NT-1:0]  valid_mask, fin_all, req_all, exp_all, commit_mask;
  logic [NCPU-1:0] ins_v, ins_root;
  tid_t           ins_t [NCPU], ins_p [NCPU];
  logic           det_valid;
  logic [NT-1:0]  det_mask;
  logic [XLEN-1:0] det_addr;

  logic [NT-1:0]  u_fin [NCPU], u_req [NCPU], u_exp [NCPU];
  logic [NCPU-1:0] u_ins, bus_req, bus_gnt, idle_v;
  tid_t           u_ins_t [NCPU], u_ins_p [NCPU];

  // store bus
  logic            st_valid;
  tid_t            st_tid;
  logic [XLEN-1:0] st_addr;
  always_comb begin
    bus_gnt  = '0;
    st_valid = 1'b0;
    st_tid   = '0;
    st_addr  = '0;
    for (int c = NCPU - 1; c >= 0; c--)
      if (bus_req[c]) begin
        bus_gnt  = NCPU'(1) << c;
        st_valid = 1'b1;
        st_tid   = cur_tid[c];
        st_addr  = {mem_addr[c][XLEN-1:2], 2'b00};
      end
  end

  // spawn handling
  logic [NCPU-1:0] pend;
  logic [SLW-1:0]  pend_cnt [NCPU];
  logic [XLEN-1:0] pend_pc [NCPU], pend_sp [NCPU];
  logic            sp_go;
  int unsigned     sp_src, sp_dst;
  always_comb begin
    sp_go  = 1'b0;
    sp_src = 0;
    sp_dst = 0;
    for (int c = NCPU - 1; c >= 0; c--)
      if (spawn_req[c] && running[c] && !stall[c] && !u_ins[c]) begin
        sp_src = c;
        sp_go  = 1'b1;
      end
    if (sp_go) begin
      sp_go = 1'b0;
      for (int d = NCPU - 1; d >= 0; d--)
        if (idle_v[d] && !pend[d] && d != int'(sp_src)) begin
          sp_dst = d;
          sp_go  = 1'b1;
        end
    end
  end

  logic boot_go;
  assign boot_go = boot_valid && (task_count == '0) && idle_v[0] && !pend[0];

  always_comb begin
    for (int c = 0; c < NCPU; c++) begin
      spawn_ack[c] = sp_go && (sp_src == c);
      ins_v[c]     = u_ins[c] || (sp_go && sp_src == c) || (boot_go && c == 0);
      ins_root[c]  = boot_go && c == 0 && !u_ins[0];
      ins_t[c]     = u_ins[c] ? u_ins_t[c] :
                     (sp_go && sp_src == c) ? tid_t'(sp_dst * TPC) : tid_t'(0);
      ins_p[c]     = u_ins[c] ? u_ins_p[c] : cur_tid[c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= '0;
      for (int c = 0; c < NCPU; c++) begin
        pend_cnt[c] <= '0;  pend_pc[c] <= '0;  pend_sp[c] <= '0;
      end
    end else begin
      for (int c = 0; c < NCPU; c++) begin
        if (pend[c]) begin
          if (pend_cnt[c] != '0) pend_cnt[c] <= pend_cnt[c] - 1'b1;
          else pend[c] <= 1'b0;
          if (squash_valid && squash_kill[c * TPC]) pend[c] <= 1'b0;
        end
      end
      if (sp_go) begin
        pend[sp_dst]     <= 1'b1;
        pend_cnt[sp_dst] <= SLW'(SPAWN_LAT - 1);
        pend_pc[sp_dst]  <= spawn_pc[sp_src];
        pend_sp[sp_dst]  <= spawn_sp[sp_src];
      end
      if (boot_go && !u_ins[0]) begin
        pend[0]     <= 1'b1;
        pend_cnt[0] <= '0;
        pend_pc[0]  <= boot_pc;
        pend_sp[0]  <= boot_sp;
      end
    end
  end

  always_comb begin
    for (int c = 0; c < NCPU; c++) begin
      start_valid[c] = pend[c] && pend_cnt[c] == '0 && !(squash_valid && squash_kill[c * TPC]);
      start_pc[c]    = pend_pc[c];
      start_sp[c]    = pend_sp[c];
    end
  end

  always_comb begin
    fin_all = '0;  req_all = '0;  exp_all = '0;
    for (int c = 0; c < NCPU; c++) begin
      fin_all |= u_fin[c];
      req_all |= u_req[c];
      exp_all |= u_exp[c];
    end
    commit_mask = '0;
    if (commit_valid) commit_mask[commit_tid] = 1'b1;
  end

  task_order_list #(.NPORT(NCPU)) u_order (
    .clk, .rst_n, .now,
    .ins_valid   (ins_v),
    .ins_root    (ins_root),
    .ins_tid     (ins_t),
    .ins_parent  (ins_p),
    .fin_mask    (fin_all),
    .restart_mask(squash_valid ? squash_restart : '0),
    .kill_mask   (squash_valid ? squash_kill : '0),
    .commit_valid, .commit_tid,
    .order, .pos_of, .valid_mask,
    .count       (task_count)
  );

  squash_unit #(.MODE(RST_MODE), .LAT(VIOL_LAT)) u_squash (
    .clk, .rst_n,
    .order, .pos_of, .valid_mask,
    .st_valid, .st_tid, .st_addr,
    .st_exposed  (exp_all),
    .req_restart (req_all),
    .det_valid, .det_mask, .det_addr,
    .apply_valid (squash_valid),
    .restart_mask(squash_restart),
    .kill_mask   (squash_kill)
  );

  assign violation = det_valid;

  // ---------------- processors
  for (genvar c = 0; c < NCPU; c++) begin : g_cpu
    logic [XLEN-1:0] rdata_b_unused;
    cpu_ckpt_unit #(.CPU_ID(c), .MEM_OPT(MEM_OPT), .L1_SETS(L1_SETS)) u_cpu (
      .clk, .rst_n,
      .ret_count     (ret_count[c]),
      .mem_valid     (mem_valid[c]),
      .mem_store     (mem_store[c]),
      .mem_pc        (mem_pc[c]),
      .mem_addr      (mem_addr[c]),
      .mem_ready     (mem_ready[c]),
      .commit_instr  (commit_instr[c]),
      .rf_we         (rf_we[c]),
      .rf_waddr      (rf_waddr[c]),
      .rf_wdata      (rf_wdata[c]),
      .rf_raddr_a    (rf_raddr[c]),
      .rf_rdata_a    (rf_rdata[c]),
      .rf_raddr_b    ('0),
      .rf_rdata_b    (rdata_b_unused),
      .redirect_valid(redirect_valid[c]),
      .redirect_pc   (redirect_pc[c]),
      .redirect_sp   (redirect_sp[c]),
      .stall         (stall[c]),
      .running       (running[c]),
      .idle          (idle_v[c]),
      .cur_tid       (cur_tid[c]),
      .start_valid   (start_valid[c]),
      .start_pc      (start_pc[c]),
      .start_sp      (start_sp[c]),
      .bus_req       (bus_req[c]),
      .bus_gnt       (bus_gnt[c]),
      .cur_is_head   (order[0].valid && order[0].tid == cur_tid[c]),
      .ins_valid     (u_ins[c]),
      .ins_tid       (u_ins_t[c]),
      .ins_parent    (u_ins_p[c]),
      .fin_mask      (u_fin[c]),
      .req_restart   (u_req[c]),
      .commit_valid, .commit_tid, .commit_mask,
      .restart_mask  (squash_valid ? squash_restart : '0),
      .kill_mask     (squash_valid ? squash_kill : '0),
      .snp_addr      (st_addr),
      .snp_exposed   (u_exp[c]),
      .det_valid, .det_mask, .det_addr,
      .ev_pred       (ev_pred[c]),
      .ev_ckpt       (ev_ckpt[c]),
      .ev_shared     (ev_shared[c]),
      .ev_alloc_fail (ev_alloc_fail[c]),
      .ev_rewind     (ev_rewind[c]),
      .ev_stall      (ev_stall[c])
    );
    assign idle[c] = idle_v[c] && !pend[c];
  end
endmodule
