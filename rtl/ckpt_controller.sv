// Checkpoint controller of one processor. A processor runs one spawned task
// at a time, plus the checkpoints of that task: a checkpoint is a new task,
// created by hardware, that is the immediate successor of the task it
// checkpoints and is pinned to the same processor. The chain uses local
// slots 0 (the spawned task) to CP_MAX; the global task slot is
// CPU_ID*TPC + local slot. The running task is always the newest slot, cur.
// Checkpoint (do_ckpt, in the cycle the predicted load is presented): the
// load and everything after it belong to slot cur+1, so acc_tid switches in
// that same cycle; the current register file is copied into shadow copy cur,
// the checkpointed task is marked done and the new slot is inserted in the
// order list right after it.
// Squash: the lowest own slot named in restart_mask/kill_mask decides. A
// restart of slot k rewinds to it: slots above k are dropped (they are its
// children and are killed in the same chain), k becomes the running task, the
// core is redirected to the PC the slot began at, and for k >= 1 the register
// file is restored from shadow copy k-1. Slot 0 restarts with only the PC and
// SP it was spawned with (spawned tasks get no live registers). A kill of
// slot 0 ends the chain. A task restarted three times stalls until it is the
// head (non-speculative), to stop it wasting energy.
// A failed version allocation asks the squash unit to restart the running
// task (the most speculative one on this processor), unless it is the head.
// Commit instruction: the running task is marked done; the processor becomes
// idle when every slot of its chain has committed.
// Outputs indexed by global task slot (fin_mask, req_restart) and task ids
// are full width so they can be OR-ed across processors; the bits belonging
// to other processors' slots, and the upper id bits that a given CPU_ID can
// never reach, are constant by construction.
module ckpt_controller
  import tls_ckpt_pkg::*;
#(
  parameter int unsigned CPU_ID = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  // spawn onto this processor
  input  logic            start_valid,
  input  logic [XLEN-1:0] start_pc,
  input  logic [XLEN-1:0] start_sp,
  output logic            idle,
  // core events
  input  logic            ld_valid,        // a load is presented this cycle
  input  logic [XLEN-1:0] ld_pc,
  input  logic            do_ckpt,         // policy decision for that load
  input  logic            commit_instr,    // core reached the task's commit instruction
  input  logic            alloc_fail,      // version allocation failed for this access
  // task identity
  output logic [$clog2(TPC)-1:0] cur,      // running slot = checkpoints placed
  output tid_t            run_tid,         // running slot as a task slot number
  output tid_t            acc_tid,         // task of this cycle's access
  output logic            acc_has_parent,
  output tid_t            acc_parent,
  output logic            running,
  output logic            stall,
  input  logic            cur_is_head,
  // order list
  output logic            ins_valid,
  output tid_t            ins_tid,
  output tid_t            ins_parent,
  output logic [NT-1:0]   fin_mask,
  output logic [NT-1:0]   req_restart,
  input  logic            commit_valid,
  input  tid_t            commit_tid,
  input  logic [NT-1:0]   restart_mask,
  input  logic [NT-1:0]   kill_mask,
  // register file and core redirection
  output logic            snap_valid,
  output logic [$clog2(CP_MAX)-1:0] snap_slot,
  output logic            rest_valid,
  output logic [$clog2(CP_MAX)-1:0] rest_slot,
  output logic            redirect_valid,
  output logic [XLEN-1:0] redirect_pc,
  output logic [XLEN-1:0] redirect_sp,
  output logic            task_start       // counter restart for the policy
);
  localparam int unsigned LW   = $clog2(TPC);
  localparam int unsigned SW   = $clog2(CP_MAX);
  localparam int unsigned BASE = CPU_ID * TPC;

  function automatic tid_t gtid(input logic [LW-1:0] k);
    return tid_t'(BASE) + tid_t'(k);
  endfunction

  logic [TPC-1:0]  live;
  logic [1:0]      rcount [TPC];
  logic [XLEN-1:0] slot_pc [TPC];
  logic [XLEN-1:0] sp0;

  // squash decision for this processor
  logic           sq_hit, sq_restart;
  logic [LW-1:0]  sq_slot;
  always_comb begin
    sq_hit = 1'b0;  sq_restart = 1'b0;  sq_slot = '0;
    for (int k = TPC - 1; k >= 0; k--) begin
      if (live[k] && (restart_mask[gtid(LW'(k))] || kill_mask[gtid(LW'(k))])) begin
        sq_hit     = 1'b1;
        sq_slot    = LW'(k);
        sq_restart = restart_mask[gtid(LW'(k))];
      end
    end
  end

  logic ckpt_go;
  assign idle     = !(|live);
  assign stall    = running && (rcount[cur] == 2'd3) && !cur_is_head;
  assign ckpt_go  = do_ckpt && ld_valid && running && !stall && !sq_hit &&
                    (cur < LW'(CP_MAX));

  assign run_tid        = gtid(cur);
  assign acc_tid        = ckpt_go ? gtid(cur + 1'b1) : gtid(cur);
  assign acc_has_parent = ckpt_go || (cur != '0);
  assign acc_parent     = ckpt_go ? gtid(cur) : gtid(cur - 1'b1);

  assign ins_valid  = ckpt_go;
  assign ins_tid    = gtid(cur + 1'b1);
  assign ins_parent = gtid(cur);
  assign snap_valid = ckpt_go;
  assign snap_slot  = SW'(cur);

  always_comb begin
    fin_mask = '0;
    if (running && !sq_hit && (ckpt_go || commit_instr)) fin_mask[gtid(cur)] = 1'b1;
    req_restart = '0;
    if (alloc_fail && running && !cur_is_head && !sq_hit) req_restart[acc_tid] = 1'b1;
  end

  // rewind outputs
  always_comb begin
    rest_valid     = sq_hit && sq_restart && (sq_slot != '0);
    rest_slot      = SW'(sq_slot - 1'b1);
    redirect_valid = sq_hit && sq_restart;
    redirect_pc    = slot_pc[sq_slot];
    redirect_sp    = sp0;
    task_start     = start_valid || (sq_hit && sq_restart);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      live    <= '0;
      cur     <= '0;
      running <= 1'b0;
      sp0     <= '0;
      for (int k = 0; k < TPC; k++) begin
        rcount[k]  <= '0;
        slot_pc[k] <= '0;
      end
    end else begin
      if (commit_valid && commit_tid >= tid_t'(BASE) && commit_tid < tid_t'(BASE + TPC))
        live[LW'(commit_tid - tid_t'(BASE))] <= 1'b0;
      if (start_valid && idle) begin
        live       <= TPC'(1);
        cur        <= '0;
        running    <= 1'b1;
        slot_pc[0] <= start_pc;
        sp0        <= start_sp;
        rcount[0]  <= '0;
      end else if (sq_hit) begin
        for (int k = 0; k < TPC; k++)
          if (LW'(k) > sq_slot || (LW'(k) == sq_slot && !sq_restart)) live[k] <= 1'b0;
        if (sq_restart) begin
          cur     <= sq_slot;
          running <= 1'b1;
          if (rcount[sq_slot] != 2'd3) rcount[sq_slot] <= rcount[sq_slot] + 1'b1;
        end else begin
          // the slot and everything after it is gone; older slots are done
          running <= 1'b0;
          if (sq_slot != '0) cur <= sq_slot - 1'b1;
        end
      end else if (ckpt_go) begin
        cur                  <= cur + 1'b1;
        live[cur + 1'b1]     <= 1'b1;
        rcount[cur + 1'b1]   <= '0;
        slot_pc[cur + 1'b1]  <= ld_pc;
      end else if (commit_instr && running) begin
        running <= 1'b0;
      end
    end
  end
endmodule
