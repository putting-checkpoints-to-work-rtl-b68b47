// Squash unit: detects dependence violations and propagates kills and
// restarts through the speculation order.
// Detection: every store is broadcast; each cache reports which tasks hold an
// exposed read of the stored word, and those more speculative than the
// storing task are violated. Allocation failures also request a restart of the
// failing task. Requests wait VIOL_LAT cycles (violation to kill/restart
// latency of the evaluated system) and are then served one at a time, least
// speculative first.
// Propagation (MODE = RST_TIMESTAMP, the default): walking from the violated
// task towards more speculative tasks, a task whose parent has been killed or
// restarted in this chain is killed (it was spawned by misspeculated
// execution); any other task is restarted only if it overlaps in time with the
// chain, i.e. it is still running or finished later than the earliest start
// time of every task killed or restarted so far; otherwise it is left alone.
// The earliest start time covers all squashed tasks, not only the violated
// one, because a task may have consumed a value forwarded from any of them.
// RST_PARENT restarts every non-killed successor; RST_BASE kills all of them.
// Interface: store snoop inputs are sampled combinationally; det_* reports a
// detected dependence violation one cycle later (predictor training);
// restart_mask/kill_mask are one-cycle pulses, by task slot. One chain is
// applied per VIOL_LAT window opening, with one idle cycle after each so the
// order list is updated before the next chain is evaluated.
module squash_unit
  import tls_ckpt_pkg::*;
#(
  parameter restart_mode_e MODE = RST_TIMESTAMP,
  parameter int unsigned   LAT  = VIOL_LAT
) (
  input  logic            clk,
  input  logic            rst_n,
  input  task_entry_t     order  [NT],     // tasks by position, head first
  input  logic [TID_W:0]  pos_of [NT],
  input  logic [NT-1:0]   valid_mask,
  // store snoop
  input  logic            st_valid,
  input  tid_t            st_tid,
  input  logic [XLEN-1:0] st_addr,
  input  logic [NT-1:0]   st_exposed,      // tasks with an exposed read of the word
  // restart requests from failed allocations
  input  logic [NT-1:0]   req_restart,
  // detected dependence violations (registered)
  output logic            det_valid,
  output logic [NT-1:0]   det_mask,
  output logic [XLEN-1:0] det_addr,
  // squash actions
  output logic            apply_valid,
  output logic [NT-1:0]   restart_mask,
  output logic [NT-1:0]   kill_mask
);
  localparam int unsigned TW = $clog2(LAT);

  logic [NT-1:0] viol_now;
  logic [NT-1:0] pend;
  logic [TW-1:0] timer [NT];

  always_comb begin
    viol_now = '0;
    if (st_valid && valid_mask[st_tid])
      for (int t = 0; t < NT; t++)
        if (st_exposed[t] && valid_mask[t] && pos_of[t] > pos_of[st_tid]) viol_now[t] = 1'b1;
  end

  // pick the least speculative request whose latency has elapsed
  logic            sel_valid;
  logic [TID_W:0]  sel_pos;
  always_comb begin
    sel_valid = 1'b0;
    sel_pos   = '0;
    for (int k = NT - 1; k >= 0; k--)
      if (order[k].valid && pend[order[k].tid] && timer[order[k].tid] == '0) begin
        sel_valid = 1'b1;
        sel_pos   = (TID_W+1)'(k);
      end
  end

  // kill/restart chain from the selected position
  logic [NT-1:0] c_restart, c_kill, in_merge;
  ts_t           earliest;
  always_comb begin
    c_restart = '0;
    c_kill    = '0;
    in_merge  = '0;
    earliest  = '0;
    for (int k = 0; k < NT; k++) begin
      if (sel_valid && order[k].valid && (TID_W+1)'(k) >= sel_pos) begin
        automatic tid_t t       = order[k].tid;
        automatic logic par_in  = order[k].has_parent && in_merge[order[k].parent];
        automatic logic overlap = !order[k].done || (order[k].end_ts > earliest);
        if ((TID_W+1)'(k) == sel_pos) begin
          c_restart[t] = 1'b1;
        end else begin
          unique case (MODE)
            RST_BASE:   c_kill[t] = 1'b1;
            RST_PARENT: if (par_in) c_kill[t] = 1'b1; else c_restart[t] = 1'b1;
            default:    if (par_in) c_kill[t] = 1'b1; else if (overlap) c_restart[t] = 1'b1;
          endcase
        end
        if (c_kill[t] || c_restart[t]) begin
          if (!(|in_merge) || order[k].start_ts < earliest) earliest = order[k].start_ts;
          in_merge[t] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend         <= '0;
      for (int t = 0; t < NT; t++) timer[t] <= '0;
      det_valid    <= 1'b0;
      det_mask     <= '0;
      det_addr     <= '0;
      apply_valid  <= 1'b0;
      restart_mask <= '0;
      kill_mask    <= '0;
    end else begin
      det_valid <= |viol_now;
      det_mask  <= viol_now;
      det_addr  <= st_addr;
      apply_valid  <= 1'b0;
      restart_mask <= '0;
      kill_mask    <= '0;
      for (int t = 0; t < NT; t++) begin
        if (pend[t] && timer[t] != '0) timer[t] <= timer[t] - 1'b1;
        if (!valid_mask[t]) pend[t] <= 1'b0;
        if ((viol_now[t] || req_restart[t]) && valid_mask[t] && !pend[t]) begin
          pend[t]  <= 1'b1;
          timer[t] <= TW'(LAT - 2);
        end
      end
      if (sel_valid && !apply_valid) begin
        apply_valid  <= 1'b1;
        restart_mask <= c_restart;
        kill_mask    <= c_kill;
        for (int t = 0; t < NT; t++)
          if (in_merge[t]) pend[t] <= 1'b0;
      end
    end
  end
endmodule
