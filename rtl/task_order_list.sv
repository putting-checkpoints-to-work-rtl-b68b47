// Global speculation order of all tasks (spawned tasks and checkpoints).
// Out-of-order spawn means a new task is always placed immediately after the
// task that created it: a spawned child directly follows its parent, ahead of
// any children the parent spawned earlier, and a checkpoint directly follows
// the task it checkpoints. Rather than splitting task-ID ranges, this list
// keeps a precedence matrix over task slots, prec[i][j] = 1 when task i is
// less speculative than task j, so that inserting, removing and one insert per
// processor in the same cycle are all single-cycle updates. For every slot it
// also keeps the parent, the start timestamp (cycle the task last began), the
// end timestamp and a done flag (commit instruction reached or checkpointed).
// The head (least speculative valid task) commits once it is done: commit
// pulses for one cycle and the slot is freed. Killed tasks are removed;
// restarted ones get a new start time. Removing a task clears the parent link
// of its children, so a reused slot is never taken for an old parent.
// Outputs: the tasks sorted by position (order[0] is the head) and the
// position of every slot, both combinational from the registered state.
module task_order_list
  import tls_ckpt_pkg::*;
#(
  parameter int unsigned NPORT = NCPU
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ts_t              now,
  // insertion, one port per processor
  input  logic [NPORT-1:0] ins_valid,
  input  logic [NPORT-1:0] ins_root,      // no parent: append as most speculative
  input  tid_t             ins_tid    [NPORT],
  input  tid_t             ins_parent [NPORT],
  // state changes by slot
  input  logic [NT-1:0]    fin_mask,      // task reached its end
  input  logic [NT-1:0]    restart_mask,  // task restarts now
  input  logic [NT-1:0]    kill_mask,     // task removed
  // commit
  output logic             commit_valid,
  output tid_t             commit_tid,
  // views
  output task_entry_t      order  [NT],   // by position, head first
  output logic [TID_W:0]   pos_of [NT],   // position of each slot
  output logic [NT-1:0]    valid_mask,
  output logic [TID_W:0]   count
);
  logic [NT-1:0]   prec [NT];
  logic [NT-1:0]   vld, done, has_par;
  tid_t            par   [NT];
  ts_t             st    [NT];
  ts_t             et    [NT];

  assign valid_mask = vld;

  // positions and sorted view
  always_comb begin
    count = '0;
    for (int j = 0; j < NT; j++) begin
      pos_of[j] = '0;
      for (int i = 0; i < NT; i++)
        if (vld[i] && prec[i][j]) pos_of[j] = pos_of[j] + 1'b1;
      if (vld[j]) count = count + 1'b1;
    end
    for (int k = 0; k < NT; k++) begin
      order[k] = '0;
      for (int j = 0; j < NT; j++)
        if (vld[j] && pos_of[j] == (TID_W+1)'(k))
          order[k] = '{valid: 1'b1, tid: tid_t'(j), has_parent: has_par[j], parent: par[j],
                       start_ts: st[j], end_ts: et[j], done: done[j]};
    end
  end

  assign commit_valid = order[0].valid && order[0].done;
  assign commit_tid   = order[0].tid;

  logic [NT-1:0] remove;
  always_comb begin
    remove = kill_mask & vld;
    if (commit_valid) remove[commit_tid] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;  done <= '0;  has_par <= '0;
      for (int i = 0; i < NT; i++) begin
        prec[i] <= '0;  par[i] <= '0;  st[i] <= '0;  et[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NT; i++) begin
        if (remove[i]) vld[i] <= 1'b0;
        if (fin_mask[i] && vld[i]) begin
          done[i] <= 1'b1;  et[i] <= now;
        end
        if (restart_mask[i] && vld[i] && !remove[i]) begin
          done[i] <= 1'b0;  st[i] <= now;
        end
        if (has_par[i] && remove[par[i]]) has_par[i] <= 1'b0;
      end
      for (int p = 0; p < NPORT; p++) begin
        if (ins_valid[p]) begin
          automatic int n = int'(ins_tid[p]);
          automatic int a = int'(ins_parent[p]);
          vld[n] <= 1'b1;  done[n] <= 1'b0;  st[n] <= now;  et[n] <= now;
          has_par[n] <= !ins_root[p] && vld[a] && !remove[a];
          par[n] <= ins_parent[p];
          for (int j = 0; j < NT; j++) begin
            // relation of the new task to every existing task
            prec[n][j] <= ins_root[p] ? 1'b0 : (prec[a][j] && j != a);
            prec[j][n] <= ins_root[p] ? vld[j] : (prec[j][a] || j == a);
          end
          // relation to tasks inserted by the other ports in the same cycle
          for (int q = 0; q < NPORT; q++) begin
            if (q != p && ins_valid[q]) begin
              automatic int m = int'(ins_tid[q]);
              automatic int b = int'(ins_parent[q]);
              automatic logic nm = ins_root[p] ? 1'b0 :
                                   ins_root[q] ? 1'b1 : prec[a][b];
              prec[n][m] <= nm;
              prec[m][n] <= !nm;
            end
          end
          prec[n][n] <= 1'b0;
        end
      end
    end
  end
endmodule
