// End-to-end test of tls_ckpt_cmp at its default parameters. A behavioural
// core on each processor runs one iteration of a speculatively parallelised
// loop per task: it spawns the next iteration first, then runs a body.
// Even iterations are long: after a run of ALU work they read a shared
// read-only word Y, then the loop-carried variable X (load PC 0x100c), read Y
// again, and later store X three times. Odd iterations are short and only
// touch private data, except iteration 3, which reads five lines of one cache
// set. An even iteration's stores to X violate the next even iteration's read of X.
// The first such violation restarts a whole task and trains the predictor;
// from then on a checkpoint is placed before the load of X, so violations
// rewind to it. Every non-boot task start is checked to come exactly the
// 12-cycle spawn latency after a granted spawn. The test counts, and requires, each mechanism: spawns,
// predictions, checkpoints, violations, rewinds with register restore,
// kills, selective restarts of successors, successors left untouched thanks
// to the timestamp check, checkpoint loads served by the parent's version,
// failed allocations, the three-restart stall and in-order commit of all
// iterations. Registers are checked after every rewind against the values
// snapshotted when the checkpoint was placed.
module tb_tls_ckpt_cmp;
  import tls_ckpt_pkg::*;
  localparam int NITER = 12;
  localparam logic [31:0] PC0 = 32'h1000, X = 32'h8000, Y = 32'h8100;

  logic clk = 0, rst_n = 0;
  logic boot_valid;
  logic [XLEN-1:0] boot_pc, boot_sp;
  logic [2:0] ret_count [NCPU];
  logic mem_valid [NCPU], mem_store [NCPU], mem_ready [NCPU], commit_instr [NCPU];
  logic [XLEN-1:0] mem_pc [NCPU], mem_addr [NCPU];
  logic spawn_req [NCPU], spawn_ack [NCPU];
  logic [XLEN-1:0] spawn_pc [NCPU], spawn_sp [NCPU];
  logic rf_we [NCPU];
  logic [4:0] rf_waddr [NCPU], rf_raddr [NCPU];
  logic [XLEN-1:0] rf_wdata [NCPU], rf_rdata [NCPU];
  logic start_valid [NCPU], redirect_valid [NCPU], stall [NCPU], running [NCPU], idle [NCPU];
  logic [XLEN-1:0] start_pc [NCPU], start_sp [NCPU], redirect_pc [NCPU], redirect_sp [NCPU];
  tid_t cur_tid [NCPU];
  logic commit_valid, squash_valid, violation;
  tid_t commit_tid;
  logic [NT-1:0] squash_restart, squash_kill;
  logic [TID_W:0] task_count;
  logic ev_pred [NCPU], ev_ckpt [NCPU], ev_shared [NCPU], ev_alloc_fail [NCPU], ev_rewind [NCPU], ev_stall [NCPU];

  tls_ckpt_cmp dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_spawn = 0, n_pred = 0, n_ckpt = 0, n_viol = 0, n_rewind = 0, n_kill = 0, n_selrst = 0;
  int n_untouched = 0, n_shared = 0, n_afail = 0, n_stall = 0, n_commit = 0, n_regchk = 0;

  task automatic report();
    $display("spawns=%0d predictions=%0d checkpoints=%0d violations=%0d rewinds=%0d kills=%0d",
             n_spawn, n_pred, n_ckpt, n_viol, n_rewind, n_kill);
    $display("selective_restarts=%0d untouched=%0d shared_loads=%0d alloc_fails=%0d stall_cycles=%0d commits=%0d regchecks=%0d",
             n_selrst, n_untouched, n_shared, n_afail, n_stall, n_commit, n_regchk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    report();
    $finish;
  end

  // ---------------- behavioural cores
  typedef enum int {OP_SPAWN, OP_ALU, OP_LOAD, OP_STORE, OP_COMMIT} op_e;
  typedef struct { op_e op; int rep; logic [31:0] addr; } ins_t;

  function automatic ins_t prog(input int it, input int k);
    ins_t i = '{OP_COMMIT, 1, 0};
    if (k == 0) return '{OP_SPAWN, 1, 0};
    if (it % 2 == 0) begin
      case (k)
        1: i = '{OP_ALU, 30, 0};
        2: i = '{OP_LOAD, 1, Y};
        3: i = '{OP_LOAD, 1, X};
        4: i = '{OP_LOAD, 1, Y};
        5: i = '{OP_ALU, 25, 0};
        6: i = '{OP_STORE, 1, X};
        7: i = '{OP_ALU, 25, 0};
        8: i = '{OP_STORE, 1, X};
        9: i = '{OP_ALU, 25, 0};
        10: i = '{OP_STORE, 1, X};
        default: i = '{OP_COMMIT, 1, 0};
      endcase
    end else begin
      if (it == 3 && k >= 1 && k <= 5) i = '{OP_LOAD, 1, 32'h20000 + (k - 1) * 4096};
      else case (k)
        1: i = '{OP_ALU, 3, 0};
        2: i = '{OP_LOAD, 1, 32'h40000 + it * 64};
        default: i = '{OP_COMMIT, 1, 0};
      endcase
    end
    return i;
  endfunction

  bit   active [NCPU];
  int   iter [NCPU], pc_k [NCPU], rep_left [NCPU];
  int   tid_iter [NT];
  logic [31:0] snap_r8 [NT];
  int   last_commit_iter = -1;
  int   done_iters = 0;

  initial begin
    boot_valid = 0; boot_pc = PC0; boot_sp = 0;
    for (int c = 0; c < NCPU; c++) begin
      chk_tid[c] = -1; active[c] = 0; iter[c] = 0; pc_k[c] = 0; rep_left[c] = 0;
      ret_count[c] = 0; mem_valid[c] = 0; mem_store[c] = 0; mem_pc[c] = 0; mem_addr[c] = 0;
      commit_instr[c] = 0; spawn_req[c] = 0; spawn_pc[c] = 0; spawn_sp[c] = 0;
      rf_we[c] = 0; rf_waddr[c] = 0; rf_wdata[c] = 0; rf_raddr[c] = 8;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); boot_valid = 1;
    @(negedge clk); boot_valid = 0;
  end

  // drive each core at the falling edge, then settle and observe
  int chk_tid [NCPU];
  int cyc = 0, n_latchk = 0;
  bit ack_at [int];
  always @(negedge clk) if (rst_n) begin
    cyc++;
    // register state after a rewind must equal the snapshot of the checkpoint
    for (int c = 0; c < NCPU; c++) if (chk_tid[c] >= 0) begin
      checks++;
      n_regchk++;
      if (rf_rdata[c] !== snap_r8[chk_tid[c]]) begin
        failures++;
        $display("cpu %0d: r8=%0d after rewind, snapshot %0d", c, rf_rdata[c], snap_r8[chk_tid[c]]);
      end
      chk_tid[c] = -1;
    end
    for (int c = 0; c < NCPU; c++) begin
      automatic ins_t i = prog(iter[c], pc_k[c]);
      ret_count[c] = 0; mem_valid[c] = 0; mem_store[c] = 0; commit_instr[c] = 0;
      spawn_req[c] = 0; rf_we[c] = 0;
      if (active[c]) begin
        mem_pc[c] = PC0 + pc_k[c] * 4;
        case (i.op)
          OP_SPAWN:  begin spawn_req[c] = iter[c] < NITER - 1; spawn_pc[c] = PC0; spawn_sp[c] = iter[c] + 1; end
          OP_ALU:    begin
                       ret_count[c] = 1; rf_we[c] = 1;
                       rf_waddr[c] = (pc_k[c] < 3) ? 5'd7 : 5'd8;
                       rf_wdata[c] = iter[c] * 1000 + pc_k[c] * 10 + rep_left[c];
                     end
          OP_LOAD:   begin mem_valid[c] = 1; mem_addr[c] = i.addr; ret_count[c] = 1; end
          OP_STORE:  begin mem_valid[c] = 1; mem_store[c] = 1; mem_addr[c] = i.addr; ret_count[c] = 1; end
          OP_COMMIT: begin commit_instr[c] = 1; ret_count[c] = 1; end
        endcase
      end
    end
    #1;
    for (int c = 0; c < NCPU; c++) begin
      automatic ins_t i = prog(iter[c], pc_k[c]);
      if (ev_pred[c]) n_pred++;
      if (ev_shared[c]) n_shared++;
      if (ev_alloc_fail[c]) n_afail++;
      if (ev_stall[c]) n_stall++;
      if (ev_ckpt[c]) begin
        n_ckpt++;
        snap_r8[cur_tid[c] + 1] = rf_rdata[c];
        tid_iter[cur_tid[c] + 1] = iter[c];
      end
      if (start_valid[c]) begin
        // a spawned child starts exactly the spawn latency after the request
        if (c != 0) begin
          checks++; n_latchk++;
          if (!ack_at.exists(cyc - 12)) begin failures++; $display("cpu %0d: start not 12 cycles after a spawn", c); end
        end
        active[c] = 1; iter[c] = start_sp[c]; pc_k[c] = 0; rep_left[c] = 0;
        tid_iter[c * TPC] = start_sp[c];
      end else if (redirect_valid[c]) begin
        pc_k[c] = (redirect_pc[c] - PC0) / 4; rep_left[c] = 0; active[c] = 1;
        if (redirect_pc[c] != PC0) begin
          n_rewind++;
          for (int t = c * TPC + TPC - 1; t >= c * TPC; t--) if (squash_restart[t]) chk_tid[c] = t;
        end
      end else if (active[c] && !stall[c] && running[c]) begin
        automatic bit adv = 1;
        if (i.op == OP_SPAWN && spawn_req[c]) begin
          adv = spawn_ack[c];
          if (spawn_ack[c]) begin n_spawn++; ack_at[cyc] = 1; end
        end
        if ((i.op == OP_LOAD || i.op == OP_STORE) && !mem_ready[c]) adv = 0;
        if (i.op == OP_ALU) begin
          rep_left[c]++;
          adv = rep_left[c] >= i.rep;
        end
        if (adv) begin
          rep_left[c] = 0;
          if (i.op == OP_COMMIT) active[c] = 0;
          else pc_k[c]++;
        end
      end else if (active[c] && !running[c]) begin
        active[c] = 0;   // task killed
      end
    end
    if (violation) n_viol++;
    if (commit_valid) begin
      n_commit++;
      checks++;
      if (tid_iter[commit_tid] < last_commit_iter) begin
        failures++;
        $display("commit out of order: iteration %0d after %0d", tid_iter[commit_tid], last_commit_iter);
      end
      last_commit_iter = tid_iter[commit_tid];
    end
    if (squash_valid) begin
      automatic int vpos = NT;
      if (squash_kill != '0) n_kill++;
      for (int t = 0; t < NT; t++)
        if (squash_restart[t] && int'(dut.u_order.pos_of[t]) < vpos) vpos = dut.u_order.pos_of[t];
      for (int t = 0; t < NT; t++) if (dut.valid_mask[t] && int'(dut.u_order.pos_of[t]) > vpos) begin
        if (squash_restart[t]) n_selrst++;
        else if (!squash_kill[t]) n_untouched++;
      end
    end
  end

  initial begin
    wait (rst_n);
    wait (last_commit_iter == NITER - 1 && task_count == 0);
    repeat (5) @(posedge clk);
    checks++; if (n_spawn == 0)     begin failures++; $display("no spawn"); end
    checks++; if (n_pred == 0)      begin failures++; $display("no prediction"); end
    checks++; if (n_ckpt == 0)      begin failures++; $display("no checkpoint"); end
    checks++; if (n_viol == 0)      begin failures++; $display("no violation"); end
    checks++; if (n_rewind == 0)    begin failures++; $display("no rewind"); end
    checks++; if (n_kill == 0)      begin failures++; $display("no kill"); end
    checks++; if (n_selrst == 0)    begin failures++; $display("no selective restart"); end
    checks++; if (n_untouched == 0) begin failures++; $display("no untouched successor"); end
    checks++; if (n_shared == 0)    begin failures++; $display("no shared checkpoint load"); end
    checks++; if (n_afail == 0)     begin failures++; $display("no failed allocation"); end
    checks++; if (n_stall == 0)     begin failures++; $display("no restart-limit stall"); end
    checks++; if (n_regchk == 0)    begin failures++; $display("no register check"); end
    report();
    $finish;
  end
endmodule
