// Directed test of ckpt_controller for processor 1 (task slots 9..17):
// task start, checkpoint creation tagging the triggering load with the new
// slot, register snapshots, rewind to a checkpoint with register restore and
// PC redirection, the three-restart stall until the task is the head,
// restart requests on failed allocations, commit, and a kill of the chain.
module tb_ckpt_controller;
  import tls_ckpt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start_valid, idle, ld_valid, do_ckpt, commit_instr, alloc_fail;
  logic [XLEN-1:0] start_pc, start_sp, ld_pc, redirect_pc, redirect_sp;
  logic [3:0] cur;
  tid_t run_tid, acc_tid, acc_parent, ins_tid, ins_parent, commit_tid;
  logic acc_has_parent, running, stall, cur_is_head, ins_valid, commit_valid;
  logic [NT-1:0] fin_mask, req_restart, restart_mask, kill_mask;
  logic snap_valid, rest_valid, redirect_valid, task_start;
  logic [2:0] snap_slot, rest_slot;
  int checks = 0, failures = 0;

  ckpt_controller #(.CPU_ID(1)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic idle_inputs();
    start_valid = 0; ld_valid = 0; do_ckpt = 0; commit_instr = 0; alloc_fail = 0;
    commit_valid = 0; restart_mask = '0; kill_mask = '0;
  endtask

  initial begin
    idle_inputs(); start_pc = 0; start_sp = 0; ld_pc = 0; cur_is_head = 0; commit_tid = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); chk(idle, 1, "idle after reset");
    start_valid = 1; start_pc = 32'h400100; start_sp = 32'h7fff0000; #1;
    chk(task_start, 1, "start pulses task_start");
    @(negedge clk); idle_inputs(); #1;
    chk(running && run_tid == 9, 1, "running slot 9");
    // load with checkpoint decision
    ld_valid = 1; ld_pc = 32'h400140; do_ckpt = 1; #1;
    chk(acc_tid == 10 && acc_parent == 9 && acc_has_parent, 1, "load tagged with new checkpoint");
    chk(ins_valid && ins_tid == 10 && ins_parent == 9, 1, "checkpoint inserted after its parent");
    chk(snap_valid && snap_slot == 0, 1, "snapshot into shadow copy 0");
    chk(fin_mask == (NT'(1) << 9), 1, "checkpointed task finishes");
    @(negedge clk); idle_inputs();
    ld_valid = 1; ld_pc = 32'h400180; do_ckpt = 1; #1;
    chk(acc_tid == 11 && snap_slot == 1, 1, "second checkpoint");
    @(negedge clk); idle_inputs(); #1;
    chk(run_tid == 11 && cur == 2, 1, "running slot 11");
    // rewind to the first checkpoint (slot 10), its checkpoint 11 is killed
    for (int r = 0; r < 3; r++) begin
      restart_mask = NT'(1) << 10; kill_mask = NT'(1) << 11; #1;
      chk(redirect_valid && redirect_pc == 32'h400140, 1, "redirect to checkpoint PC");
      chk(rest_valid && rest_slot == 0, 1, "registers restored from shadow copy 0");
      @(negedge clk); idle_inputs(); #1;
      chk(run_tid == 10 && running, 1, "running checkpoint 10 again");
    end
    chk(stall, 1, "third restart stalls the task");
    cur_is_head = 1; #1;
    chk(stall, 0, "head task does not stall");
    cur_is_head = 0;
    // failed allocation while speculative requests a restart of the running task
    ld_valid = 1; alloc_fail = 1; cur_is_head = 1; #1;
    chk(req_restart == '0, 1, "head is not restarted for space");
    cur_is_head = 0; #1;
    chk(req_restart == (NT'(1) << 10), 1, "restart request for running task");
    @(negedge clk); idle_inputs();
    // commit instruction, then both slots commit
    commit_instr = 1; #1;
    chk(fin_mask == (NT'(1) << 10), 1, "commit instruction finishes task");
    @(negedge clk); idle_inputs(); #1;
    chk(!running && !idle, 1, "waiting to commit");
    commit_valid = 1; commit_tid = 9; @(negedge clk); idle_inputs();
    commit_valid = 1; commit_tid = 10; @(negedge clk); idle_inputs(); #1;
    chk(idle, 1, "idle after the chain commits");
    // new task, then killed
    start_valid = 1; start_pc = 32'h400200; @(negedge clk); idle_inputs();
    restart_mask = NT'(1) << 9; #1;
    chk(redirect_valid && redirect_pc == 32'h400200 && !rest_valid, 1, "slot 0 restart: PC only");
    @(negedge clk); idle_inputs();
    kill_mask = NT'(1) << 9; @(negedge clk); idle_inputs(); #1;
    chk(idle && !running, 1, "killed chain leaves processor idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
