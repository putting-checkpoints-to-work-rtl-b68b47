// Directed test of task_order_list: root insertion, out-of-order spawns
// (a newer child goes ahead of older ones), simultaneous insertions from two
// processors, checkpoint insertion, commit of the done head, kill removal,
// restart timestamps and clearing of parent links of committed parents.
module tb_task_order_list;
  import tls_ckpt_pkg::*;
  logic clk = 0, rst_n = 0;
  ts_t now;
  logic [NCPU-1:0] ins_valid, ins_root;
  tid_t ins_tid [NCPU], ins_parent [NCPU];
  logic [NT-1:0] fin_mask, restart_mask, kill_mask, valid_mask;
  logic commit_valid;
  tid_t commit_tid;
  task_entry_t order [NT];
  logic [TID_W:0] pos_of [NT];
  logic [TID_W:0] count;
  int checks = 0, failures = 0;

  task_order_list dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) now <= now + 1;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk_order(input int exp[$], input string what);
    bit ok = (count == exp.size());
    foreach (exp[k]) if (!order[k].valid || order[k].tid != exp[k] || pos_of[exp[k]] != k) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      $write("FAIL %s: got", what);
      for (int k = 0; k < int'(count); k++) $write(" %0d", order[k].tid);
      $display("");
    end
  endtask
  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic ins(input int port, input int t, input int p, input bit root);
    ins_valid[port] = 1; ins_tid[port] = tid_t'(t); ins_parent[port] = tid_t'(p); ins_root[port] = root;
  endtask
  task automatic step();
    @(negedge clk);
    ins_valid = '0; ins_root = '0; fin_mask = '0; restart_mask = '0; kill_mask = '0;
    #1;
  endtask

  initial begin
    ts_t t_restart;
    now = 0; ins_valid = '0; ins_root = '0; fin_mask = '0; restart_mask = '0; kill_mask = '0;
    for (int p = 0; p < NCPU; p++) begin ins_tid[p] = '0; ins_parent[p] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    ins(0, 0, 0, 1);                 step(); chk_order('{0}, "root");
    ins(0, 9, 0, 0);                 step(); chk_order('{0, 9}, "spawn");
    ins(0, 18, 0, 0);                step(); chk_order('{0, 18, 9}, "newer child ahead");
    ins(1, 10, 9, 0); ins(2, 27, 18, 0); step();
    chk_order('{0, 18, 27, 9, 10}, "two inserts in one cycle");
    chk(order[4].has_parent && order[4].parent == 9, 1, "checkpoint parent");
    chk(commit_valid, 0, "head not done");
    fin_mask[0] = 1'b1; fin_mask[9] = 1'b1;
    step();
    chk(commit_valid && commit_tid == 0, 1, "done head commits");
    chk(order[3].done && order[3].tid == 9, 1, "task 9 done");
    step();
    chk_order('{18, 27, 9, 10}, "after commit");
    chk(order[0].has_parent, 0, "parent link of committed parent cleared");
    kill_mask[27] = 1'b1; step();
    chk_order('{18, 9, 10}, "after kill");
    t_restart = now;
    restart_mask[9] = 1'b1; step();
    chk(order[1].done, 0, "restart clears done");
    chk(order[1].start_ts == t_restart, 1, "restart timestamp");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
