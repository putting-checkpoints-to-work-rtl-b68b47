// Directed test of squash_unit with hand-built speculation orders:
// violation detection only towards more speculative readers, the
// violation-to-squash latency, killing of tasks spawned by squashed tasks,
// restart only on time overlap, and the overlap check against every squashed
// task, not only the violated one (a task that ended before the violated task
// started must still restart if it overlaps a restarted successor).
module tb_squash_unit;
  import tls_ckpt_pkg::*;
  logic clk = 0, rst_n = 0;
  task_entry_t order [NT];
  logic [TID_W:0] pos_of [NT];
  logic [NT-1:0] valid_mask, st_exposed, req_restart, det_mask, restart_mask, kill_mask;
  logic st_valid, det_valid, apply_valid;
  tid_t st_tid;
  logic [XLEN-1:0] st_addr, det_addr;
  int checks = 0, failures = 0;

  squash_unit dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s", what); end
  endtask

  // build the order: each row is {tid, parent (-1 none), start, end, done}
  task automatic set_order(input int rows[$][5]);
    valid_mask = '0;
    for (int k = 0; k < NT; k++) begin order[k] = '0; pos_of[k] = '0; end
    foreach (rows[k]) begin
      order[k] = '{valid: 1'b1, tid: tid_t'(rows[k][0]), has_parent: rows[k][1] >= 0,
                   parent: tid_t'(rows[k][1] < 0 ? 0 : rows[k][1]),
                   start_ts: ts_t'(rows[k][2]), end_ts: ts_t'(rows[k][3]), done: rows[k][4] != 0};
      pos_of[rows[k][0]] = (TID_W+1)'(k);
      valid_mask[rows[k][0]] = 1'b1;
    end
  endtask

  // store by task s hitting exposed reads of the tasks in m; wait for the squash
  task automatic store_and_wait(input int s, input logic [NT-1:0] m, output int lat,
                                output logic [NT-1:0] rm, output logic [NT-1:0] km);
    @(negedge clk);
    st_valid = 1; st_tid = tid_t'(s); st_exposed = m; st_addr = 32'h1234;
    @(negedge clk);
    st_valid = 0; st_exposed = '0;
    lat = 1;
    while (!apply_valid && lat < 100) begin @(negedge clk); lat++; end
    rm = restart_mask; km = kill_mask;
  endtask

  initial begin
    int lat;
    logic [NT-1:0] rm, km;
    st_valid = 0; st_tid = '0; st_addr = '0; st_exposed = '0; req_restart = '0;
    set_order('{{1, -1, 0, 0, 0}});
    repeat (2) @(posedge clk); rst_n = 1;

    // Case 1: 1 (head) 2 (child of 1) 3 (checkpoint of 2) 4 (child of 1, ended
    // before 2 started) 5 (child of 4, running)
    set_order('{{1, -1, 0, 0, 0}, {2, 1, 10, 50, 1}, {3, 2, 30, 0, 0},
                {4, 1, 5, 8, 1}, {5, 4, 6, 0, 0}});
    // a store by 5 to a word read by 2 is no violation (2 is older)
    @(negedge clk); st_valid = 1; st_tid = 5; st_exposed = NT'(1) << 2; #1;
    @(negedge clk); st_valid = 0; st_exposed = '0; #1;
    chk(det_valid, 0, "store by a successor is not a violation");
    repeat (15) @(negedge clk);
    chk(apply_valid, 0, "nothing squashed");
    store_and_wait(1, NT'(1) << 2, lat, rm, km);
    chk(lat == VIOL_LAT, 1, "violation to squash latency");
    if (lat != VIOL_LAT) $display("latency %0d", lat);
    chk(rm == ((NT'(1) << 2) | (NT'(1) << 5)), 1, "restart set case 1");
    chk(km == (NT'(1) << 3), 1, "kill set case 1");

    // Case 2: 1 (head) 2 (started at 40, running) 6 (child of 1, started 20,
    // running) 7 (child of 1, ended at 25): 7 overlaps only with 6
    set_order('{{1, -1, 0, 0, 0}, {2, 1, 40, 0, 0}, {6, 1, 20, 0, 0}, {7, 1, 15, 25, 1}});
    store_and_wait(1, NT'(1) << 2, lat, rm, km);
    chk(rm == ((NT'(1) << 2) | (NT'(1) << 6) | (NT'(1) << 7)), 1, "overlap with a restarted successor");
    chk(km == '0, 1, "no kills case 2");

    // Case 3: same order but 7 ended before every squashed task started
    set_order('{{1, -1, 0, 0, 0}, {2, 1, 40, 0, 0}, {6, 1, 20, 0, 0}, {7, 1, 5, 12, 1}});
    store_and_wait(1, NT'(1) << 2, lat, rm, km);
    chk(rm == ((NT'(1) << 2) | (NT'(1) << 6)), 1, "no overlap, no restart");

    // Case 4: restart request from a failed allocation, checkpoint chain 2->3->8
    set_order('{{1, -1, 0, 0, 0}, {2, 1, 10, 20, 1}, {3, 2, 20, 30, 1}, {8, 3, 30, 0, 0}});
    @(negedge clk); req_restart = NT'(1) << 3;
    @(negedge clk); req_restart = '0;
    lat = 1;
    while (!apply_valid && lat < 100) begin @(negedge clk); lat++; end
    chk(restart_mask == (NT'(1) << 3) && kill_mask == (NT'(1) << 8), 1, "rewind to a checkpoint kills its checkpoint");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
