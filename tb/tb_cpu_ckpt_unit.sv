// Directed test of cpu_ckpt_unit (processor 0): a violation trains the
// predictor and restarts the task from its spawn PC; after enough
// instructions the same load is predicted and a checkpoint is placed; a
// violation of the checkpoint rewinds to the load with the register file
// restored; stores wait for the bus grant; snooped stores see the exposed
// read of the running checkpoint.
module tb_cpu_ckpt_unit;
  import tls_ckpt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] ret_count;
  logic mem_valid, mem_store, mem_ready, commit_instr, rf_we;
  logic [XLEN-1:0] mem_pc, mem_addr, rf_wdata, rf_rdata_a, rf_rdata_b;
  logic [4:0] rf_waddr, rf_raddr_a, rf_raddr_b;
  logic redirect_valid, stall, running, idle, start_valid, bus_req, bus_gnt, cur_is_head;
  logic [XLEN-1:0] redirect_pc, redirect_sp, start_pc, start_sp, snp_addr, det_addr;
  tid_t cur_tid, ins_tid, ins_parent, commit_tid;
  logic ins_valid, commit_valid, det_valid;
  logic [NT-1:0] fin_mask, req_restart, commit_mask, restart_mask, kill_mask, snp_exposed, det_mask;
  logic ev_pred, ev_ckpt, ev_shared, ev_alloc_fail, ev_rewind, ev_stall;
  int checks = 0, failures = 0;
  localparam logic [31:0] A = 32'h8000, P = 32'h1010;

  cpu_ckpt_unit #(.CPU_ID(0)) dut (.*);

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
  task automatic quiet();
    ret_count = 0; mem_valid = 0; mem_store = 0; commit_instr = 0; rf_we = 0;
    start_valid = 0; bus_gnt = 0; commit_valid = 0; restart_mask = '0; kill_mask = '0;
    det_valid = 0; det_mask = '0;
  endtask

  initial begin
    quiet(); mem_pc = 0; mem_addr = 0; rf_waddr = 0; rf_wdata = 0; rf_raddr_a = 8; rf_raddr_b = 0;
    start_pc = 32'h1000; start_sp = 32'h7000; cur_is_head = 0; commit_tid = 0; commit_mask = '0;
    snp_addr = 0; det_addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start_valid = 1;
    @(negedge clk); quiet(); #1; chk(running && cur_tid == 0, 1, "task running");
    rf_we = 1; rf_waddr = 8; rf_wdata = 111;
    @(negedge clk); quiet();
    mem_valid = 1; mem_pc = P; mem_addr = A; ret_count = 1; #1;
    chk(mem_ready, 1, "load accepted"); chk(ev_pred, 0, "untrained: no prediction");
    @(negedge clk); quiet();
    snp_addr = A; #1; chk(snp_exposed[0], 1, "exposed read of task 0 visible to snoop");
    // violation reported for task 0 on A, then its squash
    det_valid = 1; det_mask = NT'(1); det_addr = A;
    @(negedge clk); quiet();
    restart_mask = NT'(1); #1;
    chk(redirect_valid && redirect_pc == 32'h1000, 1, "restart to spawn PC");
    @(negedge clk); quiet();
    repeat (4) begin ret_count = 4; @(negedge clk); quiet(); end
    mem_valid = 1; mem_pc = P; mem_addr = A; ret_count = 1; #1;
    chk(ev_pred, 1, "trained load predicted");
    chk(ev_ckpt && ins_tid == 1 && ins_parent == 0, 1, "checkpoint placed");
    @(negedge clk); quiet(); #1;
    chk(cur_tid == 1, 1, "checkpoint running");
    rf_we = 1; rf_waddr = 8; rf_wdata = 222;
    @(negedge clk); quiet(); #1;
    chk(rf_rdata_a == 222, 1, "register written after checkpoint");
    restart_mask = NT'(1) << 1; #1;
    chk(redirect_valid && redirect_pc == P && ev_rewind, 1, "rewind to the checkpointed load");
    @(negedge clk); quiet(); #1;
    chk(rf_rdata_a == 111, 1, "register restored from the snapshot");
    // store waits for the bus
    mem_valid = 1; mem_store = 1; mem_addr = 32'h9000; #1;
    chk(bus_req && !mem_ready, 1, "store waits for grant");
    bus_gnt = 1; #1;
    chk(mem_ready, 1, "granted store proceeds");
    @(negedge clk); quiet();
    mem_valid = 1; mem_pc = P; mem_addr = A; ret_count = 1;
    @(negedge clk); quiet();
    snp_addr = A; #1; chk(snp_exposed == (NT'(1) << 1), 1, "checkpoint's exposed read visible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
