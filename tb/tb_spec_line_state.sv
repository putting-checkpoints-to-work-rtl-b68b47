// Directed test of spec_line_state on a small cache (4 sets, 2 ways):
// exposed-read marking and snoop reporting, protection by the task's own
// write, the checkpoint sharing optimisation, store allocation for a
// checkpoint, allocation failure when a set is full of versions, and freeing
// of versions on discard and commit.
module tb_spec_line_state;
  import tls_ckpt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic acc_valid, acc_store, acc_has_parent, acc_exposed, acc_alloc_fail, acc_shared;
  logic [31:0] acc_addr, snp_addr;
  tid_t acc_tid, acc_parent;
  logic [NT-1:0] snp_exposed, commit_mask, discard_mask;
  int checks = 0, failures = 0;

  spec_line_state #(.SETS(4), .WAYS(2), .LINE_WORDS(8), .MEM_OPT(1'b1)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // one access; returns exposed/fail/shared as seen in the access cycle
  task automatic acc(input logic st, input logic [31:0] a, input int t, input int par,
                     output logic e, output logic f, output logic s);
    @(negedge clk);
    acc_valid = 1; acc_store = st; acc_addr = a; acc_tid = tid_t'(t);
    acc_has_parent = par >= 0; acc_parent = tid_t'(par < 0 ? 0 : par);
    #1; e = acc_exposed; f = acc_alloc_fail; s = acc_shared;
    @(negedge clk); acc_valid = 0;
  endtask

  task automatic snoop(input logic [31:0] a, output logic [NT-1:0] m);
    snp_addr = a;
    #1;
    m = snp_exposed;
  endtask

  initial begin
    logic e, f, s;
    logic [NT-1:0] m;
    acc_valid = 0; acc_store = 0; acc_addr = 0; acc_tid = 0; acc_has_parent = 0; acc_parent = 0;
    snp_addr = 0; commit_mask = 0; discard_mask = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // task 1 loads word 0 of line 0x000: exposed
    acc(0, 32'h0000, 1, -1, e, f, s);
    chk(e, 1, "first load exposed"); chk(f, 0, "allocated");
    #1; snoop(32'h0000, m); chk(m == (NT'(1) << 1), 1, "snoop sees task 1");
    snoop(32'h0004, m); chk(m == '0, 1, "other word not exposed");
    // task 1 writes word 1, then reads it: protected
    acc(1, 32'h0004, 1, -1, e, f, s);
    acc(0, 32'h0004, 1, -1, e, f, s);
    chk(e, 0, "read after own write not exposed");
    #1; snoop(32'h0004, m); chk(m == '0, 1, "protected word not reported");
    // checkpoint task 2 (parent 1) loads word 0: served by the parent's version
    acc(0, 32'h0000, 2, 1, e, f, s);
    chk(s, 1, "checkpoint shares parent's exposed read");
    #1; snoop(32'h0000, m); chk(m == (NT'(1) << 1), 1, "no version for the checkpoint");
    // checkpoint store allocates its own version
    acc(1, 32'h0008, 2, 1, e, f, s);
    chk(f, 0, "checkpoint store allocates"); chk(s, 0, "store not shared");
    // checkpoint loads word 3, not read by the parent: exposed in its own version
    acc(0, 32'h000c, 2, 1, e, f, s);
    chk(s, 0, "not shared"); chk(e, 1, "exposed");
    #1; snoop(32'h000c, m); chk(m == (NT'(1) << 2), 1, "snoop sees checkpoint");
    // set 0 now holds two versions (tasks 1 and 2): task 3 cannot allocate
    acc(0, 32'h0080, 3, -1, e, f, s);
    chk(f, 1, "allocation fails in a full set");
    // a different set still has room
    acc(0, 32'h0020, 3, -1, e, f, s);
    chk(f, 0, "other set allocates");
    // discard task 1, commit task 2: set 0 is free again
    @(negedge clk); discard_mask = NT'(1) << 1; commit_mask = NT'(1) << 2;
    @(negedge clk); discard_mask = '0; commit_mask = '0;
    #1; snoop(32'h0000, m); chk(m == '0, 1, "discarded version gone");
    snoop(32'h000c, m); chk(m == '0, 1, "committed version gone");
    acc(0, 32'h0080, 3, -1, e, f, s);
    chk(f, 0, "allocation succeeds after freeing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
