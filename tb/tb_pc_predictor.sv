// Directed test of pc_predictor: a violation on an address recorded by an
// exposed load makes that load's PC critical; a violation on an address that
// was never recorded (or was displaced) teaches nothing.
module tb_pc_predictor;
  logic clk = 0, rst_n = 0;
  logic [31:0] pred_pc, ld_addr, ld_pc, viol_addr, viol_pc;
  logic pred, ld_valid, viol_valid, viol_pc_found, viol_pc_was_critical;
  int checks = 0, failures = 0;

  pc_predictor #(.CPT_ENTRIES(4), .XT_ENTRIES(4)) dut (.*);

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

  task automatic load(input logic [31:0] a, input logic [31:0] p);
    @(negedge clk); ld_valid = 1; ld_addr = a; ld_pc = p;
    @(negedge clk); ld_valid = 0;
  endtask

  task automatic viol(input logic [31:0] a, output logic found, output logic [31:0] p, output logic was);
    @(negedge clk); viol_valid = 1; viol_addr = a; #1;
    found = viol_pc_found; p = viol_pc; was = viol_pc_was_critical;
    @(negedge clk); viol_valid = 0;
  endtask

  initial begin
    logic f, w; logic [31:0] p;
    ld_valid = 0; viol_valid = 0; pred_pc = 0; ld_addr = 0; ld_pc = 0; viol_addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // record three exposed loads
    load(32'h1000, 32'h400100);
    load(32'h2000, 32'h400200);
    load(32'h3000, 32'h400300);
    pred_pc = 32'h400200; #1; chk(pred, 0, "untrained pc");
    viol(32'h2000, f, p, w);
    chk(f, 1, "translation found"); chk(p == 32'h400200, 1, "translated pc"); chk(w, 0, "not yet critical");
    pred_pc = 32'h400200; #1; chk(pred, 1, "pc now critical");
    pred_pc = 32'h400100; #1; chk(pred, 0, "other pc not critical");
    viol(32'h2000, f, p, w);
    chk(w, 1, "second violation sees critical pc");
    viol(32'h9000, f, p, w);
    chk(f, 0, "unknown address not translated");
    pred_pc = 32'h0; #1; chk(pred, 0, "untranslated violation trains nothing");
    // displace 0x1000 from the 4-entry translation table
    load(32'h4000, 32'h400400); load(32'h5000, 32'h400500);
    viol(32'h1000, f, p, w);
    chk(f, 0, "displaced address lost");
    pred_pc = 32'h400100; #1; chk(pred, 0, "displaced pc not learned");
    // PC update for a re-recorded address
    load(32'h5000, 32'h400555);
    viol(32'h5000, f, p, w);
    chk(p == 32'h400555, 1, "latest pc for address");
    pred_pc = 32'h400555; #1; chk(pred, 1, "latest pc critical");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
