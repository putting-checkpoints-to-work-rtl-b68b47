// Directed test of dep_predictor in its default bimodal mode: training from
// violations, the selector moving to the address predictor after a violation
// only that predictor foresaw, and prediction-time "no dependence" training.
module tb_dep_predictor;
  logic clk = 0, rst_n = 0;
  logic q_valid, pred, pred_addr, pred_pc, exp_valid, viol_valid;
  logic [31:0] q_pc, q_addr, exp_addr, exp_pc, viol_addr;
  int checks = 0, failures = 0;

  dep_predictor dut (.*);

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
  task automatic expose(input logic [31:0] a, input logic [31:0] p);
    @(negedge clk); exp_valid = 1; exp_addr = a; exp_pc = p;
    @(negedge clk); exp_valid = 0;
  endtask
  task automatic viol(input logic [31:0] a);
    @(negedge clk); viol_valid = 1; viol_addr = a;
    @(negedge clk); viol_valid = 0;
  endtask
  task automatic ask(input logic [31:0] p, input logic [31:0] a, input logic v);
    @(negedge clk); q_valid = v; q_pc = p; q_addr = a; #1;
  endtask

  initial begin
    q_valid = 0; exp_valid = 0; viol_valid = 0;
    q_pc = 0; q_addr = 0; exp_addr = 0; exp_pc = 0; viol_addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    ask(32'h400010, 32'h1000, 0); chk(pred, 0, "cold");
    expose(32'h1000, 32'h400010);
    viol(32'h1000);
    ask(32'h400010, 32'h1000, 0);
    chk(pred_addr, 1, "address learned"); chk(pred_pc, 1, "pc learned"); chk(pred, 1, "pred");
    ask(32'h400010, 32'h7000, 0);
    chk(pred, 1, "selector on PC side: other address still predicted");
    ask(32'h400020, 32'h1000, 0);
    chk(pred_addr, 1, "addr hit"); chk(pred, 0, "selector on PC side: pc not critical");
    // violation that only the address predictor foresaw, for load PC 0x400040
    expose(32'h1000, 32'h400040);
    viol(32'h1000);
    ask(32'h400040, 32'h9000, 0);
    chk(pred_pc, 1, "pc 0x400040 learned");
    chk(pred, 0, "selector saturated to address side");
    ask(32'h400040, 32'h1000, 0);
    chk(pred, 1, "address side predicts");
    // no-dependence training: PC side predicts, address side not, 16 times
    for (int i = 0; i < 16; i++) ask(32'h400010, 32'h8000, 1);
    ask(32'h400010, 32'h8000, 0);
    chk(pred, 0, "selector moved away from PC side after no-dependence training");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
