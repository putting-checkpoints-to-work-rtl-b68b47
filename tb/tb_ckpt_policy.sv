// Self-checking test of ckpt_policy with the default CP_MAX = 8, C = 100:
// random retire counts and predictions, the checkpoint count fed back as a
// controller would, and every decision compared with the insertion rule
// evaluated in real arithmetic: size > C/CP_MAX*(CP+1).
module tb_ckpt_policy;
  logic clk = 0, rst_n = 0;
  logic task_start, pred, do_ckpt;
  logic [3:0] cp;
  logic [2:0] inst_count;
  logic [19:0] size;
  int checks = 0, failures = 0, placed = 0, refused_limit = 0;

  ckpt_policy dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int msize, mcp;
    bit exp;
    task_start = 0; pred = 0; cp = 0; inst_count = 0;
    msize = 0; mcp = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      task_start = ($urandom % 500) == 0;
      pred       = ($urandom % 6) == 0;
      inst_count = $urandom % 5;
      cp         = mcp;
      #1;
      exp = pred && !task_start && mcp < 8 && (real'(msize) > 100.0 / 8.0 * real'(mcp + 1));
      checks++;
      if (do_ckpt !== exp || size !== msize) begin
        failures++;
        $display("mismatch size=%0d/%0d cp=%0d do=%0d exp=%0d", size, msize, mcp, do_ckpt, exp);
      end
      if (pred && mcp == 8) refused_limit++;
      @(posedge clk);
      if (task_start) begin msize = 0; mcp = 0; end
      else if (exp) begin msize = inst_count; mcp++; placed++; end
      else msize += inst_count;
    end
    checks++;
    if (placed == 0 || refused_limit == 0) failures++;
    $display("placed=%0d refused_at_limit=%0d", placed, refused_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
