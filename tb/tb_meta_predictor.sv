// Self-checking test of meta_predictor against a reference counter table:
// random training events (component predictions and outcome) on random PCs,
// with the selector output compared every cycle.
module tb_meta_predictor;
  localparam int N = 16, CB = 3;
  logic clk = 0, rst_n = 0;
  logic [31:0] sel_pc, upd_pc;
  logic sel_pc_pred, upd_valid, upd_addr_pred, upd_pc_pred, upd_violated;
  int checks = 0, failures = 0;
  int ctr [N];

  meta_predictor #(.ENTRIES(N), .CBITS(CB)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sat_seen = 0;
    for (int i = 0; i < N; i++) ctr[i] = 4;
    upd_valid = 0; sel_pc = 0; upd_pc = 0; upd_addr_pred = 0; upd_pc_pred = 0; upd_violated = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      sel_pc        = 32'h400000 + ($urandom % 64) * 4;
      upd_pc        = 32'h400000 + ($urandom % 64) * 4;
      upd_valid     = $urandom % 2;
      upd_addr_pred = $urandom % 2;
      upd_pc_pred   = $urandom % 2;
      upd_violated  = ($urandom % 8) == 0;
      #1;
      checks++;
      if (sel_pc_pred !== (ctr[sel_pc[5:2]] >= 4)) begin
        failures++;
        $display("sel mismatch pc=%h got %0d ctr=%0d", sel_pc, sel_pc_pred, ctr[sel_pc[5:2]]);
      end
      @(posedge clk);
      if (upd_valid && upd_addr_pred != upd_pc_pred) begin
        automatic int k = upd_pc[5:2];
        if (upd_violated) begin ctr[k] = upd_pc_pred ? 7 : 0; sat_seen++; end
        else if (upd_pc_pred) begin if (ctr[k] > 0) ctr[k]--; end
        else begin if (ctr[k] < 7) ctr[k]++; end
      end
    end
    checks++;
    if (sat_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
