// Self-checking test of shadow_regfile: random register writes, snapshots
// into random shadow copies and single-cycle restores, checked against a
// reference model of the working file and the shadow copies.
module tb_shadow_regfile;
  logic clk = 0, rst_n = 0;
  logic we, snap_valid, rest_valid;
  logic [4:0] waddr, raddr_a, raddr_b;
  logic [31:0] wdata, rdata_a, rdata_b;
  logic [2:0] snap_slot, rest_slot;
  int checks = 0, failures = 0, restores = 0;
  logic [31:0] arf [32], old_arf [32];
  logic [31:0] sh [8][32];

  shadow_regfile dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) arf[r] = 0;
    for (int s = 0; s < 8; s++) for (int r = 0; r < 32; r++) sh[s][r] = 0;
    we = 0; snap_valid = 0; rest_valid = 0; waddr = 0; wdata = 0;
    raddr_a = 0; raddr_b = 0; snap_slot = 0; rest_slot = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      we = $urandom % 2; waddr = $urandom; wdata = $urandom;
      snap_valid = ($urandom % 10) == 0; snap_slot = $urandom;
      rest_valid = ($urandom % 15) == 0; rest_slot = $urandom;
      raddr_a = $urandom; raddr_b = $urandom;
      #1;
      checks += 2;
      if (rdata_a !== arf[raddr_a]) begin failures++; $display("it %0d ra %0d got %h exp %h", it, raddr_a, rdata_a, arf[raddr_a]); end
      if (rdata_b !== arf[raddr_b]) failures++;
      @(posedge clk);
      // both copies happen on the same edge: each reads the old state
      for (int r = 0; r < 32; r++) old_arf[r] = arf[r];
      if (rest_valid) begin
        for (int r = 0; r < 32; r++) arf[r] = sh[rest_slot][r];
        restores++;
      end else if (we && waddr != 0) arf[waddr] = wdata;
      if (snap_valid) for (int r = 0; r < 32; r++) sh[snap_slot][r] = old_arf[r];
    end
    checks++;
    if (restores == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
