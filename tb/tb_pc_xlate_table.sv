// Self-checking test of pc_xlate_table: random exposed loads (address, PC)
// are recorded; lookups by address are compared with a reference FIFO map in
// which a repeated address updates its PC in place.
module tb_pc_xlate_table;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic ins_valid, lookup_hit;
  logic [31:0] ins_addr, ins_pc, lookup_addr, lookup_pc;
  int checks = 0, failures = 0;
  logic [31:0] ra[$], rp[$];

  pc_xlate_table #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    ins_valid = 0; ins_addr = 0; ins_pc = 0; lookup_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      ins_valid   = ($urandom % 3) != 0;
      ins_addr    = ($urandom % 20) * 4;
      ins_pc      = 32'h400000 + ($urandom % 64) * 4;
      lookup_addr = ($urandom % 20) * 4;
      #1;
      idx = -1;
      foreach (ra[i]) if (ra[i] == lookup_addr) idx = i;
      checks++;
      if (lookup_hit !== (idx >= 0) || (idx >= 0 && lookup_pc !== rp[idx])) begin
        failures++;
        $display("lookup %h: hit=%0d pc=%h", lookup_addr, lookup_hit, lookup_pc);
      end
      @(posedge clk);
      if (ins_valid) begin
        idx = -1;
        foreach (ra[i]) if (ra[i] == ins_addr) idx = i;
        if (idx >= 0) rp[idx] = ins_pc;
        else begin
          if (ra.size() == N) begin void'(ra.pop_front()); void'(rp.pop_front()); end
          ra.push_back(ins_addr); rp.push_back(ins_pc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
