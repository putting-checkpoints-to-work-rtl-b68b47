// Self-checking test of critical_buffer: inserts random keys into a small
// buffer and compares every lookup with a reference FIFO set kept in the
// testbench (duplicates are not re-inserted, the oldest entry is replaced).
module tb_critical_buffer;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [31:0] lookup_key, ins_key;
  logic hit, ins_valid, ins_hit;
  int checks = 0, failures = 0;
  logic [31:0] ref_q[$];

  critical_buffer #(.ENTRIES(N), .KEY_W(32)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit in_ref(logic [31:0] k);
    foreach (ref_q[i]) if (ref_q[i] == k) return 1;
    return 0;
  endfunction

  initial begin
    ins_valid = 0; ins_key = 0; lookup_key = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      ins_valid  = ($urandom % 2) == 0;
      ins_key    = $urandom % 12;
      lookup_key = $urandom % 12;
      #1;
      checks++;
      if (hit !== in_ref(lookup_key)) begin
        failures++;
        $display("lookup %0d: hit=%0d expected %0d", lookup_key, hit, in_ref(lookup_key));
      end
      checks++;
      if (ins_hit !== in_ref(ins_key)) failures++;
      @(posedge clk);
      if (ins_valid && !in_ref(ins_key)) begin
        if (ref_q.size() == N) void'(ref_q.pop_front());
        ref_q.push_back(ins_key);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
