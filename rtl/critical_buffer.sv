// Critical buffer: a small fully associative set of "critical" keys used by
// the dependence predictors. As the Critical Address Buffer it holds the
// addresses of stores that caused dependence violations; as the Critical PC
// Table it holds the PCs of loads that were violated. A lookup is a
// combinational match of all entries (a prediction in the same cycle). An
// insert adds the key unless it is already present; when the buffer is full
// the oldest entry is replaced (FIFO), the policy found best for these tables.
// Interface: lookup_key -> hit (combinational); ins_valid/ins_key written at
// the clock edge; ins_hit tells, combinationally, whether ins_key is already
// held, i.e. whether the buffer would have predicted it. Reset empties the buffer. The 32-entry default is the size
// used for checkpoint placement; the key width is this design's choice.
module critical_buffer #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned KEY_W   = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [KEY_W-1:0] lookup_key,
  output logic             hit,
  input  logic             ins_valid,
  input  logic [KEY_W-1:0] ins_key,
  output logic             ins_hit      // ins_key already present (used for training)
);
  localparam int unsigned PW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0]            vld;
  logic [ENTRIES-1:0][KEY_W-1:0] key;
  logic [PW-1:0]                 wptr;   // FIFO replacement pointer
  logic                          ins_present;

  assign ins_hit = ins_present;

  always_comb begin
    hit = 1'b0;
    ins_present = 1'b0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (vld[i] && key[i] == lookup_key) hit = 1'b1;
      if (vld[i] && key[i] == ins_key)    ins_present = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld  <= '0;
      key  <= '0;
      wptr <= '0;
    end else if (ins_valid && !ins_present) begin
      vld[wptr] <= 1'b1;
      key[wptr] <= ins_key;
      wptr      <= (wptr == PW'(ENTRIES - 1)) ? '0 : wptr + 1'b1;
    end
  end
endmodule
