// PC Translation Table. When a violation is detected only the data address is
// known, while the PC predictor needs the PC of the load that was violated.
// This fully associative table remembers, for each exposed load, the word
// address and the load's PC. A later exposed load to an address already in
// the table overwrites its PC; otherwise the oldest entry is replaced (FIFO).
// Lookups are combinational; the table is off the prediction path, only read
// when a violation trains the predictor. 64 entries is the recommended size;
// the replacement policy of this table is this design's choice.
module pc_xlate_table #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned PC_W    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ins_valid,   // exposed load observed
  input  logic [ADDR_W-1:0] ins_addr,
  input  logic [PC_W-1:0]   ins_pc,
  input  logic [ADDR_W-1:0] lookup_addr, // violated address
  output logic              lookup_hit,
  output logic [PC_W-1:0]   lookup_pc
);
  localparam int unsigned PW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0]             vld;
  logic [ENTRIES-1:0][ADDR_W-1:0] addr;
  logic [ENTRIES-1:0][PC_W-1:0]   pc;
  logic [PW-1:0]                  wptr;
  logic                           ins_hit;
  logic [PW-1:0]                  ins_idx;

  always_comb begin
    lookup_hit = 1'b0;
    lookup_pc  = '0;
    ins_hit    = 1'b0;
    ins_idx    = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (vld[i] && addr[i] == lookup_addr) begin
        lookup_hit = 1'b1;
        lookup_pc  = pc[i];
      end
      if (vld[i] && addr[i] == ins_addr) begin
        ins_hit = 1'b1;
        ins_idx = PW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld  <= '0;
      addr <= '0;
      pc   <= '0;
      wptr <= '0;
    end else if (ins_valid) begin
      if (ins_hit) begin
        pc[ins_idx] <= ins_pc;
      end else begin
        vld[wptr]  <= 1'b1;
        addr[wptr] <= ins_addr;
        pc[wptr]   <= ins_pc;
        wptr       <= (wptr == PW'(ENTRIES - 1)) ? '0 : wptr + 1'b1;
      end
    end
  end
endmodule
