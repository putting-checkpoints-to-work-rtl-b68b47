// Program Counter based dependence predictor. A load is predicted dependent
// when its PC is in the Critical PC Table. Training needs the PC of the load
// that was violated, which the violation itself does not carry: every exposed
// load records (word address, PC) in the PC Translation Table, and a violation
// on an address looks the PC up there and inserts it into the Critical PC
// Table. If the address has been displaced from the translation table the
// violation is not learned.
// Interface: pred_pc -> pred (combinational, usable at fetch); ld_* records
// an exposed load; viol_valid/viol_addr trains at the clock edge. The
// training outputs tell, in the violation cycle, which PC was found and
// whether this predictor already held it (for the hybrid's selector).
module pc_predictor #(
  parameter int unsigned CPT_ENTRIES = 32,
  parameter int unsigned XT_ENTRIES  = 64,
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned PC_W        = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PC_W-1:0]   pred_pc,
  output logic              pred,
  input  logic              ld_valid,     // exposed load
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [PC_W-1:0]   ld_pc,
  input  logic              viol_valid,
  input  logic [ADDR_W-1:0] viol_addr,
  output logic              viol_pc_found,
  output logic [PC_W-1:0]   viol_pc,
  output logic              viol_pc_was_critical
);
  logic xt_hit;

  pc_xlate_table #(.ENTRIES(XT_ENTRIES), .ADDR_W(ADDR_W), .PC_W(PC_W)) u_xlate (
    .clk, .rst_n,
    .ins_valid  (ld_valid),
    .ins_addr   (ld_addr),
    .ins_pc     (ld_pc),
    .lookup_addr(viol_addr),
    .lookup_hit (xt_hit),
    .lookup_pc  (viol_pc)
  );

  critical_buffer #(.ENTRIES(CPT_ENTRIES), .KEY_W(PC_W)) u_cpt (
    .clk, .rst_n,
    .lookup_key(pred_pc),
    .hit       (pred),
    .ins_valid (viol_valid && xt_hit),
    .ins_key   (viol_pc),
    .ins_hit   (viol_pc_was_critical)
  );

  assign viol_pc_found = viol_valid && xt_hit;
endmodule
