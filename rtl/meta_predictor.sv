// Selector (meta-predictor) of the hybrid bimodal dependence predictor: a
// direct-mapped table of saturating counters indexed by load PC. A counter in
// its upper half selects the PC predictor, in its lower half the address
// predictor. Training happens only when the two component predictions
// disagree. When the load did violate, the counter is saturated towards the
// component that predicted the dependence; otherwise it moves one step towards
// the component that predicted no dependence. This bias keeps sensitivity
// high, since missing a violating load costs more than a spare checkpoint.
// Interface: sel_pc -> sel_pc_pred (1 = use the PC predictor), combinational;
// upd_* trains at the clock edge. 128 entries of 5 bits is the configuration
// used for checkpoint placement. The index (PC bits above the 4-byte
// instruction offset), counter polarity and reset value (midpoint, i.e.
// weakly PC) are this design's choices.
module meta_predictor #(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned CBITS   = 5,
  parameter int unsigned PC_W    = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] sel_pc,
  output logic            sel_pc_pred,
  input  logic            upd_valid,
  input  logic [PC_W-1:0] upd_pc,
  input  logic            upd_addr_pred,  // address predictor said "dependent"
  input  logic            upd_pc_pred,    // PC predictor said "dependent"
  input  logic            upd_violated    // outcome: the load was violated
);
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam logic [CBITS-1:0] CMAX = '1;
  localparam logic [CBITS-1:0] CMID = {1'b1, {(CBITS-1){1'b0}}};

  logic [CBITS-1:0] ctr [ENTRIES];
  logic [IW-1:0]    sel_idx, upd_idx;

  assign sel_idx     = sel_pc[IW+1:2];
  assign upd_idx     = upd_pc[IW+1:2];
  assign sel_pc_pred = ctr[sel_idx][CBITS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr[i] <= CMID;
    end else if (upd_valid && (upd_addr_pred != upd_pc_pred)) begin
      if (upd_violated) begin
        ctr[upd_idx] <= upd_pc_pred ? CMAX : '0;
      end else if (upd_pc_pred) begin
        if (ctr[upd_idx] != '0) ctr[upd_idx] <= ctr[upd_idx] - 1'b1;
      end else begin
        if (ctr[upd_idx] != CMAX) ctr[upd_idx] <= ctr[upd_idx] + 1'b1;
      end
    end
  end
endmodule
