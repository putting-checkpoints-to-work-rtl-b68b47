// Hybrid dependence predictor of one processor. It predicts, for each load,
// whether the load is likely to be violated by a store of a less speculative
// task, so that a checkpoint can be placed just before it. Two component
// predictors are kept: the address predictor (Critical Address Buffer of
// store addresses that caused violations) and the PC predictor (Critical PC
// Table fed through the PC Translation Table). In the default bimodal mode a
// PC-indexed selector chooses which component to believe per load; the OR and
// AND modes combine the two outputs directly.
// Training: a violation inserts the violating word address into the address
// buffer, the violated load's PC into the PC table, and saturates the
// selector towards the component that was right. The "no dependence" outcome
// of a load is only known when its task commits; this design trains the
// selector with that outcome already at prediction time, whenever the two
// components disagree (a later violation on the same PC re-saturates it).
// Interface: q_valid/q_pc/q_addr -> pred (combinational); exp_* records an
// exposed load; viol_valid/viol_addr trains at the clock edge.
module dep_predictor
  import tls_ckpt_pkg::*;
#(
  parameter int unsigned  CAB_ENTRIES  = 32,
  parameter int unsigned  CPT_ENTRIES  = 32,
  parameter int unsigned  XT_ENTRIES   = 64,
  parameter int unsigned  META_ENTRIES = 128,
  parameter int unsigned  META_CBITS   = 5,
  parameter hybrid_mode_e MODE         = HY_BIMODAL
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            q_valid,     // a load asks for a prediction
  input  logic [XLEN-1:0] q_pc,
  input  logic [XLEN-1:0] q_addr,      // word-aligned load address
  output logic            pred,
  output logic            pred_addr,   // component predictions, for statistics
  output logic            pred_pc,
  input  logic            exp_valid,   // exposed load: record address -> PC
  input  logic [XLEN-1:0] exp_addr,
  input  logic [XLEN-1:0] exp_pc,
  input  logic            viol_valid,  // violation on this processor
  input  logic [XLEN-1:0] viol_addr
);
  logic            sel_pc;
  logic            cab_was, cpt_was, pc_found;
  logic [XLEN-1:0] viol_pc;
  logic            m_upd, m_addr, m_pc, m_viol;
  logic [XLEN-1:0] m_pc_val;

  critical_buffer #(.ENTRIES(CAB_ENTRIES), .KEY_W(XLEN)) u_cab (
    .clk, .rst_n,
    .lookup_key(q_addr),
    .hit       (pred_addr),
    .ins_valid (viol_valid),
    .ins_key   (viol_addr),
    .ins_hit   (cab_was)
  );

  pc_predictor #(.CPT_ENTRIES(CPT_ENTRIES), .XT_ENTRIES(XT_ENTRIES),
                 .ADDR_W(XLEN), .PC_W(XLEN)) u_pcp (
    .clk, .rst_n,
    .pred_pc             (q_pc),
    .pred                (pred_pc),
    .ld_valid            (exp_valid),
    .ld_addr             (exp_addr),
    .ld_pc               (exp_pc),
    .viol_valid          (viol_valid),
    .viol_addr           (viol_addr),
    .viol_pc_found       (pc_found),
    .viol_pc             (viol_pc),
    .viol_pc_was_critical(cpt_was)
  );

  meta_predictor #(.ENTRIES(META_ENTRIES), .CBITS(META_CBITS), .PC_W(XLEN)) u_meta (
    .clk, .rst_n,
    .sel_pc       (q_pc),
    .sel_pc_pred  (sel_pc),
    .upd_valid    (m_upd),
    .upd_pc       (m_pc_val),
    .upd_addr_pred(m_addr),
    .upd_pc_pred  (m_pc),
    .upd_violated (m_viol)
  );

  // Selector update: a violation takes precedence over a prediction-time
  // "no dependence" update in the same cycle.
  always_comb begin
    if (pc_found) begin
      m_upd = 1'b1;  m_pc_val = viol_pc;  m_addr = cab_was;  m_pc = cpt_was;  m_viol = 1'b1;
    end else begin
      m_upd = q_valid; m_pc_val = q_pc;   m_addr = pred_addr; m_pc = pred_pc; m_viol = 1'b0;
    end
  end

  always_comb begin
    unique case (MODE)
      HY_OR:   pred = pred_addr | pred_pc;
      HY_AND:  pred = pred_addr & pred_pc;
      default: pred = sel_pc ? pred_pc : pred_addr;
    endcase
  end
endmodule
