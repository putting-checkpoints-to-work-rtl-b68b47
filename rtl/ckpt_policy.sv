// Checkpoint insertion policy. A checkpoint is placed before a load when
//   (dependence predicted) and (CP < CP_MAX) and (size > C/CP_MAX * (CP+1)),
// where CP is the number of checkpoints the task already has and size is the
// number of instructions since the task started or since its latest
// checkpoint. The size threshold grows with CP up to C for the last
// checkpoint, so checkpoints become scarcer as they are used up. The
// comparison is done without division as size*CP_MAX > C*(CP+1).
// CP comes from the checkpoint controller; this module keeps the instruction
// counter: inst_count instructions retire per cycle, task_start (a new task,
// a restart or a rewind) clears it, and a placed checkpoint restarts it. The
// load that triggers a checkpoint is the first instruction of the checkpoint,
// so the instructions retiring in that cycle are not counted before it.
// do_ckpt is combinational from pred, cp and the counter.
module ckpt_policy #(
  parameter int unsigned CP_MAX = 8,
  parameter int unsigned C      = 100,
  parameter int unsigned IW     = 3,    // width of the per-cycle retire count
  parameter int unsigned SIZE_W = 20
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        task_start,
  input  logic [$clog2(CP_MAX+1)-1:0] cp,          // checkpoints already placed
  input  logic [IW-1:0]               inst_count,  // instructions retired this cycle
  input  logic                        pred,        // dependence predicted for a load
  output logic                        do_ckpt,
  output logic [SIZE_W-1:0]           size
);
  localparam int unsigned CPW = $clog2(CP_MAX + 1);
  localparam int unsigned PW  = SIZE_W + 16;

  logic [PW-1:0] lhs, rhs;

  always_comb begin
    lhs = PW'(size) * PW'(CP_MAX);
    rhs = PW'(C) * (PW'(cp) + PW'(1));
    do_ckpt = pred && !task_start && (cp < CPW'(CP_MAX)) && (lhs > rhs);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      size <= '0;
    end else if (task_start) begin
      size <= '0;
    end else if (do_ckpt) begin
      size <= SIZE_W'(inst_count);
    end else if (size <= {SIZE_W{1'b1}} - SIZE_W'(inst_count)) begin
      size <= size + SIZE_W'(inst_count);
    end
  end
endmodule
