// Register file with shadow copies for checkpoints. The working copy is the
// processor's architectural register file (one write port, two read ports).
// Each of the NSNAP shadow copies holds the register state of one checkpoint:
// snap_valid copies the whole working file into shadow slot snap_slot in one
// cycle, and rest_valid copies shadow slot rest_slot back into the working
// file in one cycle, which is how a rewind to a checkpoint restores the
// registers without any memory traffic. A register write in the same cycle as
// a snapshot is not part of the snapshot (the snapshot is the state before
// that cycle's writes); a restore takes precedence over a write in the same
// cycle. Register 0 reads as zero. Reads are combinational. Shadow copies in
// the processor (rather than snapshots in memory) is the organisation the
// evaluated system uses; the port counts and the register-0 rule are this
// design's choices.
module shadow_regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned XLEN  = 32,
  parameter int unsigned NSNAP = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [XLEN-1:0]          wdata,
  input  logic [$clog2(NREGS)-1:0] raddr_a,
  output logic [XLEN-1:0]          rdata_a,
  input  logic [$clog2(NREGS)-1:0] raddr_b,
  output logic [XLEN-1:0]          rdata_b,
  input  logic                     snap_valid,
  input  logic [$clog2(NSNAP)-1:0] snap_slot,
  input  logic                     rest_valid,
  input  logic [$clog2(NSNAP)-1:0] rest_slot
);
  localparam int unsigned AW = $clog2(NREGS);

  logic [NREGS-1:0][XLEN-1:0] arf;
  logic [NREGS-1:0][XLEN-1:0] shadow [NSNAP];

  assign rdata_a = (raddr_a == '0) ? '0 : arf[raddr_a];
  assign rdata_b = (raddr_b == '0) ? '0 : arf[raddr_b];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arf <= '0;
      for (int s = 0; s < NSNAP; s++) shadow[s] <= '0;
    end else begin
      if (snap_valid) shadow[snap_slot] <= arf;
      if (rest_valid) arf <= shadow[rest_slot];
      else if (we && waddr != AW'(0)) arf[waddr] <= wdata;
    end
  end
endmodule
