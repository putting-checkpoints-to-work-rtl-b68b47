// Speculative version state of one processor's L1 data cache. The L1 holds a
// separate version of a line for every speculative task that touched it; this
// module keeps, for each version, the line tag, the owning task and, per word,
// an exposed-read bit (read before the task wrote it) and a written bit. It
// tracks dependences: a snooped store returns the set of tasks holding an
// exposed read of that word, from which the squash unit picks those more
// speculative than the storing task. It also decides allocation: a task's
// first access to a line allocates a version in the line's set, and if all
// ways hold speculative versions the allocation fails, upon which the most
// speculative task of the processor is restarted to free space.
// Checkpoint optimisation (MEM_OPT): a checkpoint that loads a word its parent
// (the checkpointed task, same processor, immediately less speculative) has
// already read exposed does not allocate a version; a violation on that word
// restarts the parent, which kills the checkpoint anyway. Stores always
// allocate, so that the checkpoint's writes can be rolled back on their own.
// Commit of a task retires its versions (they are written to L2 and stop
// being speculative, so the slots are freed); a kill or restart discards them.
// Interface: one access per cycle (acc_*), results combinational, state
// updated at the clock edge; snoop is combinational. The geometry (16KB,
// 4-way) is the evaluated L1; the 32-byte line and word-granular tracking are
// this design's choices, and line data is not held here.
module spec_line_state
  import tls_ckpt_pkg::*;
#(
  parameter int unsigned SETS       = 128,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_WORDS = 8,
  parameter bit          MEM_OPT    = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  // access from the local processor
  input  logic            acc_valid,
  input  logic            acc_store,
  input  logic [XLEN-1:0] acc_addr,
  input  tid_t            acc_tid,
  input  logic            acc_has_parent,   // acc_tid is a checkpoint of acc_parent
  input  tid_t            acc_parent,
  output logic            acc_exposed,      // load is an exposed read
  output logic            acc_alloc_fail,   // no way free for a new version
  output logic            acc_shared,       // load served by the parent's version
  // snooped store from the bus
  input  logic [XLEN-1:0] snp_addr,
  output logic [NT-1:0]   snp_exposed,      // tasks with an exposed read of the word
  // task state changes
  input  logic [NT-1:0]   commit_mask,
  input  logic [NT-1:0]   discard_mask
);
  localparam int unsigned WOFF = $clog2(LINE_WORDS);
  localparam int unsigned IDXW = $clog2(SETS);
  localparam int unsigned TAGW = XLEN - 2 - WOFF - IDXW;
  localparam int unsigned WYW  = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef struct packed {
    logic                  valid;
    logic [TAGW-1:0]       tag;
    tid_t                  tid;
    logic [LINE_WORDS-1:0] exposed;
    logic [LINE_WORDS-1:0] written;
  } ver_t;

  ver_t ver [SETS][WAYS];

  logic [IDXW-1:0] a_set, s_set;
  logic [TAGW-1:0] a_tag, s_tag;
  logic [WOFF-1:0] a_word, s_word;

  assign a_word = acc_addr[2 +: WOFF];
  assign a_set  = acc_addr[2+WOFF +: IDXW];
  assign a_tag  = acc_addr[XLEN-1 -: TAGW];
  assign s_word = snp_addr[2 +: WOFF];
  assign s_set  = snp_addr[2+WOFF +: IDXW];
  assign s_tag  = snp_addr[XLEN-1 -: TAGW];

  logic           own_hit, par_exp, free_found, do_alloc, do_update;
  logic [WYW-1:0] own_way, free_way;

  always_comb begin
    own_hit = 1'b0;  own_way = '0;
    par_exp = 1'b0;
    free_found = 1'b0;  free_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (ver[a_set][w].valid && ver[a_set][w].tag == a_tag) begin
        if (ver[a_set][w].tid == acc_tid) begin
          own_hit = 1'b1;  own_way = WYW'(w);
        end
        if (acc_has_parent && ver[a_set][w].tid == acc_parent && ver[a_set][w].exposed[a_word])
          par_exp = 1'b1;
      end
      if (!ver[a_set][w].valid) begin
        free_found = 1'b1;  free_way = WYW'(w);
      end
    end

    acc_shared     = 1'b0;
    acc_exposed    = 1'b0;
    acc_alloc_fail = 1'b0;
    do_alloc       = 1'b0;
    do_update      = 1'b0;
    if (acc_valid) begin
      if (own_hit) begin
        do_update   = 1'b1;
        acc_exposed = !acc_store && !ver[a_set][own_way].written[a_word];
      end else if (!acc_store && MEM_OPT && par_exp) begin
        acc_shared  = 1'b1;
        acc_exposed = 1'b1;
      end else if (free_found) begin
        do_alloc    = 1'b1;
        acc_exposed = !acc_store;
      end else begin
        acc_alloc_fail = 1'b1;
      end
    end
  end

  always_comb begin
    snp_exposed = '0;
    for (int w = 0; w < WAYS; w++)
      if (ver[s_set][w].valid && ver[s_set][w].tag == s_tag && ver[s_set][w].exposed[s_word])
        snp_exposed[ver[s_set][w].tid] = 1'b1;
  end

  logic [LINE_WORDS-1:0] wbit;
  assign wbit = LINE_WORDS'(1) << a_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) ver[s][w] <= '0;
    end else begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          if (ver[s][w].valid && (commit_mask[ver[s][w].tid] || discard_mask[ver[s][w].tid]))
            ver[s][w].valid <= 1'b0;
      if (!(commit_mask[acc_tid] || discard_mask[acc_tid])) begin
        if (do_update) begin
          if (acc_store) ver[a_set][own_way].written <= ver[a_set][own_way].written | wbit;
          else if (acc_exposed) ver[a_set][own_way].exposed <= ver[a_set][own_way].exposed | wbit;
        end else if (do_alloc) begin
          ver[a_set][free_way] <= '{valid:   1'b1,
                                    tag:     a_tag,
                                    tid:     acc_tid,
                                    exposed: acc_store ? '0 : wbit,
                                    written: acc_store ? wbit : '0};
        end
      end
    end
  end
endmodule
