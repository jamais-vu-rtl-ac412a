// sb_cor: Squashed Buffer of the Clear-on-Retire scheme.
//
// It holds one PC Buffer (a plain 1-bit Bloom filter) and one ID register that
// names the oldest Squashing instruction seen since the last clear. On a squash
// the Victims' PCs are inserted, one per cycle, through the victim port, and ID
// is replaced only if the new Squashing instruction is older than the one in
// ID. ID keeps both the PC and the ROB index of the Squashing instruction: a
// squasher that stays in the ROB (a mispredicted branch) is tracked by its ROB
// index; a squasher that leaves the ROB (an exception, a consistency-violating
// load) is tracked by its PC until it is inserted again, when its new ROB index
// is captured. When the instruction in ID reaches its Visibility Point (VP) the
// program has made forward progress, and the PC Buffer and ID are cleared.
// Every instruction about to enter the ROB is looked up; a hit means "place a
// fence before it".
//
// Interface and timing: squash, victim and VP inputs are single-cycle events.
// Lookups on the ins_* lanes are answered one clock later on fence_valid/fence.
// Relative age in the circular ROB is measured from rob_head. The behaviour
// follows the scheme's description; the one-victim-per-cycle insert port, the
// registered lookup, and treating a pending (left-the-ROB) ID as younger than
// any squasher still in the ROB are this design's choices.
module sb_cor
  import jv_pkg::*;
#(
  parameter int unsigned PCW = jv_pkg::PC_W,
  parameter int unsigned ROB = jv_pkg::ROB_ENTRIES,
  parameter int unsigned M   = jv_pkg::BF_ENTRIES,
  parameter int unsigned N   = jv_pkg::BF_HASHES,
  parameter int unsigned L   = jv_pkg::LANES,
  localparam int unsigned RW = $clog2(ROB),
  localparam int unsigned IW = $clog2(M)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [RW-1:0]  rob_head,
  // a squash: the Squashing instruction
  input  logic           squash_valid,
  input  logic [PCW-1:0] squash_pc,
  input  logic [RW-1:0]  squash_rob_idx,
  input  logic           squash_removed,   // squasher leaves the ROB
  // Victim PCs, one per cycle
  input  logic           victim_valid,
  input  logic [PCW-1:0] victim_pc,
  // an instruction reached its VP
  input  logic           vp_valid,
  input  logic [RW-1:0]  vp_rob_idx,
  // instructions about to be inserted in the ROB
  input  logic           ins_valid   [L],
  input  logic [PCW-1:0] ins_pc      [L],
  input  logic [RW-1:0]  ins_rob_idx [L],
  output logic           fence_valid [L],
  output logic           fence       [L],
  // state, for observation
  output logic           id_valid,
  output logic           id_pending,      // squasher left the ROB, not back yet
  output logic [PCW-1:0] id_pc,
  output logic [RW-1:0]  id_rob_idx,
  output logic           cleared          // pulse: ID reached its VP
);
  logic [IW-1:0] vic_idx [N];
  logic [IW-1:0] q_idx   [L][N];
  logic          q_hit   [L];
  logic          bf_empty;

  bf_hash #(.PCW(PCW), .M(M), .N(N)) u_hv (.pc(victim_pc), .idx(vic_idx));
  for (genvar g = 0; g < L; g++) begin : g_qh
    bf_hash #(.PCW(PCW), .M(M), .N(N)) u_hq (.pc(ins_pc[g]), .idx(q_idx[g]));
  end

  function automatic logic [RW-1:0] age(input logic [RW-1:0] idx,
                                        input logic [RW-1:0] head);
    return (idx >= head) ? idx - head : RW'(idx + RW'(ROB) - head);
  endfunction

  logic id_at_vp, take_squash;
  assign id_at_vp = vp_valid && id_valid && !id_pending && (vp_rob_idx == id_rob_idx);
  assign cleared  = id_at_vp;

  always_comb begin
    take_squash = 1'b0;
    if (squash_valid) begin
      if (!id_valid || id_pending || id_at_vp) take_squash = 1'b1;
      else if (age(squash_rob_idx, rob_head) <= age(id_rob_idx, rob_head))
        take_squash = 1'b1;
    end
  end

  bloom_filter #(.M(M), .N(N), .K(1), .Q(L)) u_bf (
    .clk, .rst_n,
    .clear     (id_at_vp),
    .upd_valid (victim_valid),
    .upd_remove(1'b0),
    .upd_idx   (vic_idx),
    .q_idx     (q_idx),
    .q_hit     (q_hit),
    .empty     (bf_empty)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_valid   <= 1'b0;
      id_pending <= 1'b0;
      id_pc      <= '0;
      id_rob_idx <= '0;
    end else begin
      if (id_at_vp) begin
        id_valid   <= 1'b0;
        id_pending <= 1'b0;
      end
      // a removed squasher comes back: capture its new ROB index
      if (id_valid && id_pending) begin
        for (int g = L - 1; g >= 0; g--) begin
          if (ins_valid[g] && ins_pc[g] == id_pc) begin
            id_pending <= 1'b0;
            id_rob_idx <= ins_rob_idx[g];
          end
        end
      end
      if (take_squash) begin
        id_valid   <= 1'b1;
        id_pending <= squash_removed;
        id_pc      <= squash_pc;
        id_rob_idx <= squash_rob_idx;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < L; g++) begin
        fence_valid[g] <= 1'b0;
        fence[g]       <= 1'b0;
      end
    end else begin
      for (int g = 0; g < L; g++) begin
        fence_valid[g] <= ins_valid[g];
        fence[g]       <= ins_valid[g] && q_hit[g];
      end
    end
  end

  // the PC Buffer is only written while a squash is being recorded
  assert property (@(posedge clk) disable iff (!rst_n)
                   victim_valid |-> (id_valid || $past(squash_valid)))
    else $error("sb_cor: victim inserted with no Squashing instruction in ID");
endmodule
