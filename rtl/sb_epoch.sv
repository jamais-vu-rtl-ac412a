// sb_epoch: Squashed Buffer of the Epoch scheme (Epoch-Rem by default).
//
// It holds P {ID, PC-Buffer} pairs, one per in-progress epoch, each PC Buffer a
// counting Bloom filter, plus one extra OverflowID register with no PC Buffer.
//   * Victim insert (upd_remove = 0): the Victim's PC goes into the pair whose
//     ID equals the Victim's epoch. If no pair owns that epoch a free pair is
//     taken (lowest index first) and its ID set. If no pair is free, the epoch
//     overflows and OverflowID becomes the highest overflowed epoch ID. An
//     epoch that owns no pair and is not above OverflowID is already covered by
//     the overflow and never takes a pair later.
//   * Removal (upd_remove = 1, only when REM = 1): a fenced Victim reached its
//     VP, so its PC is taken out of its epoch's filter.
//   * Epoch VP: when the first instruction of epoch E reaches its VP, every
//     pair whose ID is older than E is cleared and freed, and OverflowID is
//     cleared once E is younger than it (that epoch has fully retired).
//   * Lookup: an instruction of epoch E about to enter the ROB is fenced if the
//     pair owning E reports a hit, or if no pair owns E and E is not above a
//     valid OverflowID.
//
// Interface and timing: one update per cycle (insert or remove); lookups on
// the ins_* lanes are answered one clock later. Epoch IDs are EPOCH_W-bit
// counters compared in wrapping arithmetic. Sizes (12 pairs, 1232 entries,
// 7 hashes, 4 bits) follow the evaluated configuration; the lowest-free-pair
// allocation, the registered lookup and the ID width are this design's choices.
module sb_epoch
  import jv_pkg::*;
#(
  parameter int unsigned PCW = jv_pkg::PC_W,
  parameter int unsigned EW  = jv_pkg::EPOCH_W,
  parameter int unsigned P   = jv_pkg::EPOCH_PAIRS,
  parameter int unsigned M   = jv_pkg::BF_ENTRIES,
  parameter int unsigned N   = jv_pkg::BF_HASHES,
  parameter int unsigned K   = jv_pkg::CBF_BITS,
  parameter int unsigned L   = jv_pkg::LANES,
  parameter bit          REM = 1'b1,
  localparam int unsigned IW = $clog2(M)
) (
  input  logic           clk,
  input  logic           rst_n,
  // Victim insert / VP removal
  input  logic           upd_valid,
  input  logic           upd_remove,
  input  logic [PCW-1:0] upd_pc,
  input  logic [EW-1:0]  upd_epoch,
  // first instruction of an epoch reached its VP
  input  logic           epoch_vp_valid,
  input  logic [EW-1:0]  epoch_vp_id,
  // lookups
  input  logic           ins_valid [L],
  input  logic [PCW-1:0] ins_pc    [L],
  input  logic [EW-1:0]  ins_epoch [L],
  output logic           fence_valid [L],
  output logic           fence       [L],
  // state, for observation
  output logic [P-1:0]   pair_valid,
  output logic           overflow_valid,
  output logic [EW-1:0]  overflow_id,
  output logic           overflow_evt     // pulse: a Victim found no pair
);
  logic [EW-1:0] pair_id [P];

  logic [IW-1:0] u_idx [N];
  logic [IW-1:0] q_idx [L][N];
  bf_hash #(.PCW(PCW), .M(M), .N(N)) u_hu (.pc(upd_pc), .idx(u_idx));
  for (genvar g = 0; g < L; g++) begin : g_qh
    bf_hash #(.PCW(PCW), .M(M), .N(N)) u_hq (.pc(ins_pc[g]), .idx(q_idx[g]));
  end

  // ---- update decode --------------------------------------------------------
  logic         u_own_hit;
  logic [P-1:0] u_own;          // pair owning upd_epoch
  logic         u_free_hit;
  logic [P-1:0] u_free;         // lowest free pair
  logic         u_covered;      // epoch already covered by OverflowID
  logic [P-1:0] p_clear;        // pair cleared by an epoch VP
  logic [P-1:0] p_upd;          // pair receiving the update
  logic         ins_alloc, ins_ovf;

  always_comb begin
    u_own = '0; u_own_hit = 1'b0;
    u_free = '0; u_free_hit = 1'b0;
    for (int unsigned p = 0; p < P; p++) begin
      if (pair_valid[p] && pair_id[p] == upd_epoch) begin
        u_own[p] = 1'b1; u_own_hit = 1'b1;
      end
      p_clear[p] = epoch_vp_valid && pair_valid[p] && epoch_older(pair_id[p], epoch_vp_id);
    end
    for (int p = int'(P) - 1; p >= 0; p--) begin
      if (!pair_valid[p]) begin
        u_free = '0; u_free[p] = 1'b1; u_free_hit = 1'b1;
      end
    end
    u_covered = overflow_valid && !epoch_older(overflow_id, upd_epoch);
    ins_alloc = upd_valid && !upd_remove && !u_own_hit && !u_covered && u_free_hit;
    ins_ovf   = upd_valid && !upd_remove && !u_own_hit && !u_covered && !u_free_hit;
    if (upd_valid && !upd_remove)      p_upd = u_own_hit ? u_own : (ins_alloc ? u_free : '0);
    else if (upd_valid && REM)         p_upd = u_own;
    else                               p_upd = '0;
  end
  assign overflow_evt = ins_ovf;

  // ---- pairs ---------------------------------------------------------------
  logic q_hit [P][L];
  for (genvar p = 0; p < P; p++) begin : g_pair
    logic e_unused;
    bloom_filter #(.M(M), .N(N), .K(K), .Q(L)) u_bf (
      .clk, .rst_n,
      .clear     (p_clear[p]),
      .upd_valid (p_upd[p] && !p_clear[p]),
      .upd_remove(upd_remove),
      .upd_idx   (u_idx),
      .q_idx     (q_idx),
      .q_hit     (q_hit[p]),
      .empty     (e_unused)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pair_valid     <= '0;
      overflow_valid <= 1'b0;
      overflow_id    <= '0;
      for (int unsigned p = 0; p < P; p++) pair_id[p] <= '0;
    end else begin
      for (int unsigned p = 0; p < P; p++) begin
        if (p_clear[p]) pair_valid[p] <= 1'b0;
        if (ins_alloc && u_free[p]) begin
          pair_valid[p] <= 1'b1;
          pair_id[p]    <= upd_epoch;
        end
      end
      if (epoch_vp_valid && overflow_valid && epoch_older(overflow_id, epoch_vp_id))
        overflow_valid <= 1'b0;
      if (ins_ovf) begin
        overflow_valid <= 1'b1;
        if (!overflow_valid || epoch_older(overflow_id, upd_epoch) ||
            (epoch_vp_valid && epoch_older(overflow_id, epoch_vp_id)))
          overflow_id <= upd_epoch;
      end
    end
  end

  // ---- lookups ---------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < L; g++) begin
        fence_valid[g] <= 1'b0;
        fence[g]       <= 1'b0;
      end
    end else begin
      for (int g = 0; g < L; g++) begin
        logic owned, hit;
        owned = 1'b0; hit = 1'b0;
        for (int unsigned p = 0; p < P; p++) begin
          if (pair_valid[p] && pair_id[p] == ins_epoch[g]) begin
            owned = 1'b1;
            hit   = q_hit[p][g];
          end
        end
        if (!owned && overflow_valid && !epoch_older(overflow_id, ins_epoch[g]))
          hit = 1'b1;
        fence_valid[g] <= ins_valid[g];
        fence[g]       <= ins_valid[g] && hit;
      end
    end
  end

  // at most one pair may own an epoch
  always_comb begin
    if (rst_n) assert ($countones(u_own) <= 1) else $error("sb_epoch: epoch owned twice");
  end
endmodule
