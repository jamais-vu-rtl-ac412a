// jamais_vu_top: a fence unit that thwarts microarchitectural replay attacks.
//
// An attacker who can repeatedly squash the pipeline (page faults, branch
// mispredictions, memory-consistency violations) can make a younger "victim"
// instruction execute many times and so denoise any side channel it drives.
// This unit sits beside the reorder buffer (ROB). It records the instructions
// that get squashed (Victims) and, when one of them is about to enter the ROB
// again, tells the pipeline to place a fence before it, so it cannot execute
// until it reaches its Visibility Point (VP) and can no longer be squashed.
//
// Three recording schemes run side by side and scheme selects the one whose
// decision drives fence:
//   * Clear-on-Retire (sb_cor): one plain Bloom filter of Victim PCs, cleared
//     when the oldest Squashing instruction reaches its VP.
//   * Epoch-Rem (sb_epoch + epoch_tracker): one counting Bloom filter per
//     in-progress epoch (12 pairs plus OverflowID); a Victim's PC is removed
//     when it reaches its VP and an epoch's record is dropped when a younger
//     epoch's first instruction reaches its VP.
//   * Counter (counter_cache): a 4-bit Squashed Counter per static instruction,
//     kept in memory and cached in a 32x4 Counter Cache.
// A squash_alarm flags a single instruction that squashes the pipeline more
// than a few times, which fencing cannot prevent.
//
// Interface (the ROB/pipeline is outside this unit):
//   * ins_*  : up to LANES instructions about to enter the ROB, in program
//     order, with their start-of-epoch marker. The fence answer per lane comes
//     back on the per-scheme outputs: Clear-on-Retire and Epoch one clock
//     later, Counter two clocks later (with CounterPending); fence_valid/fence
//     carry the selected scheme's answer with that scheme's latency. A
//     cor_clear pulse tells the pipeline to drop every fence Clear-on-Retire
//     has placed, because its Squashing instruction has reached its VP.
//   * squash_*: one-cycle event naming the Squashing instruction, whether it
//     leaves the ROB (exception, consistency violation) or stays (branch).
//   * upd_*  : valid/ready channel, one event per transfer, in order: each
//     Victim of a squash (oldest first), each instruction that reaches its VP
//     (with the fence flags it received from Epoch and Counter), and context
//     switches (flush of the Counter Cache). Only Counter Cache misses and the
//     flush make the channel wait.
//   * mem_*  : Counter Cache requests to the TLB and cache hierarchy.
// What each scheme does follows the published schemes; the serialized update channel,
// the lane count and the latencies are this design's choices.
module jamais_vu_top
  import jv_pkg::*;
#(
  parameter int unsigned PCW   = jv_pkg::PC_W,
  parameter int unsigned ROB   = jv_pkg::ROB_ENTRIES,
  parameter int unsigned M     = jv_pkg::BF_ENTRIES,
  parameter int unsigned N     = jv_pkg::BF_HASHES,
  parameter int unsigned K     = jv_pkg::CBF_BITS,
  parameter int unsigned P     = jv_pkg::EPOCH_PAIRS,
  parameter int unsigned EW    = jv_pkg::EPOCH_W,
  parameter int unsigned SETS  = jv_pkg::CC_SETS,
  parameter int unsigned WAYS  = jv_pkg::CC_WAYS,
  parameter int unsigned LB    = jv_pkg::LINE_BYTES,
  parameter int unsigned CW    = jv_pkg::CTR_BITS,
  parameter int unsigned L     = jv_pkg::LANES,
  localparam int unsigned RW   = $clog2(ROB),
  localparam int unsigned MEMW = LB * 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  scheme_e         scheme,
  input  logic [RW-1:0]   rob_head,
  input  logic [PCW-1:0]  cc_offset,
  // ROB insertion and fence answers
  input  logic            ins_valid   [L],
  input  logic [PCW-1:0]  ins_pc      [L],
  input  logic [RW-1:0]   ins_rob_idx [L],
  input  logic            ins_start   [L],
  output logic [EW-1:0]   ins_epoch   [L],
  output logic            fence_valid [L],
  output logic            fence       [L],
  output logic            cor_fence_valid [L],
  output logic            cor_fence       [L],
  output logic            ep_fence_valid  [L],
  output logic            ep_fence        [L],
  output logic            cc_fence_valid  [L],
  output logic            cc_fence        [L],
  output logic            cc_pending      [L],
  output logic            cor_clear,        // Clear-on-Retire fences are nullified
  // squash
  input  logic            squash_valid,
  input  logic [PCW-1:0]  squash_pc,
  input  logic [RW-1:0]   squash_rob_idx,
  input  logic            squash_removed,
  // Victims, VPs, context switches
  input  logic            upd_valid,
  output logic            upd_ready,
  input  upd_op_e         upd_op,
  input  logic [PCW-1:0]  upd_pc,
  input  logic [RW-1:0]   upd_rob_idx,
  input  logic            upd_ep_fenced,
  input  logic            upd_cc_fenced,
  // Counter Cache memory port
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output logic            mem_req_write,
  output logic [PCW-1:0]  mem_req_addr,
  output logic [MEMW-1:0] mem_req_wdata,
  input  logic            mem_rsp_valid,
  input  logic [MEMW-1:0] mem_rsp_data,
  // attack alarm
  output logic            alarm,
  output logic [PCW-1:0]  alarm_pc,
  output logic            alarm_seen
);
  // ---- update channel decode --------------------------------------------------
  logic   is_vic, is_vp, is_ctx, need_cc, cc_ready, fire;
  cc_op_e cc_op;
  assign is_vic  = (upd_op == UPD_VICTIM);
  assign is_vp   = (upd_op == UPD_VP);
  assign is_ctx  = (upd_op == UPD_CTX);
  assign need_cc = is_vic || is_ctx || (is_vp && upd_cc_fenced);
  assign cc_op   = is_ctx ? CC_FLUSH : (is_vic ? CC_INC : CC_DEC);
  assign upd_ready = need_cc ? cc_ready : 1'b1;
  assign fire      = upd_valid && upd_ready;

  // ---- epoch IDs -------------------------------------------------------------
  logic [RW-1:0] sq_first;
  logic [EW-1:0] upd_epoch, vp_epoch, cur_epoch;
  logic          epoch_vp_valid;
  assign sq_first = squash_removed ? squash_rob_idx
                  : ((squash_rob_idx == RW'(ROB - 1)) ? '0 : squash_rob_idx + 1'b1);

  epoch_tracker #(.ROB(ROB), .EW(EW), .L(L)) u_epoch_trk (
    .clk, .rst_n,
    .ins_valid, .ins_rob_idx, .ins_start, .ins_epoch,
    .squash_valid, .squash_first_idx(sq_first),
    .rd_idx(upd_rob_idx), .rd_epoch(upd_epoch),
    .vp_valid(fire && is_vp), .vp_idx(upd_rob_idx), .vp_epoch(vp_epoch),
    .epoch_vp_valid, .cur_epoch
  );

  // ---- Clear-on-Retire -------------------------------------------------------
  logic           cor_id_valid, cor_id_pending, cor_cleared;
  logic [PCW-1:0] cor_id_pc;
  logic [RW-1:0]  cor_id_rob_idx;

  sb_cor #(.PCW(PCW), .ROB(ROB), .M(M), .N(N), .L(L)) u_cor (
    .clk, .rst_n, .rob_head,
    .squash_valid, .squash_pc, .squash_rob_idx, .squash_removed,
    .victim_valid(fire && is_vic), .victim_pc(upd_pc),
    .vp_valid(fire && is_vp), .vp_rob_idx(upd_rob_idx),
    .ins_valid, .ins_pc, .ins_rob_idx,
    .fence_valid(cor_fence_valid), .fence(cor_fence),
    .id_valid(cor_id_valid), .id_pending(cor_id_pending), .id_pc(cor_id_pc),
    .id_rob_idx(cor_id_rob_idx), .cleared(cor_cleared)
  );

  assign cor_clear = cor_cleared;

  // ---- Epoch-Rem -----------------------------------------------------------
  logic [P-1:0]  ep_pair_valid;
  logic          ep_ovf_valid, ep_ovf_evt;
  logic [EW-1:0] ep_ovf_id;

  sb_epoch #(.PCW(PCW), .EW(EW), .P(P), .M(M), .N(N), .K(K), .L(L), .REM(1'b1)) u_epoch (
    .clk, .rst_n,
    .upd_valid (fire && (is_vic || (is_vp && upd_ep_fenced))),
    .upd_remove(is_vp),
    .upd_pc,
    .upd_epoch,
    .epoch_vp_valid, .epoch_vp_id(vp_epoch),
    .ins_valid, .ins_pc, .ins_epoch,
    .fence_valid(ep_fence_valid), .fence(ep_fence),
    .pair_valid(ep_pair_valid), .overflow_valid(ep_ovf_valid),
    .overflow_id(ep_ovf_id), .overflow_evt(ep_ovf_evt)
  );

  // ---- Counter ---------------------------------------------------------------
  logic [CW-1:0] cc_ctr [L];
  logic          cc_busy;

  counter_cache #(.PCW(PCW), .SETS(SETS), .WAYS(WAYS), .LB(LB), .CW(CW), .L(L)) u_cc (
    .clk, .rst_n, .offset(cc_offset),
    .q_valid(ins_valid), .q_va(ins_pc),
    .r_valid(cc_fence_valid), .r_ctr(cc_ctr), .r_pending(cc_pending), .r_fence(cc_fence),
    .upd_valid(upd_valid && need_cc), .upd_ready(cc_ready), .upd_op(cc_op), .upd_va(upd_pc),
    .mem_req_valid, .mem_req_ready, .mem_req_write, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_data, .busy(cc_busy)
  );

  // ---- repeated-squash alarm ---------------------------------------------------
  squash_alarm #(.PCW(PCW)) u_alarm (
    .clk, .rst_n,
    .squash_valid, .squash_pc,
    .vp_valid(fire && is_vp), .vp_pc(upd_pc),
    .alarm, .alarm_pc, .alarm_seen
  );

  // ---- selected scheme ---------------------------------------------------------
  always_comb begin
    for (int g = 0; g < L; g++) begin
      unique case (scheme)
        SCHEME_EPOCH:   begin fence_valid[g] = ep_fence_valid[g];  fence[g] = ep_fence[g];  end
        SCHEME_COUNTER: begin fence_valid[g] = cc_fence_valid[g];  fence[g] = cc_fence[g];  end
        default:        begin fence_valid[g] = cor_fence_valid[g]; fence[g] = cor_fence[g]; end
      endcase
    end
  end

  // events of one kind at a time: a squash is not mixed with ROB insertions
  always_comb begin
    if (rst_n && squash_valid) begin
      for (int g = 0; g < L; g++)
        assert (!ins_valid[g]) else $error("jamais_vu_top: insertion during a squash");
    end
  end
endmodule
