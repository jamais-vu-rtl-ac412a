// epoch_tracker: assigns epoch IDs to instructions as they enter the ROB.
//
// The compiler marks the first instruction of every epoch (a loop, a loop
// iteration, or a procedure body) with a start-of-epoch marker. The tracker
// keeps the current epoch ID; an inserted instruction that carries a marker
// opens the next, monotonically increasing ID. The ID and the marker of every
// in-flight instruction are kept in a table indexed by ROB entry. On a squash
// the current ID is reset to the point of the squash: the first instruction
// that re-enters the ROB gets the same epoch ID as the oldest squashed one.
// When an instruction that opened an epoch reaches its VP, epoch_vp_valid
// reports that epoch so the Squashed Buffer can drop older epochs.
//
// Interface and timing: up to L insertions per cycle, in program order across
// lanes; ins_epoch is combinational. The two table read ports (rd_*, vp_*) are
// combinational. A squash names the ROB index of the oldest squashed
// instruction and takes effect at the next edge; insertions in the same cycle
// are ignored. The ID width and the per-ROB-entry table are this design's
// choices; the restore rule follows the scheme's description.
module epoch_tracker
  import jv_pkg::*;
#(
  parameter int unsigned ROB = jv_pkg::ROB_ENTRIES,
  parameter int unsigned EW  = jv_pkg::EPOCH_W,
  parameter int unsigned L   = jv_pkg::LANES,
  localparam int unsigned RW = $clog2(ROB)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ins_valid   [L],
  input  logic [RW-1:0] ins_rob_idx [L],
  input  logic          ins_start   [L],
  output logic [EW-1:0] ins_epoch   [L],
  input  logic          squash_valid,
  input  logic [RW-1:0] squash_first_idx,   // oldest squashed instruction
  input  logic [RW-1:0] rd_idx,             // epoch of a Victim
  output logic [EW-1:0] rd_epoch,
  input  logic          vp_valid,
  input  logic [RW-1:0] vp_idx,
  output logic [EW-1:0] vp_epoch,
  output logic          epoch_vp_valid,     // an epoch's first instruction at VP
  output logic [EW-1:0] cur_epoch
);
  logic [EW-1:0] ep_tab [ROB];
  logic          st_tab [ROB];

  always_comb begin
    logic [EW-1:0] e;
    e = cur_epoch;
    for (int g = 0; g < L; g++) begin
      if (ins_valid[g] && ins_start[g]) e = e + EW'(1);
      ins_epoch[g] = e;
    end
  end

  assign rd_epoch       = ep_tab[rd_idx];
  assign vp_epoch       = ep_tab[vp_idx];
  assign epoch_vp_valid = vp_valid && st_tab[vp_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_epoch <= '0;
      for (int unsigned r = 0; r < ROB; r++) begin
        ep_tab[r] <= '0;
        st_tab[r] <= 1'b0;
      end
    end else if (squash_valid) begin
      cur_epoch <= ep_tab[squash_first_idx] - EW'(st_tab[squash_first_idx]);
    end else begin
      cur_epoch <= ins_epoch[L-1];
      for (int g = 0; g < L; g++) begin
        if (ins_valid[g]) begin
          ep_tab[ins_rob_idx[g]] <= ins_epoch[g];
          st_tab[ins_rob_idx[g]] <= ins_start[g];
        end
      end
    end
  end
endmodule
