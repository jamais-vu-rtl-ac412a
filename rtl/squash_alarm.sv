// squash_alarm: guard against one instruction squashing the pipeline again and
// again.
//
// Fencing cannot stop a Squashing instruction that is itself squashed during
// its own execution (the replay handle of a page-fault replay attack) from
// flushing the pipeline repeatedly. The hardware therefore allows a dynamic
// instruction only a very small number of repeated flushes before it raises an
// attack alarm. This block keeps a small table of recent Squashing instructions,
// identified by PC, each with a count of the flushes it caused. A count above
// THRESH raises alarm (a one-cycle pulse with alarm_pc) and the sticky
// alarm_seen flag, cleared only by reset. When a tracked instruction reaches its
// VP it has made forward progress and its entry is freed. A new squasher takes a
// free entry, or replaces entries in round-robin order when the table is full.
//
// Interface and timing: squash and VP are single-cycle events; alarm is
// registered (one cycle after the squash that crosses the threshold). The
// requirement comes from the published scheme; the table size, THRESH, PC-based
// identity and round-robin replacement are this design's choices.
module squash_alarm
  import jv_pkg::*;
#(
  parameter int unsigned PCW     = jv_pkg::PC_W,
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned THRESH  = 4,
  localparam int unsigned CNTW   = $clog2(THRESH + 2),
  localparam int unsigned EB     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           squash_valid,
  input  logic [PCW-1:0] squash_pc,
  input  logic           vp_valid,
  input  logic [PCW-1:0] vp_pc,
  output logic           alarm,
  output logic [PCW-1:0] alarm_pc,
  output logic           alarm_seen
);
  logic            ev  [ENTRIES];
  logic [PCW-1:0]  epc [ENTRIES];
  logic [CNTW-1:0] cnt [ENTRIES];
  logic [EB-1:0]   rr;

  logic          s_hit, s_free_hit;
  logic [EB-1:0] s_way, s_free;

  always_comb begin
    s_hit = 1'b0; s_way = '0; s_free_hit = 1'b0; s_free = '0;
    for (int e = int'(ENTRIES) - 1; e >= 0; e--) begin
      if (ev[e] && epc[e] == squash_pc) begin s_hit = 1'b1; s_way = EB'(e); end
      if (!ev[e])                      begin s_free_hit = 1'b1; s_free = EB'(e); end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr         <= '0;
      alarm      <= 1'b0;
      alarm_pc   <= '0;
      alarm_seen <= 1'b0;
      for (int unsigned e = 0; e < ENTRIES; e++) begin
        ev[e] <= 1'b0; epc[e] <= '0; cnt[e] <= '0;
      end
    end else begin
      alarm <= 1'b0;
      if (vp_valid) begin
        for (int unsigned e = 0; e < ENTRIES; e++)
          if (ev[e] && epc[e] == vp_pc) ev[e] <= 1'b0;
      end
      if (squash_valid) begin
        if (s_hit) begin
          if (cnt[s_way] != '1) cnt[s_way] <= cnt[s_way] + 1'b1;
          if (cnt[s_way] + 1'b1 > CNTW'(THRESH)) begin
            alarm      <= 1'b1;
            alarm_pc   <= squash_pc;
            alarm_seen <= 1'b1;
          end
        end else begin
          logic [EB-1:0] w;
          w = s_free_hit ? s_free : rr;
          if (!s_free_hit) rr <= (rr == EB'(ENTRIES - 1)) ? '0 : rr + 1'b1;
          ev[w]  <= 1'b1;
          epc[w] <= squash_pc;
          cnt[w] <= CNTW'(1);
          if (THRESH == 0) begin
            alarm <= 1'b1; alarm_pc <= squash_pc; alarm_seen <= 1'b1;
          end
        end
      end
    end
  end
endmodule
