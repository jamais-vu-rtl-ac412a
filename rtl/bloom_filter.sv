// bloom_filter: one PC Buffer, an M-entry (counting) Bloom filter.
//
// Each of the M entries holds K bits. With K = 1 it is the plain filter of the
// Clear-on-Retire scheme: an insert sets the N entries selected by the hash
// indices, a clear zeroes the whole array in one cycle, and remove is ignored.
// With K > 1 it is the counting filter of Epoch-Rem: an insert increments the N
// selected entries and a remove decrements them. An entry saturates at 2^K-1
// (the lost squash is the "saturation" false negative) and does not go below 0.
// A query reports a hit when all N selected entries are non-zero; a filter can
// give false positives but, in the plain form, no false negatives.
//
// Interface: one update port (upd_valid with upd_remove choosing insert or
// remove) carrying N indices, a synchronous clear, and Q query lanes. Queries
// are combinational on the current contents; updates take effect at the next
// clock edge. When clear and insert arrive in the same cycle, the array is
// cleared and the insert is applied on top. If two hash indices of one PC
// coincide, that entry changes once; insert and remove treat duplicates alike,
// so the filter stays balanced. These last points are this design's choices.
//
// Sizes follow the evaluated configuration: M = 1232, N = 7, K = 4 for the
// counting filter.
module bloom_filter #(
  parameter int unsigned M = 1232,
  parameter int unsigned N = 7,
  parameter int unsigned K = 4,
  parameter int unsigned Q = 2,
  localparam int unsigned IW = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          upd_valid,
  input  logic          upd_remove,
  input  logic [IW-1:0] upd_idx [N],
  input  logic [IW-1:0] q_idx   [Q][N],
  output logic          q_hit   [Q],
  output logic          empty             // every entry is zero
);
  localparam logic [K-1:0] KMAX = '1;

  logic [K-1:0] ent [M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned e = 0; e < M; e++) ent[e] <= '0;
    end else begin
      if (clear) begin
        for (int unsigned e = 0; e < M; e++) ent[e] <= '0;
      end
      if (upd_valid) begin
        for (int unsigned h = 0; h < N; h++) begin
          if (!upd_remove) begin
            // insert: counting entries saturate, plain entries are set
            if (clear)                 ent[upd_idx[h]] <= K'(1);
            else if (ent[upd_idx[h]] != KMAX)
                                       ent[upd_idx[h]] <= ent[upd_idx[h]] + K'(1);
          end else if (K > 1 && !clear) begin
            if (ent[upd_idx[h]] != '0) ent[upd_idx[h]] <= ent[upd_idx[h]] - K'(1);
          end
        end
      end
    end
  end

  always_comb begin
    for (int unsigned q = 0; q < Q; q++) begin
      q_hit[q] = 1'b1;
      for (int unsigned h = 0; h < N; h++) begin
        if (ent[q_idx[q][h]] == '0) q_hit[q] = 1'b0;
      end
    end
  end

  always_comb begin
    empty = 1'b1;
    for (int unsigned e = 0; e < M; e++) begin
      if (ent[e] != '0) empty = 1'b0;
    end
  end

  initial begin
    assert (N >= 1 && K >= 1 && M >= 2) else $error("bloom_filter: bad sizes");
  end
endmodule
