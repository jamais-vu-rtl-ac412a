// bf_hash: the n hash functions H_1..H_n of a PC Buffer (Bloom filter).
//
// Purely combinational. One PC in, N filter indices out, each in [0, M). The
// same indices feed every filter of a Squashed Buffer, so one bf_hash serves a
// query lane or an update port of all filters at once. The published scheme asks for n
// independent hash functions of the PC; the mixing function (jv_pkg::bf_hash_idx,
// a multiply/xor-shift mix scaled to M by a multiply-high) is this design's choice.
module bf_hash
  import jv_pkg::*;
#(
  parameter int unsigned PCW = jv_pkg::PC_W,
  parameter int unsigned M   = jv_pkg::BF_ENTRIES,
  parameter int unsigned N   = jv_pkg::BF_HASHES,
  localparam int unsigned IW = $clog2(M)
) (
  input  logic [PCW-1:0] pc,
  output logic [IW-1:0]  idx [N]
);
  always_comb begin
    for (int unsigned h = 0; h < N; h++) begin
      idx[h] = IW'(bf_hash_idx(64'(pc), h, M));
    end
  end
endmodule
