// jv_pkg: constants, types and the Bloom-filter hash shared by the replay-attack
// fence unit.
//
// The sizes are those of the evaluated configuration: a 192-entry ROB, Bloom
// filters of 1232 entries probed by 7 hash functions, 4-bit counting entries,
// 12 {ID, PC-Buffer} pairs for the Epoch scheme, and a 32-set 4-way Counter
// Cache of 4-bit counters over 64-byte instruction lines. The PC width, the
// epoch-ID width, the number of insertion lanes and the hash functions
// themselves are this design's own choices (the hash functions are not
// specified beyond "n hash functions").
package jv_pkg;

  // ---- sizes of the evaluated configuration --------------------------------
  localparam int unsigned ROB_ENTRIES = 192;   // ROB entries
  localparam int unsigned BF_ENTRIES  = 1232;  // M, entries per Bloom filter
  localparam int unsigned BF_HASHES   = 7;     // n, hash functions
  localparam int unsigned CBF_BITS    = 4;     // k, bits per counting entry
  localparam int unsigned EPOCH_PAIRS = 12;    // {ID, PC-Buffer} pairs (Epoch)
  localparam int unsigned CC_SETS     = 32;    // Counter Cache sets
  localparam int unsigned CC_WAYS     = 4;     // Counter Cache ways
  localparam int unsigned CTR_BITS    = 4;     // bits per Squashed Counter
  localparam int unsigned LINE_BYTES  = 64;    // I-cache line size

  // ---- this design's own choices ----------------------------------------
  localparam int unsigned PC_W        = 48;    // x86-64 virtual address bits
  localparam int unsigned EPOCH_W     = 8;     // small epoch identifier
  // 14 read ports / 7 hash functions = 2 filter queries per cycle
  localparam int unsigned LANES       = 2;

  // Which scheme's fence decision the pipeline obeys.
  typedef enum logic [1:0] {
    SCHEME_COR     = 2'd0,   // Clear-on-Retire
    SCHEME_EPOCH   = 2'd1,   // Epoch-Rem
    SCHEME_COUNTER = 2'd2    // Counter
  } scheme_e;

  // Serialized update events from the ROB to the fence unit.
  typedef enum logic [1:0] {
    UPD_VICTIM = 2'd0,   // a squashed (Victim) instruction
    UPD_VP     = 2'd1,   // an instruction reached its Visibility Point
    UPD_CTX    = 2'd2    // context switch: flush the Counter Cache
  } upd_op_e;

  // Counter Cache operations.
  typedef enum logic [1:0] {
    CC_INC   = 2'd0,     // Victim squashed: counter++
    CC_DEC   = 2'd1,     // fenced instruction at its VP: counter-- (floor 0)
    CC_FLUSH = 2'd2      // write back every dirty line, invalidate all
  } cc_op_e;

  // Fold a PC to 32 bits.
  function automatic logic [31:0] pc_fold(input logic [63:0] pc);
    return pc[31:0] ^ {pc[63:48], pc[47:32]};
  endfunction

  // Hash function H_i: multiply-xorshift mix of the folded PC with a per-hash
  // odd constant, then scaled to [0, m) by taking the high part of x*m.
  function automatic logic [31:0] bf_hash_idx(input logic [63:0] pc,
                                              input int unsigned i,
                                              input int unsigned m);
    logic [31:0] x;
    logic [63:0] p;
    x = pc_fold(pc) ^ (32'h9E37_79B9 * (i + 1));
    x = x * (32'h85EB_CA6B + 32'(i) * 32'h0000_2C1A);
    x = x ^ (x >> 15);
    x = x * 32'hC2B2_AE35;
    x = x ^ (x >> 13);
    p = 64'(x) * 64'(m);
    return p[63:32];
  endfunction

  // a is older than b in wrapping (serial-number) epoch arithmetic.
  function automatic logic epoch_older(input logic [EPOCH_W-1:0] a,
                                       input logic [EPOCH_W-1:0] b);
    logic [EPOCH_W-1:0] d;
    d = a - b;
    return d[EPOCH_W-1];
  endfunction

endpackage
