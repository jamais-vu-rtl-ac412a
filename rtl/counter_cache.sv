// counter_cache: the Counter Cache (CC) of the Counter scheme.
//
// Every static instruction has a 4-bit Squashed Counter: it is raised by one
// each time an instance of the instruction is squashed and lowered by one
// (never below zero) each time a fenced instance reaches its Visibility Point
// (VP). An instruction about to enter the ROB is fenced when its counter is
// above THRESH (0: any non-zero counter) or when its counter is not in the CC.
// The counters live in memory, one byte per instruction byte at a fixed virtual
// offset (Offset) from the instruction, with the counter in the byte's low
// bits; the CC keeps only the counter bits, so a 64-byte line of counters is
// compacted to 32 bytes. The CC is set-associative (32 sets x 4 ways) and is
// indexed and tagged with the instruction's line address.
//
// Side-channel rules: a lookup never changes CC state. On a hit the counter is
// returned; on a miss CounterPending is returned and nothing else happens. LRU
// is updated only when a fenced instruction reaches its VP (CC_DEC) or a line
// is filled; a miss is fetched from memory only by CC_DEC (at the VP) or by
// CC_INC (after a squash). CC_FLUSH writes back every dirty line and
// invalidates the CC, as at a context switch.
//
// Interface and timing:
//   * Lookup lanes q_*: the answer appears on r_* exactly two clocks later (the
//     2-cycle round trip of the evaluated configuration).
//   * Update channel upd_*: valid/ready. Hold upd_valid and upd_op/upd_va until
//     upd_ready. A hit completes in the cycle it is presented; a miss writes
//     back a dirty victim, reads the counter line, installs it and then
//     completes.
//   * Memory port mem_*: requests carry the counter line's virtual address (the
//     TLB and cache hierarchy beyond it are not part of this block). Reads are
//     answered on mem_rsp_valid; writes have no answer.
// Counter rules, sizes and the side-channel rules follow the published scheme. Treating
// a squash-time miss like a VP miss, true-LRU replacement, the memory port and
// a line-aligned Offset are this design's choices.
module counter_cache
  import jv_pkg::*;
#(
  parameter int unsigned PCW    = jv_pkg::PC_W,
  parameter int unsigned SETS   = jv_pkg::CC_SETS,
  parameter int unsigned WAYS   = jv_pkg::CC_WAYS,
  parameter int unsigned LB     = jv_pkg::LINE_BYTES,
  parameter int unsigned CW     = jv_pkg::CTR_BITS,
  parameter int unsigned L      = jv_pkg::LANES,
  parameter int unsigned THRESH = 0,
  localparam int unsigned OB    = $clog2(LB),
  localparam int unsigned SB    = $clog2(SETS),
  localparam int unsigned WB    = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned TW    = PCW - OB - SB,
  localparam int unsigned LINEW = LB * CW,
  localparam int unsigned MEMW  = LB * 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PCW-1:0]   offset,          // VA distance from code to counters
  // lookups, at ROB insertion
  input  logic             q_valid   [L],
  input  logic [PCW-1:0]   q_va      [L],
  output logic             r_valid   [L],
  output logic [CW-1:0]    r_ctr     [L],
  output logic             r_pending [L],   // CounterPending
  output logic             r_fence   [L],
  // counter updates
  input  logic             upd_valid,
  output logic             upd_ready,
  input  cc_op_e           upd_op,
  input  logic [PCW-1:0]   upd_va,
  // memory side
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output logic             mem_req_write,
  output logic [PCW-1:0]   mem_req_addr,
  output logic [MEMW-1:0]  mem_req_wdata,
  input  logic             mem_rsp_valid,
  input  logic [MEMW-1:0]  mem_rsp_data,
  output logic             busy
);
  localparam logic [CW-1:0] CMAX = '1;

  typedef enum logic [2:0] {S_IDLE, S_WB, S_FILL_REQ, S_FILL_WAIT, S_FLUSH} state_e;

  logic             v    [SETS][WAYS];
  logic             d    [SETS][WAYS];
  logic [TW-1:0]    tag  [SETS][WAYS];
  logic [LINEW-1:0] data [SETS][WAYS];
  logic [WB-1:0]    age  [SETS][WAYS];   // 0 = most recently used

  state_e           state;
  cc_op_e           op_q;
  logic [PCW-1:0]   va_q;
  logic [WB-1:0]    vway;
  logic [SB+WB-1:0] fptr;

  function automatic logic [SB-1:0] set_of(input logic [PCW-1:0] va);
    return va[OB +: SB];
  endfunction
  function automatic logic [TW-1:0] tag_of(input logic [PCW-1:0] va);
    return va[PCW-1 -: TW];
  endfunction
  function automatic logic [PCW-1:0] ctr_line(input logic [PCW-1:0] line_va,
                                             input logic [PCW-1:0] off);
    return {line_va[PCW-1:OB] + off[PCW-1:OB], OB'(0)};
  endfunction
  function automatic logic [LINEW-1:0] bump(input logic [LINEW-1:0] line,
                                            input logic [OB-1:0] b, input cc_op_e op);
    logic [LINEW-1:0] r;
    logic [CW-1:0]    c;
    r = line;
    c = line[b*CW +: CW];
    if (op == CC_INC && c != CMAX)   r[b*CW +: CW] = c + CW'(1);
    if (op == CC_DEC && c != '0)     r[b*CW +: CW] = c - CW'(1);
    return r;
  endfunction

  // ---- lookup pipeline (2 cycles) --------------------------------------------
  logic           s1_valid [L];
  logic [PCW-1:0] s1_va    [L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < L; g++) begin
        s1_valid[g] <= 1'b0; s1_va[g] <= '0;
        r_valid[g] <= 1'b0; r_ctr[g] <= '0; r_pending[g] <= 1'b0; r_fence[g] <= 1'b0;
      end
    end else begin
      for (int g = 0; g < L; g++) begin
        logic          hit;
        logic [CW-1:0] c;
        logic [SB-1:0] s;
        s1_valid[g] <= q_valid[g];
        s1_va[g]    <= q_va[g];
        s   = set_of(s1_va[g]);
        hit = 1'b0;
        c   = '0;
        for (int unsigned w = 0; w < WAYS; w++) begin
          if (v[s][w] && tag[s][w] == tag_of(s1_va[g])) begin
            hit = 1'b1;
            c   = data[s][w][s1_va[g][OB-1:0]*CW +: CW];
          end
        end
        r_valid[g]   <= s1_valid[g];
        r_ctr[g]     <= c;
        r_pending[g] <= s1_valid[g] && !hit;
        r_fence[g]   <= s1_valid[g] && (!hit || c > CW'(THRESH));
      end
    end
  end

  // ---- update side -------------------------------------------------------------
  logic [SB-1:0] u_set;
  logic [TW-1:0] u_tag;
  logic          u_hit;
  logic [WB-1:0] u_way;
  logic [WB-1:0] repl_way;
  logic [SB-1:0] f_set;
  logic [WB-1:0] f_way;

  assign u_set = set_of(state == S_IDLE ? upd_va : va_q);
  assign u_tag = tag_of(state == S_IDLE ? upd_va : va_q);
  assign f_set = fptr[SB+WB-1 -: SB];
  assign f_way = (WAYS > 1) ? fptr[WB-1:0] : '0;

  always_comb begin
    u_hit = 1'b0; u_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (v[u_set][w] && tag[u_set][w] == u_tag) begin
        u_hit = 1'b1; u_way = WB'(w);
      end
    end
    // replacement: an invalid way first, else the least recently used one
    repl_way = '0;
    for (int w = int'(WAYS) - 1; w >= 0; w--) begin
      if (age[u_set][w] == WB'(WAYS - 1)) repl_way = WB'(w);
    end
    for (int w = int'(WAYS) - 1; w >= 0; w--) begin
      if (!v[u_set][w]) repl_way = WB'(w);
    end
  end

  always_comb begin
    upd_ready     = 1'b0;
    mem_req_valid = 1'b0;
    mem_req_write = 1'b0;
    mem_req_addr  = '0;
    mem_req_wdata = '0;
    case (state)
      S_IDLE:      upd_ready = upd_valid && upd_op != CC_FLUSH && u_hit;
      S_WB: begin
        mem_req_valid = 1'b1;
        mem_req_write = 1'b1;
        mem_req_addr  = ctr_line({tag[u_set][vway], u_set, OB'(0)}, offset);
        for (int unsigned b = 0; b < LB; b++)
          mem_req_wdata[b*8 +: 8] = 8'(data[u_set][vway][b*CW +: CW]);
      end
      S_FILL_REQ: begin
        mem_req_valid = 1'b1;
        mem_req_addr  = ctr_line({va_q[PCW-1:OB], OB'(0)}, offset);
      end
      S_FILL_WAIT: upd_ready = mem_rsp_valid;
      S_FLUSH: begin
        mem_req_valid = v[f_set][f_way] && d[f_set][f_way];
        mem_req_write = 1'b1;
        mem_req_addr  = ctr_line({tag[f_set][f_way], f_set, OB'(0)}, offset);
        for (int unsigned b = 0; b < LB; b++)
          mem_req_wdata[b*8 +: 8] = 8'(data[f_set][f_way][b*CW +: CW]);
        upd_ready = (fptr == (SB+WB)'(SETS*WAYS - 1)) &&
                    (!mem_req_valid || mem_req_ready);
      end
      default: ;
    endcase
  end
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op_q  <= CC_INC;
      va_q  <= '0;
      vway  <= '0;
      fptr  <= '0;
      for (int unsigned s = 0; s < SETS; s++) begin
        for (int unsigned w = 0; w < WAYS; w++) begin
          v[s][w] <= 1'b0; d[s][w] <= 1'b0; tag[s][w] <= '0; data[s][w] <= '0;
          age[s][w] <= WB'(w);
        end
      end
    end else begin
      case (state)
        S_IDLE: if (upd_valid) begin
          if (upd_op == CC_FLUSH) begin
            state <= S_FLUSH;
            fptr  <= '0;
          end else if (u_hit) begin
            data[u_set][u_way] <= bump(data[u_set][u_way], upd_va[OB-1:0], upd_op);
            if (bump(data[u_set][u_way], upd_va[OB-1:0], upd_op) != data[u_set][u_way])
              d[u_set][u_way] <= 1'b1;
            // LRU moves only at the VP
            if (upd_op == CC_DEC) begin
              for (int unsigned w = 0; w < WAYS; w++)
                if (age[u_set][w] < age[u_set][u_way]) age[u_set][w] <= age[u_set][w] + WB'(1);
              age[u_set][u_way] <= '0;
            end
          end else begin
            op_q  <= upd_op;
            va_q  <= upd_va;
            vway  <= repl_way;
            state <= (v[u_set][repl_way] && d[u_set][repl_way]) ? S_WB : S_FILL_REQ;
          end
        end
        S_WB: if (mem_req_ready) begin
          v[u_set][vway] <= 1'b0;
          d[u_set][vway] <= 1'b0;
          state          <= S_FILL_REQ;
        end
        S_FILL_REQ: if (mem_req_ready) state <= S_FILL_WAIT;
        S_FILL_WAIT: if (mem_rsp_valid) begin
          logic [LINEW-1:0] line;
          for (int unsigned b = 0; b < LB; b++) line[b*CW +: CW] = mem_rsp_data[b*8 +: CW];
          data[u_set][vway] <= bump(line, va_q[OB-1:0], op_q);
          d[u_set][vway]    <= (bump(line, va_q[OB-1:0], op_q) != line);
          v[u_set][vway]    <= 1'b1;
          tag[u_set][vway]  <= u_tag;
          for (int unsigned w = 0; w < WAYS; w++)
            if (age[u_set][w] < age[u_set][vway]) age[u_set][w] <= age[u_set][w] + WB'(1);
          age[u_set][vway]  <= '0;
          state             <= S_IDLE;
        end
        S_FLUSH: if (!mem_req_valid || mem_req_ready) begin
          v[f_set][f_way] <= 1'b0;
          d[f_set][f_way] <= 1'b0;
          fptr            <= fptr + 1'b1;
          if (fptr == (SB+WB)'(SETS*WAYS - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // update requests must stay put until accepted
  assert property (@(posedge clk) disable iff (!rst_n)
                   (upd_valid && !upd_ready) |=> (upd_valid && $stable(upd_op) && $stable(upd_va)))
    else $error("counter_cache: update request changed before it was accepted");
endmodule
