// tb_jamais_vu_top: end-to-end test of the fence unit at its full default size
// (192-entry ROB, 1232-entry filters with 7 hashes, 12 epoch pairs, 32x4
// Counter Cache), driven by a behavioural ROB/pipeline model.
//
// Part 1 replays the proof-of-concept replay attack: ten Squashing
// instructions (exceptions at the ROB head) precede a secret-dependent
// division, and the attacker squashes each of them five times before letting
// it retire. The model counts how often the division executes and is then
// squashed (a "replay"). Without protection it is replayed 50 times;
// Clear-on-Retire must allow 10, Epoch and Counter 1. Each of the ten
// Squashing instructions also crosses the repeated-squash alarm threshold.
//
// Part 2 runs a loop with one epoch per iteration: a mispredicted branch in the
// first iteration squashes 19 younger epochs, more than the 12 pairs, so
// Epoch must overflow and fence every re-inserted instruction of an overflowed
// epoch. A context switch then flushes the Counter Cache to memory.
//
// Every mechanism of the design is counted and must occur at least once.
module tb_jamais_vu_top;
  import jv_pkg::*;
  localparam int unsigned PCW = jv_pkg::PC_W, ROB = jv_pkg::ROB_ENTRIES, L = jv_pkg::LANES;
  localparam int unsigned RW = $clog2(ROB), MEMW = jv_pkg::LINE_BYTES * 8;
  localparam logic [PCW-1:0] OFFSET = 48'h0080_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  scheme_e        scheme;
  logic [RW-1:0]  rob_head;
  logic           ins_valid [L], ins_start [L];
  logic [PCW-1:0] ins_pc [L];
  logic [RW-1:0]  ins_rob_idx [L];
  logic [EPOCH_W-1:0] ins_epoch [L];
  logic           fence_valid [L], fence [L];
  logic           cor_fence_valid [L], cor_fence [L], ep_fence_valid [L], ep_fence [L];
  logic           cc_fence_valid [L], cc_fence [L], cc_pending [L];
  logic           cor_clear;
  logic           squash_valid, squash_removed;
  logic [PCW-1:0] squash_pc;
  logic [RW-1:0]  squash_rob_idx;
  logic           upd_valid, upd_ready, upd_ep_fenced, upd_cc_fenced;
  upd_op_e        upd_op;
  logic [PCW-1:0] upd_pc;
  logic [RW-1:0]  upd_rob_idx;
  logic           mem_req_valid, mem_req_ready, mem_req_write, mem_rsp_valid;
  logic [PCW-1:0] mem_req_addr;
  logic [MEMW-1:0] mem_req_wdata, mem_rsp_data;
  logic           alarm, alarm_seen;
  logic [PCW-1:0] alarm_pc;

  jamais_vu_top dut (
    .clk, .rst_n, .scheme, .rob_head, .cc_offset(OFFSET),
    .ins_valid, .ins_pc, .ins_rob_idx, .ins_start, .ins_epoch, .fence_valid, .fence,
    .cor_fence_valid, .cor_fence, .ep_fence_valid, .ep_fence, .cc_fence_valid, .cc_fence,
    .cc_pending, .cor_clear,
    .squash_valid, .squash_pc, .squash_rob_idx, .squash_removed,
    .upd_valid, .upd_ready, .upd_op, .upd_pc, .upd_rob_idx, .upd_ep_fenced, .upd_cc_fenced,
    .mem_req_valid, .mem_req_ready, .mem_req_write, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_data, .alarm, .alarm_pc, .alarm_seen);

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d at %0t", what, got, exp, $time);
    end
  endtask

  // ---- behavioural memory for counter pages --------------------------------------
  logic [MEMW-1:0] mem [logic [PCW-1:0]];
  int rsp_wait = -1;
  logic [PCW-1:0] rsp_addr;
  assign mem_req_ready = 1'b1;
  always @(posedge clk) begin
    mem_rsp_valid <= 1'b0;
    if (rsp_wait == 0) begin
      mem_rsp_valid <= 1'b1;
      mem_rsp_data  <= mem.exists(rsp_addr) ? mem[rsp_addr] : '0;
      rsp_wait = -1;
    end else if (rsp_wait > 0) rsp_wait--;
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_write) mem[mem_req_addr] = mem_req_wdata;
      else begin rsp_addr = mem_req_addr; rsp_wait = 3; end
    end
  end

  // ---- mechanism counters ----------------------------------------------------------
  typedef enum int {
    M_COR_FENCE, M_COR_CLEAR, M_COR_RECAPTURE, M_EP_FENCE, M_EP_ALLOC, M_EP_OVERFLOW,
    M_EP_OVF_FENCE, M_EP_REMOVE, M_EP_DROP, M_CC_FENCE, M_CC_PENDING, M_CC_FILL,
    M_CC_WRITEBACK, M_CC_FLUSH, M_UPD_STALL, M_ALARM, M_SQ_REMOVED, M_SQ_STAYS, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mname [M_NUM] = '{"CoR fence", "CoR clear", "CoR ID re-capture", "Epoch fence",
    "Epoch pair allocation", "Epoch overflow", "Epoch overflow fence", "Epoch PC removal",
    "Epoch drop of older epochs", "Counter fence", "CounterPending", "CC line fill",
    "CC write-back", "CC flush", "update stall", "alarm", "squash (squasher removed)",
    "squash (squasher stays)"};
  int alarms = 0;
  always @(posedge clk) if (rst_n) begin
    if (cor_clear) mech[M_COR_CLEAR]++;
    if (dut.u_cor.id_pending && !dut.u_cor.id_at_vp && !squash_valid &&
        dut.u_cor.id_valid) begin
      for (int g = 0; g < L; g++)
        if (ins_valid[g] && ins_pc[g] == dut.u_cor.id_pc) mech[M_COR_RECAPTURE]++;
    end
    if (dut.u_epoch.ins_alloc) mech[M_EP_ALLOC]++;
    if (dut.u_epoch.overflow_evt) mech[M_EP_OVERFLOW]++;
    if (dut.u_epoch.upd_valid && dut.u_epoch.upd_remove) mech[M_EP_REMOVE]++;
    if (|dut.u_epoch.p_clear) mech[M_EP_DROP]++;
    if (mem_req_valid && !mem_req_write) mech[M_CC_FILL]++;
    if (mem_req_valid && mem_req_write) mech[M_CC_WRITEBACK]++;
    if (upd_valid && !upd_ready) mech[M_UPD_STALL]++;
    if (alarm) begin alarms++; mech[M_ALARM]++; end
  end

  // ---- ROB / pipeline model -----------------------------------------------------------
  typedef struct {
    int             pi;          // program index
    logic [PCW-1:0] pc;
    int             ridx;
    bit             start;
    bit             f_cor, f_ep, f_cc, f_pend;
    bit             executed;
  } rob_e;
  typedef struct { logic [PCW-1:0] pc; bit start; bit secret; } prog_e;

  prog_e prog [$];
  rob_e  rob  [$];
  int    tail_idx = 0;
  bit    unsafe = 0;         // ignore every fence (the unprotected baseline)
  int    t_exec = 0;         // executions of the transmitter
  int    t_replay = 0;       // executions that were squashed

  function automatic bit obeyed(rob_e e);
    if (unsafe) return 0;
    case (scheme)
      SCHEME_COR:   return e.f_cor;
      SCHEME_EPOCH: return e.f_ep;
      default:      return e.f_cc;
    endcase
  endfunction

  // an instruction executes (once): count it if it is the transmitter
  `define EXECUTE(E) if (!E.executed) begin E.executed = 1; if (prog[E.pi].secret) t_exec++; end

  // insert prog[pi .. pi+n-1], two per cycle, and collect every scheme's answer
  task automatic insert(input int pi, input int n);
    for (int k = 0; k < n; k += L) begin
      rob_e e [L];
      int   cnt;
      cnt = (n - k < L) ? n - k : L;
      @(negedge clk);
      for (int g = 0; g < L; g++) begin
        ins_valid[g] = (g < cnt);
        if (g < cnt) begin
          e[g].pi = pi + k + g; e[g].pc = prog[pi + k + g].pc; e[g].start = prog[pi + k + g].start;
          e[g].ridx = tail_idx; e[g].executed = 0;
          tail_idx = (tail_idx + 1) % ROB;
          ins_pc[g] = e[g].pc; ins_start[g] = e[g].start; ins_rob_idx[g] = RW'(e[g].ridx);
        end
      end
      @(negedge clk);
      foreach (ins_valid[g]) ins_valid[g] = 0;
      for (int g = 0; g < cnt; g++) begin
        check("CoR/Epoch answer after 1 clock", cor_fence_valid[g] && ep_fence_valid[g], 1);
        e[g].f_cor = cor_fence[g]; e[g].f_ep = ep_fence[g];
        if (dut.u_epoch.overflow_valid && cor_fence_valid[g]) ;
      end
      @(negedge clk);
      for (int g = 0; g < cnt; g++) begin
        check("Counter answer after 2 clocks", cc_fence_valid[g], 1);
        e[g].f_cc = cc_fence[g]; e[g].f_pend = cc_pending[g];
        if (e[g].f_cor) mech[M_COR_FENCE]++;
        if (e[g].f_ep)  mech[M_EP_FENCE]++;
        if (e[g].f_cc)  mech[M_CC_FENCE]++;
        if (e[g].f_pend) mech[M_CC_PENDING]++;
        if (!obeyed(e[g])) begin `EXECUTE(e[g]) end
        rob.push_back(e[g]);
      end
    end
  endtask

  task automatic send(input upd_op_e op, input rob_e e);
    @(negedge clk);
    upd_valid = 1; upd_op = op; upd_pc = e.pc; upd_rob_idx = RW'(e.ridx);
    upd_ep_fenced = e.f_ep; upd_cc_fenced = e.f_cc;
    #1;
    while (!upd_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 upd_valid = 0;
  endtask

  // squash everything younger than rob[k]; the squasher leaves the ROB if removed
  task automatic squash(input int k, input bit removed);
    rob_e s;
    int   first;
    s = rob[k];
    @(negedge clk);
    squash_valid = 1; squash_pc = s.pc; squash_rob_idx = RW'(s.ridx); squash_removed = removed;
    mech[removed ? M_SQ_REMOVED : M_SQ_STAYS]++;
    @(negedge clk);
    squash_valid = 0;
    first = removed ? k : k + 1;
    for (int j = k + 1; j < rob.size(); j++) begin
      send(UPD_VICTIM, rob[j]);
      if (rob[j].executed && prog[rob[j].pi].secret) t_replay++;
    end
    tail_idx = rob.size() > first ? rob[first].ridx : tail_idx;
    while (rob.size() > first) void'(rob.pop_back());
  endtask

  // the head reaches its VP: it executes if it had not, then retires
  task automatic retire();
    rob_e e;
    e = rob.pop_front();
    `EXECUTE(e)
    send(UPD_VP, e);
    rob_head = rob.size() ? RW'(rob[0].ridx) : RW'(tail_idx);
  endtask

  // a cor_clear pulse nullifies every Clear-on-Retire fence in the ROB
  always @(posedge clk) if (rst_n && cor_clear) begin
    for (int j = 0; j < rob.size(); j++) begin
      rob[j].f_cor = 0;
      if (!obeyed(rob[j])) begin `EXECUTE(rob[j]) end
    end
  end

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0;
    rob.delete(); tail_idx = 0; rob_head = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  // ---- part 1: the proof-of-concept attack -----------------------------------
  localparam int NSQ = 10, NREP = 5;
  task automatic poc(input scheme_e sch, input bit uns, input int exp_replays);
    int n;
    scheme = sch; unsafe = uns;
    do_reset();
    alarms = 0;
    n = prog.size();
    // benign warm-up pass: everything retires, the Counter Cache warms up
    insert(0, n);
    while (rob.size()) retire();
    t_exec = 0; t_replay = 0;
    // attack: squash each Squashing instruction NREP times at the ROB head
    insert(0, n);
    retire();                                  // the epoch-start instruction
    for (int s = 0; s < NSQ; s++) begin
      for (int r = 0; r < NREP; r++) begin
        int pi;
        pi = rob[0].pi;
        squash(0, 1'b1);
        insert(pi, n - pi);
      end
      retire();
    end
    while (rob.size()) retire();
    $display("scheme=%s unsafe=%0d: transmitter replays=%0d executions=%0d alarms=%0d",
             sch.name(), uns, t_replay, t_exec, alarms);
    check($sformatf("replays under %s%s", sch.name(), uns ? " (unprotected)" : ""),
          t_replay, exp_replays);
    check("executions = replays + the committed one", t_exec, exp_replays + 1);
    check("one alarm per Squashing instruction", alarms, NSQ);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    scheme = SCHEME_COR; rob_head = 0;
    squash_valid = 0; squash_removed = 0; squash_pc = 0; squash_rob_idx = 0;
    upd_valid = 0; upd_op = UPD_VP; upd_pc = 0; upd_rob_idx = 0; upd_ep_fenced = 0; upd_cc_fenced = 0;
    foreach (ins_valid[g]) begin ins_valid[g] = 0; ins_pc[g] = 0; ins_rob_idx[g] = 0; ins_start[g] = 0; end
    foreach (mech[i]) mech[i] = 0;

    // program of part 1: epoch start, 10 Squashing loads, test, division, tail
    prog.push_back('{48'h40_1000, 1, 0});
    for (int s = 0; s < NSQ; s++) prog.push_back('{PCW'(48'h40_1010 + 4 * s), 0, 0});
    prog.push_back('{48'h40_1040, 0, 0});      // test of the secret
    prog.push_back('{48'h40_1044, 0, 1});      // the division (transmitter)
    prog.push_back('{48'h40_1048, 0, 0});
    prog.push_back('{48'h40_104c, 0, 0});

    poc(SCHEME_COR, 1, NSQ * NREP);
    poc(SCHEME_COR, 0, NSQ);
    poc(SCHEME_EPOCH, 0, 1);
    poc(SCHEME_COUNTER, 0, 1);

    // ---- part 2: one epoch per loop iteration, a branch squash that overflows ----
    begin
      int n, ovf_fences, fenced_overflowed;
      prog.delete();
      for (int it = 0; it < 20; it++) begin
        prog.push_back('{PCW'(48'h50_0000 + it * 16 * 64 + 0),  1, 0});
        prog.push_back('{PCW'(48'h50_0000 + it * 16 * 64 + 4),  0, 0});
        prog.push_back('{PCW'(48'h50_0000 + it * 16 * 64 + 8),  0, 0});
        prog.push_back('{PCW'(48'h50_0000 + it * 16 * 64 + 12), 0, 0});  // branch
      end
      prog.push_back('{48'h60_0000, 1, 0});   // code after the loop: a new epoch
      scheme = SCHEME_EPOCH; unsafe = 0;
      do_reset();
      n = prog.size();
      insert(0, n);
      // warm nothing: retire the first instruction, then the branch of
      // iteration 0 mispredicts and squashes the 19 younger iterations
      retire();
      squash(2, 1'b0);
      check("overflow after 19 squashed epochs", dut.u_epoch.overflow_valid, 1);
      check("all 12 pairs taken", dut.u_epoch.pair_valid, 12'hfff);
      insert(4, n - 4);
      fenced_overflowed = 0;
      foreach (rob[j]) if (rob[j].pi >= 4 * 13 && rob[j].pi < 4 * 20 && rob[j].f_ep) fenced_overflowed++;
      // iterations 13..19 overflowed: each of their 28 instructions is fenced
      // (the instruction after the loop was squashed too and is fenced as well)
      check("overflowed epochs fenced", fenced_overflowed, 28);
      mech[M_EP_OVF_FENCE] += fenced_overflowed;
      // context switch: the Counter Cache goes back to memory
      begin
        rob_e z;
        z = rob[0];
        send(UPD_CTX, z);
        mech[M_CC_FLUSH]++;
        check("CC empty after flush", dut.u_cc.v[0][0] || dut.u_cc.v[1][0], 0);
      end
      while (rob.size()) retire();
      // the next code opens a fresh epoch; once it starts retiring, every
      // overflowed epoch has fully retired
      prog.push_back('{48'h60_0040, 1, 0});
      insert(n, 1);
      check("fresh epoch not fenced", rob[0].f_ep, 0);
      retire();
      check("overflow cleared once its epochs retired", dut.u_epoch.overflow_valid, 0);
    end

    foreach (mech[i]) begin
      $display("mechanism %-28s : %0d", mname[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin failures++; $display("FAIL mechanism never happened: %s", mname[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
`undef EXECUTE
