// tb_counter_cache: a small Counter Cache (2 sets x 2 ways) under random
// increments (squashes) and decrements (VPs) over more lines than it holds, so
// that misses, dirty write-backs and refills happen often. A behavioural
// memory with random ready and latency holds the counter pages. Every lookup
// is answered exactly two clocks later and, on a hit, must match a reference
// table of counters; a miss must report CounterPending and fence. At the end a
// flush (context switch) must leave every counter in memory, at VA + Offset.
module tb_counter_cache;
  import jv_pkg::*;
  localparam int unsigned PCW = 48, SETS = 2, WAYS = 2, LB = 64, CW = 4, L = 2;
  localparam int unsigned MEMW = LB * 8;
  localparam logic [PCW-1:0] OFFSET = 48'h0100_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           q_valid [L], r_valid [L], r_pending [L], r_fence [L];
  logic [PCW-1:0] q_va [L];
  logic [CW-1:0]  r_ctr [L];
  logic           upd_valid, upd_ready, busy;
  cc_op_e         upd_op;
  logic [PCW-1:0] upd_va;
  logic           mem_req_valid, mem_req_ready, mem_req_write, mem_rsp_valid;
  logic [PCW-1:0] mem_req_addr;
  logic [MEMW-1:0] mem_req_wdata, mem_rsp_data;

  counter_cache #(.PCW(PCW), .SETS(SETS), .WAYS(WAYS), .LB(LB), .CW(CW), .L(L)) dut (
    .clk, .rst_n, .offset(OFFSET), .q_valid, .q_va, .r_valid, .r_ctr, .r_pending, .r_fence,
    .upd_valid, .upd_ready, .upd_op, .upd_va, .mem_req_valid, .mem_req_ready,
    .mem_req_write, .mem_req_addr, .mem_req_wdata, .mem_rsp_valid, .mem_rsp_data, .busy);

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_wb = 0, n_fill = 0, n_pend = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0h exp=%0h at %0t", what, got, exp, $time);
    end
  endtask

  // ---- behavioural memory: counter pages start at zero -------------------------
  logic [MEMW-1:0] mem [logic [PCW-1:0]];
  int rsp_wait = -1;
  logic [PCW-1:0] rsp_addr;
  always @(negedge clk) mem_req_ready <= ($urandom_range(3) != 0);
  always @(posedge clk) begin
    mem_rsp_valid <= 1'b0;
    if (rsp_wait == 0) begin
      mem_rsp_valid <= 1'b1;
      mem_rsp_data  <= mem.exists(rsp_addr) ? mem[rsp_addr] : '0;
      rsp_wait = -1;
    end else if (rsp_wait > 0) rsp_wait--;
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_write) begin mem[mem_req_addr] = mem_req_wdata; n_wb++; end
      else begin rsp_addr = mem_req_addr; rsp_wait = $urandom_range(4); n_fill++; end
    end
  end

  // ---- reference counters by instruction VA -----------------------------------
  int ref_c [logic [PCW-1:0]];
  function automatic int refc(logic [PCW-1:0] va);
    return ref_c.exists(va) ? ref_c[va] : 0;
  endfunction

  // ---- lookup checker: answers are due two clocks after the request ------------
  logic [PCW-1:0] pend_va [L][$];
  int             pend_t  [L][$];
  bit             pend_mh [L][$];   // must hit
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n) begin
    for (int g = 0; g < L; g++) begin
      if (r_valid[g]) begin
        logic [PCW-1:0] va;
        checks++;
        if (pend_va[g].size() == 0) begin failures++; $display("FAIL unexpected answer"); end
        else begin
          va = pend_va[g].pop_front();
          check("lookup latency 2", cyc - pend_t[g].pop_front(), 2);
          if (pend_mh[g].pop_front()) check("just-updated line resident", r_pending[g], 0);
          if (r_pending[g]) begin
            n_pend++;
            check("pending fences", r_fence[g], 1);
          end else begin
            check("counter value", r_ctr[g], refc(va));
            check("fence on non-zero", r_fence[g], refc(va) != 0);
          end
        end
      end
    end
  end

  task automatic lookup(input logic [PCW-1:0] a, input logic [PCW-1:0] b, input bit mh = 0);
    @(negedge clk);
    pend_mh[0].push_back(mh); pend_mh[1].push_back(1'b0);
    q_valid[0] = 1; q_va[0] = a; q_valid[1] = 1; q_va[1] = b;
    pend_va[0].push_back(a); pend_t[0].push_back(cyc);
    pend_va[1].push_back(b); pend_t[1].push_back(cyc);
    @(negedge clk);
    q_valid[0] = 0; q_valid[1] = 0;
  endtask

  task automatic update(input cc_op_e op, input logic [PCW-1:0] va);
    int waited;
    @(negedge clk);
    upd_valid = 1; upd_op = op; upd_va = va; waited = 0;
    #1;
    while (!upd_ready) begin waited++; @(negedge clk); #1; end
    @(posedge clk);
    #1 upd_valid = 0;
    if (op != CC_FLUSH) begin
      if (waited == 0) n_hit++; else n_miss++;
      if (op == CC_INC && refc(va) < 15) ref_c[va] = refc(va) + 1;
      if (op == CC_DEC && refc(va) > 0)  ref_c[va] = refc(va) - 1;
    end
  endtask

  function automatic logic [PCW-1:0] rva();
    // 5 instruction lines over 2 sets; 4 instruction bytes per line
    return PCW'(48'h0040_0000 + $urandom_range(4) * 64 + $urandom_range(3));
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_valid = 0; upd_op = CC_INC; upd_va = 0;
    foreach (q_valid[g]) begin q_valid[g] = 0; q_va[g] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // a cold CC answers CounterPending
    lookup(48'h40_0000, 48'h40_0041);
    for (int t = 0; t < 1500; t++) begin
      logic [PCW-1:0] va;
      va = rva();
      update(($urandom_range(9) < 6) ? CC_INC : CC_DEC, va);
      // the line just updated is resident
      lookup(va, rva(), 1'b1);
      repeat (2) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    // context switch: flush, then every counter is in memory at VA + Offset
    update(CC_FLUSH, '0);
    check("idle after flush", busy, 0);
    foreach (ref_c[va]) begin
      logic [PCW-1:0] la;
      logic [MEMW-1:0] line;
      la   = {va[PCW-1:6] + OFFSET[PCW-1:6], 6'd0};
      line = mem.exists(la) ? mem[la] : '0;
      check("counter in memory after flush", line[va[5:0]*8 +: 8], ref_c[va]);
    end
    lookup(48'h40_0000, 48'h40_0040);
    repeat (4) @(negedge clk);
    checks++;
    if (n_hit < 50 || n_miss < 50 || n_wb < 20 || n_fill < 50 || n_pend < 3) begin
      failures++; $display("FAIL coverage");
    end
    $display("hits=%0d misses=%0d writebacks=%0d fills=%0d pending=%0d", n_hit, n_miss, n_wb, n_fill, n_pend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
