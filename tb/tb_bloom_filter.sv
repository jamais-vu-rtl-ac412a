// tb_bloom_filter: random insert/remove/clear/query traffic on a small counting
// filter (saturation and conflicts happen often) and on a plain filter, each
// compared every cycle with a reference array kept in the testbench.
module tb_bloom_filter;
  localparam int unsigned M = 61, N = 3, K = 2, Q = 2, IW = $clog2(M);
  localparam int unsigned KMAX = (1 << K) - 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // counting filter (c_) and plain filter (p_) share the stimulus
  logic          clear, upd_valid, upd_remove;
  logic [IW-1:0] upd_idx [N];
  logic [IW-1:0] q_idx   [Q][N];
  logic          c_hit [Q], p_hit [Q];
  logic          c_empty, p_empty;

  bloom_filter #(.M(M), .N(N), .K(K), .Q(Q)) dut_c (.clk, .rst_n, .clear, .upd_valid,
    .upd_remove, .upd_idx, .q_idx, .q_hit(c_hit), .empty(c_empty));
  bloom_filter #(.M(M), .N(N), .K(1), .Q(Q)) dut_p (.clk, .rst_n, .clear, .upd_valid,
    .upd_remove, .upd_idx, .q_idx, .q_hit(p_hit), .empty(p_empty));

  int cref [M];
  int pref [M];
  int checks = 0, failures = 0;
  int sat_seen = 0;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0b exp=%0b at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic ref_hit(ref int a [M], input logic [IW-1:0] ix [N]);
    for (int h = 0; h < N; h++) if (a[ix[h]] == 0) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; upd_valid = 0; upd_remove = 0;
    foreach (upd_idx[h]) upd_idx[h] = '0;
    foreach (q_idx[q, h]) q_idx[q][h] = '0;
    foreach (cref[e]) begin cref[e] = 0; pref[e] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int r;
      logic [IW-1:0] ui [N];
      @(negedge clk);
      // random queries: half of them repeat the update indices
      for (int q = 0; q < Q; q++)
        for (int h = 0; h < N; h++) q_idx[q][h] = IW'($urandom_range(M - 1));
      #1;
      for (int q = 0; q < Q; q++) begin
        check("counting query", c_hit[q], ref_hit(cref, q_idx[q]));
        check("plain query",    p_hit[q], ref_hit(pref, q_idx[q]));
      end
      begin
        logic ce, pe;
        ce = 1; pe = 1;
        foreach (cref[e]) begin if (cref[e] != 0) ce = 0; if (pref[e] != 0) pe = 0; end
        check("counting empty", c_empty, ce);
        check("plain empty", p_empty, pe);
      end
      r = $urandom_range(99);
      clear      = (r < 2);
      upd_valid  = (r >= 1 && r < 90);
      upd_remove = (r >= 55);
      for (int h = 0; h < N; h++) upd_idx[h] = IW'($urandom_range(M - 1));
      ui = upd_idx;
      @(posedge clk);
      // reference update: clear first, then the update; each distinct entry once
      if (clear) foreach (cref[e]) begin cref[e] = 0; pref[e] = 0; end
      if (upd_valid) begin
        for (int h = 0; h < N; h++) begin
          bit dup;
          dup = 0;
          for (int j = 0; j < h; j++) if (ui[j] == ui[h]) dup = 1;
          if (!dup) begin
            if (!upd_remove) begin
              if (cref[ui[h]] < KMAX) cref[ui[h]]++; else sat_seen++;
              pref[ui[h]] = 1;
            end else if (!clear) begin
              if (cref[ui[h]] > 0) cref[ui[h]]--;
            end
          end
        end
      end
    end
    // inserted items are always found by the plain filter (no false negatives)
    @(negedge clk);
    clear = 1; upd_valid = 0;
    @(negedge clk);
    clear = 0;
    for (int t = 0; t < 8; t++) begin
      upd_valid = 1; upd_remove = 0;
      for (int h = 0; h < N; h++) upd_idx[h] = IW'((t * 7 + h * 13) % M);
      @(negedge clk);
    end
    upd_valid = 0;
    for (int t = 0; t < 8; t++) begin
      for (int h = 0; h < N; h++) q_idx[0][h] = IW'((t * 7 + h * 13) % M);
      #1 check("plain no false negative", p_hit[0], 1'b1);
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("saturating inserts: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
