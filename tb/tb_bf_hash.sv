// tb_bf_hash: checks the hash unit against a separately written model of the
// hash formula (64-bit integer arithmetic), checks that every index is in
// range, and that indices spread over the whole filter.
module tb_bf_hash;
  localparam int unsigned M = 1232, N = 7, PCW = 48, IW = $clog2(M);
  logic [PCW-1:0] pc;
  logic [IW-1:0]  idx [N];
  int checks = 0, failures = 0;
  int hist [M];

  bf_hash #(.PCW(PCW), .M(M), .N(N)) dut (.pc(pc), .idx(idx));

  function automatic longint unsigned model(longint unsigned p, int i);
    longint unsigned x;
    x = ((p & 64'hFFFF_FFFF) ^ ((p >> 32) & 64'hFFFF)) ^ (p >> 48 << 16);
    x = (x ^ ((64'h9E37_79B9 * longint'(i + 1)) & 64'hFFFF_FFFF)) & 64'hFFFF_FFFF;
    x = (x * ((64'h85EB_CA6B + longint'(i) * 64'h2C1A) & 64'hFFFF_FFFF)) & 64'hFFFF_FFFF;
    x = x ^ (x >> 15);
    x = (x * 64'hC2B2_AE35) & 64'hFFFF_FFFF;
    x = x ^ (x >> 13);
    return (x * longint'(M)) >> 32;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int empty_b, same;
    foreach (hist[i]) hist[i] = 0;
    same = 0;
    for (int t = 0; t < 2000; t++) begin
      pc = {$urandom, $urandom} & {PCW{1'b1}};
      if (t < 200) pc = 48'h40_0000 + PCW'(t * 3);   // dense code addresses
      #1;
      for (int h = 0; h < N; h++) begin
        checks++;
        if (idx[h] >= M || longint'(idx[h]) != model(64'(pc), h)) begin
          failures++;
          if (failures < 5) $display("FAIL pc=%h h=%0d idx=%0d model=%0d", pc, h, idx[h], model(64'(pc), h));
        end
        hist[idx[h]]++;
      end
      if (idx[0] == idx[1]) same++;
    end
    empty_b = 0;
    foreach (hist[i]) if (hist[i] == 0) empty_b++;
    // 14000 draws over 1232 buckets: expected empty buckets ~ 1232*e^-11.4 < 1
    checks++; if (empty_b > 5) begin failures++; $display("FAIL %0d empty buckets", empty_b); end
    checks++; if (same > 20)   begin failures++; $display("FAIL H0==H1 %0d times", same); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
