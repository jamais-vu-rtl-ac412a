// tb_sb_epoch: Epoch-Rem Squashed Buffer with four pairs, running the overflow
// example of six squashed epochs 10..15: epochs 10..13 take the four pairs,
// 14 and 15 overflow and OverflowID becomes 15. It then checks fencing by
// pair and by OverflowID, removal at the VP, clearing of older epochs at an
// epoch's VP, that overflowed epochs never take a pair, and the one-clock
// lookup latency. A second instance built without removal (REM = 0, plain
// Epoch) must ignore removals.
module tb_sb_epoch;
  localparam int unsigned PCW = 48, EW = 8, P = 4, L = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           upd_valid, upd_remove, epoch_vp_valid;
  logic [PCW-1:0] upd_pc;
  logic [EW-1:0]  upd_epoch, epoch_vp_id;
  logic           ins_valid [L];
  logic [PCW-1:0] ins_pc [L];
  logic [EW-1:0]  ins_epoch [L];
  logic           fence_valid [L], fence [L];
  logic [P-1:0]   pair_valid;
  logic           overflow_valid, overflow_evt;
  logic [EW-1:0]  overflow_id;

  sb_epoch #(.PCW(PCW), .EW(EW), .P(P), .L(L)) dut (.*);

  // plain Epoch: removals are ignored
  logic         n_fence_valid [L], n_fence [L];
  logic [P-1:0] n_pair_valid;
  logic         n_overflow_valid, n_overflow_evt;
  logic [EW-1:0] n_overflow_id;
  sb_epoch #(.PCW(PCW), .EW(EW), .P(P), .L(L), .REM(1'b0)) dut_norem (
    .clk, .rst_n, .upd_valid, .upd_remove, .upd_pc, .upd_epoch,
    .epoch_vp_valid, .epoch_vp_id, .ins_valid, .ins_pc, .ins_epoch,
    .fence_valid(n_fence_valid), .fence(n_fence), .pair_valid(n_pair_valid),
    .overflow_valid(n_overflow_valid), .overflow_id(n_overflow_id),
    .overflow_evt(n_overflow_evt));

  int checks = 0, failures = 0, ovf_events = 0;
  always @(posedge clk) if (rst_n && overflow_evt) ovf_events++;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic upd(input logic [PCW-1:0] pc, input int ep, input bit rem);
    @(negedge clk);
    upd_valid = 1; upd_pc = pc; upd_epoch = EW'(ep); upd_remove = rem;
    @(negedge clk);
    upd_valid = 0;
  endtask

  task automatic evp(input int ep);
    @(negedge clk);
    epoch_vp_valid = 1; epoch_vp_id = EW'(ep);
    @(negedge clk);
    epoch_vp_valid = 0;
  endtask

  function automatic logic [PCW-1:0] vpc(int ep, int i);
    return PCW'(48'h40_0000 + ep * 48'h100 + i * 4);
  endfunction

  task automatic look(input logic [PCW-1:0] pc, input int ep, input bit exp, input string what);
    @(negedge clk);
    ins_valid[0] = 1; ins_pc[0] = pc; ins_epoch[0] = EW'(ep);
    ins_valid[1] = 1; ins_pc[1] = pc; ins_epoch[1] = EW'(ep);
    #1 check({what, " (not before the clock)"}, fence_valid[0], 0);
    @(negedge clk);
    ins_valid[0] = 0; ins_valid[1] = 0;
    check({what, " valid"}, fence_valid[0], 1);
    check(what, fence[0], exp);
    check({what, " lane 1"}, fence[1], exp);
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_valid = 0; upd_remove = 0; upd_pc = 0; upd_epoch = 0;
    epoch_vp_valid = 0; epoch_vp_id = 0;
    foreach (ins_valid[g]) begin ins_valid[g] = 0; ins_pc[g] = 0; ins_epoch[g] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // a full ROB of epochs 10..15 is squashed, oldest first, 3 Victims each
    for (int ep = 10; ep <= 15; ep++)
      for (int i = 0; i < 3; i++) upd(vpc(ep, i), ep, 0);
    check("all pairs used", pair_valid, 4'hf);
    check("OverflowID valid", overflow_valid, 1);
    check("OverflowID = 15", overflow_id, 15);
    // only the first Victim of epochs 14 and 15 overflows; the rest are covered
    check("overflow events", ovf_events, 2);
    for (int p = 0; p < P; p++) check("pair IDs", dut.pair_id[p], 10 + p);

    look(vpc(12, 1), 12, 1, "Victim in its epoch");
    look(vpc(12, 1), 11, 0, "same PC, other epoch");
    look(48'h99_0000, 12, 0, "non-Victim in owned epoch");
    look(48'h99_0000, 14, 1, "any PC of overflowed epoch 14");
    look(48'h99_0000, 15, 1, "any PC of overflowed epoch 15");
    look(vpc(15, 0), 16, 0, "epoch 16 above OverflowID");

    // Epoch-Rem: a Victim inserted twice needs two removals
    upd(vpc(13, 0), 13, 0);
    upd(vpc(13, 0), 13, 1);
    look(vpc(13, 0), 13, 1, "one removal of two");
    upd(vpc(13, 0), 13, 1);
    look(vpc(13, 0), 13, 0, "both removed");
    check("no removal without REM", n_fence[0], 1);

    // first instruction of epoch 12 reaches its VP: 10 and 11 are freed
    evp(12);
    check("pairs 10,11 freed", pair_valid, 4'b1100);
    check("overflow kept", overflow_valid, 1);
    look(vpc(12, 0), 12, 1, "epoch 12 kept after its VP");
    // epoch 14 is covered by the overflow: it takes no pair
    upd(vpc(14, 5), 14, 0);
    check("overflowed epoch takes no pair", pair_valid, 4'b1100);
    // epoch 16 takes a freed pair
    upd(vpc(16, 0), 16, 0);
    check("epoch 16 allocated", pair_valid, 4'b1101);
    look(vpc(16, 0), 16, 1, "epoch 16 Victim");
    look(48'h99_0000, 14, 1, "epoch 14 still fenced");
    // epoch 16 starts retiring: 12, 13 and OverflowID (15) are dropped
    evp(16);
    check("only 16 left", pair_valid, 4'b0001);
    check("OverflowID cleared", overflow_valid, 0);
    look(48'h99_0000, 14, 0, "epoch 14 released");
    look(vpc(16, 0), 16, 1, "epoch 16 kept");

    // epoch IDs wrap: 254, 255, 0, 1 are in order
    evp(250);           // nothing older than 250 except wrap-around check
    check("16 is not older than 250? (wrap: 16 is younger)", pair_valid, 4'b0001);
    upd(vpc(1, 0), 254, 0); upd(vpc(1, 1), 255, 0); upd(vpc(1, 2), 0, 0);
    evp(0);
    look(vpc(1, 0), 254, 0, "254 older than 0 after wrap");
    look(vpc(1, 2), 0, 1, "epoch 0 kept");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
