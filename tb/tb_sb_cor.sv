// tb_sb_cor: directed Clear-on-Retire scenarios. Victims become fenced on
// re-insertion, ID follows the oldest Squashing instruction (with the circular
// ROB age measured from the head), a Squashing instruction that left the ROB
// is found again by its PC, and reaching the VP of ID clears everything.
// The lookup latency of one clock is checked.
module tb_sb_cor;
  localparam int unsigned PCW = 48, ROB = 16, L = 2, RW = $clog2(ROB);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [RW-1:0]  rob_head;
  logic           squash_valid, squash_removed, victim_valid, vp_valid;
  logic [PCW-1:0] squash_pc, victim_pc;
  logic [RW-1:0]  squash_rob_idx, vp_rob_idx;
  logic           ins_valid [L];
  logic [PCW-1:0] ins_pc [L];
  logic [RW-1:0]  ins_rob_idx [L];
  logic           fence_valid [L], fence [L];
  logic           id_valid, id_pending, cleared;
  logic [PCW-1:0] id_pc;
  logic [RW-1:0]  id_rob_idx;

  sb_cor #(.PCW(PCW), .ROB(ROB), .L(L)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic squash(input logic [PCW-1:0] pc, input int idx, input bit removed,
                        input logic [PCW-1:0] victims [$]);
    @(negedge clk);
    squash_valid = 1; squash_pc = pc; squash_rob_idx = RW'(idx); squash_removed = removed;
    @(negedge clk);
    squash_valid = 0;
    foreach (victims[i]) begin
      victim_valid = 1; victim_pc = victims[i];
      @(negedge clk);
    end
    victim_valid = 0;
  endtask

  // look up two PCs; returns the fences seen exactly one clock later
  task automatic lookup(input logic [PCW-1:0] a, input logic [PCW-1:0] b,
                        input int ia, input int ib, output bit fa, output bit fb);
    @(negedge clk);
    ins_valid[0] = 1; ins_pc[0] = a; ins_rob_idx[0] = RW'(ia);
    ins_valid[1] = 1; ins_pc[1] = b; ins_rob_idx[1] = RW'(ib);
    #1 check("fence not early", fence_valid[0], 0);
    @(negedge clk);
    ins_valid[0] = 0; ins_valid[1] = 0;
    check("fence_valid after 1 clock", fence_valid[0] && fence_valid[1], 1);
    fa = fence[0]; fb = fence[1];
  endtask

  task automatic vp(input int idx);
    @(negedge clk);
    vp_valid = 1; vp_rob_idx = RW'(idx);
    @(negedge clk);
    vp_valid = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit fa, fb;
    logic [PCW-1:0] v1 [$], v2 [$];
    rob_head = 0; squash_valid = 0; squash_removed = 0; victim_valid = 0; vp_valid = 0;
    squash_pc = 0; victim_pc = 0; squash_rob_idx = 0; vp_rob_idx = 0;
    foreach (ins_valid[g]) begin ins_valid[g] = 0; ins_pc[g] = 0; ins_rob_idx[g] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. nothing recorded: no fences
    lookup(48'h1000, 48'h1004, 1, 2, fa, fb);
    check("empty SB fence a", fa, 0); check("empty SB fence b", fb, 0);

    // 2. branch at ROB 5 (head 2) squashes 1008, 100c, 1010
    rob_head = 2;
    v1 = '{48'h1008, 48'h100c, 48'h1010};
    squash(48'h1004, 5, 0, v1);
    check("ID valid", id_valid, 1); check("ID rob", id_rob_idx, 5); check("ID not pending", id_pending, 0);
    lookup(48'h1008, 48'h2000, 6, 7, fa, fb);
    check("victim fenced", fa, 1); check("non-victim not fenced", fb, 0);

    // 3. a younger squasher (ROB 9) does not replace ID
    v2 = '{48'h3000};
    squash(48'h1020, 9, 0, v2);
    check("younger squash keeps ID", id_rob_idx, 5);
    // 4. an older one (ROB 3) does
    squash(48'h0ff0, 3, 0, v2);
    check("older squash takes ID", id_rob_idx, 3); check("ID pc", id_pc, 48'h0ff0);

    // 5. VP of another instruction does not clear
    vp(5);
    lookup(48'h100c, 48'h3000, 4, 5, fa, fb);
    check("still fenced a", fa, 1); check("still fenced b", fb, 1);
    // 6. VP of ID clears the PC Buffer and ID
    vp(3);
    check("ID cleared", id_valid, 0);
    lookup(48'h100c, 48'h3000, 4, 5, fa, fb);
    check("cleared a", fa, 0); check("cleared b", fb, 0);

    // 7. wrap-around age: head 14, squasher at 1 (age 3) older than at 4 (age 6)
    rob_head = 14;
    squash(48'h5000, 4, 0, v2);
    squash(48'h4ff0, 1, 0, v2);
    check("wrap age", id_rob_idx, 1);
    squash(48'h5010, 15, 0, v2);       // age 1: older still
    check("wrap age 2", id_rob_idx, 15);
    vp(15);
    check("cleared wrap", id_valid, 0);

    // 8. exception: squasher leaves the ROB, is found again by PC
    rob_head = 0;
    v1 = '{48'h6004, 48'h6008};
    squash(48'h6000, 3, 1, v1);
    check("pending", id_pending, 1);
    vp(3);                              // index 3 is meaningless while pending
    check("no clear while pending", id_valid, 1);
    lookup(48'h6100, 48'h6000, 7, 8, fa, fb);   // squasher returns at ROB 8
    check("pending cleared", id_pending, 0); check("new ROB index", id_rob_idx, 8);
    lookup(48'h6004, 48'h6008, 9, 10, fa, fb);
    check("exception victim a", fa, 1); check("exception victim b", fb, 1);
    // a squasher in the ROB while ID is pending replaces it
    squash(48'h7000, 2, 1, v2);
    squash(48'h7100, 6, 0, v2);
    check("pending replaced", id_pc, 48'h7100);
    vp(6);
    check("cleared after re-capture", id_valid, 0);
    lookup(48'h6004, 48'h6008, 9, 10, fa, fb);
    check("after clear a", fa, 0); check("after clear b", fb, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
