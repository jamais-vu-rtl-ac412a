// tb_epoch_tracker: random insertion of marked and unmarked instructions into
// a circular ROB, with random squashes, checked against a reference model of
// the epoch IDs (a marker opens the next ID; after a squash the first
// re-inserted instruction gets the epoch of the oldest squashed one) and of
// the epoch-start VP reports.
module tb_epoch_tracker;
  localparam int unsigned ROB = 24, EW = 8, L = 2, RW = $clog2(ROB);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          ins_valid [L];
  logic [RW-1:0] ins_rob_idx [L];
  logic          ins_start [L];
  logic [EW-1:0] ins_epoch [L];
  logic          squash_valid, vp_valid, epoch_vp_valid;
  logic [RW-1:0] squash_first_idx, rd_idx, vp_idx;
  logic [EW-1:0] rd_epoch, vp_epoch, cur_epoch;

  epoch_tracker #(.ROB(ROB), .EW(EW), .L(L)) dut (.*);

  int checks = 0, failures = 0, squashes = 0, starts = 0;
  int ref_ep [ROB];
  bit ref_st [ROB];
  int cur, tail, count;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    squash_valid = 0; vp_valid = 0; squash_first_idx = 0; rd_idx = 0; vp_idx = 0;
    foreach (ins_valid[g]) begin ins_valid[g] = 0; ins_rob_idx[g] = 0; ins_start[g] = 0; end
    cur = 0; tail = 0; count = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (count > 4 && $urandom_range(15) == 0) begin
        // squash from a random in-flight position: tail rolls back
        int back, first;
        back  = $urandom_range(count - 1) + 1;
        first = (tail - back + ROB) % ROB;
        squash_valid = 1; squash_first_idx = RW'(first);
        cur   = (ref_ep[first] - int'(ref_st[first])) & 8'hff;
        tail  = first; count -= back; squashes++;
        @(negedge clk);
        squash_valid = 0;
        check("restored epoch", cur_epoch, cur);
      end else if (count < ROB - 2) begin
        for (int g = 0; g < L; g++) begin
          ins_valid[g]   = 1;
          ins_rob_idx[g] = RW'((tail + g) % ROB);
          ins_start[g]   = ($urandom_range(3) == 0);
        end
        #1;
        for (int g = 0; g < L; g++) begin
          if (ins_start[g]) begin cur = (cur + 1) & 8'hff; starts++; end
          check("inserted epoch", ins_epoch[g], cur);
          ref_ep[(tail + g) % ROB] = cur;
          ref_st[(tail + g) % ROB] = ins_start[g];
        end
        @(negedge clk);
        foreach (ins_valid[g]) ins_valid[g] = 0;
        tail = (tail + L) % ROB; count += L;
      end else begin
        // retire the oldest few
        count -= 6;
      end
      // read ports against the model
      if (count > 0) begin
        int r;
        r = (tail - 1 - $urandom_range(count - 1) + ROB) % ROB;
        rd_idx = RW'(r); vp_idx = RW'(r); vp_valid = 1;
        #1;
        check("rd_epoch", rd_epoch, ref_ep[r]);
        check("vp_epoch", vp_epoch, ref_ep[r]);
        check("epoch start at VP", epoch_vp_valid, ref_st[r]);
        vp_valid = 0;
      end
    end
    checks++; if (squashes < 20 || starts < 100) begin failures++; $display("FAIL coverage"); end
    $display("squashes=%0d epoch starts=%0d", squashes, starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
