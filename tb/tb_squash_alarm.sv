// tb_squash_alarm: a Squashing instruction that flushes the pipeline more than
// THRESH times raises the alarm on exactly the flush that crosses the limit;
// reaching its VP resets its count; a full table replaces entries round-robin.
module tb_squash_alarm;
  localparam int unsigned PCW = 48, ENTRIES = 4, THRESH = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic           squash_valid, vp_valid, alarm, alarm_seen;
  logic [PCW-1:0] squash_pc, vp_pc, alarm_pc;

  squash_alarm #(.PCW(PCW), .ENTRIES(ENTRIES), .THRESH(THRESH)) dut (.*);

  int checks = 0, failures = 0, alarms = 0;
  always @(posedge clk) if (rst_n && alarm) alarms++;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0h exp=%0h", what, got, exp); end
  endtask
  task automatic sq(input logic [PCW-1:0] pc, input bit exp_alarm);
    @(negedge clk); squash_valid = 1; squash_pc = pc;
    @(negedge clk); squash_valid = 0;
    check("alarm after this squash", alarm, exp_alarm);
    if (exp_alarm) check("alarm pc", alarm_pc, pc);
  endtask
  task automatic vp(input logic [PCW-1:0] pc);
    @(negedge clk); vp_valid = 1; vp_pc = pc;
    @(negedge clk); vp_valid = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    squash_valid = 0; vp_valid = 0; squash_pc = 0; vp_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // three flushes are allowed, the fourth raises the alarm
    sq(48'hA0, 0); sq(48'hA0, 0); sq(48'hA0, 0);
    check("no alarm yet", alarm_seen, 0);
    sq(48'hA0, 1);
    check("sticky", alarm_seen, 1);
    // forward progress resets the count
    vp(48'hA0);
    sq(48'hA0, 0); sq(48'hA0, 0); sq(48'hA0, 0);
    // interleaved squashers are counted separately
    sq(48'hB0, 0); sq(48'hC0, 0); sq(48'hB0, 0); sq(48'hB0, 0);
    sq(48'hB0, 1);
    // fill the table (A0, B0, C0, D0), then E0 replaces A0 round-robin
    sq(48'hD0, 0); sq(48'hE0, 0);
    sq(48'hA0, 0);          // A0 starts again from 1
    check("alarm count", alarms, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
