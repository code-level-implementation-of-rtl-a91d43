// tb_sync_comparator: random patterns, some equal to the sync character;
// a match must be reported one cycle later and only when strobed.
`timescale 1ns/1ps
module tb_sync_comparator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       strobe, sync_match;
  logic [7:0] pattern, sync_char;
  int n_match = 0;

  sync_comparator dut (.clk, .rst_n, .strobe, .pattern, .sync_char, .sync_match);

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit want;
    strobe = 0; pattern = 0; sync_char = 8'hE7;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      if (k % 100 == 0) sync_char = 8'($urandom);
      strobe  = 1'($urandom);
      // equal, one bit away, or random
      case ($urandom % 3)
        0:       pattern = sync_char;
        1:       pattern = sync_char ^ (8'h01 << ($urandom % 8));
        default: pattern = 8'($urandom);
      endcase
      want    = strobe && (pattern == sync_char);
      @(negedge clk);
      strobe = 0;
      checks++;
      if (sync_match != want) begin
        failures++;
        $display("FAIL: pattern %h sync %h match %b", pattern, sync_char, sync_match);
      end
      if (want) n_match++;
    end
    checks++;
    if (n_match == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
