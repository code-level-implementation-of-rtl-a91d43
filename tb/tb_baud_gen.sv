// tb_baud_gen: checks the tick interval of every rate of the selection
// table against round(CLK_HZ / (16 * baud)), with a clock of 16 * 115200 * 3
// Hz so that the divisors are small, and once more at the default 50 MHz
// for the fastest rate.
`timescale 1ns/1ps
module tb_baud_gen;
  localparam int unsigned CLK_HZ = 16 * 115200 * 3;
  localparam int unsigned RATES [8] = '{115200, 57600, 38400, 19200, 9600, 4800, 1200, 300};

  logic clk = 0, rst_n = 0;
  logic [2:0] sel = 0;
  logic tick, tick50;
  always #5 clk = ~clk;

  baud_gen #(.CLK_HZ(CLK_HZ)) dut (.clk, .rst_n, .sel, .tick);
  baud_gen dut50 (.clk, .rst_n, .sel(3'd0), .tick(tick50));

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_div(input longint hz, input longint baud);
    longint d = (hz + baud * 8) / (baud * 16);
    return (d < 1) ? 1 : int'(d);
  endfunction

  task automatic measure(input bit which50, output int gap);
    int n = 0;
    if (which50) begin
      do @(posedge clk); while (!tick50);
      do begin @(posedge clk); n++; end while (!tick50);
    end else begin
      do @(posedge clk); while (!tick);
      do begin @(posedge clk); n++; end while (!tick);
    end
    gap = n;
  endtask

  initial begin
    int g;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      repeat (3) @(posedge clk);
      for (int k = 0; k < 3; k++) begin
        measure(0, g);
        checks++;
        if (g != expect_div(longint'(CLK_HZ), longint'(RATES[s]))) begin
          failures++;
          $display("FAIL: sel %0d gap %0d expected %0d", s, g, expect_div(longint'(CLK_HZ), longint'(RATES[s])));
        end
      end
    end
    measure(1, g);
    checks++;
    if (g != 27) begin
      failures++;
      $display("FAIL: 50 MHz 115200 gap %0d", g);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
