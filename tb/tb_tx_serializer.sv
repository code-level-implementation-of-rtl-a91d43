// tb_tx_serializer: the baud tick is held high, so one bit lasts 16 clock
// cycles. Random characters are loaded back to back whenever ready is high,
// in synchronous mode and in asynchronous mode with one and two stop bits.
// The line is sampled in the middle of every bit period counted from the
// start of the first bit, and the samples must equal the expected line
// sequence with no gap; busy must fall exactly when the last bit ends.
// In synchronous mode tx_clk must have a period of 16 cycles and rise in
// the middle of each bit.
`timescale 1ns/1ps
module tb_tx_serializer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       tick = 1, sync_mode, stop2, load, ready, busy, txd, tx_clk;
  logic [8:0] data;
  logic [3:0] nbits;

  tx_serializer dut (.clk, .rst_n, .tick, .sync_mode, .stop2, .load, .data,
                     .nbits, .ready, .busy, .txd, .tx_clk);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit sm, input bit s2, input int nchar);
    bit exp_bits[$];
    bit got[$];
    int n;
    sync_mode = sm; stop2 = s2; load = 0;
    repeat (40) @(posedge clk);
    fork
      begin
        for (int c = 0; c < nchar; c++) begin
          logic [8:0] d = 9'($urandom);
          int nb = 1 + $urandom % 9;
          @(negedge clk);
          while (!ready) @(negedge clk);
          load = 1; data = d; nbits = 4'(nb);
          if (!sm) exp_bits.push_back(0);
          for (int i = 0; i < nb; i++) exp_bits.push_back(d[i]);
          if (!sm) begin
            exp_bits.push_back(1);
            if (s2) exp_bits.push_back(1);
          end
          @(negedge clk);
          load = 0;
        end
      end
      begin
        @(posedge busy);
        // bit k is on the line from here for 16 cycles
        repeat (8) @(posedge clk);
        got.push_back(txd);
        forever begin
          repeat (16) @(posedge clk);
          if (!busy) break;
          got.push_back(txd);
        end
      end
    join
    n = exp_bits.size();
    check(got.size() == n, $sformatf("mode %0d/%0d: %0d bits, expected %0d", sm, s2, got.size(), n));
    for (int i = 0; i < n && i < got.size(); i++)
      check(got[i] == exp_bits[i], $sformatf("mode %0d/%0d bit %0d", sm, s2, i));
    check(txd == 1'b1, "idle line high");
  endtask

  initial begin
    int t0, t1;
    sync_mode = 1; stop2 = 0; load = 0; data = 0; nbits = 8;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1, 0, 12);
    run(0, 0, 12);
    run(0, 1, 12);
    // bit clock in synchronous mode
    sync_mode = 1;
    @(posedge tx_clk); t0 = int'($time);
    @(posedge tx_clk); t1 = int'($time);
    check((t1 - t0) == 160, $sformatf("tx_clk period %0d ns", t1 - t0));
    sync_mode = 0;
    repeat (40) begin
      @(posedge clk);
      check(!tx_clk, "no bit clock in asynchronous mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
