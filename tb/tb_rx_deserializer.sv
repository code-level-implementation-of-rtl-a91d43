// tb_rx_deserializer: the baud tick is held high (one bit = 16 cycles).
// Synchronous mode: random bits clocked in by a generated rx_clk; after
// every bit the receiver register must hold the last eight bits; out of
// hunt, characters of random length must come out whole. Asynchronous mode:
// characters with start and one or two stop bits, some with a stop bit
// forced low, which must be flagged as framing errors; a short low glitch
// must not start a character.
`timescale 1ns/1ps
module tb_rx_deserializer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       enable = 1, tick = 1, sync_mode = 1, stop2 = 0;
  logic       rx_in = 1, rx_clk = 0, hunt = 1;
  logic [3:0] exp_bits = 8;
  logic [7:0] shreg;
  logic       shift_done, char_valid, framing_err;
  logic [8:0] char_data;

  rx_deserializer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // received characters
  logic [8:0] got_d[$];
  bit         got_f[$];
  int         n_shift = 0;
  always @(posedge clk) begin
    if (rst_n && char_valid) begin
      got_d.push_back(char_data);
      got_f.push_back(framing_err);
    end
    if (rst_n && shift_done) n_shift++;
  end

  task automatic line_bit(input bit b);
    @(negedge clk);
    rx_in = b;
    if (sync_mode) begin
      rx_clk = 0;
      repeat (8) @(negedge clk);
      rx_clk = 1;
      repeat (8) @(negedge clk);
      rx_clk = 0;
    end else begin
      repeat (15) @(negedge clk);
    end
  endtask

  initial begin
    logic [7:0] win;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- synchronous, hunting: register follows the line
    win = 0;
    for (int i = 0; i < 60; i++) begin
      automatic bit b = 1'($urandom);
      line_bit(b);
      win = {b, win[7:1]};
      repeat (4) @(posedge clk);
      check(shreg == win, $sformatf("sync register %h want %h", shreg, win));
    end
    check(n_shift == 60, "one shift per received clock edge");
    check(got_d.size() == 0, "no characters while hunting");
    // ---- synchronous, out of hunt: characters
    hunt = 0;
    for (int c = 0; c < 30; c++) begin
      automatic int n = 1 + $urandom % 9;
      automatic logic [8:0] v = 9'($urandom);
      automatic logic [8:0] m = 0;
      exp_bits = 4'(n);
      for (int i = 0; i < n; i++) begin
        line_bit(v[i]);
        m[i] = v[i];
      end
      repeat (4) @(posedge clk);
      check(got_d.size() == 1 && got_d[0] == m && !got_f[0],
            $sformatf("sync char %0d: %0d chars %h want %h", c, got_d.size(), (got_d.size() > 0) ? got_d[0] : 9'h000, m));
      got_d = {}; got_f = {};
    end
    // ---- asynchronous
    sync_mode = 0;
    hunt = 1;
    repeat (40) @(negedge clk);
    for (int c = 0; c < 40; c++) begin
      automatic int n = 5 + $urandom % 5;
      automatic logic [8:0] v = 9'($urandom);
      automatic logic [8:0] m = 0;
      automatic bit bad = ($urandom % 4 == 0);
      stop2 = 1'($urandom);
      exp_bits = 4'(n);
      line_bit(0);
      for (int i = 0; i < n; i++) begin
        line_bit(v[i]);
        m[i] = v[i];
      end
      line_bit(!(bad && !stop2));
      if (stop2) line_bit(!bad);
      // idle, and a 3-cycle glitch that must be ignored
      line_bit(1);
      @(negedge clk); rx_in = 0; repeat (3) @(negedge clk); rx_in = 1;
      line_bit(1);
      line_bit(1);
      check(got_d.size() == 1, $sformatf("async char %0d: %0d characters", c, got_d.size()));
      if (got_d.size() == 1)
        check(got_d[0] == m && got_f[0] == bad,
              $sformatf("async char %0d: %h/%b want %h/%b", c, got_d[0], got_f[0], m, bad));
      got_d = {}; got_f = {};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
