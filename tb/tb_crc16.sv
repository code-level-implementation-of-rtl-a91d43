// tb_crc16: feeds random characters of 1 to 8 bits and compares the
// register with a bitwise model of the x^16 + x^12 + x^5 + 1 LFSR, written
// as "xor the bit into the top, shift, xor the polynomial if the top was
// set". Also checks init, hold without upd, and a known value.
`timescale 1ns/1ps
module tb_crc16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        init, upd;
  logic [7:0]  data;
  logic [3:0]  nbits;
  logic [15:0] crc, model;

  crc16 dut (.clk, .rst_n, .init, .upd, .data, .nbits, .crc);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] model_step(input logic [15:0] c,
                                             input logic [7:0] d, input int n);
    for (int i = 0; i < n; i++) begin
      c = c ^ (16'(d[i]) << 15);
      c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 0; upd = 0; data = 0; nbits = 8;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(crc == 16'hFFFF, "reset value");
    // known value: one zero byte from all ones
    upd = 1; data = 8'h00; nbits = 8;
    @(negedge clk);
    upd = 0;
    check(crc == model_step(16'hFFFF, 8'h00, 8), "zero byte");
    check(crc == 16'hE1F0, $sformatf("zero byte known value %h", crc));
    model = crc;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      init  = ($urandom % 50 == 0);
      upd   = 1'($urandom);
      data  = 8'($urandom);
      nbits = 4'(1 + $urandom % 8);
      @(negedge clk);
      if (init) model = 16'hFFFF;
      else if (upd) model = model_step(model, data, int'(nbits));
      init = 0; upd = 0;
      check(crc == model, $sformatf("step %0d crc %h want %h", k, crc, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
