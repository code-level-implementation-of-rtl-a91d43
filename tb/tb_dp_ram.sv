// tb_dp_ram: random writes on port A and reads on port B, compared with a
// reference array.
`timescale 1ns/1ps
module tb_dp_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic       we_a;
  logic [2:0] addr_a, addr_b;
  logic [7:0] din_a, dout_b;
  logic [7:0] ref_mem [8];

  dp_ram dut (.clk, .we_a, .addr_a, .din_a, .addr_b, .dout_b);

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_a = 0; addr_a = 0; addr_b = 0; din_a = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      we_a = 1; addr_a = 3'(i); din_a = 8'($urandom);
      ref_mem[i] = din_a;
    end
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      we_a = 1'($urandom);
      addr_a = 3'($urandom);
      din_a = 8'($urandom);
      addr_b = 3'($urandom);
      #1;
      checks++;
      if (dout_b !== ref_mem[addr_b]) begin
        failures++;
        $display("FAIL: addr %0d got %h want %h", addr_b, dout_b, ref_mem[addr_b]);
      end
      @(posedge clk);
      if (we_a) ref_mem[addr_a] = din_a;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
