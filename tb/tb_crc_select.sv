// tb_crc_select: all four check-field choices with random inputs.
`timescale 1ns/1ps
module tb_crc_select;
  import usart_pkg::*;
  crc_mode_e   mode;
  logic [15:0] crc_calc, field, want;
  logic [7:0]  sync_char;

  crc_select dut (.mode, .crc_calc, .sync_char, .field);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      mode      = crc_mode_e'(k % 4);
      crc_calc  = 16'($urandom);
      sync_char = 8'($urandom);
      #1;
      case (k % 4)
        0: want = crc_calc;
        1: want = 16'hFFFF;
        2: want = 16'h0000;
        default: want = {sync_char, sync_char};
      endcase
      checks++;
      if (field != want) begin
        failures++;
        $display("FAIL: mode %0d got %h want %h", k % 4, field, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
