// tb_usart_regs: the processor register file. Checks reset values, write
// and read back of every R/W register, the TXDATA push, COMMAND start and
// RXDATA pop strobes, status levels, sticky event bits with write-1-clear
// (an event in the same cycle as the clear wins), and the interrupt with
// its per-bit mask and global enable.
`timescale 1ns/1ps
module tb_usart_regs;
  import usart_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cs = 0, wr_p = 0, rd_p = 0;
  logic [3:0]  addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic        irq;
  ctrl_t       ctrl;
  logic [7:0]  sync_char, own_addr, dest_addr, tx_data, rx_head = 8'h5C;
  logic        tx_push, tx_start, rx_pop;
  logic        tx_empty = 1, tx_full = 0, tx_busy = 0, tx_done = 0;
  logic        rx_empty = 0, rx_full = 1, rx_busy = 1;
  rx_events_t  rx_ev = '0;
  int          n_push = 0, n_start = 0, n_pop = 0;
  logic [7:0]  last_push;

  usart_regs dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (tx_push) begin n_push++; last_push <= tx_data; end
    if (tx_start) n_start++;
    if (rx_pop) n_pop++;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [3:0] a, input logic [15:0] v);
    @(negedge clk);
    cs = 1; wr_p = 1; addr = a; wdata = v;
    @(negedge clk);
    cs = 0; wr_p = 0;
  endtask
  task automatic rd(input logic [3:0] a, output logic [15:0] v);
    @(negedge clk);
    cs = 1; rd_p = 1; addr = a;
    @(negedge clk);
    cs = 0; rd_p = 0;
    v = rdata;
  endtask

  initial begin
    logic [15:0] v, r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    rd(REG_CONTROL, v); check(v == 16'hE061, "control reset");
    rd(REG_SYNC, v);    check(v == 16'h00E7, "sync reset");
    rd(REG_STATUS, v);  check(v == 16'h0029, $sformatf("status levels %h", v));
    check(sync_char == 8'hE7 && ctrl == ctrl_t'(16'hE061), "configuration outputs");
    // read/write registers
    for (int k = 0; k < 20; k++) begin
      r = 16'($urandom);
      wr(REG_CONTROL, r); rd(REG_CONTROL, v); check(v == r && ctrl == r, "control r/w");
      wr(REG_SYNC, r);    rd(REG_SYNC, v);    check(v == {8'h0, r[7:0]} && sync_char == r[7:0], "sync r/w");
      wr(REG_OWNADDR, r); rd(REG_OWNADDR, v); check(v == {8'h0, r[7:0]} && own_addr == r[7:0], "own address r/w");
      wr(REG_DSTADDR, r); rd(REG_DSTADDR, v); check(v == {8'h0, r[7:0]} && dest_addr == r[7:0], "dest address r/w");
      wr(REG_INTCTRL, r); rd(REG_INTCTRL, v); check(v == r, "intctrl r/w");
    end
    wr(REG_INTCTRL, 16'h0000);
    // strobes
    wr(REG_TXDATA, 16'h00A7);
    check(n_push == 1 && last_push == 8'hA7, "TXDATA push");
    wr(REG_COMMAND, 16'h0000);
    check(n_start == 0, "COMMAND without bit 0");
    wr(REG_COMMAND, 16'h0001);
    check(n_start == 1, "COMMAND start");
    rd(REG_RXDATA, v);
    check(n_pop == 1 && v == 16'h005C, "RXDATA pop and data");
    rd(REG_SYNC, v);
    check(n_pop == 1 && n_push == 1, "no stray strobes");
    // sticky events
    @(negedge clk); rx_ev.crc_err = 1; tx_done = 1;
    @(negedge clk); rx_ev = '0; tx_done = 0;
    repeat (3) @(negedge clk);
    rd(REG_STATUS, v);
    check(v[8] && v[13] && !v[7], $sformatf("sticky bits %h", v));
    // interrupt: masked, then enabled without global, then global
    check(!irq, "no interrupt while masked");
    wr(REG_INTCTRL, 16'h0100);
    check(!irq, "no interrupt without global enable");
    wr(REG_INTCTRL, 16'h8100);
    check(irq, "interrupt on crc error");
    wr(REG_STATUS, 16'h0100);
    rd(REG_STATUS, v);
    check(!v[8] && v[13] && !irq, "write 1 clears only its bit");
    // set and clear in the same cycle: set wins
    @(negedge clk);
    cs = 1; wr_p = 1; addr = REG_STATUS; wdata = 16'hFFFF; rx_ev.parity_err = 1;
    @(negedge clk);
    cs = 0; wr_p = 0; rx_ev = '0;
    rd(REG_STATUS, v);
    check(v[9] && !v[13], "event wins over clear");
    // levels follow inputs
    tx_empty = 0; tx_full = 1; rx_empty = 1; rx_full = 0; tx_busy = 1; rx_busy = 0;
    rd(REG_STATUS, v);
    check(v[5:0] == 6'b010110, $sformatf("levels %b", v[5:0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
