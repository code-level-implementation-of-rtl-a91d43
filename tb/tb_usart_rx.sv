// tb_usart_rx: the whole receiver with the baud tick held high (one bit =
// 16 cycles). The testbench builds frames bit by bit, with a bitwise
// CRC-16 model, and drives them on rx_in (with rx_clk in synchronous mode)
// after some idle or random bits. The data read back from the RX buffer and
// the status events must match: sync found, check field good, or bad after
// a flipped data bit. Half duplex must block reception while the own
// transmitter is busy.
`timescale 1ns/1ps
module tb_usart_rx;
  import usart_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctrl_t      ctrl;
  logic       tick = 1, rx_in = 1, rx_clk = 0, tx_busy = 0, pop = 0;
  logic [7:0] sync_char = 8'hE7, own_addr = 8'h11, rx_head;
  logic       rx_full, rx_empty, rx_busy;
  rx_events_t events;

  usart_rx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] step(input logic [15:0] c, input logic [7:0] d, input int n);
    for (int i = 0; i < n; i++) begin
      c = c ^ (16'(d[i]) << 15);
      c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction

  rx_events_t ev_acc;
  always @(posedge clk) if (rst_n) ev_acc <= ev_acc | events;

  task automatic line_bit(input bit b);
    @(negedge clk);
    rx_in = b;
    if (ctrl.sync_mode) begin
      rx_clk = 0;
      repeat (8) @(negedge clk);
      rx_clk = 1;
      repeat (8) @(negedge clk);
      rx_clk = 0;
    end else begin
      repeat (15) @(negedge clk);
    end
  endtask

  task automatic add_char(ref bit s[$], input logic [8:0] v, input int n);
    if (!ctrl.sync_mode) s.push_back(0);
    for (int i = 0; i < n; i++) s.push_back(v[i]);
    if (!ctrl.sync_mode) begin
      s.push_back(1);
      if (ctrl.stop2) s.push_back(1);
    end
  endtask

  task automatic frame(input logic [15:0] cv, input bit corrupt);
    bit s[$];
    logic [7:0] data[$];
    logic [15:0] crc = 16'hFFFF, fe;
    int nd, nblk, flip_at;
    logic [7:0] v;
    ctrl = ctrl_t'(cv);
    ctrl.half_dup = 0;
    nd = int'(ctrl.dlen) + 5;
    nblk = int'(ctrl.blk_len_m1) + 1;
    add_char(s, {1'b0, sync_char}, 8);
    if (ctrl.addr_en) add_char(s, {1'b0, own_addr}, 8);
    flip_at = s.size() + (ctrl.sync_mode ? 0 : 1);
    for (int i = 0; i < nblk; i++) begin
      logic [7:0] d = 8'($urandom);
      logic [7:0] m = 0;
      logic [8:0] w;
      logic p = ctrl.par_odd;
      for (int b = 0; b < nd; b++) begin m[b] = d[b]; p ^= d[b]; end
      w = {1'b0, m};
      if (ctrl.par_en) w[nd] = p;
      data.push_back(m);
      add_char(s, w, nd + int'(ctrl.par_en));
      crc = step(crc, m, nd);
    end
    case (ctrl.crc_mode)
      CRC_CALC:  fe = crc;
      CRC_ONES:  fe = 16'hFFFF;
      CRC_ZEROS: fe = 16'h0000;
      default:   fe = {sync_char, sync_char};
    endcase
    add_char(s, {1'b0, fe[15:8]}, 8);
    add_char(s, {1'b0, fe[7:0]}, 8);
    if (corrupt) s[flip_at] = !s[flip_at];
    ev_acc = '0;
    // idle before the frame
    for (int i = 0; i < 12; i++) line_bit(1);
    foreach (s[i]) line_bit(s[i]);
    for (int i = 0; i < 4; i++) line_bit(1);
    check(ev_acc.sync_match && ev_acc.rx_done, $sformatf("ctrl %h: frame received", cv));
    // a fixed check field cannot see a flipped data bit
    check(ev_acc.crc_match == !(corrupt && ctrl.crc_mode == CRC_CALC) &&
          ev_acc.crc_err == (corrupt && ctrl.crc_mode == CRC_CALC),
          $sformatf("ctrl %h: check field result", cv));
    check((ev_acc.parity_err == (corrupt && ctrl.par_en)), "parity result");
    check(!ev_acc.framing_err && !ev_acc.overrun_err, "no framing or overrun error");
    foreach (data[i]) begin
      v = rx_head;
      if (corrupt && i == 0) data[i][0] = !data[i][0];
      check(!rx_empty && v == data[i], $sformatf("ctrl %h: byte %0d %h want %h", cv, i, v, data[i]));
      @(negedge clk); pop = 1; @(negedge clk); pop = 0;
    end
    check(rx_empty, "all read");
  endtask

  initial begin
    ctrl = ctrl_t'(CTRL_RESET);
    ev_acc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(CTRL_RESET, 0);
    for (int k = 0; k < 30; k++) frame(16'($urandom), k % 4 == 3);
    // half duplex: own transmitter busy, the frame is not seen
    ctrl = ctrl_t'(CTRL_RESET);
    ctrl.half_dup = 1;
    tx_busy = 1;
    ev_acc = '0;
    for (int i = 0; i < 8; i++) line_bit(sync_char[i]);
    for (int i = 0; i < 40; i++) line_bit(1'($urandom));
    check(!ev_acc.sync_match && !rx_busy, "half duplex: receiver held while sending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
