// tb_usart_tx: the whole transmitter with the baud tick held high (one bit
// = 16 clock cycles). Random configurations and blocks are sent; the line
// is decoded here (in synchronous mode at each rising edge of tx_clk, in
// asynchronous mode on a 16-cycle grid from the first start bit) and must
// equal the frame built by the testbench: sync, address, data with parity,
// check field (bitwise CRC-16 model), with start and stop bits in
// asynchronous mode. The TX buffer's full and empty flags are checked too.
`timescale 1ns/1ps
module tb_usart_tx;
  import usart_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctrl_t      ctrl;
  logic       tick = 1, push = 0, start = 0, rx_busy = 0;
  logic [7:0] sync_char = 8'h96, dest_addr = 8'hA5, push_data = 0;
  logic       txd, tx_clk, tx_full, tx_empty, tx_busy, tx_done;

  usart_tx dut (.*);

  bit done_seen = 0;
  always @(posedge clk) if (tx_done) done_seen <= 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic add_char(ref bit s[$], input logic [8:0] v, input int n);
    if (!ctrl.sync_mode) s.push_back(0);
    for (int i = 0; i < n; i++) s.push_back(v[i]);
    if (!ctrl.sync_mode) begin
      s.push_back(1);
      if (ctrl.stop2) s.push_back(1);
    end
  endtask

  task automatic frame(input logic [15:0] cv);
    bit exp_s[$], got[$];
    logic [7:0] data[$];
    logic [15:0] crc = 16'hFFFF, fe;
    int nd, nblk;
    ctrl = ctrl_t'(cv);
    ctrl.baud_sel = 0;
    nd = int'(ctrl.dlen) + 5;
    nblk = int'(ctrl.blk_len_m1) + 1;
    add_char(exp_s, {1'b0, sync_char}, 8);
    if (ctrl.addr_en) add_char(exp_s, {1'b0, dest_addr}, 8);
    for (int i = 0; i < nblk; i++) begin
      logic [7:0] d = 8'($urandom);
      logic [8:0] w = {1'b0, d};
      logic p = ctrl.par_odd;
      data.push_back(d);
      for (int b = 0; b < nd; b++) p ^= d[b];
      if (ctrl.par_en) w[nd] = p;
      add_char(exp_s, w, nd + int'(ctrl.par_en));
      crc = step(crc, d, nd);
    end
    case (ctrl.crc_mode)
      CRC_CALC:  fe = crc;
      CRC_ONES:  fe = 16'hFFFF;
      CRC_ZEROS: fe = 16'h0000;
      default:   fe = {sync_char, sync_char};
    endcase
    add_char(exp_s, {1'b0, fe[15:8]}, 8);
    add_char(exp_s, {1'b0, fe[7:0]}, 8);
    // load the buffer
    foreach (data[i]) begin
      @(negedge clk);
      push = 1; push_data = data[i];
      @(negedge clk);
      push = 0;
    end
    check(!tx_empty && (tx_full == (nblk == 8)), "buffer flags after loading");
    @(negedge clk);
    start = 1;
    done_seen = 0;
    @(negedge clk);
    start = 0;
    if (ctrl.sync_mode) begin
      bit seen0, prev;
      seen0 = 0;
      prev = tx_clk;
      while (!done_seen) begin
        @(posedge clk);
        if (tx_clk && !prev) begin
          if (txd == 0) seen0 = 1;
          if (seen0) got.push_back(txd);
        end
        prev = tx_clk;
      end
    end else begin
      @(negedge txd);
      repeat (8) @(posedge clk);
      for (int i = 0; i < exp_s.size(); i++) begin
        got.push_back(txd);
        repeat (16) @(posedge clk);
      end
      while (!done_seen) @(posedge clk);
    end
    check(got.size() == exp_s.size(), $sformatf("ctrl %h: %0d line bits, expected %0d", cv, got.size(), exp_s.size()));
    for (int i = 0; i < exp_s.size() && i < got.size(); i++)
      check(got[i] == exp_s[i], $sformatf("ctrl %h: line bit %0d", cv, i));
    check(tx_empty && !tx_busy, "buffer empty, transmitter idle");
    repeat (20) @(posedge clk);
  endtask

  initial begin
    ctrl = ctrl_t'(CTRL_RESET);
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(CTRL_RESET);
    for (int k = 0; k < 24; k++) frame(16'($urandom) & 16'hFFFD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
