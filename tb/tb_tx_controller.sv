// tb_tx_controller: the frame sequencer against models of its neighbours.
// The TX buffer is a queue, the CRC generator a bitwise model driven by
// crc_init/crc_upd, and the serializer a model that stays not-ready for a
// random number of cycles after each load. Each frame's loaded characters
// must be: sync, address (if enabled), the data characters with their
// parity bit, then the two halves of the check field, with the right bit
// counts; tx_done must follow. Also checked: a start waits for a full
// block, and in half duplex for the receiver to be idle.
`timescale 1ns/1ps
module tb_tx_controller;
  import usart_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctrl_t       ctrl;
  logic [7:0]  sync_char = 8'hE7, dest_addr = 8'h3C, fifo_head;
  logic        start = 0, rx_busy = 0, fifo_pop, crc_init, crc_upd;
  logic [3:0]  fifo_count;
  logic [15:0] crc_field, crc_m;
  logic        ser_ready, ser_busy, ser_load, tx_busy, tx_done;
  logic [8:0]  ser_data;
  logic [3:0]  ser_nbits;
  logic [7:0]  q[$];
  int          ser_wait = 0;
  int          loads_d[$], loads_n[$];

  tx_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
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

  // neighbours
  assign fifo_head  = (q.size() > 0) ? q[0] : 8'h00;
  assign fifo_count = 4'(q.size());
  assign ser_ready  = (ser_wait == 0);
  assign ser_busy   = (ser_wait != 0);
  always_comb
    case (ctrl.crc_mode)
      CRC_CALC:  crc_field = crc_m;
      CRC_ONES:  crc_field = 16'hFFFF;
      CRC_ZEROS: crc_field = 16'h0000;
      default:   crc_field = {sync_char, sync_char};
    endcase

  always @(posedge clk) begin
    if (crc_init) crc_m <= 16'hFFFF;
    else if (crc_upd) crc_m <= step(crc_m, fifo_head, int'(ctrl.dlen) + 5);
    if (fifo_pop) void'(q.pop_front());
    if (ser_load) begin
      loads_d.push_back(int'(ser_data));
      loads_n.push_back(int'(ser_nbits));
      ser_wait <= 3 + $urandom % 8;
    end else if (ser_wait > 0) ser_wait <= ser_wait - 1;
  end

  task automatic frame(input logic [15:0] cv, input bit late_data, input bit hold_rx);
    logic [7:0] data[$];
    logic [15:0] crc_e = 16'hFFFF, fe;
    int nd, nblk, k, idx;
    bit ok;
    ctrl = ctrl_t'(cv);
    nd = int'(ctrl.dlen) + 5;
    nblk = int'(ctrl.blk_len_m1) + 1;
    if (nblk == 1) late_data = 0;
    loads_d = {}; loads_n = {};
    for (int i = 0; i < nblk; i++) data.push_back(8'($urandom));
    @(negedge clk);
    if (!late_data) foreach (data[i]) q.push_back(data[i]);
    else q.push_back(data[0]);
    rx_busy = hold_rx;
    start = 1;
    @(negedge clk);
    start = 0;
    if (late_data || hold_rx) begin
      repeat (30) @(negedge clk);
      check(!tx_busy && loads_d.size() == 0, "start held back");
      if (late_data) for (int i = 1; i < nblk; i++) q.push_back(data[i]);
      rx_busy = 0;
    end
    ok = 0;
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk);
      if (tx_done) begin ok = 1; break; end
    end
    check(ok, "tx_done");
    // expected characters
    idx = 0;
    check(loads_d.size() == nblk + (ctrl.addr_en ? 4 : 3), $sformatf("%0d characters", loads_d.size()));
    if (loads_d.size() != nblk + (ctrl.addr_en ? 4 : 3)) return;
    check(loads_d[idx] == int'(sync_char) && loads_n[idx] == 8, "sync character"); idx++;
    if (ctrl.addr_en) begin
      check(loads_d[idx] == int'(dest_addr) && loads_n[idx] == 8, "address character"); idx++;
    end
    foreach (data[i]) begin
      int w = 0;
      int pb = 0;
      for (int b = 0; b < nd; b++) begin
        w |= int'(data[i][b]) << b;
        pb ^= int'(data[i][b]);
      end
      if (ctrl.par_en) w |= (pb ^ int'(ctrl.par_odd)) << nd;
      check(loads_d[idx] == w && loads_n[idx] == nd + int'(ctrl.par_en),
            $sformatf("data %0d: %h/%0d want %h/%0d", i, loads_d[idx], loads_n[idx], w, nd + int'(ctrl.par_en)));
      idx++;
      crc_e = step(crc_e, data[i], nd);
    end
    case (ctrl.crc_mode)
      CRC_CALC:  fe = crc_e;
      CRC_ONES:  fe = 16'hFFFF;
      CRC_ZEROS: fe = 16'h0000;
      default:   fe = {sync_char, sync_char};
    endcase
    check(loads_d[idx] == int'(fe[15:8]) && loads_n[idx] == 8, "check field high"); idx++;
    check(loads_d[idx] == int'(fe[7:0]) && loads_n[idx] == 8, "check field low");
    check(q.size() == 0, "block taken from the buffer");
  endtask

  initial begin
    ctrl = ctrl_t'(CTRL_RESET);
    crc_m = 16'hFFFF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      automatic logic [15:0] cv = 16'($urandom);
      frame(cv, k % 5 == 1, k % 7 == 3 && cv[1]);
    end
    ctrl = ctrl_t'(CTRL_RESET);
    ctrl.half_dup = 1;
    frame(ctrl, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
