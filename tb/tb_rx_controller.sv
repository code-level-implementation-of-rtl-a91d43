// tb_rx_controller: the receive frame FSM driven with sync_match pulses and
// characters. The testbench keeps its own CRC model (updated on
// crc_init/crc_upd) and builds frames with random configuration, own or
// foreign address, good or bad parity, a full or free RX buffer and a good
// or bad check field; it then compares the pushed characters and every
// status event with what the frame should produce, and checks hunt and
// exp_bits.
`timescale 1ns/1ps
module tb_rx_controller;
  import usart_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        enable = 1;
  ctrl_t       ctrl;
  logic [7:0]  own_addr = 8'h42, sync_char = 8'hE7;
  logic        sync_match = 0, char_valid = 0, framing_err = 0;
  logic [8:0]  char_data = 0;
  logic        hunt, crc_init, crc_upd, fifo_full = 0, fifo_push, rx_busy;
  logic [3:0]  exp_bits;
  logic [15:0] crc_field, crc_m = 16'hFFFF;
  logic [7:0]  fifo_data;
  rx_events_t  events;

  rx_controller dut (.*);

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

  always_comb
    case (ctrl.crc_mode)
      CRC_CALC:  crc_field = crc_m;
      CRC_ONES:  crc_field = 16'hFFFF;
      CRC_ZEROS: crc_field = 16'h0000;
      default:   crc_field = {sync_char, sync_char};
    endcase

  // collected outputs
  logic [7:0] pushed[$];
  int ev [9];
  always @(posedge clk) if (rst_n) begin
    if (crc_init) crc_m <= 16'hFFFF;
    else if (crc_upd) crc_m <= step(crc_m, char_data[7:0], int'(ctrl.dlen) + 5);
    if (fifo_push) pushed.push_back(fifo_data);
    for (int i = 0; i < 9; i++) if (events[i]) ev[i]++;
  end
  // event bit positions in rx_events_t
  localparam int E_SYNC = 0, E_CRCOK = 1, E_CRCERR = 2, E_PAR = 3, E_OVR = 4,
                 E_FRM = 5, E_AMATCH = 6, E_DONE = 7, E_AMISS = 8;

  task automatic send_char(input logic [8:0] v, input bit ferr);
    @(negedge clk);
    char_valid = 1; char_data = v; framing_err = ferr;
    @(negedge clk);
    char_valid = 0; framing_err = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic frame(input logic [15:0] cv);
    int nd, nblk;
    bit mine, crc_good;
    int n_par = 0, n_ovr = 0;
    logic [7:0] want[$];
    logic [15:0] crc_e = 16'hFFFF, fe;
    ctrl = ctrl_t'(cv);
    nd = int'(ctrl.dlen) + 5;
    nblk = int'(ctrl.blk_len_m1) + 1;
    mine = !ctrl.addr_en || ($urandom % 3 != 0);
    crc_good = ($urandom % 3 != 0);
    pushed = {};
    for (int i = 0; i < 9; i++) ev[i] = 0;
    repeat (2) @(negedge clk);
    check(hunt && exp_bits == 8, "hunting for sync");
    // a character while hunting is ignored
    send_char(9'h0AA, 0);
    sync_match = 1;
    @(negedge clk);
    sync_match = 0;
    repeat (2) @(negedge clk);
    check(!hunt && rx_busy, "in frame after sync");
    if (ctrl.addr_en) begin
      check(exp_bits == 8, "address character length");
      send_char({1'b0, mine ? own_addr : own_addr ^ 8'h10}, 0);
    end
    for (int i = 0; i < nblk; i++) begin
      logic [7:0] d = 8'($urandom);
      logic [7:0] m = 0;
      logic [8:0] w;
      logic p = ctrl.par_odd;
      bit bad = ctrl.par_en && ($urandom % 4 == 0);
      bit full = ($urandom % 5 == 0);
      for (int b = 0; b < nd; b++) begin m[b] = d[b]; p ^= d[b]; end
      w = {1'b0, m};
      if (ctrl.par_en) w[nd] = p ^ bad;
      check(exp_bits == 4'(nd + int'(ctrl.par_en)), "data character length");
      fifo_full = full;
      send_char(w, 0);
      fifo_full = 0;
      crc_e = step(crc_e, m, nd);
      if (mine) begin
        if (bad) n_par++;
        if (full) n_ovr++; else want.push_back(m);
      end
    end
    case (ctrl.crc_mode)
      CRC_CALC:  fe = crc_e;
      CRC_ONES:  fe = 16'hFFFF;
      CRC_ZEROS: fe = 16'h0000;
      default:   fe = {sync_char, sync_char};
    endcase
    if (!crc_good) fe ^= 16'(1 << ($urandom % 16));
    send_char({1'b0, fe[15:8]}, 0);
    send_char({1'b0, fe[7:0]}, 1);
    check(hunt, "back to hunt");
    check(pushed == want, $sformatf("ctrl %h: stored %0d characters, want %0d", cv, pushed.size(), want.size()));
    check(ev[E_SYNC] == 1, "sync event");
    check(ev[E_PAR] == (n_par > 0 ? ev[E_PAR] : 0) && (ev[E_PAR] > 0) == (n_par > 0), "parity error event");
    check((ev[E_OVR] > 0) == (n_ovr > 0), "overrun event");
    check(ev[E_FRM] == 1, "framing error event");
    check(ev[E_AMATCH] == int'(ctrl.addr_en && mine), "address match event");
    check(ev[E_AMISS] == int'(ctrl.addr_en && !mine), "address miss event");
    check(ev[E_DONE] == int'(mine), "rx_done event");
    check(ev[E_CRCOK] == int'(mine && crc_good), $sformatf("ctrl %h: crc match event", cv));
    check(ev[E_CRCERR] == int'(mine && !crc_good), "crc error event");
  endtask

  initial begin
    ctrl = ctrl_t'(CTRL_RESET);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) frame(16'($urandom));
    // disabled: held in hunt
    enable = 0;
    sync_match = 1;
    @(negedge clk);
    sync_match = 0;
    @(negedge clk);
    check(hunt, "disabled receiver stays in hunt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
