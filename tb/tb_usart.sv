// tb_usart: end-to-end test of two USARTs linked back to back, at the
// default parameters (50 MHz clock, 115200 baud and the other rates of the
// selection table).
//
// USART 1 and USART 2 cross their tx_out/tx_clk and rx_in/rx_clk. The link
// from 1 to 2 passes through an XOR that the testbench uses to flip chosen
// bits of a frame. Each scenario resets both devices, programs them through
// their processor buses, sends blocks and checks against values worked out
// here: the received characters, the CRC-16 (an independent bitwise model),
// the status flags, and the bit time of the line (16 * round(CLK_HZ /
// (16 * baud)) clock cycles). Every mechanism of the design is counted and
// a mechanism that never happened counts as a failure: synchronous and
// asynchronous frames, parity, two stop bits, every data length, the four
// check-field choices, address match and miss, overrun, parity, framing and
// CRC errors, half duplex deferral, full duplex, interrupt, a full TX buffer
// and a rate change.
`timescale 1ns/1ps
module tb_usart;
  import usart_pkg::*;

  localparam int unsigned CLK_HZ = 50_000_000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #10 clk = ~clk;

  // bus of each device
  logic        cs   [2];
  logic        wr_p [2];
  logic        rd_p [2];
  logic [3:0]  addr [2];
  logic [15:0] wdata[2];
  logic [15:0] rdata[2];
  logic        irq  [2];
  logic        txo  [2];
  logic        txc  [2];
  logic        flip = 1'b0;
  logic        line12, line21;

  assign line12 = txo[0] ^ flip;
  assign line21 = txo[1];

  usart u1 (
    .clk(clk), .rst_n(rst_n), .cs(cs[0]), .wr_p(wr_p[0]), .rd_p(rd_p[0]),
    .addr(addr[0]), .wdata(wdata[0]), .rdata(rdata[0]), .irq(irq[0]),
    .tx_out(txo[0]), .tx_clk(txc[0]), .rx_in(line21), .rx_clk(txc[1])
  );
  usart u2 (
    .clk(clk), .rst_n(rst_n), .cs(cs[1]), .wr_p(wr_p[1]), .rd_p(rd_p[1]),
    .addr(addr[1]), .wdata(wdata[1]), .rdata(rdata[1]), .irq(irq[1]),
    .tx_out(txo[1]), .tx_clk(txc[1]), .rx_in(line12), .rx_clk(txc[0])
  );

  int checks = 0;
  int failures = 0;

  // mechanisms seen
  typedef enum int {
    M_SYNC, M_ASYNC, M_PARITY, M_STOP2, M_DLEN5, M_DLEN6, M_DLEN7, M_DLEN8,
    M_CRC_CALC, M_CRC_ONES, M_CRC_ZEROS, M_CRC_SYNC, M_ADDR_MATCH, M_ADDR_MISS,
    M_OVERRUN, M_PAR_ERR, M_FRAME_ERR, M_CRC_ERR, M_HALF_DUP, M_FULL_DUP,
    M_IRQ, M_TX_FULL, M_RATE, M_NUM
  } mech_e;
  int mech [M_NUM];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ bus
  initial begin
    for (int i = 0; i < 2; i++) begin
      cs[i] = 0; wr_p[i] = 0; rd_p[i] = 0; addr[i] = 0; wdata[i] = 0;
    end
  end

  task automatic wr(input int d, input logic [3:0] a, input logic [15:0] v);
    @(negedge clk);
    cs[d] = 1; wr_p[d] = 1; addr[d] = a; wdata[d] = v;
    @(negedge clk);
    cs[d] = 0; wr_p[d] = 0;
  endtask

  task automatic rd(input int d, input logic [3:0] a, output logic [15:0] v);
    @(negedge clk);
    cs[d] = 1; rd_p[d] = 1; addr[d] = a;
    @(negedge clk);
    cs[d] = 0; rd_p[d] = 0;
    v = rdata[d];
  endtask

  // wait until all bits of mask are set in STATUS, give up after max cycles
  task automatic wait_status(input int d, input logic [15:0] mask,
                             input int max_cycles, output bit ok);
    logic [15:0] s;
    int n = 0;
    ok = 0;
    while (n < max_cycles) begin
      rd(d, REG_STATUS, s);
      if ((s & mask) == mask) begin ok = 1; break; end
      repeat (30) @(posedge clk);
      n += 32;
    end
  endtask

  // ------------------------------------------------------------ models
  function automatic logic [15:0] crc_model(input logic [7:0] data[$],
                                            input int nbits);
    logic [15:0] c = 16'hFFFF;
    foreach (data[k])
      for (int i = 0; i < nbits; i++) begin
        c = c ^ (16'(data[k][i]) << 15);
        c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
      end
    return c;
  endfunction

  function automatic int bit_time(input int sel);
    int baud = BAUD_TABLE[sel];
    return 16 * ((CLK_HZ + baud * 8) / (baud * 16));
  endfunction

  function automatic logic [15:0] mk_ctrl(input bit sync_mode, input bit half,
      input bit par_en, input bit par_odd, input bit stop2, input int nbits,
      input int sel, input crc_mode_e cm, input bit addr_en, input int blk);
    ctrl_t c;
    c.sync_mode  = sync_mode;
    c.half_dup   = half;
    c.par_en     = par_en;
    c.par_odd    = par_odd;
    c.stop2      = stop2;
    c.dlen       = 2'(nbits - 5);
    c.baud_sel   = 3'(sel);
    c.crc_mode   = cm;
    c.addr_en    = addr_en;
    c.blk_len_m1 = 3'(blk - 1);
    return c;
  endfunction

  task automatic reset_all();
    flip = 0;
    rst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
  endtask

  // number of line bits in one frame
  function automatic int frame_bits(input ctrl_t c);
    int nd = int'(c.dlen) + 5;
    int nblk = int'(c.blk_len_m1) + 1;
    int nchar = (c.addr_en ? 4 : 3) + nblk;
    int extra = c.sync_mode ? 0 : (c.stop2 ? 3 : 2);
    int dbits = nd + (c.par_en ? 1 : 0);
    return (nchar - nblk) * (8 + extra) + nblk * (dbits + extra);
  endfunction

  // Flip line bit k of the next frame from USART 1 (bit 0 = first line bit).
  task automatic flip_bit(input ctrl_t c, input int k);
    int bt = bit_time(int'(c.baud_sel));
    int first_low;
    logic [7:0] sync_char = SYNC_RESET;
    // first low line bit of the frame
    if (c.sync_mode) begin
      first_low = 0;
      while (sync_char[first_low]) first_low++;
    end else begin
      first_low = 0;
    end
    @(negedge line12);
    repeat ((k - first_low) * bt) @(posedge clk);
    flip = 1;
    repeat (bt) @(posedge clk);
    flip = 0;
  endtask

  // Send one block from dev s to dev d and check what arrives.
  task automatic send_block(input int s, input logic [15:0] ctrl_v,
                            input logic [7:0] data[$], input bit expect_ok,
                            input string tag);
    ctrl_t c = ctrl_t'(ctrl_v);
    int d = 1 - s;
    int nd = int'(c.dlen) + 5;
    logic [15:0] st, v;
    logic [7:0] m;
    bit ok;
    int t0, t1, bt;
    wr(0, REG_CONTROL, ctrl_v);
    wr(1, REG_CONTROL, ctrl_v);
    wr(0, REG_STATUS, 16'hFFFF);
    wr(1, REG_STATUS, 16'hFFFF);
    foreach (data[i]) wr(s, REG_TXDATA, {8'h00, data[i]});
    wr(s, REG_COMMAND, 16'h0001);
    t0 = int'($time);
    bt = bit_time(int'(c.baud_sel));
    wait_status(s, 16'h2000, (frame_bits(c) + 8) * bt, ok);
    t1 = int'($time);
    check(ok, {tag, ": tx_done"});
    // frame time: start handshake plus frame_bits bit periods, up to 2 more
    check(((t1 - t0) / 20) >= frame_bits(c) * bt &&
          ((t1 - t0) / 20) <= (frame_bits(c) + 2) * bt,
          $sformatf("%s: frame time %0d cycles, expected %0d bits of %0d",
                    tag, (t1 - t0) / 20, frame_bits(c), bt));
    wait_status(d, 16'h4000, 4 * bt, ok);
    check(ok, {tag, ": rx_done"});
    rd(d, REG_STATUS, st);
    check(st[6], {tag, ": sync_match"});
    check(st[7] == expect_ok && st[8] == !expect_ok, {tag, ": crc result"});
    foreach (data[i]) begin
      rd(d, REG_RXDATA, v);
      for (int b = 0; b < 8; b++) m[b] = (b < nd) ? data[i][b] : 1'b0;
      if (expect_ok)
        check(v[7:0] == m, $sformatf("%s: byte %0d got %h want %h", tag, i, v[7:0], m));
    end
    rd(d, REG_STATUS, st);
    check(st[2], {tag, ": rx buffer empty after reading"});
    if (c.sync_mode) mech[M_SYNC]++; else mech[M_ASYNC]++;
    if (c.par_en) mech[M_PARITY]++;
    if (c.stop2 && !c.sync_mode) mech[M_STOP2]++;
    mech[M_DLEN5 + nd - 5]++;
    if (st[7]) mech[M_CRC_CALC + int'(c.crc_mode)]++;
  endtask

  function automatic void rand_data(ref logic [7:0] q[$], input int n);
    q = {};
    for (int i = 0; i < n; i++) q.push_back(8'($urandom));
  endfunction

  // ------------------------------------------------------------ main
  initial begin
    logic [7:0]  q[$];
    logic [15:0] cv, st, v;
    bit ok;
    int t0, t1, bt;
    ctrl_t c;

    for (int i = 0; i < M_NUM; i++) mech[i] = 0;

    // 1. reset values, synchronous block of eight at 115200 baud
    reset_all();
    rd(0, REG_CONTROL, v);
    check(v == CTRL_RESET, "control reset value");
    rd(0, REG_SYNC, v);
    check(v == 16'h00E7, "sync reset value");
    q = '{8'hCA, 8'hFE, 8'hAB, 8'hAB, 8'hCF, 8'hAF, 8'h00, 8'hFF};
    send_block(0, CTRL_RESET, q, 1, "sync8");

    // bit clock period of the synchronous link
    begin
      @(posedge txc[0]); t0 = int'($time);
      @(posedge txc[0]); t1 = int'($time);
      check((t1 - t0) / 20 == bit_time(0),
            $sformatf("tx_clk period %0d cycles", (t1 - t0) / 20));
    end

    // 2. asynchronous and synchronous frames in several formats; the
    //    receiver's CRC register is also compared with the model
    reset_all();
    rand_data(q, 4);
    send_block(0, mk_ctrl(0, 0, 1, 0, 0, 8, 0, CRC_CALC, 0, 4), q, 1, "async8 even");
    check(u2.u_rx.crc == crc_model(q, 8), "receiver CRC equals model");

    reset_all();
    rand_data(q, 3);
    send_block(0, mk_ctrl(0, 0, 1, 1, 1, 5, 0, CRC_CALC, 0, 3), q, 1, "async5 odd stop2");
    reset_all();
    rand_data(q, 5);
    send_block(1, mk_ctrl(0, 0, 0, 0, 0, 6, 0, CRC_CALC, 0, 5), q, 1, "async6 2->1");
    reset_all();
    rand_data(q, 6);
    send_block(0, mk_ctrl(1, 0, 1, 1, 0, 7, 0, CRC_CALC, 0, 6), q, 1, "sync7 odd");
    reset_all();
    rand_data(q, 2);
    send_block(1, mk_ctrl(1, 0, 0, 0, 0, 6, 0, CRC_CALC, 0, 2), q, 1, "sync6 2->1");

    // 3. the other check fields
    reset_all();
    rand_data(q, 1);
    send_block(0, mk_ctrl(1, 0, 0, 0, 0, 8, 0, CRC_ONES, 0, 1), q, 1, "crc ones");
    rand_data(q, 1);
    send_block(0, mk_ctrl(0, 0, 0, 0, 0, 8, 0, CRC_ZEROS, 0, 1), q, 1, "crc zeros");
    rand_data(q, 1);
    send_block(0, mk_ctrl(1, 0, 0, 0, 0, 8, 0, CRC_SYNC, 0, 1), q, 1, "crc sync");

    // 4. a check field set differently at the two ends is an error
    reset_all();
    wr(0, REG_CONTROL, mk_ctrl(1, 0, 0, 0, 0, 8, 0, CRC_ONES, 0, 1));
    wr(1, REG_CONTROL, mk_ctrl(1, 0, 0, 0, 0, 8, 0, CRC_ZEROS, 0, 1));
    wr(0, REG_TXDATA, 16'h0012);
    wr(0, REG_COMMAND, 16'h0001);
    wait_status(1, 16'h4000, 40 * bit_time(0), ok);
    rd(1, REG_STATUS, st);
    check(ok && st[8] && !st[7], "mismatched check field gives crc error");

    // 5. addressing: match and miss
    reset_all();
    cv = mk_ctrl(1, 0, 0, 0, 0, 8, 0, CRC_CALC, 1, 2);
    wr(1, REG_OWNADDR, 16'h005A);
    wr(0, REG_DSTADDR, 16'h005A);
    rand_data(q, 2);
    send_block(0, cv, q, 1, "addressed");
    rd(1, REG_STATUS, st);
    check(st[12] && !st[15], "address match flag");
    if (st[12]) mech[M_ADDR_MATCH]++;
    wr(0, REG_STATUS, 16'hFFFF);
    wr(1, REG_STATUS, 16'hFFFF);
    wr(0, REG_DSTADDR, 16'h005B);
    wr(0, REG_TXDATA, 16'h0001);
    wr(0, REG_TXDATA, 16'h0002);
    wr(0, REG_COMMAND, 16'h0001);
    wait_status(0, 16'h2000, 60 * bit_time(0), ok);
    repeat (4 * bit_time(0)) @(posedge clk);
    rd(1, REG_STATUS, st);
    check(ok && st[15] && !st[12] && !st[14] && st[2],
          $sformatf("address miss: frame discarded, status %h", st));
    if (st[15]) mech[M_ADDR_MISS]++;
    // the next frame for this address is received again
    wr(0, REG_DSTADDR, 16'h005A);
    rand_data(q, 2);
    send_block(0, cv, q, 1, "addressed again");

    // 6. overrun: eight characters wait unread, two more arrive
    reset_all();
    cv = mk_ctrl(1, 0, 0, 0, 0, 8, 0, CRC_CALC, 0, 8);
    wr(0, REG_CONTROL, cv);
    wr(1, REG_CONTROL, cv);
    for (int i = 0; i < 8; i++) wr(0, REG_TXDATA, 16'(i + 1));
    wr(0, REG_TXDATA, 16'h0099);
    rd(0, REG_STATUS, st);
    check(st[1], "TX buffer full after eight writes");
    if (st[1]) mech[M_TX_FULL]++;
    wr(0, REG_COMMAND, 16'h0001);
    wait_status(1, 16'h4000, 100 * bit_time(0), ok);
    rd(1, REG_STATUS, st);
    check(ok && st[3] && !st[10], "RX buffer full, no overrun yet");
    wr(1, REG_STATUS, 16'hFFFF);
    cv = mk_ctrl(1, 0, 0, 0, 0, 8, 0, CRC_CALC, 0, 2);
    wr(0, REG_CONTROL, cv);
    wr(1, REG_CONTROL, cv);
    wr(0, REG_TXDATA, 16'h0077);
    wr(0, REG_TXDATA, 16'h0088);
    wr(0, REG_COMMAND, 16'h0001);
    wait_status(1, 16'h4000, 60 * bit_time(0), ok);
    rd(1, REG_STATUS, st);
    check(ok && st[10], "overrun flagged");
    if (st[10]) mech[M_OVERRUN]++;
    for (int i = 0; i < 8; i++) begin
      rd(1, REG_RXDATA, v);
      check(v[7:0] == 8'(i + 1), $sformatf("kept byte %0d = %h", i, v[7:0]));
    end
    wr(1, REG_STATUS, 16'h0400);
    rd(1, REG_STATUS, st);
    check(!st[10], "overrun flag cleared by writing 1");

    // 7. parity error: flip the parity bit of the first data character
    reset_all();
    c = ctrl_t'(mk_ctrl(0, 0, 1, 0, 0, 8, 0, CRC_CALC, 0, 2));
    wr(0, REG_CONTROL, c);
    wr(1, REG_CONTROL, c);
    wr(0, REG_TXDATA, 16'h0031);
    wr(0, REG_TXDATA, 16'h0032);
    wr(0, REG_COMMAND, 16'h0001);
    flip_bit(c, 10 + 1 + 8);
    wait_status(1, 16'h4000, 60 * bit_time(0), ok);
    rd(1, REG_STATUS, st);
    check(ok && st[9] && st[7], $sformatf("parity error, CRC still good: %h", st));
    if (st[9]) mech[M_PAR_ERR]++;

    // 8. framing error: stop bit of the last character forced low
    reset_all();
    c = ctrl_t'(mk_ctrl(0, 0, 0, 0, 0, 8, 0, CRC_CALC, 0, 1));
    wr(0, REG_CONTROL, c);
    wr(1, REG_CONTROL, c);
    wr(0, REG_TXDATA, 16'h00C3);
    wr(0, REG_COMMAND, 16'h0001);
    flip_bit(c, frame_bits(c) - 1);
    wait_status(1, 16'h4000, 60 * bit_time(0), ok);
    rd(1, REG_STATUS, st);
    check(ok && st[11], $sformatf("framing error: %h", st));
    if (st[11]) mech[M_FRAME_ERR]++;

    // 9. CRC error: one data bit flipped in a synchronous frame
    reset_all();
    c = ctrl_t'(mk_ctrl(1, 0, 0, 0, 0, 8, 0, CRC_CALC, 0, 3));
    wr(0, REG_CONTROL, c);
    wr(1, REG_CONTROL, c);
    for (int i = 0; i < 3; i++) wr(0, REG_TXDATA, 16'h0040 + 16'(i));
    wr(0, REG_COMMAND, 16'h0001);
    flip_bit(c, 8 + 8 + 3);
    wait_status(1, 16'h4000, 60 * bit_time(0), ok);
    rd(1, REG_STATUS, st);
    check(ok && st[8] && !st[7], $sformatf("CRC error: %h", st));
    if (st[8]) mech[M_CRC_ERR]++;
    rd(1, REG_RXDATA, v);
    rd(1, REG_RXDATA, v);
    check(v[7:0] == (8'h41 ^ 8'h08), "flipped bit visible in data");

    // 10. interrupt on rx_done, global enable
    reset_all();
    wr(1, REG_INTCTRL, 16'h4000);
    rand_data(q, 1);
    send_block(0, mk_ctrl(1, 0, 0, 0, 0, 8, 0, CRC_CALC, 0, 1), q, 1, "irq masked");
    check(!irq[1], "no interrupt without global enable");
    wr(1, REG_INTCTRL, 16'hC000);
    @(posedge clk);
    check(irq[1], "interrupt with global enable");
    if (irq[1]) mech[M_IRQ]++;
    wr(1, REG_STATUS, 16'h4000);
    @(posedge clk);
    check(!irq[1], "interrupt cleared with its status bit");

    // 11. full duplex: both directions at once
    reset_all();
    cv = mk_ctrl(1, 0, 0, 0, 0, 8, 0, CRC_CALC, 0, 4);
    wr(0, REG_CONTROL, cv);
    wr(1, REG_CONTROL, cv);
    for (int i = 0; i < 4; i++) begin
      wr(0, REG_TXDATA, 16'h0010 + 16'(i));
      wr(1, REG_TXDATA, 16'h0020 + 16'(i));
    end
    wr(0, REG_COMMAND, 16'h0001);
    wr(1, REG_COMMAND, 16'h0001);
    repeat (12 * bit_time(0)) @(posedge clk);
    rd(0, REG_STATUS, st);
    rd(1, REG_STATUS, v);
    check(st[4] && st[5] && v[4] && v[5], "both sides send and receive together");
    if (st[4] && st[5]) mech[M_FULL_DUP]++;
    wait_status(0, 16'h4080, 80 * bit_time(0), ok);
    check(ok, "full duplex: 1 received");
    wait_status(1, 16'h4080, 80 * bit_time(0), ok);
    check(ok, "full duplex: 2 received");
    for (int i = 0; i < 4; i++) begin
      rd(0, REG_RXDATA, v);
      check(v[7:0] == 8'h20 + 8'(i), "full duplex data 2->1");
      rd(1, REG_RXDATA, v);
      check(v[7:0] == 8'h10 + 8'(i), "full duplex data 1->2");
    end

    // 12. half duplex: 2 is asked to send while it receives; it waits
    reset_all();
    cv = mk_ctrl(1, 1, 0, 0, 0, 8, 0, CRC_CALC, 0, 4);
    wr(0, REG_CONTROL, cv);
    wr(1, REG_CONTROL, cv);
    for (int i = 0; i < 4; i++) begin
      wr(0, REG_TXDATA, 16'h0030 + 16'(i));
      wr(1, REG_TXDATA, 16'h0050 + 16'(i));
    end
    wr(0, REG_COMMAND, 16'h0001);
    repeat (12 * bit_time(0)) @(posedge clk);
    wr(1, REG_COMMAND, 16'h0001);
    repeat (4 * bit_time(0)) @(posedge clk);
    rd(1, REG_STATUS, st);
    check(st[5] && !st[4], "half duplex: 2 receives, its transmission waits");
    if (st[5] && !st[4]) mech[M_HALF_DUP]++;
    wait_status(1, 16'h4080, 80 * bit_time(0), ok);
    check(ok, "half duplex: 2 received");
    wait_status(1, 16'h2000, 80 * bit_time(0), ok);
    check(ok, "half duplex: 2 sent afterwards");
    wait_status(0, 16'h4080, 20 * bit_time(0), ok);
    check(ok, "half duplex: 1 received");
    for (int i = 0; i < 4; i++) begin
      rd(0, REG_RXDATA, v);
      check(v[7:0] == 8'h50 + 8'(i), "half duplex data 2->1");
      rd(1, REG_RXDATA, v);
      check(v[7:0] == 8'h30 + 8'(i), "half duplex data 1->2");
    end

    // 13. another rate of the table (57600 baud), synchronous and
    //     asynchronous
    reset_all();
    rand_data(q, 2);
    send_block(0, mk_ctrl(1, 0, 0, 0, 0, 8, 1, CRC_CALC, 0, 2), q, 1, "sync 57600");
    @(posedge txc[0]); t0 = int'($time);
    @(posedge txc[0]); t1 = int'($time);
    bt = bit_time(1);
    check((t1 - t0) / 20 == bt, $sformatf("57600: tx_clk period %0d", (t1 - t0) / 20));
    if ((t1 - t0) / 20 == bt) mech[M_RATE]++;
    rand_data(q, 1);
    send_block(0, mk_ctrl(0, 0, 0, 0, 1, 8, 2, CRC_CALC, 0, 1), q, 1, "async 38400");

    // ------------------------------------------------------------ summary
    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %s: %0d", mech_e'(i), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_e'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
