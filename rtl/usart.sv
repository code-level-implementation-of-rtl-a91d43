// usart: universal synchronous/asynchronous receiver-transmitter, top level.
//
// A processor writes characters into an eight-level transmit buffer and asks
// for a block to be sent. The transmitter frames the block as
//   SYNC, [ADDRESS], DATA x blk_len, CHECK[15:8], CHECK[7:0]
// where CHECK is a CRC-16 of the data bits or a fixed pattern. In
// synchronous mode the bits go out back to back on tx_out with their clock
// on tx_clk; in asynchronous mode each character is framed by a start bit
// and one or two stop bits and no clock is sent. The receiver hunts for the
// sync character (bit by bit in synchronous mode, character by character in
// asynchronous mode), stores the data characters of the frame in its own
// eight-level buffer, checks parity, stop bits, buffer overrun and the check
// field, and reports everything in a 16-bit status register that can raise
// an interrupt. Two USARTs talk by crossing tx_out/tx_clk with rx_in/rx_clk.
//
// Blocks: usart_regs (processor glue logic and control logic), baud_gen
// (rate selection), usart_tx and usart_rx. Everything runs on clk; rx_clk
// and rx_in are synchronized inside the receiver. One baud generator serves
// both directions. CLK_HZ is the frequency of clk; its default of 50 MHz is
// this design's assumption.
module usart
  import usart_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor bus
  input  logic        cs,
  input  logic        wr_p,
  input  logic        rd_p,
  input  logic [3:0]  addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        irq,
  // serial link
  output logic        tx_out,
  output logic        tx_clk,
  input  logic        rx_in,
  input  logic        rx_clk
);

  ctrl_t      ctrl;
  logic [7:0] sync_char, own_addr, dest_addr;
  logic       tick;
  logic       tx_push, tx_start, tx_empty, tx_full, tx_busy, tx_done;
  logic [7:0] tx_data;
  logic       rx_pop, rx_empty, rx_full, rx_busy;
  logic [7:0] rx_head;
  rx_events_t rx_ev;

  usart_regs u_regs (
    .clk       (clk),
    .rst_n     (rst_n),
    .cs        (cs),
    .wr_p      (wr_p),
    .rd_p      (rd_p),
    .addr      (addr),
    .wdata     (wdata),
    .rdata     (rdata),
    .irq       (irq),
    .ctrl      (ctrl),
    .sync_char (sync_char),
    .own_addr  (own_addr),
    .dest_addr (dest_addr),
    .tx_push   (tx_push),
    .tx_data   (tx_data),
    .tx_start  (tx_start),
    .tx_empty  (tx_empty),
    .tx_full   (tx_full),
    .tx_busy   (tx_busy),
    .tx_done   (tx_done),
    .rx_pop    (rx_pop),
    .rx_head   (rx_head),
    .rx_empty  (rx_empty),
    .rx_full   (rx_full),
    .rx_busy   (rx_busy),
    .rx_ev     (rx_ev)
  );

  baud_gen #(.CLK_HZ(CLK_HZ)) u_baud (
    .clk   (clk),
    .rst_n (rst_n),
    .sel   (ctrl.baud_sel),
    .tick  (tick)
  );

  usart_tx u_tx (
    .clk       (clk),
    .rst_n     (rst_n),
    .tick      (tick),
    .ctrl      (ctrl),
    .sync_char (sync_char),
    .dest_addr (dest_addr),
    .push      (tx_push),
    .push_data (tx_data),
    .start     (tx_start),
    .rx_busy   (rx_busy),
    .txd       (tx_out),
    .tx_clk    (tx_clk),
    .tx_full   (tx_full),
    .tx_empty  (tx_empty),
    .tx_busy   (tx_busy),
    .tx_done   (tx_done)
  );

  usart_rx u_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .tick      (tick),
    .ctrl      (ctrl),
    .sync_char (sync_char),
    .own_addr  (own_addr),
    .rx_in     (rx_in),
    .rx_clk    (rx_clk),
    .tx_busy   (tx_busy),
    .pop       (rx_pop),
    .rx_head   (rx_head),
    .rx_full   (rx_full),
    .rx_empty  (rx_empty),
    .rx_busy   (rx_busy),
    .events    (rx_ev)
  );

endmodule
