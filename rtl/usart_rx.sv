// usart_rx: receiver subsystem.
//
// Follows the document's receiver diagram: the receiver register
// (rx_deserializer) feeds the sync comparator, whose SYNC_MATCH enables the
// CRC generator and the path of data characters into the RAM (the
// eight-level RX buffer); the frame FSM (rx_controller) compares the check
// field and reports to the status register through events. The check field
// expected is chosen by the same crc_select as in the transmitter.
// In half duplex (ctrl.half_dup) the receiver is held in hunt while the own
// transmitter is busy. The processor reads the oldest character on rx_head
// and removes it with pop.
module usart_rx
  import usart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  ctrl_t      ctrl,
  input  logic [7:0] sync_char,
  input  logic [7:0] own_addr,
  input  logic       rx_in,
  input  logic       rx_clk,
  input  logic       tx_busy,
  input  logic       pop,
  output logic [7:0] rx_head,
  output logic       rx_full,
  output logic       rx_empty,
  output logic       rx_busy,
  output rx_events_t events
);

  logic        enable;
  logic        hunt;
  logic [3:0]  exp_bits;
  logic [7:0]  shreg;
  logic        shift_done, char_valid, framing_err;
  logic [8:0]  char_data;
  logic        cmp_strobe, sync_match;
  logic [7:0]  cmp_pattern;
  logic        crc_init, crc_upd;
  logic [15:0] crc, field;
  logic        push;
  logic [7:0]  push_data;

  assign enable      = !(ctrl.half_dup && tx_busy);
  assign cmp_strobe  = hunt && (ctrl.sync_mode ? shift_done : char_valid);
  assign cmp_pattern = ctrl.sync_mode ? shreg : char_data[7:0];

  rx_deserializer u_des (
    .clk         (clk),
    .rst_n       (rst_n),
    .enable      (enable),
    .tick        (tick),
    .sync_mode   (ctrl.sync_mode),
    .stop2       (ctrl.stop2),
    .rx_in       (rx_in),
    .rx_clk      (rx_clk),
    .hunt        (hunt),
    .exp_bits    (exp_bits),
    .shreg       (shreg),
    .shift_done  (shift_done),
    .char_valid  (char_valid),
    .char_data   (char_data),
    .framing_err (framing_err)
  );

  sync_comparator u_cmp (
    .clk        (clk),
    .rst_n      (rst_n),
    .strobe     (cmp_strobe),
    .pattern    (cmp_pattern),
    .sync_char  (sync_char),
    .sync_match (sync_match)
  );

  crc16 u_crc (
    .clk   (clk),
    .rst_n (rst_n),
    .init  (crc_init),
    .upd   (crc_upd),
    .data  (char_data[7:0]),
    .nbits (dlen_bits(ctrl.dlen)),
    .crc   (crc)
  );

  crc_select u_sel (
    .mode      (ctrl.crc_mode),
    .crc_calc  (crc),
    .sync_char (sync_char),
    .field     (field)
  );

  rx_controller u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .enable      (enable),
    .ctrl        (ctrl),
    .own_addr    (own_addr),
    .sync_match  (sync_match),
    .char_valid  (char_valid),
    .char_data   (char_data),
    .framing_err (framing_err),
    .hunt        (hunt),
    .exp_bits    (exp_bits),
    .crc_init    (crc_init),
    .crc_upd     (crc_upd),
    .crc_field   (field),
    .fifo_full   (rx_full),
    .fifo_push   (push),
    .fifo_data   (push_data),
    .rx_busy     (rx_busy),
    .events      (events)
  );

  usart_fifo #(.WIDTH(8), .DEPTH(BUF_DEPTH)) u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (push),
    .din   (push_data),
    .pop   (pop),
    .head  (rx_head),
    .full  (rx_full),
    .empty (rx_empty),
    .count ()
  );

endmodule
