// usart_tx: transmitter subsystem.
//
// Wires together the eight-level TX buffer (usart_fifo on a dual-port RAM),
// the CRC-16 generator, the check-field selector, the frame sequencer and
// the parallel-to-serial shift register, as in the document's transmitter
// diagram. The processor pushes characters with push/push_data; start
// requests one block. The frame leaves on txd, with its bit clock on tx_clk
// in synchronous mode. tick is the 16x baud enable from baud_gen.
module usart_tx
  import usart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  ctrl_t      ctrl,
  input  logic [7:0] sync_char,
  input  logic [7:0] dest_addr,
  input  logic       push,
  input  logic [7:0] push_data,
  input  logic       start,
  input  logic       rx_busy,
  output logic       txd,
  output logic       tx_clk,
  output logic       tx_full,
  output logic       tx_empty,
  output logic       tx_busy,
  output logic       tx_done
);

  logic [7:0]  head;
  logic [3:0]  count;
  logic        pop;
  logic        crc_init, crc_upd;
  logic [15:0] crc, field;
  logic        ser_ready, ser_busy, ser_load;
  logic [8:0]  ser_data;
  logic [3:0]  ser_nbits;

  usart_fifo #(.WIDTH(8), .DEPTH(BUF_DEPTH)) u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (push),
    .din   (push_data),
    .pop   (pop),
    .head  (head),
    .full  (tx_full),
    .empty (tx_empty),
    .count (count)
  );

  crc16 u_crc (
    .clk   (clk),
    .rst_n (rst_n),
    .init  (crc_init),
    .upd   (crc_upd),
    .data  (head),
    .nbits (dlen_bits(ctrl.dlen)),
    .crc   (crc)
  );

  crc_select u_sel (
    .mode      (ctrl.crc_mode),
    .crc_calc  (crc),
    .sync_char (sync_char),
    .field     (field)
  );

  tx_controller u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .ctrl       (ctrl),
    .sync_char  (sync_char),
    .dest_addr  (dest_addr),
    .start      (start),
    .rx_busy    (rx_busy),
    .fifo_head  (head),
    .fifo_count (count),
    .fifo_pop   (pop),
    .crc_init   (crc_init),
    .crc_upd    (crc_upd),
    .crc_field  (field),
    .ser_ready  (ser_ready),
    .ser_busy   (ser_busy),
    .ser_load   (ser_load),
    .ser_data   (ser_data),
    .ser_nbits  (ser_nbits),
    .tx_busy    (tx_busy),
    .tx_done    (tx_done)
  );

  tx_serializer u_ser (
    .clk       (clk),
    .rst_n     (rst_n),
    .tick      (tick),
    .sync_mode (ctrl.sync_mode),
    .stop2     (ctrl.stop2),
    .load      (ser_load),
    .data      (ser_data),
    .nbits     (ser_nbits),
    .ready     (ser_ready),
    .busy      (ser_busy),
    .txd       (txd),
    .tx_clk    (tx_clk)
  );

endmodule
