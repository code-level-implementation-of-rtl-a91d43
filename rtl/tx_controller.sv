// tx_controller: transmit frame sequencer (FSM4 of the transmitter).
//
// A start command is held pending until the TX buffer holds a whole block
// (blk_len_m1 + 1 characters) and, in half duplex, until the receiver is
// idle. The FSM then feeds the serializer one character each time it is
// ready:
//   SYNC   the sync register (8 bits)
//   ADDR   the destination address (8 bits), only if addr_en
//   DATA   blk_len characters popped from the TX buffer, each of dlen bits,
//          followed by a parity bit if par_en; each one also advances the
//          CRC over its dlen data bits
//   CRC_H  bits 15:8 of the check field chosen by crc_select
//   CRC_L  bits 7:0 of the check field
//   FLUSH  waits until the last bit has left the line, then pulses tx_done.
// The CRC is restarted when a frame begins. The order sync - data - CRC and
// the choice of check field follow the document; the address character, the
// block-length field and the start handshake are this design's choices.
// The control register is expected to stay unchanged during a frame.
module tx_controller
  import usart_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ctrl_t       ctrl,
  input  logic [7:0]  sync_char,
  input  logic [7:0]  dest_addr,
  input  logic        start,
  input  logic        rx_busy,
  // TX buffer
  input  logic [7:0]  fifo_head,
  input  logic [3:0]  fifo_count,
  output logic        fifo_pop,
  // CRC generator
  output logic        crc_init,
  output logic        crc_upd,
  input  logic [15:0] crc_field,
  // serializer
  input  logic        ser_ready,
  input  logic        ser_busy,
  output logic        ser_load,
  output logic [8:0]  ser_data,
  output logic [3:0]  ser_nbits,
  // status
  output logic        tx_busy,
  output logic        tx_done
);

  typedef enum logic [2:0] {
    S_IDLE, S_SYNC, S_ADDR, S_DATA, S_CRC_H, S_CRC_L, S_FLUSH
  } state_e;

  state_e     state;
  logic       pending;
  logic [2:0] dcnt;
  logic [3:0] nd;
  logic       can_start;

  assign nd        = dlen_bits(ctrl.dlen);
  assign can_start = pending && (fifo_count >= 4'(ctrl.blk_len_m1) + 4'd1)
                     && !(ctrl.half_dup && rx_busy);
  assign tx_busy   = (state != S_IDLE);

  // character handed to the serializer in the current state
  always_comb begin
    ser_load  = 1'b0;
    ser_data  = '0;
    ser_nbits = 4'd8;
    fifo_pop  = 1'b0;
    crc_upd   = 1'b0;
    crc_init  = (state == S_IDLE) && can_start;
    unique case (state)
      S_SYNC: begin
        ser_load = ser_ready;
        ser_data = {1'b0, sync_char};
      end
      S_ADDR: begin
        ser_load = ser_ready;
        ser_data = {1'b0, dest_addr};
      end
      S_DATA: begin
        ser_load  = ser_ready;
        fifo_pop  = ser_ready;
        crc_upd   = ser_ready;
        ser_nbits = nd + (ctrl.par_en ? 4'd1 : 4'd0);
        for (int i = 0; i < 8; i++)
          if (i < int'(nd)) ser_data[i] = fifo_head[i];
        if (ctrl.par_en)
          ser_data[nd] = parity_of(fifo_head, nd, ctrl.par_odd);
      end
      S_CRC_H: begin
        ser_load = ser_ready;
        ser_data = {1'b0, crc_field[15:8]};
      end
      S_CRC_L: begin
        ser_load = ser_ready;
        ser_data = {1'b0, crc_field[7:0]};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pending <= 1'b0;
      dcnt    <= '0;
      tx_done <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      if (start) pending <= 1'b1;
      unique case (state)
        S_IDLE:
          if (can_start) begin
            pending <= 1'b0;
            dcnt    <= '0;
            state   <= S_SYNC;
          end
        S_SYNC:
          if (ser_ready) state <= ctrl.addr_en ? S_ADDR : S_DATA;
        S_ADDR:
          if (ser_ready) state <= S_DATA;
        S_DATA:
          if (ser_ready) begin
            dcnt <= dcnt + 1'b1;
            if (dcnt == ctrl.blk_len_m1) state <= S_CRC_H;
          end
        S_CRC_H:
          if (ser_ready) state <= S_CRC_L;
        S_CRC_L:
          if (ser_ready) state <= S_FLUSH;
        S_FLUSH:
          if (!ser_busy && ser_ready) begin
            tx_done <= 1'b1;
            state   <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_pop_not_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                    fifo_pop |-> (fifo_count != '0));

endmodule
