// rx_controller: receive frame FSM, error detection and status events.
//
//   HUNT   waits for sync_match from the sync comparator; the CRC is
//          restarted and the frame begins
//   ADDR   (only if addr_en) the address character is compared with the
//          own address; on a mismatch the rest of the frame is still
//          followed, so that its data cannot be mistaken for a sync
//          character, but nothing is stored or reported except addr_miss
//   DATA   blk_len data characters: each one advances the CRC, has its
//          parity checked if par_en, and is pushed into the RX buffer;
//          a character that finds the buffer full is dropped and raises an
//          overrun error
//   CRC_H, CRC_L  the two check-field characters are compared with the
//          field expected from crc_select; crc_match or crc_err, then
//          rx_done, and back to HUNT.
// A stop-bit error reported by the deserializer raises framing_err.
// Every event is a one-cycle pulse in events, collected by the status
// register. hunt and exp_bits tell the deserializer what to do next.
// The gating of data into the RAM and of the CRC generator by the sync
// match follows the document's receiver diagram; the address handling,
// the block length and the event set are this design's choices.
module rx_controller
  import usart_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  ctrl_t       ctrl,
  input  logic [7:0]  own_addr,
  // deserializer / comparator
  input  logic        sync_match,
  input  logic        char_valid,
  input  logic [8:0]  char_data,
  input  logic        framing_err,
  output logic        hunt,
  output logic [3:0]  exp_bits,
  // CRC
  output logic        crc_init,
  output logic        crc_upd,
  input  logic [15:0] crc_field,
  // RX buffer
  input  logic        fifo_full,
  output logic        fifo_push,
  output logic [7:0]  fifo_data,
  // status
  output logic        rx_busy,
  output rx_events_t  events
);

  typedef enum logic [2:0] {R_HUNT, R_ADDR, R_DATA, R_CRC_H, R_CRC_L} state_e;

  state_e     state;
  logic [2:0] dcnt;
  logic       accept;
  logic [7:0] crc_hi;
  logic [3:0] nd;
  logic [7:0] dmask;
  logic       par_bad;

  assign nd       = dlen_bits(ctrl.dlen);
  assign hunt     = (state == R_HUNT);
  assign rx_busy  = !hunt;
  assign exp_bits = (state == R_DATA) ? nd + (ctrl.par_en ? 4'd1 : 4'd0) : 4'd8;

  always_comb begin
    dmask = '0;
    for (int i = 0; i < 8; i++)
      if (i < int'(nd)) dmask[i] = char_data[i];
  end

  assign par_bad   = ctrl.par_en && (char_data[nd] != parity_of(dmask, nd, ctrl.par_odd));
  assign fifo_data = dmask;
  assign crc_init  = enable && hunt && sync_match;
  assign crc_upd   = enable && (state == R_DATA) && char_valid;
  assign fifo_push = crc_upd && accept && !fifo_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= R_HUNT;
      dcnt   <= '0;
      accept <= 1'b0;
      crc_hi <= '0;
      events <= '0;
    end else begin
      events <= '0;
      if (!enable) begin
        state <= R_HUNT;
      end else begin
        if (char_valid && framing_err) events.framing_err <= 1'b1;
        unique case (state)
          R_HUNT:
            if (sync_match) begin
              events.sync_match <= 1'b1;
              dcnt   <= '0;
              accept <= 1'b1;
              state  <= ctrl.addr_en ? R_ADDR : R_DATA;
            end
          R_ADDR:
            if (char_valid) begin
              accept <= (char_data[7:0] == own_addr);
              if (char_data[7:0] == own_addr) events.addr_match <= 1'b1;
              else                            events.addr_miss  <= 1'b1;
              state <= R_DATA;
            end
          R_DATA:
            if (char_valid) begin
              if (accept && par_bad)   events.parity_err  <= 1'b1;
              if (accept && fifo_full) events.overrun_err <= 1'b1;
              dcnt <= dcnt + 1'b1;
              if (dcnt == ctrl.blk_len_m1) state <= R_CRC_H;
            end
          R_CRC_H:
            if (char_valid) begin
              crc_hi <= char_data[7:0];
              state  <= R_CRC_L;
            end
          R_CRC_L:
            if (char_valid) begin
              if (accept) begin
                events.rx_done <= 1'b1;
                if ({crc_hi, char_data[7:0]} == crc_field) events.crc_match <= 1'b1;
                else                                       events.crc_err   <= 1'b1;
              end
              state <= R_HUNT;
            end
          default: state <= R_HUNT;
        endcase
      end
    end
  end

endmodule
