// tx_serializer: parallel-to-serial shift register and transmitter line
// logic.
//
// A free-running 4-bit phase counter, advanced by the 16x baud tick, cuts
// time into bit periods of 16 ticks; a bit period starts when the phase
// wraps from 15 to 0. On load the controller hands over one character,
// data[nbits-1:0] (up to 9 bits: 8 data bits and a parity bit), and the
// serializer expands it into the line sequence:
//   synchronous mode:  the nbits bits, least significant first;
//   asynchronous mode: start bit 0, the nbits bits, one or two stop bits 1.
// Each bit is driven on txd at the start of a bit period. ready is high when
// the shift register is empty, which happens right after the last bit of a
// character has started; a character loaded then starts at the next bit
// period, so the characters of a frame follow each other without a gap, as
// the synchronous receiver needs. busy stays high until the last bit period
// has ended. The line idles high.
// In synchronous mode tx_clk is the bit clock sent with the data: low in the
// first half of a bit period and high in the second, so the receiver samples
// on its rising edge in the middle of the bit. In asynchronous mode tx_clk
// stays low.
// The document names an 8-bit synchronous parallel-serial shift register
// and a transmitter logic; the start/stop expansion and the clock phase are
// this design's choices.
module tx_serializer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       sync_mode,
  input  logic       stop2,
  input  logic       load,
  input  logic [8:0] data,
  input  logic [3:0] nbits,
  output logic       ready,
  output logic       busy,
  output logic       txd,
  output logic       tx_clk
);

  logic [3:0]  ph;
  logic [11:0] sh;
  logic [3:0]  left;
  logic        in_bit;
  logic        boundary;

  logic [11:0] seq;
  logic [3:0]  seq_len;

  always_comb begin
    seq     = '1;
    seq_len = nbits;
    if (sync_mode) begin
      for (int i = 0; i < 9; i++)
        if (i < int'(nbits)) seq[i] = data[i];
    end else begin
      seq[0] = 1'b0;
      for (int i = 0; i < 9; i++)
        if (i < int'(nbits)) seq[i+1] = data[i];
      seq_len = nbits + (stop2 ? 4'd3 : 4'd2);
    end
  end

  assign boundary = tick && (ph == 4'd15);
  assign ready    = (left == '0);
  assign busy     = (left != '0) || in_bit;
  assign tx_clk   = sync_mode && ph[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph     <= '0;
      sh     <= '1;
      left   <= '0;
      in_bit <= 1'b0;
      txd    <= 1'b1;
    end else begin
      if (tick) ph <= ph + 1'b1;
      if (load) begin
        if (boundary) begin
          txd    <= seq[0];
          sh     <= {1'b1, seq[11:1]};
          left   <= seq_len - 1'b1;
          in_bit <= 1'b1;
        end else begin
          sh     <= seq;
          left   <= seq_len;
        end
      end else if (boundary) begin
        if (left != '0) begin
          txd    <= sh[0];
          sh     <= {1'b1, sh[11:1]};
          left   <= left - 1'b1;
          in_bit <= 1'b1;
        end else begin
          txd    <= 1'b1;
          in_bit <= 1'b0;
        end
      end
    end
  end

  a_load_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                      load |-> ready);
  a_nbits_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  load |-> (nbits >= 4'd1 && nbits <= 4'd9));

endmodule
