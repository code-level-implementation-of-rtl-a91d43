// rx_deserializer: receiver register, serial-to-parallel conversion.
//
// rx_in and rx_clk are first passed through two-flip-flop synchronizers.
//
// Synchronous mode: every rising edge of the received clock samples one bit.
// The bit enters the 8-bit receiver register shreg at the top (bits arrive
// least significant first), and shift_done pulses the cycle after, so that
// the sync comparator can check the register after every bit while the
// frame FSM is hunting (hunt high). Out of hunt, the bits are also gathered
// into characters of exp_bits bits each, counted from the first bit after
// the sync character; char_valid pulses with each complete character.
//
// Asynchronous mode: the line is watched on every 16x baud tick. A low level
// starts a character; it is checked again 8 ticks later (middle of the start
// bit), then exp_bits bits are sampled every 16 ticks, in the middle of each
// bit, then one or two stop bits. char_valid pulses after the last stop bit
// with framing_err set if a stop bit was low. A start bit that is high again
// at its middle is taken as a glitch and ignored.
//
// char_data holds the character's bits in line order (bit 0 first), with
// the bits above exp_bits at zero. exp_bits
// is set by the frame FSM: 8 for sync, address and CRC characters, the data
// length plus parity for data characters. The 16x oversampling and the
// mid-bit sampling are this design's choices.
module rx_deserializer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       tick,
  input  logic       sync_mode,
  input  logic       stop2,
  input  logic       rx_in,
  input  logic       rx_clk,
  input  logic       hunt,
  input  logic [3:0] exp_bits,
  output logic [7:0] shreg,
  output logic       shift_done,
  output logic       char_valid,
  output logic [8:0] char_data,
  output logic       framing_err
);

  typedef enum logic [1:0] {A_IDLE, A_START, A_DATA, A_STOP} astate_e;

  logic [1:0] rxd_s;
  logic [2:0] rclk_s;
  logic       bit_in, rise;
  astate_e    ast;
  logic [3:0] tcnt;
  logic [3:0] cnt;
  logic       scnt;
  logic       ferr;
  logic [8:0] cbuf, cbuf_n;

  assign bit_in = rxd_s[1];
  assign rise   = rclk_s[1] && !rclk_s[2];

  always_comb begin
    cbuf_n      = cbuf;
    cbuf_n[cnt] = bit_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxd_s  <= '1;
      rclk_s <= '0;
    end else begin
      rxd_s  <= {rxd_s[0], rx_in};
      rclk_s <= {rclk_s[1:0], rx_clk};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg       <= '0;
      shift_done  <= 1'b0;
      char_valid  <= 1'b0;
      char_data   <= '0;
      framing_err <= 1'b0;
      ast         <= A_IDLE;
      tcnt        <= '0;
      cnt         <= '0;
      scnt        <= 1'b0;
      ferr        <= 1'b0;
      cbuf        <= '0;
    end else begin
      shift_done  <= 1'b0;
      char_valid  <= 1'b0;
      if (!enable) begin
        ast  <= A_IDLE;
        cnt  <= '0;
        tcnt <= '0;
      end else if (sync_mode) begin
        ast <= A_IDLE;
        if (rise) begin
          shreg      <= {bit_in, shreg[7:1]};
          shift_done <= 1'b1;
          if (hunt) begin
            cnt  <= '0;
            cbuf <= '0;
          end else begin
            cbuf <= cbuf_n;
            if (cnt == exp_bits - 1'b1) begin
              cnt         <= '0;
              cbuf        <= '0;
              char_data   <= cbuf_n;
              framing_err <= 1'b0;
              char_valid  <= 1'b1;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
      end else if (tick) begin
        unique case (ast)
          A_IDLE:
            if (!bit_in) begin
              ast  <= A_START;
              tcnt <= '0;
            end
          A_START:
            if (tcnt == 4'd7) begin
              tcnt <= '0;
              cnt  <= '0;
              cbuf <= '0;
              ferr <= 1'b0;
              scnt <= 1'b0;
              ast  <= bit_in ? A_IDLE : A_DATA;
            end else begin
              tcnt <= tcnt + 1'b1;
            end
          A_DATA:
            if (tcnt == 4'd15) begin
              tcnt <= '0;
              cbuf <= cbuf_n;
              if (cnt == exp_bits - 1'b1) ast <= A_STOP;
              else                        cnt <= cnt + 1'b1;
            end else begin
              tcnt <= tcnt + 1'b1;
            end
          A_STOP:
            if (tcnt == 4'd15) begin
              tcnt <= '0;
              if (stop2 && !scnt) begin
                scnt <= 1'b1;
                ferr <= ferr | !bit_in;
              end else begin
                char_data   <= cbuf;
                framing_err <= ferr | !bit_in;
                char_valid  <= 1'b1;
                cnt         <= '0;
                ast         <= A_IDLE;
              end
            end else begin
              tcnt <= tcnt + 1'b1;
            end
          default: ast <= A_IDLE;
        endcase
      end
    end
  end

endmodule
