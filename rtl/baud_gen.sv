// baud_gen: baud rate generator.
//
// Produces a one-cycle enable, tick, at OVERSAMPLE (16) times the baud rate
// chosen by sel = {S0,S1,S2}: 115200, 57600, 38400, 19200, 9600, 4800, 1200
// or 300 baud, the eight settings of the document's selection table. The
// divisor for each setting is worked out at elaboration as
// round(CLK_HZ / (16 * baud)), at least 1, so the generator is a single
// down-counter that reloads with the selected divisor. Changing sel restarts
// the count. The system clock frequency is this design's assumption
// (50 MHz); the document does not give it.
module baud_gen
  import usart_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] sel,
  output logic       tick
);

  localparam int unsigned CNT_W = 32;

  function automatic logic [CNT_W-1:0] divisor(input logic [2:0] idx);
    longint unsigned d;
    d = (longint'(CLK_HZ) + longint'(BAUD_TABLE[idx]) * OVERSAMPLE / 2)
        / (longint'(BAUD_TABLE[idx]) * OVERSAMPLE);
    if (d < 1) d = 1;
    return CNT_W'(d);
  endfunction

  logic [CNT_W-1:0] div_tab [NUM_BAUD];
  always_comb
    for (int i = 0; i < NUM_BAUD; i++) div_tab[i] = divisor(3'(i));

  logic [CNT_W-1:0] cnt;
  logic [2:0]       sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      sel_q <= '0;
      tick  <= 1'b0;
    end else begin
      sel_q <= sel;
      tick  <= 1'b0;
      if (sel != sel_q) begin
        cnt <= div_tab[sel] - 1'b1;
      end else if (cnt == '0) begin
        cnt  <= div_tab[sel] - 1'b1;
        tick <= 1'b1;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

endmodule
