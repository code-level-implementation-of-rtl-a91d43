// usart_fifo: eight-level character buffer built around dp_ram.
//
// The write side (push) plays the role of the transmitter's FSM1, which
// stores processor data at the write address; the read side (pop) that of
// FSM3, which hands the oldest entry to the frame logic. Write and read
// pointers run modulo DEPTH and a count gives the full and empty flags.
// head shows the oldest entry combinationally whenever empty is low. A push
// while full and a pop while empty are ignored; the flags let the user see
// that, and the receiver turns a push into a full buffer into an overrun
// error. Push and pop in the same cycle are both served.
module usart_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] head,
  output logic             full,
  output logic             empty,
  output logic [CW-1:0]    count
);

  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_push, do_pop;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  dp_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_ram (
    .clk    (clk),
    .we_a   (do_push),
    .addr_a (wr_ptr),
    .din_a  (din),
    .addr_b (rd_ptr),
    .dout_b (head)
  );

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  count <= CW'(DEPTH));

endmodule
