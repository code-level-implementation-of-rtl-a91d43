// crc16: 16-bit CRC generator, a linear feedback shift register.
//
// The register is the LFSR of x^16 + x^12 + x^5 + 1 (CRC_POLY), loaded
// with CRC_INIT (all ones) on init. On upd it advances over the low nbits
// bits of data, least significant bit first, which is the order the bits go
// on the line; the nbits single-bit LFSR steps are unrolled into one clock
// cycle so that a whole character is absorbed at once. Each step is
//   fb = crc[15] ^ bit;  crc = {crc[14:0], 0} ^ (fb ? CRC_POLY : 0).
// The transmitter and the receiver use the same block, so they agree as long
// as both see the same data bits. The document asks for a 16-bit CRC built
// from an LFSR; the polynomial and initial value are this design's choice.
module crc16
  import usart_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        upd,
  input  logic [7:0]  data,
  input  logic [3:0]  nbits,
  output logic [15:0] crc
);

  function automatic logic [15:0] step(input logic [15:0] c, input logic b);
    logic fb;
    fb = c[15] ^ b;
    return {c[14:0], 1'b0} ^ (fb ? CRC_POLY : 16'h0000);
  endfunction

  logic [15:0] nxt;
  always_comb begin
    nxt = crc;
    for (int i = 0; i < 8; i++)
      if (i < int'(nbits)) nxt = step(nxt, data[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    crc <= CRC_INIT;
    else if (init) crc <= CRC_INIT;
    else if (upd)  crc <= nxt;
  end

endmodule
