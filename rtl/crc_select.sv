// crc_select: choice of the 16-bit check field that closes a frame.
//
// The control register picks one of four sources, the four CRC blocks of
// the transmitter diagram: the calculated CRC-16, all 1's, all 0's, or the
// sync character sent twice ("CRC is Sync"). The transmitter sends the
// selected field; the receiver computes the field it expects through the
// same block and compares. Purely combinational. The four choices follow
// the document; the exact meaning of "CRC is Sync" as {sync, sync} is this
// design's reading.
module crc_select
  import usart_pkg::*;
(
  input  crc_mode_e   mode,
  input  logic [15:0] crc_calc,
  input  logic [7:0]  sync_char,
  output logic [15:0] field
);

  always_comb begin
    unique case (mode)
      CRC_CALC:  field = crc_calc;
      CRC_ONES:  field = 16'hFFFF;
      CRC_ZEROS: field = 16'h0000;
      CRC_SYNC:  field = {sync_char, sync_char};
      default:   field = crc_calc;
    endcase
  end

endmodule
