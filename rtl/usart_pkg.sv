// usart_pkg: types and constants shared by the USART modules.
//
// Holds the layout of the 16-bit control register, the 16-bit status
// register, the processor register map, the baud rates selected by S0..S2
// and the CRC polynomial. The baud table and the sync reset value follow the
// document; the register bit positions, the register map and the CRC
// polynomial are this design's own choices, because the document does not
// give them.
package usart_pkg;

  // ---------------------------------------------------------------- baud rates
  // Selection S0 S1 S2 -> rate; index = {S0,S1,S2}.
  localparam int unsigned NUM_BAUD = 8;
  localparam int unsigned BAUD_TABLE [NUM_BAUD] = '{
    115200, 57600, 38400, 19200, 9600, 4800, 1200, 300
  };
  // Oversampling factor: one bit lasts OVERSAMPLE ticks of the baud generator.
  localparam int unsigned OVERSAMPLE = 16;

  // ---------------------------------------------------------------- framing
  localparam logic [7:0]  SYNC_RESET  = 8'hE7;       // 1110_0111
  localparam logic [15:0] CRC_POLY    = 16'h1021;    // x^16 + x^12 + x^5 + 1
  localparam logic [15:0] CRC_INIT    = 16'hFFFF;
  localparam int unsigned BUF_DEPTH   = 8;           // eight-level buffers

  typedef enum logic [1:0] {
    CRC_CALC  = 2'b00,   // calculated CRC-16
    CRC_ONES  = 2'b01,   // all 1's
    CRC_ZEROS = 2'b10,   // all 0's
    CRC_SYNC  = 2'b11    // sync byte twice
  } crc_mode_e;

  // ---------------------------------------------------------------- control
  // 16-bit control register, MSB first.
  typedef struct packed {
    logic [2:0] blk_len_m1;  // [15:13] block length - 1 (1..8 data characters)
    logic       addr_en;     // [12]    address character after sync
    crc_mode_e  crc_mode;    // [11:10] check field
    logic [2:0] baud_sel;    // [9:7]   {S0,S1,S2}
    logic [1:0] dlen;        // [6:5]   data length: 0=5 .. 3=8 bits
    logic       stop2;       // [4]     two stop bits (asynchronous)
    logic       par_odd;     // [3]     odd parity
    logic       par_en;      // [2]     parity bit after every data character
    logic       half_dup;    // [1]     half duplex
    logic       sync_mode;   // [0]     1 = synchronous, 0 = asynchronous
  } ctrl_t;

  // sync mode, 8 data bits, 115200 baud, calculated CRC, block of 8
  localparam logic [15:0] CTRL_RESET = 16'hE061;

  // ---------------------------------------------------------------- status
  typedef struct packed {
    logic addr_miss;   // [15] frame for another address discarded   (sticky)
    logic rx_done;     // [14] frame received                        (sticky)
    logic tx_done;     // [13] frame sent                            (sticky)
    logic addr_match;  // [12] own address seen                      (sticky)
    logic framing_err; // [11] stop bit low (asynchronous)           (sticky)
    logic overrun_err; // [10] data lost, RX buffer full             (sticky)
    logic parity_err;  // [9]  parity mismatch                       (sticky)
    logic crc_err;     // [8]  check field mismatch                  (sticky)
    logic crc_match;   // [7]  check field match                     (sticky)
    logic sync_match;  // [6]  sync character found                  (sticky)
    logic rx_busy;     // [5]  receiving a frame                     (level)
    logic tx_busy;     // [4]  sending a frame                       (level)
    logic rx_full;     // [3]                                        (level)
    logic rx_empty;    // [2]                                        (level)
    logic tx_full;     // [1]                                        (level)
    logic tx_empty;    // [0]                                        (level)
  } status_t;

  localparam logic [15:0] STATUS_STICKY = 16'hFFC0;

  // Receiver events, one-cycle pulses.
  typedef struct packed {
    logic addr_miss;
    logic rx_done;
    logic addr_match;
    logic framing_err;
    logic overrun_err;
    logic parity_err;
    logic crc_err;
    logic crc_match;
    logic sync_match;
  } rx_events_t;

  // ---------------------------------------------------------------- registers
  typedef enum logic [3:0] {
    REG_TXDATA  = 4'h0,  // W: push a data character into the TX buffer
    REG_RXDATA  = 4'h1,  // R: pop a data character from the RX buffer
    REG_CONTROL = 4'h2,  // R/W
    REG_SYNC    = 4'h3,  // R/W sync character
    REG_STATUS  = 4'h4,  // R; W: 1 clears a sticky bit
    REG_INTCTRL = 4'h5,  // R/W [15] global enable, [14:0] source mask
    REG_OWNADDR = 4'h6,  // R/W own device address
    REG_DSTADDR = 4'h7,  // R/W destination address sent in frames
    REG_COMMAND = 4'h8   // W: [0] start transmission of one block
  } reg_addr_e;

  // Number of data bits for a dlen code.
  function automatic logic [3:0] dlen_bits(input logic [1:0] code);
    return 4'd5 + 4'(code);
  endfunction

  // Parity bit over the low n bits of d.
  function automatic logic parity_of(input logic [7:0] d, input logic [3:0] n,
                                     input logic odd);
    logic p;
    p = odd;
    for (int i = 0; i < 8; i++)
      if (i < int'(n)) p ^= d[i];
    return p;
  endfunction

endpackage
