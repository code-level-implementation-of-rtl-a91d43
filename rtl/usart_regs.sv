// usart_regs: processor interface ("glue logic") and register file of the
// control logic.
//
// The processor bus is synchronous to clk: cs selects the USART, wr_p and
// rd_p are one-cycle strobes, addr picks a 16-bit register (usart_pkg,
// reg_addr_e). A write to TXDATA pushes wdata[7:0] into the TX buffer; a
// read of RXDATA returns the oldest received character and pops it. Read
// data appear on rdata one cycle after the strobe.
//   CONTROL  16-bit control register (ctrl_t), reset CTRL_RESET
//   SYNC     sync character, reset 8'hE7
//   STATUS   16-bit status register (status_t): bits 5:0 show levels, bits
//            15:6 are sticky events set by the transmitter and receiver and
//            cleared by writing 1
//   INTCTRL  [15] global interrupt enable, [14:0] per-bit mask of STATUS
//   OWNADDR / DSTADDR  8-bit own and destination addresses
//   COMMAND  writing bit 0 requests transmission of one block
// irq = INTCTRL[15] & |(STATUS[14:0] & INTCTRL[14:0]).
// The control, sync and 16-bit status registers, the interrupt with global
// masking and the 8-bit addressing come from the document; the bit layout
// and the register map are this design's choices. The sync reset value is
// the one shown in the document's simulation waveforms.
module usart_regs
  import usart_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // processor bus
  input  logic        cs,
  input  logic        wr_p,
  input  logic        rd_p,
  input  logic [3:0]  addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        irq,
  // configuration
  output ctrl_t       ctrl,
  output logic [7:0]  sync_char,
  output logic [7:0]  own_addr,
  output logic [7:0]  dest_addr,
  // transmitter
  output logic        tx_push,
  output logic [7:0]  tx_data,
  output logic        tx_start,
  input  logic        tx_empty,
  input  logic        tx_full,
  input  logic        tx_busy,
  input  logic        tx_done,
  // receiver
  output logic        rx_pop,
  input  logic [7:0]  rx_head,
  input  logic        rx_empty,
  input  logic        rx_full,
  input  logic        rx_busy,
  input  rx_events_t  rx_ev
);

  logic        wr, rd;
  logic [15:0] sticky, set_bits, intctrl;
  status_t     status;

  assign wr = cs && wr_p;
  assign rd = cs && rd_p;

  assign tx_push  = wr && (addr == REG_TXDATA);
  assign tx_data  = wdata[7:0];
  assign tx_start = wr && (addr == REG_COMMAND) && wdata[0];
  assign rx_pop   = rd && (addr == REG_RXDATA);

  always_comb begin
    status             = status_t'(sticky);
    status.rx_busy     = rx_busy;
    status.tx_busy     = tx_busy;
    status.rx_full     = rx_full;
    status.rx_empty    = rx_empty;
    status.tx_full     = tx_full;
    status.tx_empty    = tx_empty;
  end

  always_comb begin
    set_bits = '0;
    set_bits[15] = rx_ev.addr_miss;
    set_bits[14] = rx_ev.rx_done;
    set_bits[13] = tx_done;
    set_bits[12] = rx_ev.addr_match;
    set_bits[11] = rx_ev.framing_err;
    set_bits[10] = rx_ev.overrun_err;
    set_bits[9]  = rx_ev.parity_err;
    set_bits[8]  = rx_ev.crc_err;
    set_bits[7]  = rx_ev.crc_match;
    set_bits[6]  = rx_ev.sync_match;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl      <= ctrl_t'(CTRL_RESET);
      sync_char <= SYNC_RESET;
      own_addr  <= '0;
      dest_addr <= '0;
      intctrl   <= '0;
      sticky    <= '0;
      rdata     <= '0;
    end else begin
      if (wr) begin
        unique case (addr)
          REG_CONTROL: ctrl      <= ctrl_t'(wdata);
          REG_SYNC:    sync_char <= wdata[7:0];
          REG_INTCTRL: intctrl   <= wdata;
          REG_OWNADDR: own_addr  <= wdata[7:0];
          REG_DSTADDR: dest_addr <= wdata[7:0];
          default: ;
        endcase
      end
      sticky <= ((wr && addr == REG_STATUS) ? (sticky & ~wdata) : sticky)
                & STATUS_STICKY | set_bits;
      if (rd) begin
        unique case (addr)
          REG_RXDATA:  rdata <= {8'h00, rx_head};
          REG_CONTROL: rdata <= ctrl;
          REG_SYNC:    rdata <= {8'h00, sync_char};
          REG_STATUS:  rdata <= status;
          REG_INTCTRL: rdata <= intctrl;
          REG_OWNADDR: rdata <= {8'h00, own_addr};
          REG_DSTADDR: rdata <= {8'h00, dest_addr};
          default:     rdata <= '0;
        endcase
      end
    end
  end

  assign irq = intctrl[15] && |(16'(status[14:0]) & {1'b0, intctrl[14:0]});

  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n)
                                 cs |-> !(wr_p && rd_p));

endmodule
