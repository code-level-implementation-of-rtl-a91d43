// dp_ram: simple dual-port RAM, the temporary storage of the TX and RX
// buffers.
//
// Port A writes (we_a, addr_a, din_a) on the rising clock edge; port B reads
// asynchronously (addr_b -> dout_b), as a small distributed RAM does. DEPTH
// defaults to the eight levels of the document's buffers and WIDTH to one
// 8-bit character. There is no reset: the buffer controller never reads an
// entry it has not written.
module dp_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] din_a,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] dout_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we_a) mem[addr_a] <= din_a;

  assign dout_b = mem[addr_b];

endmodule
