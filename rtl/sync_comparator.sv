// sync_comparator: detects the sync character.
//
// When strobe is high, the 8-bit pattern (the receiver register in
// synchronous mode, a received character in asynchronous mode) is compared
// with the sync register; sync_match pulses one cycle later if they are
// equal. The comparison is only made on strobe so that one received bit or
// character gives at most one match. The block and its SYNC_MATCH output
// follow the document's receiver diagram; the registered output is this
// design's choice.
module sync_comparator (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       strobe,
  input  logic [7:0] pattern,
  input  logic [7:0] sync_char,
  output logic       sync_match
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_match <= 1'b0;
    else        sync_match <= strobe && (pattern == sync_char);
  end

endmodule
