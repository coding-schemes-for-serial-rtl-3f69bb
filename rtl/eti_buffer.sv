// eti_buffer: serial data buffer of the ETI encoder and decoder.
//
// A DEPTH-stage shift register: dout is din delayed by DEPTH rising clock edges.
// In the encoder it keeps each bit until the check transition block has seen the
// whole word and set the decision bit (DEPTH = WL); in the decoder it keeps the
// received bits until the decision bit detector has seen the whole word
// (DEPTH = WL - 1). The published scheme states the buffer's purpose; the shift-register
// form and the depths are this design's.
module eti_buffer #(
  parameter int unsigned DEPTH = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic din,
  output logic dout
);
  logic [DEPTH-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst) sr <= '0;
    else     sr <= (DEPTH > 1) ? {sr[DEPTH-2:0], din} : DEPTH'(din);
  end

  assign dout = sr[DEPTH-1];
endmodule
