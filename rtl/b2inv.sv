// b2inv: bit-two inverter of the ETI code.
//
// ETI works on two-bit bases b1 b2. When the decision bit is set only the second
// bit of each base is inverted (be1 = b1, be2 = ~b2), which maps 01->00, 10->11,
// 00->01 and 11->10 as the published scheme specifies. Inverting every second bit turns
// each transition of a word into a non-transition and back, so a word with N_t
// of its WL-1 possible transitions leaves with WL-1-N_t. The mapping is its own
// inverse, so the decoder uses the same block. Purely combinational: `second`
// comes from the word-length indicator (odd bit positions), `inv` is the decision.
module b2inv (
  input  logic din,
  input  logic second,
  input  logic inv,
  output logic dout
);
  assign dout = din ^ (inv & second);
endmodule
