// eti_encoder: ETI encoder of one serial link.
//
// The serial word from the serializer enters the check transition block and the
// buffer at the same time. When the last bit has arrived, the check transition
// block sets the decision bit (N_t >= N_th); the buffered word then leaves the
// buffer, the bit-two inverter inverts every second bit if the decision is set,
// and the phase encoder sends the word either aligned with the rising clock edge
// (plain) or half a cycle later (encoded). Input: one bit per cycle, first bit of
// each word in the cycle after the serializer's ld, i.e. word positions counted
// from reset. Output: the line, WL+1 cycles after the matching input bit (plus
// half a cycle for encoded words), and the decision of the word on the line.
// The block structure is the published scheme's; the timing is this design's.
module eti_encoder #(
  parameter int unsigned WL  = eti_pkg::WL_DEFAULT,
  parameter int unsigned NTH = eti_pkg::nth_of(WL)
) (
  input  logic clk,
  input  logic rst,
  input  logic din,
  output logic dout,
  output logic decision
);
  logic                  dec, buf_bit, inv_bit;
  logic [$clog2(WL)-1:0] idx;
  logic [$clog2(WL):0]   nt;

  check_transition #(.WL(WL), .NTH(NTH)) u_check (
    .clk, .rst, .din, .decision(dec), .nt, .idx
  );

  eti_buffer #(.DEPTH(WL)) u_buf (
    .clk, .rst, .din, .dout(buf_bit)
  );

  // The buffer delays by exactly one word, so idx also gives the position of
  // buf_bit; odd positions are the second bit of a base.
  b2inv u_inv (
    .din(buf_bit), .second(idx[0]), .inv(dec), .dout(inv_bit)
  );

  phase_encoder u_phase (
    .clk, .rst, .din(inv_bit), .decision(dec), .dout, .sel(decision)
  );
endmodule
