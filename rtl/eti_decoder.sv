// eti_decoder: ETI decoder of one serial link.
//
// The line first passes the Hogge phase detector, whose rising-edge flop retimes
// it (phase decoding: both phases come out aligned to the rising edge). The
// decision bit detector judges the phase of the line's transitions over each
// word window; the retimed bits wait in a WL-1 stage buffer until that window has
// ended, and the bit-two inverter then restores every second bit of the words
// whose decision was set. Output: the decoded bit stream with a flag on the last
// bit of each word, for the deserializer.
//
// Word alignment: the link carries data and clock only, so the word counter is
// aligned by the common reset. With the encoder and serializer of this design the
// first bit of a word arrives on the line in the cycle in which a counter reset to
// WL-2 reads 0; RST_IDX sets that offset. The decoded bit k of a word leaves
// 2*WL-1 cycles after it was put on the line.
module eti_decoder #(
  parameter int unsigned WL      = eti_pkg::WL_DEFAULT,
  parameter int unsigned RST_IDX = WL - 2
) (
  input  logic clk,
  input  logic rst,
  input  logic din,
  output logic dout,
  output logic dout_last,
  output logic decision,
  output logic held,
  output logic conflict,
  output logic pd_down
);
  logic                  q1, up, buf_bit;
  logic [$clog2(WL)-1:0] idx;
  logic                  first, last;

  wl_indicator #(.WL(WL), .RST_IDX(RST_IDX)) u_wl (
    .clk, .rst, .idx, .first, .last
  );

  hogge_pd u_pd (
    .clk, .rst, .din, .q1, .up, .down(pd_down)
  );

  decision_detector u_det (
    .clk, .rst, .up, .last, .decision, .held, .conflict
  );

  eti_buffer #(.DEPTH(WL - 1)) u_buf (
    .clk, .rst, .din(q1), .dout(buf_bit)
  );

  // The window counter and the buffered bits share the same word phase.
  b2inv u_inv (
    .din(buf_bit), .second(idx[0]), .inv(decision), .dout
  );

  assign dout_last = last;
endmodule
