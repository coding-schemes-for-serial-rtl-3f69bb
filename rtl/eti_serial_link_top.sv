// eti_serial_link_top: n/m ETI serial links, end to end.
//
// NBITS parallel input bits are split into NBITS/WL groups of WL bits (degree of
// multiplexing m = WL). Each group has its own link: serializer -> ETI encoder ->
// one serial line, sent together with the clock -> ETI decoder -> deserializer.
// The ETI code keeps the number of line transitions low: a word with at least
// WL/2 bit transitions has every second bit inverted, and instead of sending an
// extra flag bit the encoder shifts such a word half a clock cycle late on the
// line; the receiver's Hogge phase detector sees the shift and undoes the
// inversion. The main configuration is one 8-bit link (NBITS = WL = 8).
//
// Interface: data_in is taken at the end of every cycle in which `ld` is high,
// once every WL cycles, starting with the first cycle after reset. The decoded
// word appears on data_out with out_valid high 3*WL+2 cycles after its ld cycle
// (26 cycles for WL = 8). `line` and `enc_decision` show each serial line and
// the decision bit of the word on it, `pd_down` each detector's reference pulse;
// rx_decision is the decision each receiver recovered for its last window and
// rx_held says that window had no transition, so the decision was carried over.
// Both clock edges are used: the falling edge carries the half-cycle phase shift.
// Reset is synchronous, active high, and aligns the word counters of both ends.
// Known limit of the code: a word whose line window has no transition at all
// carries no phase; the receiver then reuses the previous word's decision, which
// is wrong when the decisions differ.
module eti_serial_link_top #(
  parameter int unsigned NBITS = 8,
  parameter int unsigned WL    = eti_pkg::WL_DEFAULT,
  parameter int unsigned NTH   = eti_pkg::nth_of(WL)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [NBITS-1:0]    data_in,
  output logic                ld,
  output logic [NBITS/WL-1:0] line,
  output logic [NBITS/WL-1:0] enc_decision,
  output logic [NBITS/WL-1:0] pd_down,
  output logic [NBITS/WL-1:0] rx_decision,
  output logic [NBITS/WL-1:0] rx_held,
  output logic [NBITS-1:0]    data_out,
  output logic                out_valid
);
  localparam int unsigned LINKS = NBITS / WL;

  initial begin
    assert (NBITS % WL == 0) else $error("NBITS must be a multiple of WL");
  end

  logic [LINKS-1:0] ld_l, valid_l;

  for (genvar g = 0; g < LINKS; g++) begin : g_link
    logic ser_bit, ser_first, dec_bit, dec_last;
    logic dec_decision, dec_held, dec_conflict;
    logic unused_first;
    assign unused_first = ser_first;

    serializer #(.WL(WL)) u_ser (
      .clk, .rst,
      .data_in(data_in[g*WL +: WL]),
      .ld(ld_l[g]), .ser_bit, .ser_first
    );

    eti_encoder #(.WL(WL), .NTH(NTH)) u_enc (
      .clk, .rst, .din(ser_bit), .dout(line[g]), .decision(enc_decision[g])
    );

    eti_decoder #(.WL(WL)) u_dec (
      .clk, .rst, .din(line[g]), .dout(dec_bit), .dout_last(dec_last),
      .decision(dec_decision), .held(dec_held), .conflict(dec_conflict),
      .pd_down(pd_down[g])
    );

    deserializer #(.WL(WL)) u_des (
      .clk, .rst, .din(dec_bit), .last(dec_last),
      .data_out(data_out[g*WL +: WL]), .valid(valid_l[g])
    );

    // With both ends locked to one clock and reset, a receive window never mixes
    // transitions of both phases.
    assert property (@(posedge clk) disable iff (rst) !dec_conflict)
      else $error("link %0d: receive window with both phases", g);

    assign rx_decision[g] = dec_decision;
    assign rx_held[g]     = dec_held;
  end

  // All links share the clock and reset, so their strobes coincide.
  assign ld        = ld_l[0];
  assign out_valid = valid_l[0];
endmodule
