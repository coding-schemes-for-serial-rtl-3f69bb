// check_transition: counts the bit transitions of a serial data word and sets
// the ETI decision bit.
//
// A flop holds the previous bit; the XOR of the previous and the present bit is
// one transition, which an adder accumulates. The word-length indicator clears
// the count at the first bit of every word, so only the WL-1 transitions inside a
// word are counted. At the last bit the final count N_t is compared with the
// threshold N_th (NTH, half the word length) and `decision` is registered high
// when N_t >= N_th. It is then held for the following WL cycles, which is exactly
// when the buffered copy of that word reaches the inverter. `idx` tells the
// position of din in its word (WL indicator reset so that idx 0 lines up with the
// serializer's first bit). The counter, XOR and comparison follow the published scheme;
// the >= rule is the one its worked examples use, the decision timing is this
// design's choice.
module check_transition #(
  parameter int unsigned WL  = eti_pkg::WL_DEFAULT,
  parameter int unsigned NTH = eti_pkg::nth_of(WL)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  din,
  output logic                  decision,
  output logic [$clog2(WL):0]   nt,
  output logic [$clog2(WL)-1:0] idx
);
  localparam int unsigned CW = $clog2(WL) + 1;

  logic          prev, first, last;
  logic [CW-1:0] nt_next;

  wl_indicator #(.WL(WL), .RST_IDX(WL - 1)) u_wl (
    .clk, .rst, .idx, .first, .last
  );

  // Count including the present bit; the first bit of a word starts from zero.
  assign nt_next = first ? '0 : nt + CW'(din ^ prev);

  always_ff @(posedge clk) begin
    if (rst) begin
      prev     <= 1'b0;
      nt       <= '0;
      decision <= 1'b0;
    end else begin
      prev <= din;
      nt   <= nt_next;
      if (last) decision <= (nt_next >= CW'(NTH));
    end
  end
endmodule
