// wl_indicator: word-length indicator.
//
// A modulo-WL counter that tells every bit-serial block which position of the
// current data word is on its input. `first` is high at the first bit of a word
// (it clears the transition adder and the previous-bit flop of the check
// transition block), `last` at the last bit. The counter is loaded with RST_IDX
// during reset and advances once per rising clock edge, so idx in the n-th cycle
// after reset is (RST_IDX + n) mod WL. Blocks further down the pipeline use a
// different RST_IDX to follow the same word with a fixed delay; that reset-based
// alignment is this design's choice, the published scheme describes only the counter.
module wl_indicator #(
  parameter int unsigned WL      = eti_pkg::WL_DEFAULT,
  parameter int unsigned RST_IDX = WL - 1
) (
  input  logic                  clk,
  input  logic                  rst,   // synchronous, active high
  output logic [$clog2(WL)-1:0] idx,
  output logic                  first,
  output logic                  last
);
  localparam int unsigned IW = $clog2(WL);
  localparam logic [IW-1:0] LAST_IDX = IW'(WL - 1);
  localparam logic [IW-1:0] RST_VAL  = IW'(RST_IDX);

  initial begin
    assert (WL >= 2) else $error("WL must be at least 2");
    assert (RST_IDX < WL) else $error("RST_IDX must be below WL");
  end

  always_ff @(posedge clk) begin
    if (rst)                idx <= RST_VAL;
    else if (idx == LAST_IDX) idx <= '0;
    else                    idx <= idx + 1'b1;
  end

  assign first = (idx == '0);
  assign last  = (idx == LAST_IDX);
endmodule
