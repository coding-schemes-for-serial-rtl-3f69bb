// serializer: parallel-to-serial converter in front of the ETI encoder.
//
// Every WL cycles it takes one WL-bit word from data_in and shifts it out one
// bit per rising clock edge, most significant bit first (the first transmitted
// bit is b1 of the published notation). `ld` is high in the cycle whose rising
// edge takes data_in; the first bit of that word is on ser_bit in the next
// cycle, flagged by ser_first. The link never idles, so the source must present
// a word at every ld. After reset ld is high in the first cycle. The published scheme
// names the block only; the MSB-first order follows its examples, and the ld
// strobe, reset and lack of back-pressure are this design's choices.
module serializer #(
  parameter int unsigned WL = eti_pkg::WL_DEFAULT
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [WL-1:0] data_in,
  output logic          ld,
  output logic          ser_bit,
  output logic          ser_first
);
  logic [WL-1:0]         sr;
  logic [$clog2(WL)-1:0] idx;
  logic                  first, last;

  wl_indicator #(.WL(WL), .RST_IDX(WL - 1)) u_wl (
    .clk, .rst, .idx, .first, .last
  );

  always_ff @(posedge clk) begin
    if (rst)       sr <= '0;
    else if (last) sr <= data_in;
    else           sr <= {sr[WL-2:0], 1'b0};
  end

  assign ld        = last;
  assign ser_bit   = sr[WL-1];
  assign ser_first = first;
endmodule
