// deserializer: serial-to-parallel converter after the ETI decoder.
//
// Shifts in one decoded bit per rising clock edge, first bit into the MSB, and
// when `last` marks the final bit of a word, registers the complete word on
// data_out with `valid` high for one cycle. The first SKIP words after reset are
// the pipeline's reset contents and are not flagged valid. The published scheme names the
// block only; the bit order follows its examples, SKIP and valid are this
// design's choices.
module deserializer #(
  parameter int unsigned WL   = eti_pkg::WL_DEFAULT,
  parameter int unsigned SKIP = 3
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          din,
  input  logic          last,
  output logic [WL-1:0] data_out,
  output logic          valid
);
  localparam int unsigned SW = (SKIP > 0) ? $clog2(SKIP + 1) : 1;

  logic [WL-2:0] sr;
  logic [SW-1:0] skip_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr       <= '0;
      data_out <= '0;
      valid    <= 1'b0;
      skip_cnt <= SW'(SKIP);
    end else begin
      sr    <= {sr[WL-3:0], din};
      valid <= 1'b0;
      if (last) begin
        data_out <= {sr, din};
        if (skip_cnt == '0) valid    <= 1'b1;
        else                skip_cnt <= skip_cnt - 1'b1;
      end
    end
  end
endmodule
