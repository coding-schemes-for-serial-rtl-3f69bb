// phase_encoder: embeds the decision bit in the phase of the line.
//
// The coded bit is registered on the rising clock edge (dpre); a second register
// copies dpre on the falling edge, half a clock cycle later. For a plain word the
// line is driven from dpre, so its transitions line up with the rising edge; for
// an encoded (inverted) word it is driven from the falling-edge copy, so every
// transition of the word comes half a cycle late. No extra bit is sent. `sel`, the
// decision registered together with the bit, chooses the source; it changes only
// at a rising edge, where both registers hold the same value, so switching
// between phases does not put a glitch on the line. Latency: one cycle for plain
// words, one and a half for encoded words. The two phases follow the published scheme's
// timing diagrams; the register-and-select circuit is this design's.
module phase_encoder (
  input  logic clk,
  input  logic rst,
  input  logic din,
  input  logic decision,
  output logic dout,
  output logic sel
);
  logic dpre, dhalf;

  always_ff @(posedge clk) begin
    if (rst) begin
      dpre <= 1'b0;
      sel  <= 1'b0;
    end else begin
      dpre <= din;
      sel  <= decision;
    end
  end

  // Falling-edge copy: the half-cycle delayed version of dpre.
  always_ff @(negedge clk) begin
    if (rst) dhalf <= 1'b0;
    else     dhalf <= dpre;
  end

  assign dout = sel ? dhalf : dpre;
endmodule
