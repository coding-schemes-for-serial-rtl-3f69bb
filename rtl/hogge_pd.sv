// hogge_pd: Hogge phase detector at the receiving end of the ETI line.
//
// The classic Hogge structure: a rising-edge flop samples the line (q1), a
// falling-edge flop samples q1 (q2). up = line ^ q1 is high from a line
// transition until the next rising edge, so its width tells where the transition
// sat in the clock cycle: a full cycle for a transition at the rising edge (plain
// ETI word), half a cycle for one at the falling edge (encoded word).
// down = q1 ^ q2 is the half-cycle reference pulse that follows every transition.
// Because the line is stable at the rising edge in both phases, q1 is also the
// phase-decoded data: bit k of a word is on q1 one cycle after the cycle in which
// it was sent (whatever the phase). The published scheme names the detector; the circuit
// is the standard one.
module hogge_pd (
  input  logic clk,
  input  logic rst,
  input  logic din,
  output logic q1,
  output logic up,
  output logic down
);
  logic q2;

  always_ff @(posedge clk) begin
    if (rst) q1 <= 1'b0;
    else     q1 <= din;
  end

  always_ff @(negedge clk) begin
    if (rst) q2 <= 1'b0;
    else     q2 <= q1;
  end

  assign up   = din ^ q1;
  assign down = q1 ^ q2;
endmodule
